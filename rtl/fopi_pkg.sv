// fopi_pkg: constants, types and coefficient functions shared by the
// fractional-order PI (FO-PI) speed controller.
//
// The controller evaluates the 10th-order difference equation
//   c(k) = sum_{i=0..10} a_i*e(k-i) - sum_{i=1..10} b_i*c(k-i)
// obtained from Kp*(1 + Ki/s^mu) (Kp = 0.09, Ki = 7.85, mu = 0.7371) by
// recursive-Tustin discretisation at T = 15 ms. Every coefficient of the
// published table is an exact multiple of 2^-17, so the table is held here
// as integers in units of 2^-17 (the "Q17" value). From it the functions
// below derive the coefficient word for either number representation:
//   FMT_FXP : signed fixed point with FRAC fractional bits (the reference
//             configuration is a 32-bit word with 15 integer bits, FRAC = 17,
//             which reproduces the table exactly);
//   FMT_INT : plain integers after multiplying by a decimal scale S
//             (10^2 .. 10^7), rounded to nearest, halves away from zero.
// b_1 is taken as -0.722198486328125: the table's signs alternate from b_1
// on, and a negative b_1 (about -mu) is what the recursive Tustin
// expansion produces.
package fopi_pkg;

  localparam int NA = 11;          // a_0 .. a_10
  localparam int NB = 10;          // b_1 .. b_10
  localparam int NCOEF = NA + NB;  // 21 products per sample
  localparam int QBITS = 17;       // table resolution: 2^-17

  typedef enum logic [0:0] {
    FMT_FXP = 1'b0,   // fixed point, FRAC fractional bits
    FMT_INT = 1'b1    // integer, coefficients scaled by a decimal factor
  } fmt_e;

  typedef enum logic [0:0] {
    ARCH_SEQ = 1'b0,  // one shared pipelined multiplier (time multiplexed)
    ARCH_PAR = 1'b1   // one multiplier per coefficient
  } arch_e;

  // Coefficient i in units of 2^-17. i = 0..10 -> a_i, i = 11..20 -> b_(i-10).
  function automatic longint coef_q17(input int i);
    case (i)
      0:  return  64'sd13253;   // a0  =  0.10111236572265625
      1:  return -64'sd6006;    // a1  = -0.0458221435546875
      2:  return -64'sd3227;    // a2  = -0.02462005615234375
      3:  return  64'sd505;     // a3  =  0.00385284423828125
      4:  return -64'sd982;     // a4  = -0.0074920654296875
      5:  return  64'sd303;     // a5  =  0.00231170654296875
      6:  return -64'sd576;     // a6  = -0.00439453125
      7:  return  64'sd223;     // a7  =  0.00170135498046875
      8:  return -64'sd426;     // a8  = -0.0032501220703125
      9:  return  64'sd185;     // a9  =  0.00141143798828125
      10: return -64'sd409;     // a10 = -0.00312042236328125
      11: return -64'sd94660;   // b1  = -0.722198486328125
      12: return  64'sd31916;   // b2  =  0.243499755859375
      13: return -64'sd7954;    // b3  = -0.0606842041015625
      14: return  64'sd9708;    // b4  =  0.074066162109375
      15: return -64'sd4779;    // b5  = -0.03646087646484375
      16: return  64'sd5693;    // b6  =  0.04343414306640625
      17: return -64'sd3508;    // b7  = -0.026763916015625
      18: return  64'sd4212;    // b8  =  0.032135009765625
      19: return -64'sd2922;    // b9  = -0.0222930908203125
      20: return  64'sd4046;    // b10 =  0.0308685302734375
      default: return 64'sd0;
    endcase
  endfunction

  // Divide by a positive d, rounding to nearest with halves away from zero.
  function automatic longint div_round(input longint n, input longint d);
    if (n >= 0) return (n + d / 2) / d;
    else        return -((-n + d / 2) / d);
  endfunction

  // Coefficient word for the selected representation.
  function automatic longint coef_word(input fmt_e fmt, input int frac,
                                       input longint scale, input int i);
    longint q;
    q = coef_q17(i);
    if (fmt == FMT_INT)
      return div_round(q * scale, 64'sd1 << QBITS);
    else if (frac >= QBITS)
      return q <<< (frac - QBITS);
    else
      return div_round(q, 64'sd1 << (QBITS - frac));
  endfunction

  // Number of bits needed to count 0 .. n-1 (at least 1).
  function automatic int clog2_min1(input longint n);
    int b;
    b = 1;
    while ((64'sd1 << b) < n) b++;
    return b;
  endfunction

endpackage
