// tb_fopi_ref.svh: reference model of the FO-PI controller for the
// testbenches, included inside a testbench module. It starts from the
// coefficient values as real numbers and computes in 64-bit integers, so
// it shares no code with the RTL. Valid while sums stay within 64 bits,
// which holds for speed errors of a few thousand rpm.

// a_0..a_10 then b_1..b_10 of the discretised controller
function automatic real tb_coef(input int i);
  real t [21] = '{ 0.10111236572265625, -0.0458221435546875, -0.02462005615234375,
                   0.00385284423828125, -0.0074920654296875,  0.00231170654296875,
                  -0.00439453125,        0.00170135498046875, -0.0032501220703125,
                   0.00141143798828125, -0.00312042236328125,
                  -0.722198486328125,    0.243499755859375,   -0.0606842041015625,
                   0.074066162109375,   -0.03646087646484375,  0.04343414306640625,
                  -0.026763916015625,    0.032135009765625,   -0.0222930908203125,
                   0.0308685302734375 };
  return t[i];
endfunction

function automatic longint tb_round(input real x);
  if (x >= 0.0) return longint'($floor(x + 0.5));
  else          return -longint'($floor(-x + 0.5));
endfunction

// coefficient word: fixed point with frac bits, or integer scaled by scale
function automatic longint tb_coef_word(input bit is_int, input int frac,
                                        input longint scale, input int i);
  if (is_int) return tb_round(tb_coef(i) * real'(scale));
  else        return tb_round(tb_coef(i) * (2.0 ** frac));
endfunction

function automatic longint tb_sat(input longint v, input int w);
  longint hi, lo;
  hi = (64'sd1 <<< (w - 1)) - 1;
  lo = -hi - 1;
  if (v > hi) return hi;
  if (v < lo) return lo;
  return v;
endfunction

class fopi_model;
  bit     is_int;
  int     w, frac;
  longint scale;
  longint e [11];
  longint c [10];
  longint last_acc;

  function new(input bit is_int_i, input int w_i, input int frac_i, input longint scale_i);
    is_int = is_int_i; w = w_i; frac = frac_i; scale = scale_i;
    foreach (e[i]) e[i] = 0;
    foreach (c[i]) c[i] = 0;
  endfunction

  // sum of equation (12) for the taps as they are
  function longint sum();
    longint acc;
    acc = 0;
    for (int i = 0; i < 11; i++) acc += tb_coef_word(is_int, frac, scale, i) * e[i];
    for (int i = 0; i < 10; i++) acc -= tb_coef_word(is_int, frac, scale, 11 + i) * c[i];
    return acc;
  endfunction

  // one sample: integer error in, command word out
  function longint step(input longint err);
    longint ew, acc, cw;
    ew = is_int ? tb_sat(err, w) : tb_sat(err * (64'sd1 <<< frac), w);
    for (int i = 10; i > 0; i--) e[i] = e[i-1];
    e[0] = ew;
    acc = sum();
    last_acc = acc;
    if (is_int) cw = tb_sat(acc / scale, w);
    else        cw = tb_sat(acc >>> frac, w);
    for (int i = 9; i > 0; i--) c[i] = c[i-1];
    c[0] = cw;
    return cw;
  endfunction
endclass
