// fopi_coef_rom: read-only table of the 21 FO-PI coefficients
// (a_0..a_10 at addresses 0..10, b_1..b_10 at addresses 11..20) in the
// number representation chosen by FMT:
//   FMT_FXP - signed fixed point, W bits with FRAC fractional bits;
//   FMT_INT - round(coefficient * SCALE) as a W-bit signed integer.
// The values come from the coefficient table of the discretised
// controller (see fopi_pkg); the table is filled at elaboration time, so
// the ROM is plain constant logic. Read is combinational: coef follows addr
// in the same cycle. Addresses above 20 return 0.
// Coefficients that do not fit in W bits are saturated (this only happens
// for representations the controller is not meant to be used with).
module fopi_coef_rom
  import fopi_pkg::*;
#(
  parameter fmt_e   FMT   = FMT_FXP,
  parameter int     W     = 32,
  parameter int     FRAC  = 17,
  parameter longint SCALE = 10000,
  localparam int    AB    = 5
) (
  input  logic [AB-1:0]       addr,
  output logic signed [W-1:0] coef
);

  localparam longint WMAX = (64'sd1 <<< (W - 1)) - 1;
  localparam longint WMIN = -(64'sd1 <<< (W - 1));

  function automatic logic signed [W-1:0] entry(input int i);
    longint v;
    v = coef_word(FMT, FRAC, SCALE, i);
    if (v > WMAX) v = WMAX;
    if (v < WMIN) v = WMIN;
    return W'(v);
  endfunction

  logic signed [W-1:0] table_q [NCOEF];

  for (genvar g = 0; g < NCOEF; g++) begin : g_tab
    assign table_q[g] = entry(g);
  end

  always_comb begin
    if (int'(addr) < NCOEF) coef = table_q[addr];
    else                    coef = '0;
  end

endmodule
