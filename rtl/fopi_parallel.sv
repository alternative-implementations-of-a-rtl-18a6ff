// fopi_parallel: fully parallel evaluation of the FO-PI sum
//   acc = sum_{i=0..10} a_i*e_tap[i] - sum_{j=0..9} b_(j+1)*c_tap[j]
// with one constant-coefficient multiplier per term (21 in all) and an
// adder tree, all in one clock cycle. This is the fast, multiplier-hungry
// style of the controller; fopi_mac_seq is the resource-saving one.
// Timing: the sum is registered on the clock edge that samples start, so
// done pulses one cycle after start and acc holds the result until the
// next start. busy is never raised (a new start is accepted every cycle).
// Products are full precision (2W bits) and the accumulator is AW bits;
// scaling back to the data format is done by the caller.
module fopi_parallel
  import fopi_pkg::*;
#(
  parameter fmt_e   FMT   = FMT_FXP,
  parameter int     W     = 32,
  parameter int     FRAC  = 17,
  parameter longint SCALE = 10000,
  parameter int     AW    = 2 * W + 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  e_tap [NA],
  input  logic signed [W-1:0]  c_tap [NB],
  output logic                 busy,
  output logic                 done,
  output logic signed [AW-1:0] acc
);

  logic signed [W-1:0]  coef [NCOEF];
  logic signed [AW-1:0] term [NCOEF];
  logic signed [AW-1:0] sum;

  // the coefficient table, one constant read port per multiplier
  for (genvar g = 0; g < NCOEF; g++) begin : g_coef
    fopi_coef_rom #(.FMT(FMT), .W(W), .FRAC(FRAC), .SCALE(SCALE)) u_rom (
      .addr (5'(g)),
      .coef (coef[g])
    );
  end

  for (genvar g = 0; g < NA; g++) begin : g_fwd
    assign term[g] = AW'(coef[g] * e_tap[g]);
  end
  for (genvar g = 0; g < NB; g++) begin : g_fb
    assign term[NA+g] = -AW'(coef[NA+g] * c_tap[g]);
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < NCOEF; i++) sum = sum + term[i];
  end

  assign busy = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) acc <= sum;
    end
  end

endmodule
