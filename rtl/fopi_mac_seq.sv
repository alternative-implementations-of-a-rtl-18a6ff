// fopi_mac_seq: time-multiplexed evaluation of the FO-PI sum
//   acc = sum_{i=0..10} a_i*e_tap[i] - sum_{j=0..9} b_(j+1)*c_tap[j]
// with a single shared multiplier. This is the resource-saving style of
// the controller: the 21 products pass one after another through a
// two-stage pipeline (stage 1: operand/coefficient select and multiply,
// registered; stage 2: add to or subtract from the accumulator), so the
// multiplier count does not grow with the filter order.
// Timing: a one-cycle start pulse (ignored while busy) begins a run; one
// product is issued per clock, and done pulses for one cycle NCOEF+2 = 23
// cycles after the start cycle, with acc valid from then until the next
// start. The taps must stay constant while busy.
// acc is the full-precision sum (2W-bit products, AW-bit accumulator);
// scaling back to the data format is done by the caller.
module fopi_mac_seq
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

  logic [4:0]            idx;        // index of the product being issued
  logic                  issuing;    // stage 1 active
  logic                  p_valid;    // stage 2 holds a product
  logic                  p_sub;      // product belongs to the b (feedback) part
  logic                  p_last;     // last product of the run
  logic signed [2*W-1:0] prod;
  logic signed [W-1:0]   coef;
  logic signed [W-1:0]   operand;

  fopi_coef_rom #(.FMT(FMT), .W(W), .FRAC(FRAC), .SCALE(SCALE)) u_rom (
    .addr (idx),
    .coef (coef)
  );

  always_comb begin
    if (int'(idx) < NA) operand = e_tap[idx[3:0]];
    else                operand = c_tap[int'(idx) - NA];
  end

  assign busy = issuing | p_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      issuing <= 1'b0;
      p_valid <= 1'b0;
      p_sub   <= 1'b0;
      p_last  <= 1'b0;
      prod    <= '0;
      acc     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      // stage 1: select operand and coefficient, multiply
      if (start && !busy) begin
        issuing <= 1'b1;
        idx     <= '0;
        acc     <= '0;
      end else if (issuing) begin
        prod    <= coef * operand;
        p_sub   <= int'(idx) >= NA;
        p_last  <= int'(idx) == NCOEF - 1;
        p_valid <= 1'b1;
        if (int'(idx) == NCOEF - 1) issuing <= 1'b0;
        else                        idx     <= idx + 1'b1;
      end else begin
        p_valid <= 1'b0;
      end
      // stage 2: accumulate
      if (p_valid) begin
        if (p_sub) acc <= acc - AW'(prod);
        else       acc <= acc + AW'(prod);
        if (p_last) begin
          done    <= 1'b1;
          p_valid <= 1'b0;
        end
      end
    end
  end

endmodule
