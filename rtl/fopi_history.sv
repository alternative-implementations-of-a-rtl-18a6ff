// fopi_history: the two tapped delay lines of the FO-PI difference equation.
// e_tap[i] holds the error e(k-i), i = 0..10, and c_tap[j] holds the past
// command c(k-1-j), j = 0..9. A pulse on push_e shifts the error line and
// enters e_in as the newest sample e(k); a pulse on push_c shifts the
// command line and enters c_in as c(k-1) for the next sample. Both lines are
// plain W-bit shift registers, cleared by the active-low reset so that the
// controller starts from rest (zero history), which is this design's choice.
module fopi_history
  import fopi_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                push_e,
  input  logic signed [W-1:0] e_in,
  input  logic                push_c,
  input  logic signed [W-1:0] c_in,
  output logic signed [W-1:0] e_tap [NA],
  output logic signed [W-1:0] c_tap [NB]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NA; i++) e_tap[i] <= '0;
      for (int i = 0; i < NB; i++) c_tap[i] <= '0;
    end else begin
      if (push_e) begin
        e_tap[0] <= e_in;
        for (int i = 1; i < NA; i++) e_tap[i] <= e_tap[i-1];
      end
      if (push_c) begin
        c_tap[0] <= c_in;
        for (int i = 1; i < NB; i++) c_tap[i] <= c_tap[i-1];
      end
    end
  end

endmodule
