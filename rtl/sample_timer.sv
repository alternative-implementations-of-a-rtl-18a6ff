// sample_timer: produces the controller's sampling strobe. With the
// reference parameters (40 MHz clock, T = 15 ms) it divides the clock by
// DIV = 600000 and raises tick for one clock every DIV cycles while en is
// high; the first tick comes DIV cycles after en rises or reset ends.
// The counter is free of any other state, so the sampling period is exact.
module sample_timer #(
  parameter int DIV = 600000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);

  localparam int CW = $clog2(DIV) + 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!en) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
