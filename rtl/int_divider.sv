// int_divider: sequential signed divider used by the integer (scaled)
// representation of the controller, where the sum computed with
// coefficients multiplied by a decimal scale S must be divided by S before
// it becomes the command. It is a restoring divider on magnitudes: one
// quotient bit per clock, most significant first, then the sign of the
// dividend is applied, so the quotient is truncated toward zero (the
// rounding of an integer division). The divisor is taken as unsigned and
// must be non-zero.
// Timing: a one-cycle start pulse (ignored while busy) loads the operands;
// the DW quotient bits take DW cycles and one more applies the sign, so
// done is high in the (DW+2)th cycle after the start cycle (cycle 0); quot
// holds the result until the next start.
module int_divider #(
  parameter int DW = 69,   // dividend and quotient width
  parameter int VW = 32    // divisor width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] dividend,
  input  logic [VW-1:0]        divisor,
  output logic                 busy,
  output logic                 done,
  output logic signed [DW-1:0] quot
);

  localparam int CW = $clog2(DW + 1);

  logic [DW-1:0] num;     // remaining magnitude bits, shifted out at the top
  logic [DW-1:0] q;       // quotient bits, shifted in at the bottom
  logic [VW-1:0] rem;     // partial remainder, always below the divisor
  logic [VW-1:0] den;
  logic          neg;
  logic [CW-1:0] cnt;
  logic [VW:0]   trial;

  assign trial = {rem, num[DW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num  <= '0;
      q    <= '0;
      rem  <= '0;
      den  <= '0;
      neg  <= 1'b0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num  <= dividend[DW-1] ? DW'(-dividend) : DW'(dividend);
        neg  <= dividend[DW-1];
        den  <= divisor;
        rem  <= '0;
        q    <= '0;
        cnt  <= CW'(DW);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          num <= num << 1;
          if (trial >= {1'b0, den}) begin
            rem <= VW'(trial - {1'b0, den});
            q   <= {q[DW-2:0], 1'b1};
          end else begin
            rem <= VW'(trial);
            q   <= {q[DW-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          quot <= neg ? -$signed(q) : $signed(q);
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
