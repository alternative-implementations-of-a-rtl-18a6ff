// pwm_gen: pulse-width modulator that turns the controller's duty ratio
// (0..100 %) into the on/off signal of the motor's power stage.
// One PWM period is 100*STEP clocks (default STEP = 20: 2000 clocks, 20 kHz
// at 40 MHz); pwm is high for the first duty*STEP clocks of the period.
// The duty input is sampled once per period, at the cycle where
// period_start is high, so a change never cuts a pulse short. Duty values
// above 100 are treated as 100. The PWM frequency and resolution are this
// design's choices.
module pwm_gen #(
  parameter int STEP = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] duty,          // percent, 0..100
  output logic       pwm,
  output logic       period_start
);

  localparam int PERIOD = 100 * STEP;
  localparam int CW     = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] thresh;
  logic [6:0]    duty_c;

  assign duty_c       = (duty > 7'd100) ? 7'd100 : duty;
  assign period_start = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      thresh <= '0;
    end else begin
      if (cnt == CW'(PERIOD - 1)) cnt <= '0;
      else                        cnt <= cnt + 1'b1;
      if (period_start) thresh <= CW'(duty_c) * CW'(STEP);
    end
  end

  // thresh is loaded at the end of the period_start cycle, so compare the
  // first cycle against the value being loaded
  always_comb begin
    if (period_start) pwm = (duty_c != '0);
    else              pwm = (cnt < thresh);
  end

endmodule
