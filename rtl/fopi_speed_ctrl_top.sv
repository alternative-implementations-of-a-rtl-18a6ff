// fopi_speed_ctrl_top: FPGA speed controller for a DC motor using a
// fractional-order PI (FO-PI) control law, Kp*(1 + Ki/s^mu) with Kp = 0.09,
// Ki = 7.85, mu = 0.7371, discretised to a 10th-order difference equation
// sampled every T = 15 ms.
// Every SAMPLE_DIV clocks (600000 = 15 ms at 40 MHz) sample_timer strobes;
// the error e(k) = ref_rpm - speed_rpm is formed and saturated to EW bits
// and fopi_core computes the command c(k) in the selected representation
// (fixed point or scaled integer, FMT) with the selected sum engine (ARCH).
// The command is read as a duty ratio in percent, clamped to 0..100 and
// truncated to a whole percent, and pwm_gen drives the power stage with it.
// The speed measurement (speed_rpm) comes from outside.
// Ports: clk, active-low asynchronous rst_n; ref_rpm and speed_rpm are
// signed rpm values; cmd/cmd_valid expose the raw controller output (one
// pulse per sample); duty_pct and pwm go to the motor driver.
// Default configuration: 32-bit fixed point with 17 fractional bits and the
// single-multiplier engine. Units of the command (percent duty) and the
// duty clamp are this design's choices.
module fopi_speed_ctrl_top
  import fopi_pkg::*;
#(
  parameter fmt_e   FMT        = FMT_FXP,
  parameter arch_e  ARCH       = ARCH_SEQ,
  parameter int     W          = 32,
  parameter int     FRAC       = 17,
  parameter longint SCALE      = 10000,
  parameter int     EW         = 16,
  parameter int     SAMPLE_DIV = 600000,
  parameter int     PWM_STEP   = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [EW-1:0] ref_rpm,
  input  logic signed [EW-1:0] speed_rpm,
  output logic                 sample_tick,
  output logic signed [W-1:0]  cmd,
  output logic                 cmd_valid,
  output logic [6:0]           duty_pct,
  output logic                 pwm
);

  localparam int SHIFT = (FMT == FMT_FXP) ? FRAC : 0;

  logic signed [EW:0]   diff;
  logic signed [EW-1:0] err;
  logic                 core_busy;
  logic signed [W-1:0]  cmd_int;

  sample_timer #(.DIV(SAMPLE_DIV)) u_timer (
    .clk, .rst_n, .en(1'b1), .tick(sample_tick)
  );

  // error with saturation to EW bits
  assign diff = {ref_rpm[EW-1], ref_rpm} - {speed_rpm[EW-1], speed_rpm};
  always_comb begin
    if (diff > (EW+1)'((1 <<< (EW - 1)) - 1))  err = {1'b0, {(EW-1){1'b1}}};
    else if (diff < -(EW+1)'(1 <<< (EW - 1))) err = {1'b1, {(EW-1){1'b0}}};
    else                                       err = diff[EW-1:0];
  end

  fopi_core #(
    .FMT(FMT), .ARCH(ARCH), .W(W), .FRAC(FRAC), .SCALE(SCALE), .EW(EW)
  ) u_core (
    .clk, .rst_n,
    .start (sample_tick),
    .err,
    .busy  (core_busy),
    .done  (cmd_valid),
    .cmd
  );

  // command -> whole percent, clamped to 0..100
  assign cmd_int = cmd >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     duty_pct <= '0;
    else if (cmd_valid) begin
      if (cmd_int < 0)              duty_pct <= 7'd0;
      else if (cmd_int > 100)       duty_pct <= 7'd100;
      else                          duty_pct <= 7'(cmd_int);
    end
  end

  pwm_gen #(.STEP(PWM_STEP)) u_pwm (
    .clk, .rst_n, .duty(duty_pct), .pwm, .period_start()
  );

  // a new sample must never arrive while the previous one is computed
  a_sample_rate: assert property (@(posedge clk) disable iff (!rst_n)
                                  sample_tick |-> !core_busy);

endmodule
