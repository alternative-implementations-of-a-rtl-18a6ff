// tb_fopi_speed_ctrl_top_full: the speed controller at its reference
// configuration (40 MHz clock, 15 ms sampling = 600000 clocks, 32-bit fixed
// point with 17 fractional bits, single-multiplier engine, 20 kHz PWM) in
// closed loop with the DC motor model 27.5/(0.26 s + 1) (duty in percent).
// The reference steps from 0 to 1400 rpm, then to 500 rpm. For NS samples it
// checks the sampling period, each command against the testbench's integer
// model, the duty against the clamped command, and the PWM high time of one
// pulse per sample against duty * 20 clocks; both duty clamps must occur.
module tb_fopi_speed_ctrl_top_full;
  import fopi_pkg::*;
  `include "tb_fopi_ref.svh"
  localparam int NS = 30;
  localparam real POLE = 0.94393;       // exp(-0.015/0.26)

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] ref_rpm = 16'sd1400, speed_rpm;
  logic tick, cmd_valid, pwm;
  logic signed [31:0] cmd;
  logic [6:0] duty_pct;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_pulse = 0;
  real y = 0.0;
  longint exp_cmd;
  longint cyc = 0, last_tick = -1;
  fopi_model m = new(0, 32, 17, 1);

  fopi_speed_ctrl_top dut (
    .clk, .rst_n, .ref_rpm, .speed_rpm, .sample_tick(tick),
    .cmd, .cmd_valid, .duty_pct, .pwm
  );

  always #12.5 clk = ~clk;   // 40 MHz

  assign speed_rpm = 16'(tb_round(y));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick && rst_n) begin
      exp_cmd <= m.step(longint'(ref_rpm) - longint'(speed_rpm));
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != 600000) begin failures++; $display("sample period %0d", cyc - last_tick); end
      end
      last_tick <= cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NS; s++) begin
      longint c;
      int d, high;
      @(posedge clk iff (cmd_valid === 1'b1));
      checks++;
      if (longint'(cmd) != exp_cmd) begin
        failures++; $display("sample %0d: cmd %0d expected %0d", s, longint'(cmd), exp_cmd);
      end
      c = exp_cmd >>> 17;
      d = (c < 0) ? 0 : (c > 100) ? 100 : int'(c);
      if (c > 100) n_hi++;
      if (c < 0) n_lo++;
      @(negedge clk);
      checks++;
      if (int'(duty_pct) != d) begin failures++; $display("sample %0d: duty %0d expected %0d", s, duty_pct, d); end
      y = POLE * y + (1.0 - POLE) * 27.5 * real'(duty_pct);
      $display("sample %0d: ref %0d rpm, command %0.3f %%, duty %0d %%, speed now %0.1f rpm",
               s, ref_rpm, real'(cmd) / 131072.0, duty_pct, y);
      if (s == 4) ref_rpm = 16'sd500;
      // one whole PWM pulse (a pulse starts each 2000-clock period)
      if (d > 0 && d < 100) begin
        @(posedge pwm);
        @(negedge clk);
        high = 0;
        while (pwm && high < 4000) begin high++; @(negedge clk); end
        checks++;
        if (high != 20 * d) begin failures++; $display("sample %0d: pwm high %0d expected %0d", s, high, 20 * d); end
        n_pulse++;
      end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_pulse == 0) begin failures++; $display("clamps high %0d low %0d, pulses %0d", n_hi, n_lo, n_pulse); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 2) * 600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
