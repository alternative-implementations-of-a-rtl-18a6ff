// tb_fopi_speed_ctrl_top: closed-loop test of the whole speed controller.
// Nine copies of the top run side by side, one per number representation
// compared for this controller: 16-bit integers scaled by 100, 32-bit
// integers scaled by 10^2 .. 10^7, and 32-bit fixed point with 17
// fractional bits (both with the single-multiplier engine and with the
// parallel engine). Each copy drives its own model of the DC motor,
// speed(s)/duty(s) = 27.5/(0.26 s + 1) with duty in percent, discretised
// exactly at the 15 ms sampling period; the motor speed, rounded to whole
// rpm, is fed back as speed_rpm. A floating-point (double) copy of the
// whole loop runs alongside as the reference implementation.
// The sampling period is shortened to SDIV clocks and the PWM period to 100
// clocks; the arithmetic is unchanged. For every sample each copy's command
// is checked bit-exactly against the testbench's integer model, its duty
// against the clamped command, and each PWM pulse length against the duty.
// The reference runs 0 -> 1400 rpm (command clamped at 100 %), 1400 -> 500
// rpm (command clamped at 0 %) and the 500 -> 1400 rpm step; for the last
// step overshoot, 2 % settling time and steady-state error are printed for
// every representation. Each clamp must occur at least once in every copy,
// and the fixed-point loops must follow the double loop to within 1 %.
module tb_fopi_speed_ctrl_top;
  import fopi_pkg::*;
  `include "tb_fopi_ref.svh"
  localparam int NCFG = 9;
  localparam int SDIV = 300;
  localparam int NSEG = 60;             // samples per reference segment
  localparam real POLE = 0.94393;       // exp(-0.015/0.26)

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] ref_rpm = '0;
  int checks = 0, failures = 0;
  int sample = 0;
  real spd_log [NCFG+1][3*NSEG];

  always #5 clk = ~clk;

  function automatic real plant(input real y, input int duty);
    return POLE * y + (1.0 - POLE) * 27.5 * real'(duty);
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam fmt_e   FMT   = (g >= 7) ? FMT_FXP : FMT_INT;
    localparam arch_e  ARCH  = (g == 8 || g == 0) ? ARCH_PAR : ARCH_SEQ;
    localparam int     W     = (g == 0) ? 16 : 32;
    localparam longint SCALE = (g <= 1) ? 100 : (g >= 7) ? 1 : longint'(10) ** g;
    localparam int     SH    = (FMT == FMT_FXP) ? 17 : 0;

    logic signed [15:0] speed_rpm;
    logic               tick, cmd_valid, pwm;
    logic signed [W-1:0] cmd;
    logic [6:0]         duty_pct;
    real                y = 0.0;
    longint             exp_cmd;
    int                 exp_duty;
    int                 n_samples = 0, n_hi = 0, n_lo = 0;
    int                 high = 0, plen = 0;
    fopi_model          m = new(FMT == FMT_INT, W, 17, SCALE);

    fopi_speed_ctrl_top #(
      .FMT(FMT), .ARCH(ARCH), .W(W), .FRAC(17), .SCALE(SCALE),
      .SAMPLE_DIV(SDIV), .PWM_STEP(1)
    ) dut (
      .clk, .rst_n, .ref_rpm, .speed_rpm, .sample_tick(tick),
      .cmd, .cmd_valid, .duty_pct, .pwm
    );

    assign speed_rpm = 16'(tb_round(y));

    always @(posedge clk) begin
      if (tick && rst_n) exp_cmd <= m.step(longint'(ref_rpm) - longint'(speed_rpm));
    end

    always @(posedge clk) begin
      if (cmd_valid && rst_n) begin
        longint c;
        checks++;
        if (longint'(cmd) != exp_cmd) begin
          failures++;
          $display("cfg %0d sample %0d: cmd %0d expected %0d", g, sample, longint'(cmd), exp_cmd);
        end
        c = exp_cmd >>> SH;
        exp_duty = (c < 0) ? 0 : (c > 100) ? 100 : int'(c);
        if (c < 0) n_lo++;
        if (c > 100) n_hi++;
        n_samples++;
        @(negedge clk);
        checks++;
        if (int'(duty_pct) != exp_duty) begin
          failures++;
          $display("cfg %0d: duty %0d expected %0d", g, duty_pct, exp_duty);
        end
        y = plant(y, int'(duty_pct));
        if (sample < 3 * NSEG) spd_log[g][sample] = y;
      end
    end

    // PWM: every pulse that starts and ends inside the sampled range lasts
    // duty_pct clocks (STEP = 1), duty taken at the pulse's first clock
    logic pwm_q = 1'b0;
    int   run = 0, run_duty = 0, n_pulses = 0;
    always @(posedge clk) begin
      if (rst_n) begin
        pwm_q <= pwm;
        if (pwm && !pwm_q) begin run = 1; run_duty = int'(duty_pct); end
        else if (pwm) run++;
        else if (pwm_q && run < 100 && run_duty > 0) begin
          checks++;
          n_pulses++;
          if (run != run_duty) begin failures++; $display("cfg %0d: pwm pulse %0d expected %0d", g, run, run_duty); end
        end
      end
    end
  end

  // double-precision reference loop (same plant, same duty quantisation)
  real dy = 0.0;
  real de [11];
  real dc [10];
  initial begin
    foreach (de[i]) de[i] = 0.0;
    foreach (dc[i]) dc[i] = 0.0;
  end
  always @(posedge clk) begin
    if (g_cfg[0].tick) begin
      real c;
      int  d;
      for (int i = 10; i > 0; i--) de[i] = de[i-1];
      de[0] = real'(ref_rpm) - real'(tb_round(dy));
      c = 0.0;
      for (int i = 0; i < 11; i++) c += tb_coef(i) * de[i];
      for (int i = 0; i < 10; i++) c -= tb_coef(11 + i) * dc[i];
      for (int i = 9; i > 0; i--) dc[i] = dc[i-1];
      dc[0] = c;
      d = (c < 0.0) ? 0 : (c > 100.0) ? 100 : int'($floor(c));
      dy = plant(dy, d);
      if (sample < 3 * NSEG) spd_log[NCFG][sample] = dy;
    end
  end

  // overshoot, 2 % settling time and steady-state error of the last step
  task automatic step_report(input int k, input string name);
    real peak, fin, lo;
    int settle;
    peak = 0.0; settle = 0;
    fin = spd_log[k][3*NSEG-1];
    lo  = spd_log[k][2*NSEG-1];
    for (int s = 2 * NSEG; s < 3 * NSEG; s++) begin
      if (spd_log[k][s] > peak) peak = spd_log[k][s];
      if ((spd_log[k][s] - fin) > 0.02 * (fin - lo) || (fin - spd_log[k][s]) > 0.02 * (fin - lo))
        settle = s - 2 * NSEG + 1;
    end
    $display("%-13s final %7.1f rpm  overshoot %5.1f %%  settling %5.3f s  steady-state error %5.1f %%",
             name, fin, 100.0 * (peak - fin) / (fin - lo), 0.015 * settle, 100.0 * (1400.0 - fin) / 1400.0);
  endtask

  initial begin
    string names [NCFG+1] = '{"Int16(1e2)", "Int32(1e2)", "Int32(1e3)", "Int32(1e4)", "Int32(1e5)",
                              "Int32(1e6)", "Int32(1e7)", "FXP15.32", "FXP15.32 par", "DBL"};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    ref_rpm = 16'sd1400;
    while (sample < 3 * NSEG) begin
      @(posedge g_cfg[0].cmd_valid);
      @(negedge clk); @(negedge clk);
      sample++;
      if (sample == NSEG)     ref_rpm = 16'sd500;
      if (sample == 2 * NSEG) ref_rpm = 16'sd1400;
    end
    repeat (SDIV) @(posedge clk);
    for (int k = 0; k <= NCFG; k++) step_report(k, names[k]);
    // every mechanism must have happened in every copy
    checks++; if (g_cfg[0].n_samples != 3 * NSEG) begin failures++; $display("cfg 0 samples %0d", g_cfg[0].n_samples); end
    checks++; if (g_cfg[0].n_hi == 0 || g_cfg[0].n_lo == 0) begin failures++; $display("cfg 0 clamps missing"); end
    checks++; if (g_cfg[1].n_hi == 0 || g_cfg[1].n_lo == 0) begin failures++; $display("cfg 1 clamps missing"); end
    checks++; if (g_cfg[2].n_hi == 0 || g_cfg[2].n_lo == 0) begin failures++; $display("cfg 2 clamps missing"); end
    checks++; if (g_cfg[3].n_hi == 0 || g_cfg[3].n_lo == 0) begin failures++; $display("cfg 3 clamps missing"); end
    checks++; if (g_cfg[4].n_hi == 0 || g_cfg[4].n_lo == 0) begin failures++; $display("cfg 4 clamps missing"); end
    checks++; if (g_cfg[5].n_hi == 0 || g_cfg[5].n_lo == 0) begin failures++; $display("cfg 5 clamps missing"); end
    checks++; if (g_cfg[6].n_hi == 0 || g_cfg[6].n_lo == 0) begin failures++; $display("cfg 6 clamps missing"); end
    checks++; if (g_cfg[7].n_hi == 0 || g_cfg[7].n_lo == 0) begin failures++; $display("cfg 7 clamps missing"); end
    checks++; if (g_cfg[8].n_hi == 0 || g_cfg[8].n_lo == 0) begin failures++; $display("cfg 8 clamps missing"); end
    checks++;
    if (g_cfg[0].n_pulses == 0 || g_cfg[3].n_pulses == 0 || g_cfg[7].n_pulses == 0 || g_cfg[8].n_pulses == 0) begin
      failures++; $display("no PWM pulse checked");
    end
    checks++;
    if (g_cfg[3].n_samples < 3 * NSEG || g_cfg[7].n_samples < 3 * NSEG || g_cfg[8].n_samples < 3 * NSEG) begin
      failures++; $display("missing samples");
    end
    $display("samples %0d, PWM pulses checked (Int16/Int32(1e4)/FXP/FXP par) %0d/%0d/%0d/%0d", g_cfg[0].n_samples,
             g_cfg[0].n_pulses, g_cfg[3].n_pulses, g_cfg[7].n_pulses, g_cfg[8].n_pulses);
    $display("clamp counts (high/low): Int16 %0d/%0d  Int32(1e2) %0d/%0d  FXP %0d/%0d  FXP par %0d/%0d",
             g_cfg[0].n_hi, g_cfg[0].n_lo, g_cfg[1].n_hi, g_cfg[1].n_lo,
             g_cfg[7].n_hi, g_cfg[7].n_lo, g_cfg[8].n_hi, g_cfg[8].n_lo);
    // the fixed-point loops against the double loop
    for (int s = 0; s < 3 * NSEG; s++) begin
      checks++;
      if ((spd_log[7][s] - spd_log[NCFG][s]) > 14.0 || (spd_log[NCFG][s] - spd_log[7][s]) > 14.0) begin
        failures++; $display("sample %0d: FXP speed %f, DBL speed %f", s, spd_log[7][s], spd_log[NCFG][s]);
      end
      checks++;
      if (spd_log[8][s] != spd_log[7][s]) begin
        failures++; $display("sample %0d: parallel and sequential FXP differ", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((3 * NSEG + 5) * SDIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
