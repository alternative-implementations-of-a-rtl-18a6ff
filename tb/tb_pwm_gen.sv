// tb_pwm_gen: for a series of duty values (0, 1, 37, 50, 99, 100 and an
// out-of-range 120) counts the high cycles in each PWM period and checks
// them against duty*STEP, checks the period length and that the output is
// high from the start of a period, and that a duty change in mid-period
// only takes effect at the next period.
module tb_pwm_gen;
  localparam int STEP = 3;
  localparam int PERIOD = 100 * STEP;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] duty = '0;
  logic pwm, period_start;
  int checks = 0, failures = 0;

  pwm_gen #(.STEP(STEP)) dut (.clk, .rst_n, .duty, .pwm, .period_start);

  always #5 clk = ~clk;

  // measure one full period starting at the next period_start
  task automatic measure(input int exp_high, input int change_mid, input logic [6:0] new_duty);
    int high, len;
    bit first, contiguous, seen_low;
    while (!period_start) @(negedge clk);
    high = 0; len = 0; contiguous = 1; seen_low = 0;
    first = pwm;
    do begin
      if (pwm) begin high++; if (seen_low) contiguous = 0; end
      else seen_low = 1;
      len++;
      if (change_mid != 0 && len == PERIOD / 2) duty = new_duty;
      @(negedge clk);
    end while (!period_start && len < 2 * PERIOD);
    checks++;
    if (len != PERIOD) begin failures++; $display("period %0d expected %0d", len, PERIOD); end
    checks++;
    if (high != exp_high) begin failures++; $display("high %0d expected %0d", high, exp_high); end
    checks++;
    if (!contiguous || (exp_high > 0 && !first)) begin failures++; $display("pulse not at start of period"); end
  endtask

  initial begin
    int duties [7] = '{0, 1, 37, 50, 99, 100, 120};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    foreach (duties[i]) begin
      @(negedge clk);
      duty = 7'(duties[i]);
      // the next whole period, and the one after, use the new duty
      measure((duties[i] > 100 ? 100 : duties[i]) * STEP, 0, '0);
      measure((duties[i] > 100 ? 100 : duties[i]) * STEP, 0, '0);
    end
    @(negedge clk);
    duty = 7'd20;
    measure(20 * STEP, 1, 7'd80);
    measure(80 * STEP, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
