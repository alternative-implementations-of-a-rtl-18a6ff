// tb_fopi_mac_seq: drives the single-multiplier engine with random delay-line contents in
// two representations (32-bit fixed point with 17 fractional bits, and
// 32-bit integers with coefficients scaled by 10^4) and compares the sum
// of equation (12) with the testbench's own 64-bit model. It also checks
// that done arrives 23 cycle(s) after start, that busy covers the run and that a start while busy is ignored.
module tb_fopi_mac_seq;
  import fopi_pkg::*;
  `include "tb_fopi_ref.svh"
  localparam int W  = 32;
  localparam int AW = 2 * W + 5;
  localparam int LAT = 23;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_f = 1'b0, start_i = 1'b0;
  logic signed [W-1:0] e_tap [NA];
  logic signed [W-1:0] c_tap [NB];
  logic busy_f, done_f, busy_i, done_i;
  logic signed [AW-1:0] acc_f, acc_i;
  int checks = 0, failures = 0;

  fopi_mac_seq #(.FMT(FMT_FXP), .W(W), .FRAC(17)) u_fxp (
    .clk, .rst_n, .start(start_f), .e_tap, .c_tap, .busy(busy_f), .done(done_f), .acc(acc_f));
  fopi_mac_seq #(.FMT(FMT_INT), .W(W), .SCALE(10000)) u_int (
    .clk, .rst_n, .start(start_i), .e_tap, .c_tap, .busy(busy_i), .done(done_i), .acc(acc_i));

  always #5 clk = ~clk;

  // run one sum on one engine, check latency and value
  task automatic run(input bit is_int);
    fopi_model m;
    longint exp;
    int n;
    m = new(is_int, W, 17, 10000);
    for (int i = 0; i < NA; i++) m.e[i] = longint'(e_tap[i]);
    for (int i = 0; i < NB; i++) m.c[i] = longint'(c_tap[i]);
    exp = m.sum();
    @(negedge clk);
    if (is_int) start_i = 1'b1; else start_f = 1'b1;
    @(negedge clk);
    start_i = 1'b0; start_f = 1'b0;
    n = 1;
    while (!(is_int ? done_i : done_f) && n < 200) begin
      if (LAT > 1) begin
        checks++;
        if (!(is_int ? busy_i : busy_f)) begin failures++; $display("busy low during run"); end
        // a second start while busy must be ignored
        if (n == 5) begin
          if (is_int) start_i = 1'b1; else start_f = 1'b1;
        end else begin
          start_i = 1'b0; start_f = 1'b0;
        end
      end
      @(negedge clk);
      n++;
    end
    start_i = 1'b0; start_f = 1'b0;
    checks++;
    if (n != LAT) begin failures++; $display("latency %0d, expected %0d", n, LAT); end
    checks++;
    if (longint'(is_int ? acc_i : acc_f) != exp) begin
      failures++;
      $display("%s sum %0d expected %0d", is_int ? "int" : "fxp", longint'(is_int ? acc_i : acc_f), exp);
    end
    @(negedge clk);
  endtask

  initial begin
    foreach (e_tap[i]) e_tap[i] = '0;
    foreach (c_tap[i]) c_tap[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 40; t++) begin
      // fixed point: errors up to +-3000 rpm, commands up to +-200
      foreach (e_tap[i]) e_tap[i] = W'(($urandom_range(0, 6000) - 3000) * 131072 + $urandom_range(0, 131071));
      foreach (c_tap[i]) c_tap[i] = W'(($urandom_range(0, 400) - 200) * 131072 + $urandom_range(0, 131071));
      if (t == 0) begin
        foreach (e_tap[i]) e_tap[i] = (i == 0) ? 32'sd131072 : '0;
        foreach (c_tap[i]) c_tap[i] = '0;
      end
      run(1'b0);
      // integers: errors up to +-3000, commands up to +-200
      foreach (e_tap[i]) e_tap[i] = W'($urandom_range(0, 6000) - 3000);
      foreach (c_tap[i]) c_tap[i] = W'($urandom_range(0, 400) - 200);
      run(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
