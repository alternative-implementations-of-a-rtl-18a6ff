// tb_int_divider: divides random signed dividends (including zero, values
// below the divisor, and the decimal scales 10^2..10^7 as divisors) and
// compares quotient and latency (DW+2 cycles) with the testbench's own
// 64-bit division, which truncates toward zero.
module tb_int_divider;
  localparam int DW = 40;
  localparam int VW = 32;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [DW-1:0] dividend = '0;
  logic [VW-1:0] divisor = 32'd1;
  logic busy, done;
  logic signed [DW-1:0] quot;
  int checks = 0, failures = 0;

  int_divider #(.DW(DW), .VW(VW)) dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quot);

  always #5 clk = ~clk;

  task automatic div(input longint n, input longint d);
    int cyc;
    longint exp;
    exp = n / d;
    @(negedge clk);
    dividend = DW'(n); divisor = VW'(d); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // inputs may change during the run without effect
    dividend = '0; divisor = 32'd7;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != DW + 2) begin failures++; $display("latency %0d expected %0d", cyc, DW + 2); end
    checks++;
    if (longint'(quot) != exp) begin failures++; $display("%0d / %0d = %0d expected %0d", n, d, longint'(quot), exp); end
  endtask

  initial begin
    longint scales [6] = '{100, 1000, 10000, 100000, 1000000, 10000000};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    div(0, 10000);
    div(9999, 10000);
    div(-9999, 10000);
    div(10000, 10000);
    div(-10001, 10000);
    div(-(64'sd1 <<< (DW - 1)), 3);
    div((64'sd1 <<< (DW - 1)) - 1, 1);
    for (int i = 0; i < 200; i++) begin
      longint n;
      n = longint'({$urandom, $urandom}) >>> (64 - DW + $urandom_range(0, 20));
      div(n, scales[$urandom_range(0, 5)]);
    end
    for (int i = 0; i < 50; i++) div(longint'($signed($urandom)), longint'($urandom_range(1, 1000)));
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
