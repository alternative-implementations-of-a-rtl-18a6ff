// tb_sample_timer: checks that sample_timer strobes exactly once every DIV
// clocks, that the first strobe comes DIV clocks after enabling, and that
// dropping en stops and restarts the count.
module tb_sample_timer;
  localparam int DIV = 7;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, ticks = 0, en_cyc = 0;

  sample_timer #(.DIV(DIV)) dut (.clk, .rst_n, .en, .tick);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tick) begin
      checks++;
      if (last < 0) begin
        if (cyc - en_cyc != DIV) begin
          failures++; $display("first tick after %0d cycles, expected %0d", cyc - en_cyc, DIV);
        end
      end else if (cyc - last != DIV) begin
        failures++; $display("tick spacing %0d, expected %0d", cyc - last, DIV);
      end
      last <= cyc;
      ticks++;
    end
    if (!en) last <= -1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    en <= 1'b1; en_cyc = cyc + 1;
    repeat (10 * DIV) @(posedge clk);
    en <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (tick) begin failures++; $display("tick while disabled"); end
    en <= 1'b1; en_cyc = cyc + 1;
    repeat (5 * DIV + 2) @(posedge clk);
    checks++;
    if (ticks != 15) begin failures++; $display("saw %0d ticks, expected 15", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
