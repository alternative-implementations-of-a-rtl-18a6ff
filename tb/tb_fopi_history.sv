// tb_fopi_history: pushes random errors and commands, sometimes both in one
// cycle and sometimes neither, and after each cycle compares every tap of
// both delay lines with a model kept in the testbench. Also checks that
// reset clears the lines.
module tb_fopi_history;
  import fopi_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push_e = 1'b0, push_c = 1'b0;
  logic signed [W-1:0] e_in = '0, c_in = '0;
  logic signed [W-1:0] e_tap [NA];
  logic signed [W-1:0] c_tap [NB];
  logic signed [W-1:0] me [NA];
  logic signed [W-1:0] mc [NB];
  int checks = 0, failures = 0;

  fopi_history #(.W(W)) dut (.clk, .rst_n, .push_e, .e_in, .push_c, .c_in, .e_tap, .c_tap);

  always #5 clk = ~clk;

  task automatic compare();
    for (int i = 0; i < NA; i++) begin
      checks++;
      if (e_tap[i] !== me[i]) begin failures++; $display("e_tap[%0d]=%0d expected %0d", i, e_tap[i], me[i]); end
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (c_tap[i] !== mc[i]) begin failures++; $display("c_tap[%0d]=%0d expected %0d", i, c_tap[i], mc[i]); end
    end
  endtask

  initial begin
    foreach (me[i]) me[i] = '0;
    foreach (mc[i]) mc[i] = '0;
    @(posedge clk); #1;
    compare();
    @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      push_e = ($urandom_range(0, 2) != 0);
      push_c = ($urandom_range(0, 2) != 0);
      e_in   = W'($urandom);
      c_in   = W'($urandom);
      if (push_e) begin
        for (int i = NA - 1; i > 0; i--) me[i] = me[i-1];
        me[0] = e_in;
      end
      if (push_c) begin
        for (int i = NB - 1; i > 0; i--) mc[i] = mc[i-1];
        mc[0] = c_in;
      end
      @(posedge clk); #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
