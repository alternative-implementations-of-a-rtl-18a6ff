// tb_fopi_coef_rom: reads every address of the coefficient ROM in four
// representations (32-bit fixed point with 17 fractional bits, 16-bit fixed
// point with 12, and integers scaled by 100 and 10^7) and compares each word
// with the coefficient value rounded independently in the testbench.
module tb_fopi_coef_rom;
  import fopi_pkg::*;
  `include "tb_fopi_ref.svh"

  logic [4:0] addr;
  logic signed [31:0] c_fxp, c_i2, c_i7;
  logic signed [15:0] c_f12;
  int checks = 0, failures = 0;

  fopi_coef_rom #(.FMT(FMT_FXP), .W(32), .FRAC(17))                u_fxp (.addr, .coef(c_fxp));
  fopi_coef_rom #(.FMT(FMT_FXP), .W(16), .FRAC(12))                u_f12 (.addr, .coef(c_f12));
  fopi_coef_rom #(.FMT(FMT_INT), .W(32), .SCALE(100))              u_i2  (.addr, .coef(c_i2));
  fopi_coef_rom #(.FMT(FMT_INT), .W(32), .SCALE(64'd10000000))     u_i7  (.addr, .coef(c_i7));

  task automatic chk(input string what, input int a, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s addr %0d: got %0d expected %0d", what, a, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 24; a++) begin
      addr = 5'(a);
      #1;
      chk("fxp17", a, longint'(c_fxp), a < 21 ? tb_coef_word(0, 17, 1, a) : 0);
      chk("fxp12", a, longint'(c_f12), a < 21 ? tb_coef_word(0, 12, 1, a) : 0);
      chk("int100", a, longint'(c_i2), a < 21 ? tb_coef_word(1, 0, 100, a) : 0);
      chk("int1e7", a, longint'(c_i7), a < 21 ? tb_coef_word(1, 0, 10000000, a) : 0);
    end
    // spot values written out by hand
    addr = 5'd0;  #1; chk("a0 fxp17", 0, longint'(c_fxp), 13253);
    addr = 5'd11; #1; chk("b1 fxp17", 11, longint'(c_fxp), -94660);
    addr = 5'd11; #1; chk("b1 int100", 11, longint'(c_i2), -72);
    addr = 5'd3;  #1; chk("a3 int100", 3, longint'(c_i2), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
