// tb_fopi_core: runs the FO-PI control law in four configurations side by
// side - 32-bit fixed point (17 fractional bits) with the single-multiplier
// engine, the same with the parallel engine, 32-bit integers scaled by 10^4
// (single multiplier) and 16-bit integers scaled by 100 (parallel) - over
// a sequence of samples with random errors, and compares every command with
// the testbench's own model of equation (12), including the command history
// carried from sample to sample. It also checks the start-to-done latency
// of each configuration and that busy covers the computation. Some errors
// exceed the +-16383 range of the 15 integer bits, so the fixed-point
// input saturation is exercised too.
module tb_fopi_core;
  import fopi_pkg::*;
  `include "tb_fopi_ref.svh"
  localparam int NCFG = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [15:0] err = '0;
  logic busy [NCFG];
  logic done [NCFG];
  logic signed [31:0] cmd32 [3];
  logic signed [15:0] cmd16;
  int checks = 0, failures = 0;

  fopi_core #(.FMT(FMT_FXP), .ARCH(ARCH_SEQ), .W(32), .FRAC(17)) u_fs (
    .clk, .rst_n, .start, .err, .busy(busy[0]), .done(done[0]), .cmd(cmd32[0]));
  fopi_core #(.FMT(FMT_FXP), .ARCH(ARCH_PAR), .W(32), .FRAC(17)) u_fp (
    .clk, .rst_n, .start, .err, .busy(busy[1]), .done(done[1]), .cmd(cmd32[1]));
  fopi_core #(.FMT(FMT_INT), .ARCH(ARCH_SEQ), .W(32), .SCALE(10000)) u_is (
    .clk, .rst_n, .start, .err, .busy(busy[2]), .done(done[2]), .cmd(cmd32[2]));
  fopi_core #(.FMT(FMT_INT), .ARCH(ARCH_PAR), .W(16), .SCALE(100)) u_ip (
    .clk, .rst_n, .start, .err, .busy(busy[3]), .done(done[3]), .cmd(cmd16));

  always #5 clk = ~clk;

  // expected latency, cycles from the start cycle to the done cycle
  function automatic int lat(input int k);
    case (k)
      0: return 26;
      1: return 4;
      2: return 26 + (2 * 32 + 5) + 2;
      default: return 4 + (2 * 16 + 5) + 2;
    endcase
  endfunction

  function automatic longint cmd_of(input int k);
    return (k == 3) ? longint'(cmd16) : longint'(cmd32[k]);
  endfunction

  initial begin
    fopi_model m [NCFG];
    longint exp [NCFG];
    int seen [NCFG];
    int n;
    m[0] = new(0, 32, 17, 1);
    m[1] = new(0, 32, 17, 1);
    m[2] = new(1, 32, 0, 10000);
    m[3] = new(1, 16, 0, 100);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 60; s++) begin
      int e;
      // a step, a slow decay, then random errors
      if (s < 20)      e = 900 - 40 * s;
      else if (s < 25) e = -300;
      else if (s < 28) e = 30000;          // beyond the 15 integer bits: fixed point saturates
      else if (s < 30) e = -30000;
      else             e = int'($urandom_range(0, 4000)) - 2000;
      for (int k = 0; k < NCFG; k++) begin exp[k] = m[k].step(longint'(e)); seen[k] = 0; end
      @(negedge clk);
      err = 16'(e); start = 1'b1;
      @(negedge clk);
      start = 1'b0; err = 16'($urandom);   // err is sampled with start only
      n = 1;
      while (n < 200) begin
        for (int k = 0; k < NCFG; k++) begin
          if (done[k]) begin
            seen[k]++;
            checks++;
            if (n != lat(k)) begin failures++; $display("cfg %0d latency %0d expected %0d", k, n, lat(k)); end
            checks++;
            if (cmd_of(k) != exp[k]) begin
              failures++;
              $display("cfg %0d sample %0d cmd %0d expected %0d", k, s, cmd_of(k), exp[k]);
            end
          end else if (seen[k] == 0 && n < lat(k)) begin
            checks++;
            if (!busy[k]) begin failures++; $display("cfg %0d not busy at cycle %0d", k, n); end
          end
        end
        @(negedge clk);
        n++;
      end
      for (int k = 0; k < NCFG; k++) begin
        checks++;
        if (seen[k] != 1) begin failures++; $display("cfg %0d gave %0d results", k, seen[k]); end
      end
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
