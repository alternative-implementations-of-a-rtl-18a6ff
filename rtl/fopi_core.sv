// fopi_core: the fractional-order PI control law
//   c(k) = sum_{i=0..10} a_i*e(k-i) - sum_{i=1..10} b_i*c(k-i)
// for one sample per start pulse, in one of two number representations:
//   FMT_FXP - errors, coefficients and commands are W-bit fixed-point words
//             with FRAC fractional bits (reference: 32 bits, 15 integer
//             bits, FRAC = 17). The full-precision sum is shifted right by
//             FRAC (truncation toward minus infinity) and saturated to W bits.
//   FMT_INT - errors and commands are W-bit integers, coefficients are
//             round(coefficient * SCALE); the sum is divided by SCALE in
//             int_divider (truncation toward zero) and saturated to W bits.
//             The stored past commands are these integers, so the command
//             is quantised to whole units as in the integer controllers.
// ARCH selects the sum engine: ARCH_SEQ (fopi_mac_seq, one multiplier,
// 23 cycles) or ARCH_PAR (fopi_parallel, 21 multipliers, 1 cycle).
// Interface: err is the integer error e(k) (reference minus measured speed,
// in rpm), sampled with a one-cycle start pulse while busy is low. When
// c(k) is ready, cmd is updated and done pulses for one cycle; c(k) is
// then pushed into the command history for the next sample. cmd is in the
// data format (fixed point or integer).
// Latency, counted from the start cycle (cycle 0) to the cycle in which
// done is high: FXP/SEQ 26, FXP/PAR 4, INT/SEQ 28+AW, INT/PAR 6+AW cycles
// (AW = 2W+5 accumulator bits, so 97 cycles for 32-bit INT/SEQ).
// The structure follows the controller described for the FPGA; the cycle
// schedule, rounding and saturation are this design's choices.
module fopi_core
  import fopi_pkg::*;
#(
  parameter fmt_e   FMT   = FMT_FXP,
  parameter arch_e  ARCH  = ARCH_SEQ,
  parameter int     W     = 32,
  parameter int     FRAC  = 17,
  parameter longint SCALE = 10000,
  parameter int     EW    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [EW-1:0] err,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] cmd
);

  localparam int AW    = 2 * W + 5;
  localparam int SHIFT = (FMT == FMT_FXP) ? FRAC : 0;

  typedef enum logic [2:0] {S_IDLE, S_GO, S_SUM, S_DIV, S_PUSH} state_e;
  state_e state;

  logic signed [W-1:0]  e_tap [NA];
  logic signed [W-1:0]  c_tap [NB];
  logic                 push_e, push_c;
  logic signed [W-1:0]  e_word, c_word;
  logic                 dp_start, dp_done, dp_busy;
  logic signed [AW-1:0] acc;
  logic                 div_done, div_busy;
  logic signed [AW-1:0] quot;
  logic signed [AW-1:0] scaled;

  // saturate an AW-bit value to W bits
  function automatic logic signed [W-1:0] sat_w(input logic signed [AW-1:0] v);
    logic signed [AW-1:0] hi, lo;
    hi = {{(AW-W+1){1'b0}}, {(W-1){1'b1}}};
    lo = -hi - 1;
    if (v > hi)      return W'(hi);
    else if (v < lo) return W'(lo);
    else             return W'(v);
  endfunction

  // error as a data word: integer, or shifted into fixed point
  assign e_word = sat_w(AW'(err) <<< SHIFT);

  fopi_history #(.W(W)) u_hist (
    .clk, .rst_n,
    .push_e, .e_in(e_word),
    .push_c, .c_in(c_word),
    .e_tap, .c_tap
  );

  if (ARCH == ARCH_PAR) begin : g_par
    fopi_parallel #(.FMT(FMT), .W(W), .FRAC(FRAC), .SCALE(SCALE), .AW(AW)) u_sum (
      .clk, .rst_n, .start(dp_start), .e_tap, .c_tap,
      .busy(dp_busy), .done(dp_done), .acc
    );
  end else begin : g_seq
    fopi_mac_seq #(.FMT(FMT), .W(W), .FRAC(FRAC), .SCALE(SCALE), .AW(AW)) u_sum (
      .clk, .rst_n, .start(dp_start), .e_tap, .c_tap,
      .busy(dp_busy), .done(dp_done), .acc
    );
  end

  if (FMT == FMT_INT) begin : g_div
    int_divider #(.DW(AW), .VW(32)) u_div (
      .clk, .rst_n,
      .start(state == S_SUM && dp_done),
      .dividend(acc),
      .divisor(32'(SCALE)),
      .busy(div_busy), .done(div_done), .quot
    );
  end else begin : g_nodiv
    assign div_busy = 1'b0;
    assign div_done = 1'b0;
    assign quot     = acc;
  end

  // rescale the full-precision sum to the data format
  assign scaled = (FMT == FMT_INT) ? quot : (acc >>> SHIFT);

  assign push_e   = (state == S_IDLE) && start;
  assign dp_start = (state == S_GO);
  assign push_c   = (state == S_PUSH);
  assign c_word   = cmd;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cmd   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) state <= S_GO;
        S_GO:   state <= S_SUM;
        S_SUM:  if (dp_done) begin
                  if (FMT == FMT_INT) state <= S_DIV;
                  else begin
                    cmd   <= sat_w(scaled);
                    state <= S_PUSH;
                  end
                end
        S_DIV:  if (div_done) begin
                  cmd   <= sat_w(scaled);
                  state <= S_PUSH;
                end
        S_PUSH: begin
                  done  <= 1'b1;
                  state <= S_IDLE;
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the sum engine and the divider are only started when idle
  property p_no_restart;
    @(posedge clk) disable iff (!rst_n) dp_start |-> !dp_busy;
  endproperty
  a_no_restart: assert property (p_no_restart);

  property p_div_idle;
    @(posedge clk) disable iff (!rst_n) (state == S_SUM && dp_done) |-> !div_busy;
  endproperty
  a_div_idle: assert property (p_div_idle);

endmodule
