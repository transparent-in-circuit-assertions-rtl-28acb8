// monobit_assert: statistical monobit test on a 128-bit word stream.
//
// A secure cipher's output should look like uniform random bits. Each cycle
// this block counts the ones in a 128-bit word, sums those counts over a
// window of 256 words (32,768 bits) and, at the end of the window, checks
// A < ones < B. The default band 32768/2 +- 466 is the p < 0.01 limit.
//
// Pipeline (8 register stages, as in the monobit accumulator drawing):
//   1 input register
//   2,3 four 32-bit population counters (al_popcnt32)
//   4,5,6 adder tree: register row, pair sums, total (0..128)
//   7 accumulator (al_accum), cleared by the modulo-256 counter (al_counter)
//   8 verdict register, enabled at the end of each window
// The drawing labels the adder rows 5, 6 and 7 bits; those widths cannot hold
// 32, 64 and 128, so 6, 7 and 8 bits are used. The accumulator keeps the
// drawn 15 bits: only an all-ones window (32768) wraps, to 0, and fails.
//
// Interface: in_valid/din in. window_done pulses when ok is updated; ok holds
// the verdict of the last complete window (1 after reset, the first window
// after reset is skipped because it may be partial). fail_sticky is the alarm.
// Timing: with a continuous stream the verdict of a window appears 8 cycles
// after its last word was presented. Windows advance only on valid words.
module monobit_assert
  import ica_pkg::*;
#(
  parameter int unsigned WINDOW = MONO_WINDOW,
  parameter int unsigned ACC_W  = 15,
  parameter int unsigned A      = MONO_LO,
  parameter int unsigned B      = MONO_HI
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [127:0] din,
  output logic         ok,
  output logic         window_done,
  output logic         fail_sticky
);

  localparam int unsigned CNT_W = (WINDOW > 1) ? $clog2(WINDOW) : 1;

  // Valid chain for stages 1..6.
  logic [5:0] v_q;
  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[4:0], in_valid};
  end

  // Stage 1: input registers.
  logic [127:0] din_q;
  always_ff @(posedge clk) din_q <= din;

  // Stages 2-3: population counters.
  logic [5:0] pc [4];
  for (genvar i = 0; i < 4; i++) begin : g_pop
    al_popcnt32 u_pop (.clk(clk), .d(din_q[32*i +: 32]), .cnt(pc[i]));
  end

  // Stages 4-6: pipelined adder tree.
  logic [5:0] row_q [4];
  logic [6:0] pair_q [2];
  logic [7:0] total_q;
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) row_q[i] <= pc[i];
    pair_q[0] <= 7'(row_q[0]) + 7'(row_q[1]);
    pair_q[1] <= 7'(row_q[2]) + 7'(row_q[3]);
    total_q   <= 8'(pair_q[0]) + 8'(pair_q[1]);
  end

  // Window counter and stage 7 accumulator.
  logic [CNT_W-1:0] count;
  logic             wrap;
  logic [ACC_W-1:0] acc;

  al_counter #(.WIDTH(CNT_W), .FROM(0), .TO(WINDOW-1)) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(v_q[5]), .count(count), .at_from(wrap));

  al_accum #(.IN_W(8), .ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .en(v_q[5]), .clr(wrap), .d(total_q), .acc(acc));

  // Stage 8: range check and verdict register with enable.
  logic primed;
  logic in_band;
  assign in_band = (ACC_W'(A) < acc) && (acc < ACC_W'(B));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      primed      <= 1'b0;
      ok          <= 1'b1;
      window_done <= 1'b0;
      fail_sticky <= 1'b0;
    end else begin
      window_done <= 1'b0;
      if (v_q[5] && wrap) begin
        primed <= 1'b1;
        if (primed) begin
          ok          <= in_band;
          window_done <= 1'b1;
          fail_sticky <= fail_sticky | ~in_band;
        end
      end
    end
  end

endmodule
