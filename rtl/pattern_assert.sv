// pattern_assert: 4-bit pattern-counter test on a 128-bit word stream.
//
// A stronger relative of the monobit test. Each 128-bit word is cut into 32
// disjoint nibbles and the block counts how often each of the 16 possible
// nibble values occurs. Counts are summed over a window of 256 words; for a
// uniform stream each pattern is expected 256*32/16 = 512 times, and each of
// the 16 sums must lie strictly between A and B. The window and the strict
// compare follow the monobit test; the band 512 +- 56 (about 2.58 standard
// deviations of a binomial with n = 8192, p = 1/16) is this design's choice.
//
// Pipeline (8 register stages, the same latency as the monobit test):
//   1 input register
//   2 one-hot decode of every nibble (32 x 16 bits)
//   3,4,5 adder tree: counts per 4, 8 and 16 nibbles
//   6 count per pattern over the whole word (0..32)
//   7 sixteen accumulators (al_accum), cleared by one al_counter
//   8 verdict register, enabled at the end of each window
// Interface and timing as monobit_assert: ok is 1 after reset and holds the
// verdict of the last complete window, window_done pulses when it changes,
// fail_sticky is the alarm. Verdict 8 cycles after the last word of a window
// when the stream is continuous.
module pattern_assert
  import ica_pkg::*;
#(
  parameter int unsigned WINDOW = 256,
  parameter int unsigned A      = PAT_LO,
  parameter int unsigned B      = PAT_HI
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
  localparam int unsigned ACC_W = $clog2(WINDOW * 32 + 1);

  logic [5:0] v_q;
  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[4:0], in_valid};
  end

  // Stage 1.
  logic [127:0] din_q;
  always_ff @(posedge clk) din_q <= din;

  // Stage 2: one-hot decode.
  logic [15:0] hot_q [32];
  always_ff @(posedge clk) begin
    for (int n = 0; n < 32; n++) hot_q[n] <= 16'(1) << din_q[4*n +: 4];
  end

  // Stages 3-6: per-pattern adder tree.
  logic [2:0] c4_q  [8][16];
  logic [3:0] c8_q  [4][16];
  logic [4:0] c16_q [2][16];
  logic [5:0] c32_q [16];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 16; p++) begin
      for (int g = 0; g < 8; g++)
        c4_q[g][p] <= 3'(hot_q[4*g][p]) + 3'(hot_q[4*g+1][p])
                    + 3'(hot_q[4*g+2][p]) + 3'(hot_q[4*g+3][p]);
      for (int g = 0; g < 4; g++) c8_q[g][p]  <= 4'(c4_q[2*g][p]) + 4'(c4_q[2*g+1][p]);
      for (int g = 0; g < 2; g++) c16_q[g][p] <= 5'(c8_q[2*g][p]) + 5'(c8_q[2*g+1][p]);
      c32_q[p] <= 6'(c16_q[0][p]) + 6'(c16_q[1][p]);
    end
  end

  // Stage 7: window counter and accumulators.
  logic [CNT_W-1:0] count;
  logic             wrap;
  logic [ACC_W-1:0] acc [16];

  al_counter #(.WIDTH(CNT_W), .FROM(0), .TO(WINDOW-1)) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(v_q[5]), .count(count), .at_from(wrap));

  for (genvar p = 0; p < 16; p++) begin : g_acc
    al_accum #(.IN_W(6), .ACC_W(ACC_W)) u_acc (
      .clk(clk), .rst_n(rst_n), .en(v_q[5]), .clr(wrap), .d(c32_q[p]), .acc(acc[p]));
  end

  // Stage 8: range check of all 16 sums.
  logic in_band;
  always_comb begin
    in_band = 1'b1;
    for (int p = 0; p < 16; p++)
      if (!((ACC_W'(A) < acc[p]) && (acc[p] < ACC_W'(B)))) in_band = 1'b0;
  end

  logic primed;
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
