// al_popcnt32: two-stage pipelined population count of a 32-bit word.
//
// The popcnt user block of the monobit test. Stage 1 counts the ones in each
// of the four bytes; stage 2 adds the four byte counts. The 6-bit result
// (0..32) appears two cycles after the word. The split into byte counts is
// this design's choice; the two stages follow the monobit pipeline.
module al_popcnt32
  import ica_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] d,
  output logic [5:0]  cnt
);

  logic [3:0] byte_cnt [4];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) byte_cnt[b] <= popcount8(d[8*b +: 8]);
    cnt <= 6'(byte_cnt[0]) + 6'(byte_cnt[1]) + 6'(byte_cnt[2]) + 6'(byte_cnt[3]);
  end

endmodule
