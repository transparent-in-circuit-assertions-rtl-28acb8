// inrange_assert: combinational range assertion L <= C <= H, pipelined.
//
// The inRange<L, H>(C) example of the assertion language, used to check that
// each core's program counter stays inside the DDR3 memory window. Being
// latency-oblivious, the check is spread over three register stages: input
// register, the two comparisons, and their AND. The three-cycle latency
// matches the first experiment; the stage split is this design's choice.
// Interface: in_valid/c in; ok_valid/ok three cycles later. ok is 1 while no
// verdict is valid. fail_sticky rises with the first failing verdict and
// stays high until reset; it is the alarm line (a sticky flag is this
// design's choice). The default window 0x4000_0000..0x5FFF_FFFF (as word
// addresses, PC[31:2]) is also this design's choice.
module inrange_assert
  import ica_pkg::*;
#(
  parameter int unsigned W  = PC_W,
  parameter logic [W-1:0] L = W'(PC_LO),
  parameter logic [W-1:0] H = W'(PC_HI)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] c,
  output logic         ok_valid,
  output logic         ok,
  output logic         fail_sticky
);

  logic [W-1:0] c_q;
  logic         ge_q, le_q;
  logic [1:0]   v_q;

  always_ff @(posedge clk) begin
    c_q  <= c;
    ge_q <= (c_q >= L);
    le_q <= (c_q <= H);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q         <= '0;
      ok_valid    <= 1'b0;
      ok          <= 1'b1;
      fail_sticky <= 1'b0;
    end else begin
      v_q         <= {v_q[0], in_valid};
      ok_valid    <= v_q[1];
      ok          <= v_q[1] ? (ge_q & le_q) : 1'b1;
      fail_sticky <= fail_sticky | (v_q[1] & ~(ge_q & le_q));
    end
  end

endmodule
