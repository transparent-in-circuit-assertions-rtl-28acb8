// al_delay: the delay<N>(e) operator of the assertion language.
//
// Delays a value by N clock cycles. The same block is what the compiler
// inserts to balance paths: every input of an assertion must reach its output
// after the same number of cycles, so shorter paths get delay registers.
// Interface: d in, q = d from N cycles earlier. N = 0 is a wire.
// No reset: assertion data is qualified by a separate valid chain.
module al_delay #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned N     = 4
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] sr [N];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
    assign q = sr[N-1];
  end

endmodule
