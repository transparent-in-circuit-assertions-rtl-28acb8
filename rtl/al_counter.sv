// al_counter: the counter(FROM, TO) operator of the assertion language.
//
// Counts FROM, FROM+1, ..., TO and wraps back to FROM, one step per enabled
// cycle. at_from flags the cycle in which the counter holds FROM; the monobit
// test uses it as the end-of-window strobe (modulo-256 counter, 0..255).
// Interface: en advances the count; count and at_from are registered state.
// Reset (synchronous, active low) loads FROM; the reset is this design's
// choice.
module al_counter #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned FROM  = 0,
  parameter int unsigned TO    = 255
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count,
  output logic             at_from
);

  always_ff @(posedge clk) begin
    if (!rst_n)                    count <= WIDTH'(FROM);
    else if (en) begin
      if (count == WIDTH'(TO))     count <= WIDTH'(FROM);
      else                         count <= count + 1'b1;
    end
  end

  assign at_from = (count == WIDTH'(FROM));

endmodule
