// al_pri8: 8-input priority encoder (the pri user block).
//
// Returns the index of the lowest-numbered set input and a hit flag. Bit 0
// has the highest priority; the order is this design's choice. Purely
// combinational: the caller registers the result.
module al_pri8 (
  input  logic [7:0] d,
  output logic       hit,
  output logic [2:0] idx
);

  always_comb begin
    hit = 1'b0;
    idx = '0;
    for (int i = 7; i >= 0; i--) begin
      if (d[i]) begin
        hit = 1'b1;
        idx = 3'(i);
      end
    end
  end

endmodule
