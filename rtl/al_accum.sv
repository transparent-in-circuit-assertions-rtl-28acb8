// al_accum: the accum(e1, e2) operator of the assertion language.
//
// Keeps a running sum of e1 (d). When e2 (clr) holds, the sum restarts from
// zero: this cycle's input becomes the new sum, so no input is lost between
// two windows. The sum wraps modulo 2^ACC_W. Defaults are the 15-bit
// accumulator of the monobit test, fed by the 8-bit adder-tree total.
// Interface: en gates both accumulation and clear; acc is registered.
// Timing: d appears in acc one cycle later.
module al_accum #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ACC_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [IN_W-1:0]  d,
  output logic [ACC_W-1:0] acc
);

  always_ff @(posedge clk) begin
    if (!rst_n)      acc <= '0;
    else if (en) begin
      if (clr)       acc <= ACC_W'(d);
      else           acc <= acc + ACC_W'(d);
    end
  end

endmodule
