// tb_al_pri8: all 256 inputs; hit must equal (d != 0) and idx the position of
// the lowest set bit, found here by a search from bit 0 upward.
module tb_al_pri8;
  int checks = 0, failures = 0;
  logic [7:0] d;
  logic hit;
  logic [2:0] idx;
  al_pri8 dut (.d, .hit, .idx);
  initial begin
    for (int v = 0; v < 256; v++) begin
      int e;
      d = 8'(v);
      #1;
      e = -1;
      for (int i = 0; i < 8 && e < 0; i++) if (v[i]) e = i;
      checks++;
      if (hit != (v != 0) || (v != 0 && int'(idx) != e)) begin
        failures++; $display("d=%b hit=%b idx=%0d exp %0d", d, hit, idx, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
