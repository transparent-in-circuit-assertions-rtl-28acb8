// tb_al_popcnt32: random words (plus all-zero and all-one) into the popcount;
// each result is compared with $countones of the word two cycles earlier.
module tb_al_popcnt32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] d;
  logic [5:0] cnt;
  al_popcnt32 dut (.clk, .d, .cnt);
  logic [31:0] hist [$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      d = (t == 0) ? '1 : (t == 1) ? '0 : $urandom;
      hist.push_back(d);
      @(posedge clk); #1;
      if (hist.size() >= 2) begin
        logic [31:0] e;
        e = hist.pop_front();
        checks++;
        if (int'(cnt) != $countones(e)) begin failures++; $display("%h: %0d", e, cnt); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
