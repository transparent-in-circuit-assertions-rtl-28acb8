// tb_al_delay: random values through delay<5>; each output is compared with
// the input seen 5 clock edges earlier, kept in a scoreboard queue.
module tb_al_delay;
  localparam int W = 16, N = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [W-1:0] d, q;
  al_delay #(.WIDTH(W), .N(N)) dut (.clk, .d, .q);
  logic [W-1:0] hist [$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      d = 16'($urandom);
      hist.push_back(d);
      @(posedge clk); #1;
      if (hist.size() >= N) begin
        logic [W-1:0] e;
        e = hist.pop_front();
        checks++;
        if (q !== e) begin failures++; $display("t=%0d q=%h exp %h", t, q, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
