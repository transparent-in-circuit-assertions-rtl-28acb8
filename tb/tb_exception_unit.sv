// tb_exception_unit: a program-counter stream with occasional out-of-range
// values. The unit must pass src unchanged except exactly 7 cycles (2 + 3 + 2)
// after an out-of-range value, when src_out must equal the trap value that
// was presented together with that value, and taken must be high.
module tb_exception_unit;
  localparam logic [29:0] L = 30'h1000_0000, H = 30'h17FF_FFFF;
  localparam int LAT = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [29:0] src = L, catch_val = '0, src_out;
  logic taken;
  exception_unit dut (.clk, .rst_n, .src, .catch_val, .src_out, .taken);

  logic [29:0] hs [$];
  logic [29:0] hc [$];
  int n_taken = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      logic bad;
      src = ($urandom % 10 == 0) ? ((t % 2 == 1) ? H + 30'($urandom % 100) : L - 30'(1 + $urandom % 100))
                                 : L + 30'($urandom % 32'h0800_0000);
      catch_val = 30'($urandom);
      hs.push_back(src); hc.push_back(catch_val);
      #1;
      // compare with the value that entered LAT edges ago (hs has LAT+1 items)
      if (hs.size() == LAT + 1) begin
        bad = !(hs[0] >= L && hs[0] <= H);
        checks++;
        if (taken !== bad || src_out !== (bad ? hc[0] : src)) begin
          failures++; $display("t=%0d taken=%b exp %b out=%h", t, taken, bad, src_out);
        end
        if (bad) n_taken++;
        void'(hs.pop_front()); void'(hc.pop_front());
      end else begin
        checks++;
        if (taken !== 1'b0 || src_out !== src) failures++;
      end
      @(posedge clk); #1;
    end
    checks++; if (n_taken < 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
