// tb_inrange_assert: default window (word addresses 0x1000_0000..0x17FF_FFFF).
// Values are drawn around both bounds and at random; ok must equal
// (L <= c <= H) of the value presented 3 cycles earlier, ok_valid must follow
// in_valid by 3 cycles, and fail_sticky must rise after the first failure.
module tb_inrange_assert;
  localparam logic [29:0] L = 30'h1000_0000, H = 30'h17FF_FFFF;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        in_valid = 0;
  logic [29:0] c = '0;
  logic ok_valid, ok, fail_sticky;
  inrange_assert dut (.clk, .rst_n, .in_valid, .c, .ok_valid, .ok, .fail_sticky);

  logic [29:0] hc [$];
  logic        hv [$];
  bit seen_fail = 0;
  int n_fail = 0;

  function automatic logic [29:0] pick();
    case ($urandom % 6)
      0: return L;
      1: return L - 1;
      2: return H;
      3: return H + 1;
      4: return L + 30'($urandom % 32'h0800_0000);
      default: return 30'($urandom);
    endcase
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // only in-range values first: nothing may fail
    for (int t = 0; t < 500; t++) begin
      in_valid = ($urandom % 8) != 0;
      c = (t < 50) ? L + 30'(t) : pick();
      hc.push_back(c); hv.push_back(in_valid);
      @(posedge clk); #1;
      if (hc.size() >= 3) begin
        logic [29:0] ec; logic ev, eok;
        ec = hc.pop_front(); ev = hv.pop_front();
        eok = !ev || (ec >= L && ec <= H);
        if (!eok) seen_fail = 1;
        checks++;
        if (ok_valid !== ev || ok !== eok || fail_sticky !== seen_fail) begin
          failures++;
          $display("t=%0d c=%h v=%b ok=%b exp %b sticky=%b exp %b", t, ec, ok_valid, ok, eok, fail_sticky, seen_fail);
        end
        if (!eok) n_fail++;
      end
    end
    checks++; if (n_fail < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
