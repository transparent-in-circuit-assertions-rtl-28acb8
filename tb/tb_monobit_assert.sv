// tb_monobit_assert: runs the monobit test at its full size (256-word windows,
// band 15917 < ones < 16851). Windows of random words (in band) alternate
// with windows biased towards ones or zeros (out of band), one all-ones window
// (the 15-bit sum wraps to 0), one window with gaps in in_valid and one with
// its ones confined to fixed 32-bit lanes (in band only if every lane of the
// adder tree is summed). The number
// of ones per window is counted here with $countones; each verdict must match
// and must appear exactly 8 cycles after the window's last word.
module tb_monobit_assert;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         in_valid = 0;
  logic [127:0] din = '0;
  logic ok, window_done, fail_sticky;
  monobit_assert dut (.clk, .rst_n, .in_valid, .din, .ok, .window_done, .fail_sticky);

  int cyc = 0;
  always @(posedge clk) cyc++;

  // Expected verdicts in order and the cycle of each window's last word.
  bit exp_ok [$];
  int last_cyc [$];
  int n_done = 0, n_bad = 0;
  bit any_bad = 0;

  always @(posedge clk) begin
    #2;
    if (rst_n && window_done) begin
      int lc; bit e;
      n_done++;
      checks++;
      if (exp_ok.size() == 0) begin failures++; $display("unexpected verdict"); end
      else begin
        e = exp_ok.pop_front(); lc = last_cyc.pop_front();
        if (!e) begin n_bad++; any_bad = 1; end
        if (ok !== e) begin failures++; $display("window %0d ok=%b exp %b", n_done, ok, e); end
        checks++;
        // the edge that registers the last word is stage 1 of 8
        if (lc >= 0 && cyc - lc + 1 != 8) begin failures++; $display("window %0d latency %0d", n_done, cyc - lc + 1); end
        checks++;
        if (fail_sticky !== any_bad) failures++;
      end
    end
  end

  function automatic logic [127:0] word(int kind);
    logic [127:0] w;
    w = {$urandom, $urandom, $urandom, $urandom};
    case (kind)
      1: w = w | {$urandom, $urandom, $urandom, $urandom};   // ~75% ones
      2: w = w & {$urandom, $urandom, $urandom, $urandom};   // ~25% ones
      3: w = '1;
      4: w = {32'hFFFF_FFFF, 32'h0, w[63:0]};                // ones only in the top lane
      default: ;
    endcase
    return w;
  endfunction

  // Drive one window of 256 valid words; with gaps, idle cycles are inserted.
  task automatic window(int kind, bit judged, bit gaps);
    int ones = 0;
    int k = 0;
    while (k < 256) begin
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid = 0; din = word(0);
      end else begin
        in_valid = 1; din = word(kind);
        ones += $countones(din);
        k++;
      end
      @(posedge clk); #1;
    end
    if (judged) begin
      exp_ok.push_back((ones > 15917) && (ones < 16851));
      last_cyc.push_back(gaps ? -1 : cyc);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    window(0, 1, 0);
    window(0, 1, 0);
    window(1, 1, 0);
    window(0, 1, 0);
    window(2, 1, 0);
    window(3, 1, 0);
    window(0, 1, 1);
    window(4, 1, 0);
    window(0, 1, 0);
    // the last judged window needs the next window's first word to close it
    in_valid = 1; din = word(0);
    repeat (12) begin @(posedge clk); #1; end
    in_valid = 0;
    checks++; if (n_done != 9) begin failures++; $display("verdicts %0d", n_done); end
    checks++; if (n_bad < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
