// tb_pattern_assert: runs the pattern-counter test at full size (256-word
// windows, band 455 < count < 569 for each of the 16 nibble values). The
// testbench counts every nibble value of every word itself; each verdict must
// match the AND of the 16 range checks and appear 8 register stages after the
// window's last word. Windows: uniform random, exactly balanced, one with
// nibble value 0 removed, one biased towards ones, and uniform again.
module tb_pattern_assert;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         in_valid = 0;
  logic [127:0] din = '0;
  logic ok, window_done, fail_sticky;
  pattern_assert dut (.clk, .rst_n, .in_valid, .din, .ok, .window_done, .fail_sticky);

  int cyc = 0;
  always @(posedge clk) cyc++;

  bit exp_ok [$];
  int last_cyc [$];
  int n_done = 0, n_bad = 0, n_good = 0;
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
        if (!e) begin n_bad++; any_bad = 1; end else n_good++;
        if (ok !== e) begin failures++; $display("window %0d ok=%b exp %b", n_done, ok, e); end
        checks++;
        if (cyc - lc + 1 != 8) begin failures++; $display("window %0d latency %0d", n_done, cyc - lc + 1); end
        checks++;
        if (fail_sticky !== any_bad) failures++;
      end
    end
  end

  function automatic logic [127:0] word(int kind);
    logic [127:0] w;
    w = {$urandom, $urandom, $urandom, $urandom};
    if (kind == 1) begin
      for (int n = 0; n < 32; n++) if (w[4*n +: 4] == 4'h0) w[4*n +: 4] = 4'h1;
    end else if (kind == 2) begin
      w = w | {$urandom, $urandom, $urandom, $urandom};
    end else if (kind == 3) begin
      // every nibble value exactly twice, shuffled: all counts 512
      logic [3:0] nib [32];
      for (int n = 0; n < 32; n++) nib[n] = 4'(n % 16);
      for (int n = 31; n > 0; n--) begin
        int j; logic [3:0] t;
        j = int'($urandom % (n + 1));
        t = nib[n]; nib[n] = nib[j]; nib[j] = t;
      end
      for (int n = 0; n < 32; n++) w[4*n +: 4] = nib[n];
    end
    return w;
  endfunction

  task automatic window(int kind);
    int cnt [16];
    bit e;
    foreach (cnt[p]) cnt[p] = 0;
    for (int k = 0; k < 256; k++) begin
      in_valid = 1; din = word(kind);
      for (int n = 0; n < 32; n++) cnt[din[4*n +: 4]]++;
      @(posedge clk); #1;
    end
    e = 1;
    foreach (cnt[p]) if (!(cnt[p] > 455 && cnt[p] < 569)) e = 0;
    exp_ok.push_back(e);
    last_cyc.push_back(cyc);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    window(0);
    window(3);
    window(1);
    window(0);
    window(2);
    window(0);
    in_valid = 1; din = word(0);
    repeat (12) begin @(posedge clk); #1; end
    in_valid = 0;
    checks++; if (n_done != 6) begin failures++; $display("verdicts %0d", n_done); end
    checks++; if (n_bad < 2 || n_good < 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
