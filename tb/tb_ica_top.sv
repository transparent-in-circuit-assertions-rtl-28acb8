// tb_ica_top: end-to-end run of all inserted assertions at their full size
// (no parameter overrides). Five 256-word windows are streamed into every
// input at once, and the testbench keeps its own record of each input so it
// can compute every expected verdict independently:
//   exp1  8 program counters, ~5% out of the window: pc_ok per core and the
//         sticky pc_fail, 2 link + 3 assertion cycles later
//   exp2  3 monobit streams; stream 1 biased to ones in window 2, stream 0 to
//         zeros in window 3: led and mono_done 5 + 8 cycles after each window
//   exp3  4 pattern streams, exactly balanced in windows 0 and 4; nibble 0 removed from stream 2 in window 1 and
//         stream 0 biased in window 3: pat_ok and pat_done likewise
//   exp4  inf/NaN flags at random positions: fp_code 3 + 3 cycles later
//   exc   out-of-range program counters replaced by the trap value 7 cycles
//         later (2 + 3 + 2)
// Each mechanism is counted (range failure, passing and failing monobit and
// pattern windows, located flag, exception taken); one that never happened
// counts as a failure.
module tb_ica_top;
  import ica_pkg::*;
  localparam int NW = 5;
  localparam int NK = NW * 256 + 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0][29:0]   pc;
  logic [7:0]         pc_ok;
  logic               pc_fail;
  logic [2:0][127:0]  mono_in;
  logic               led, mono_done, mono_fail;
  logic [3:0][127:0]  pat_in;
  logic               pat_ok, pat_done, pat_fail;
  logic [143:0]       fp_flags;
  logic               fp_valid;
  logic [7:0]         fp_code;
  logic [29:0]        exc_src, exc_trap, exc_src_out;
  logic               exc_taken;

  ica_top dut (.*);

  // Per-cycle input records.
  logic [7:0]  pc_in_range [NK];
  int          fp_exp      [NK];
  logic        exc_bad     [NK];
  logic [29:0] exc_trap_h  [NK];
  int          ones   [NW][3];
  int          pcnt   [NW][4][16];

  int n_pc_fail = 0, n_mono_pass = 0, n_mono_fail = 0, n_pat_pass = 0, n_pat_fail = 0;
  int n_fp_hit = 0, n_exc = 0;
  bit any_pc_fail = 0, any_mono_fail = 0, any_pat_fail = 0;

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Every nibble value exactly twice, shuffled: a window of such words has
  // each pattern count at exactly 512 and must pass.
  function automatic logic [127:0] balanced128();
    logic [3:0] nib [32];
    logic [127:0] r;
    for (int n = 0; n < 32; n++) nib[n] = 4'(n % 16);
    for (int n = 31; n > 0; n--) begin
      int j; logic [3:0] t;
      j = int'($urandom % (n + 1));
      t = nib[n]; nib[n] = nib[j]; nib[j] = t;
    end
    for (int n = 0; n < 32; n++) r[4*n +: 4] = nib[n];
    return r;
  endfunction

  initial begin
    repeat (NK + 200) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ones[w, s]) ones[w][s] = 0;
    foreach (pcnt[w, s, p]) pcnt[w][s][p] = 0;
    pc = '0; mono_in = '0; pat_in = '0; fp_flags = '0; exc_src = PC_LO; exc_trap = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < NK; k++) begin
      int w;
      w = k / 256;
      // ---- drive ----
      for (int i = 0; i < 8; i++) begin
        if ($urandom % 20 == 0) pc[i] = ($urandom % 2 == 1) ? PC_HI + 30'(1 + $urandom % 64) : PC_LO - 30'(1 + $urandom % 64);
        else                    pc[i] = PC_LO + 30'($urandom % 32'h0800_0000);
        pc_in_range[k][i] = (pc[i] >= PC_LO) && (pc[i] <= PC_HI);
      end
      for (int s = 0; s < 3; s++) begin
        mono_in[s] = rnd128();
        if (w == 2 && s == 1) mono_in[s] |= rnd128();
        if (w == 3 && s == 0) mono_in[s] &= rnd128();
        if (w < NW) ones[w][s] += $countones(mono_in[s]);
      end
      for (int s = 0; s < 4; s++) begin
        pat_in[s] = (w == 0 || w == 4) ? balanced128() : rnd128();
        if (w == 3 && s == 0) pat_in[s] |= rnd128();
        for (int n = 0; n < 32; n++) begin
          if (w == 1 && s == 2 && pat_in[s][4*n +: 4] == 4'h0) pat_in[s][4*n +: 4] = 4'h5;
          if (w < NW) pcnt[w][s][pat_in[s][4*n +: 4]]++;
        end
      end
      fp_flags = '0;
      if ($urandom % 3 == 0) repeat (1 + $urandom % 3) fp_flags[$urandom % 144] = 1'b1;
      fp_exp[k] = 0;
      for (int i = 143; i >= 0; i--) if (fp_flags[i]) fp_exp[k] = i + 1;
      exc_src = ($urandom % 10 == 0) ? PC_HI + 30'(1 + $urandom % 9) : PC_LO + 30'($urandom % 1000);
      exc_trap = 30'($urandom);
      exc_bad[k] = (exc_src > PC_HI);
      exc_trap_h[k] = exc_trap;
      #1;
      // ---- check ----
      if (k >= 5) begin
        checks++;
        if (pc_ok !== pc_in_range[k-5]) begin failures++; $display("k=%0d pc_ok=%b exp %b", k, pc_ok, pc_in_range[k-5]); end
        if (pc_in_range[k-5] != 8'hFF) begin any_pc_fail = 1; n_pc_fail++; end
        checks++;
        if (pc_fail !== any_pc_fail) failures++;
      end
      if (k >= 6) begin
        checks++;
        if (!fp_valid || int'(fp_code) != fp_exp[k-6]) begin failures++; $display("k=%0d fp_code=%0d exp %0d", k, fp_code, fp_exp[k-6]); end
        if (fp_exp[k-6] != 0) n_fp_hit++;
      end
      if (k >= 7) begin
        checks++;
        if (exc_taken !== exc_bad[k-7] || exc_src_out !== (exc_bad[k-7] ? exc_trap_h[k-7] : exc_src)) begin
          failures++; $display("k=%0d exc_taken=%b exp %b", k, exc_taken, exc_bad[k-7]);
        end
        if (exc_bad[k-7]) n_exc++;
      end
      begin
        // windows close 5 (link) + 8 (assertion) cycles after their last word
        bit is_v; int wv;
        is_v = (k >= 268) && ((k - 268) % 256 == 0);
        wv = (k - 268) / 256;
        checks++;
        if (mono_done !== is_v || pat_done !== is_v) begin failures++; $display("k=%0d done %b %b exp %b", k, mono_done, pat_done, is_v); end
        if (is_v && wv < NW) begin
          bit em, ep;
          em = 1; ep = 1;
          for (int s = 0; s < 3; s++) if (!(ones[wv][s] > int'(MONO_LO) && ones[wv][s] < int'(MONO_HI))) em = 0;
          for (int s = 0; s < 4; s++)
            for (int p = 0; p < 16; p++)
              if (!(pcnt[wv][s][p] > int'(PAT_LO) && pcnt[wv][s][p] < int'(PAT_HI))) ep = 0;
          if (em) n_mono_pass++; else begin n_mono_fail++; any_mono_fail = 1; end
          if (ep) n_pat_pass++;  else begin n_pat_fail++;  any_pat_fail = 1; end
          checks += 4;
          if (led !== em)             begin failures++; $display("window %0d led=%b exp %b", wv, led, em); end
          if (pat_ok !== ep)          begin failures++; $display("window %0d pat_ok=%b exp %b", wv, pat_ok, ep); end
          if (mono_fail !== any_mono_fail) failures++;
          if (pat_fail !== any_pat_fail)   failures++;
        end
      end
      @(posedge clk); #1;
    end
    $display("mechanisms: pc_fail=%0d mono_pass=%0d mono_fail=%0d pat_pass=%0d pat_fail=%0d fp_hit=%0d exc=%0d",
             n_pc_fail, n_mono_pass, n_mono_fail, n_pat_pass, n_pat_fail, n_fp_hit, n_exc);
    checks += 7;
    if (n_pc_fail == 0)   failures++;
    if (n_mono_pass == 0) failures++;
    if (n_mono_fail == 0) failures++;
    if (n_pat_pass == 0)  failures++;
    if (n_pat_fail == 0)  failures++;
    if (n_fp_hit == 0)    failures++;
    if (n_exc == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
