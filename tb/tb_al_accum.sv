// tb_al_accum: random inputs, enables and clears into an 8-bit-in, 10-bit sum
// accumulator; compares with a software model (clear loads the input, the sum
// wraps at 2^10) every cycle.
module tb_al_accum;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] d = '0;
  logic [9:0] acc;
  al_accum #(.IN_W(8), .ACC_W(10)) dut (.clk, .rst_n, .en, .clr, .d, .acc);
  int model;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst_n = 1; model = 0;
    checks++; if (acc != 0) failures++;
    for (int t = 0; t < 300; t++) begin
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 16) == 0;
      d   = 8'($urandom);
      @(posedge clk); #1;
      if (en) model = clr ? int'(d) : (model + int'(d)) % 1024;
      checks++;
      if (int'(acc) != model) begin failures++; $display("t=%0d acc=%0d exp %0d", t, acc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
