// tb_al_counter: counter(3, 9) with random enable; a software model of the
// count (3..9, wrap to 3) is compared every cycle, and at_from with count==3.
module tb_al_counter;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] count;
  logic at_from;
  al_counter #(.WIDTH(4), .FROM(3), .TO(9)) dut (.clk, .rst_n, .en, .count, .at_from);
  int model, wraps;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst_n = 1; model = 3; wraps = 0;
    for (int t = 0; t < 200; t++) begin
      en = 1'($urandom);
      @(posedge clk); #1;
      if (en) begin
        if (model == 9) begin model = 3; wraps++; end else model++;
      end
      checks++;
      if (int'(count) != model || at_from != (model == 3)) begin
        failures++; $display("t=%0d count=%0d exp %0d", t, count, model);
      end
    end
    checks++; if (wraps < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
