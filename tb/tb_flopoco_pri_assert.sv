// tb_flopoco_pri_assert: 144 flags, mostly clear, with one, several or no
// flags raised at random positions (including 0 and 143). The expected code,
// 0 or 1 + the index of the lowest raised flag, is found by a linear search
// and compared 3 cycles later, together with code_valid.
module tb_flopoco_pri_assert;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         in_valid = 0;
  logic [143:0] flags = '0;
  logic         code_valid;
  logic [7:0]   code;
  flopoco_pri_assert dut (.clk, .rst_n, .in_valid, .flags, .code_valid, .code);

  logic [143:0] hf [$];
  logic         hv [$];
  int n_hits = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      in_valid = ($urandom % 8) != 0;
      flags = '0;
      case (t % 4)
        0: ;
        1: flags[$urandom % 144] = 1'b1;
        2: repeat (1 + $urandom % 5) flags[$urandom % 144] = 1'b1;
        default: flags[(t % 8 == 3) ? 0 : 143] = 1'b1;
      endcase
      hf.push_back(flags); hv.push_back(in_valid);
      @(posedge clk); #1;
      if (hf.size() >= 3) begin
        logic [143:0] ef; logic ev; int e;
        ef = hf.pop_front(); ev = hv.pop_front();
        e = 0;
        if (ev) for (int i = 143; i >= 0; i--) if (ef[i]) e = i + 1;
        if (e != 0) n_hits++;
        checks++;
        if (code_valid !== ev || int'(code) != e) begin
          failures++; $display("t=%0d code=%0d exp %0d valid=%b", t, code, e, code_valid);
        end
      end
    end
    checks++; if (n_hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
