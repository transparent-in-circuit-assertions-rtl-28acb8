// tb_pipe_link: drives random bundles into a 3-hop link and checks that each
// bundle and its valid flag come out exactly STAGES cycles later, and that
// the valid flag is low right after reset. Also checks a 0-hop link (wire).
module tb_pipe_link;
  localparam int W = 40, S = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         iv, ov, ov0;
  logic [W-1:0] id, od, od0;
  pipe_link #(.WIDTH(W), .STAGES(S)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));
  pipe_link #(.WIDTH(W), .STAGES(0)) dut0 (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov0), .out_data(od0));

  logic [W-1:0] hist_d [$];
  logic         hist_v [$];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; id = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (ov !== 1'b0) failures++;
    for (int t = 0; t < 200; t++) begin
      iv = 1'($urandom);
      id = {8'($urandom), $urandom};
      #1;
      checks++; if (od0 !== id || ov0 !== iv) failures++;
      hist_d.push_back(id); hist_v.push_back(iv);
      @(posedge clk); #1;
      if (hist_d.size() >= S) begin
        logic [W-1:0] ed; logic ev;
        ed = hist_d.pop_front(); ev = hist_v.pop_front();
        checks++;
        if (ov !== ev || (ev && od !== ed)) begin
          failures++;
          $display("t=%0d got %h/%b exp %h/%b", t, od, ov, ed, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
