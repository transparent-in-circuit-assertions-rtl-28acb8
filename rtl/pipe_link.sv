// pipe_link: a latency-oblivious pipeline-and-route link.
//
// Monitored signals that sit anywhere on the device are carried to the region
// that hosts the assertion logic through a chain of spare flip-flops, one per
// routing hop. Each hop adds exactly one cycle and every bit of the bundle
// sees the same number of hops, so signals sampled in one cycle arrive
// together. Defaults are the first experiment: 240 bits (eight 30-bit program
// counters) over two hops.
//
// Interface: in_valid/in_data at the source, out_valid/out_data STAGES cycles
// later. STAGES = 0 is a plain wire.
// Timing: latency STAGES cycles, one bundle per cycle.
// Only the valid flag is reset; the data flops have no reset, like the spare
// flip-flops they stand for. The valid flag is this design's addition, so that
// the assertion behind the link ignores data that entered before reset ended.
module pipe_link #(
  parameter int unsigned WIDTH  = 240,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  if (STAGES == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_pipe
    logic [WIDTH-1:0] data_q  [STAGES];
    logic [STAGES-1:0] valid_q;

    always_ff @(posedge clk) begin
      data_q[0] <= in_data;
      for (int s = 1; s < STAGES; s++) data_q[s] <= data_q[s-1];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) valid_q <= '0;
      else begin
        valid_q[0] <= in_valid;
        for (int s = 1; s < STAGES; s++) valid_q[s] <= valid_q[s-1];
      end
    end

    assign out_valid = valid_q[STAGES-1];
    assign out_data  = data_q[STAGES-1];
  end

endmodule
