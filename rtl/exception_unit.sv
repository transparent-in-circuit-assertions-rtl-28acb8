// exception_unit: semi-transparent exception on a monitored signal.
//
// An assertion with a catch handler may overwrite the signal it watches. The
// signal SRC and the handler's value are carried by a pipeline-and-route link
// (IN_STAGES hops) to spare logic, where the range assertion (inrange_assert,
// 3 cycles) and the exception circuit run side by side. The exception circuit
// is the handler expression delayed to match the assertion's latency, so the
// two paths stay balanced. A second link (OUT_STAGES hops) brings the failure
// flag and the exception value back to SRC, where a 2:1 multiplexer selects
// SRC (input 0) or the exception value (input 1).
//
// Use: the program-counter example, catch { C = OutOfRangeTrap }: a program
// counter that leaves the valid window is replaced by the trap address.
// Timing: the exception value reaches src_out IN_STAGES + 3 + OUT_STAGES
// cycles after the offending SRC value; in between SRC passes unchanged,
// which is why the scheme is only semi-transparent. src_out is combinational
// from src and registered return data, so the path from SRC to its readers
// gains only one multiplexer. The link depths are this design's choice.
// Interface: src, catch_val in; src_out, taken (exception selected) out.
module exception_unit
  import ica_pkg::*;
#(
  parameter int unsigned  W          = PC_W,
  parameter logic [W-1:0] L          = W'(PC_LO),
  parameter logic [W-1:0] H          = W'(PC_HI),
  parameter int unsigned  IN_STAGES  = 2,
  parameter int unsigned  OUT_STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] src,
  input  logic [W-1:0] catch_val,
  output logic [W-1:0] src_out,
  output logic         taken
);

  localparam int unsigned ASSERT_LATENCY = 3;

  // Link 1: SRC and the handler input to the spare region.
  logic         fwd_valid;
  logic [W-1:0] fwd_src, fwd_catch;
  pipe_link #(.WIDTH(2*W), .STAGES(IN_STAGES)) u_link_in (
    .clk(clk), .rst_n(rst_n),
    .in_valid(1'b1), .in_data({src, catch_val}),
    .out_valid(fwd_valid), .out_data({fwd_src, fwd_catch}));

  // Assertion circuit.
  logic ok_valid, ok, fail_sticky_unused;
  inrange_assert #(.W(W), .L(L), .H(H)) u_assert (
    .clk(clk), .rst_n(rst_n), .in_valid(fwd_valid), .c(fwd_src),
    .ok_valid(ok_valid), .ok(ok), .fail_sticky(fail_sticky_unused));

  // Exception circuit, balanced against the assertion.
  logic [W-1:0] exc_val;
  al_delay #(.WIDTH(W), .N(ASSERT_LATENCY)) u_exc (
    .clk(clk), .d(fwd_catch), .q(exc_val));

  // Link 2: condition and exception value back to the driver of SRC.
  logic         ret_valid, ret_fail;
  logic [W-1:0] ret_val;
  pipe_link #(.WIDTH(W+1), .STAGES(OUT_STAGES)) u_link_out (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ok_valid), .in_data({~ok, exc_val}),
    .out_valid(ret_valid), .out_data({ret_fail, ret_val}));

  assign taken   = ret_valid & ret_fail;
  assign src_out = taken ? ret_val : src;

endmodule
