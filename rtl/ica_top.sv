// ica_top: the inserted assertion circuits of the four benchmark experiments
// and the exception example, side by side.
//
// Each experiment watches a different user circuit, so each has its own
// ports. The monitored signals enter through a pipeline-and-route link whose
// depth is the number of routing hops used for that experiment; the assertion
// sits behind it in otherwise unused logic.
//   exp1  8 x 30-bit program counters (240 bits, 2 hops) -> 8 x inrange_assert
//         -> pc_ok (per core), pc_fail (sticky alarm, any core)
//   exp2  3 x 128-bit AES round keys (384 bits, 5 hops) -> 3 x monobit_assert
//         -> led (AND of the three verdicts), mono_fail
//   exp3  4 x 128-bit AES buses (512 bits, 5 hops) -> 4 x pattern_assert
//         -> pat_ok (AND), pat_fail
//   exp4  144 inf/NaN flags (3 hops) -> flopoco_pri_assert -> fp_code
//   exc   program counter with catch { C = OutOfRangeTrap } -> exception_unit
// The links' valid flags are driven high: the user circuits run freely and the
// flags only mask the pipeline contents left over from before reset.
// Timing: pc_ok 5 cycles after pc; led / pat_ok 8 cycles after the last word
// of a 256-word window plus 5 link cycles; fp_code 6 cycles after flags.
module ica_top
  import ica_pkg::*;
#(
  parameter int unsigned N_CORES     = 8,
  parameter int unsigned PC_STAGES   = 2,
  parameter int unsigned N_MONO      = 3,
  parameter int unsigned MONO_STAGES = 5,
  parameter int unsigned N_PAT       = 4,
  parameter int unsigned PAT_STAGES  = 5,
  parameter int unsigned N_FP_FLAGS  = 144,
  parameter int unsigned FP_STAGES   = 3,
  parameter int unsigned WINDOW      = 256
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // exp1
  input  logic [N_CORES-1:0][PC_W-1:0]   pc,
  output logic [N_CORES-1:0]             pc_ok,
  output logic                           pc_fail,
  // exp2
  input  logic [N_MONO-1:0][127:0]       mono_in,
  output logic                           led,
  output logic                           mono_done,
  output logic                           mono_fail,
  // exp3
  input  logic [N_PAT-1:0][127:0]        pat_in,
  output logic                           pat_ok,
  output logic                           pat_done,
  output logic                           pat_fail,
  // exp4
  input  logic [N_FP_FLAGS-1:0]          fp_flags,
  output logic                           fp_valid,
  output logic [7:0]                     fp_code,
  // exception
  input  logic [PC_W-1:0]                exc_src,
  input  logic [PC_W-1:0]                exc_trap,
  output logic [PC_W-1:0]                exc_src_out,
  output logic                           exc_taken
);

  // ---------------- exp1: program-counter range check ----------------
  logic                          pc_lv;
  logic [N_CORES-1:0][PC_W-1:0]  pc_l;
  logic [N_CORES-1:0]            pc_okv, pc_fs;
  pipe_link #(.WIDTH(N_CORES*PC_W), .STAGES(PC_STAGES)) u_pc_link (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_data(pc),
    .out_valid(pc_lv), .out_data(pc_l));
  for (genvar i = 0; i < N_CORES; i++) begin : g_pc
    inrange_assert u_rng (
      .clk(clk), .rst_n(rst_n), .in_valid(pc_lv), .c(pc_l[i]),
      .ok_valid(pc_okv[i]), .ok(pc_ok[i]), .fail_sticky(pc_fs[i]));
  end
  assign pc_fail = |pc_fs;

  // ---------------- exp2: monobit tests ----------------
  logic                      mono_lv;
  logic [N_MONO-1:0][127:0]  mono_l;
  logic [N_MONO-1:0]         mono_ok, mono_wd, mono_fs;
  pipe_link #(.WIDTH(N_MONO*128), .STAGES(MONO_STAGES)) u_mono_link (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_data(mono_in),
    .out_valid(mono_lv), .out_data(mono_l));
  for (genvar i = 0; i < N_MONO; i++) begin : g_mono
    monobit_assert #(.WINDOW(WINDOW)) u_mono (
      .clk(clk), .rst_n(rst_n), .in_valid(mono_lv), .din(mono_l[i]),
      .ok(mono_ok[i]), .window_done(mono_wd[i]), .fail_sticky(mono_fs[i]));
  end
  assign led       = &mono_ok;
  assign mono_done = mono_wd[0];
  assign mono_fail = |mono_fs;

  // ---------------- exp3: pattern counters ----------------
  logic                     pat_lv;
  logic [N_PAT-1:0][127:0]  pat_l;
  logic [N_PAT-1:0]         pat_okv, pat_wd, pat_fs;
  pipe_link #(.WIDTH(N_PAT*128), .STAGES(PAT_STAGES)) u_pat_link (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_data(pat_in),
    .out_valid(pat_lv), .out_data(pat_l));
  for (genvar i = 0; i < N_PAT; i++) begin : g_pat
    pattern_assert #(.WINDOW(WINDOW)) u_pat (
      .clk(clk), .rst_n(rst_n), .in_valid(pat_lv), .din(pat_l[i]),
      .ok(pat_okv[i]), .window_done(pat_wd[i]), .fail_sticky(pat_fs[i]));
  end
  assign pat_ok   = &pat_okv;
  assign pat_done = pat_wd[0];
  assign pat_fail = |pat_fs;

  // ---------------- exp4: inf/NaN locator ----------------
  logic                  fp_lv;
  logic [N_FP_FLAGS-1:0] fp_l;
  pipe_link #(.WIDTH(N_FP_FLAGS), .STAGES(FP_STAGES)) u_fp_link (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_data(fp_flags),
    .out_valid(fp_lv), .out_data(fp_l));
  flopoco_pri_assert #(.N_FLAGS(N_FP_FLAGS), .CODE_W(8)) u_fp (
    .clk(clk), .rst_n(rst_n), .in_valid(fp_lv), .flags(fp_l),
    .code_valid(fp_valid), .code(fp_code));

  // ---------------- exception on a program counter ----------------
  exception_unit u_exc (
    .clk(clk), .rst_n(rst_n), .src(exc_src), .catch_val(exc_trap),
    .src_out(exc_src_out), .taken(exc_taken));

endmodule
