// flopoco_pri_assert: locate the first infinity/NaN flag of a filter bank.
//
// A floating-point datapath raises one flag bit per tap when a value becomes
// infinite or NaN. Instead of a single alarm, this assertion reports which
// flag fired: 144 flags are reduced to an 8-bit code, 0 when no flag is set
// and k+1 when flag k is the lowest-numbered set flag.
//
// Pipeline (3 register stages): input register; 18 eight-input priority
// encoders (al_pri8) registered; selection of the first group with a hit and
// forming of the code. The priority order and the 0 = none coding are this
// design's choice.
// Interface: in_valid/flags in; code_valid/code three cycles later. code is 0
// while no verdict is valid.
module flopoco_pri_assert #(
  parameter int unsigned N_FLAGS = 144,
  parameter int unsigned CODE_W  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [N_FLAGS-1:0] flags,
  output logic               code_valid,
  output logic [CODE_W-1:0]  code
);

  localparam int unsigned GROUPS = (N_FLAGS + 7) / 8;

  // CODE_W must hold N_FLAGS + 1 distinct codes.
  if ((N_FLAGS + 1) > (1 << CODE_W)) begin : g_bad_width
    $error("flopoco_pri_assert: CODE_W too small for N_FLAGS");
  end

  logic [1:0] v_q;
  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[0], in_valid};
  end

  // Stage 1.
  logic [GROUPS*8-1:0] flags_q;
  always_ff @(posedge clk) flags_q <= (GROUPS*8)'(flags);

  // Stage 2: group encoders.
  logic [GROUPS-1:0] hit, hit_q;
  logic [2:0]        idx   [GROUPS];
  logic [2:0]        idx_q [GROUPS];
  for (genvar g = 0; g < GROUPS; g++) begin : g_pri
    al_pri8 u_pri (.d(flags_q[8*g +: 8]), .hit(hit[g]), .idx(idx[g]));
  end
  always_ff @(posedge clk) begin
    hit_q <= hit;
    idx_q <= idx;
  end

  // Stage 3: first group with a hit.
  logic [CODE_W-1:0] code_d;
  always_comb begin
    code_d = '0;
    for (int g = GROUPS - 1; g >= 0; g--)
      if (hit_q[g]) code_d = CODE_W'(8 * g) + CODE_W'(idx_q[g]) + CODE_W'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code_valid <= 1'b0;
      code       <= '0;
    end else begin
      code_valid <= v_q[1];
      code       <= v_q[1] ? code_d : '0;
    end
  end

endmodule
