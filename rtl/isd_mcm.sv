// isd_mcm: multiplier-free multiplication of one input sample by a constant
// vector a, using the ISD decomposition a = PM * PV.
//
// Stage 1 (isd_adder_array) registers x and forms every public product
// PV[m] * x with one adder each.  Stage 2 (isd_private_matrix) shifts and adds
// those public products, row by row of PM, in pipelined binary adder trees.
// With the default Gaussian decomposition, PV = (1, 5, 17) and
// a = (1, 4, 19, 57, 108, 134), this costs 2 + 4 = 6 adders and
// 1 + 3 + 6 = 10 registers (each W bits wide), with one adder between
// registers, as in the source's example.  PV and PM are parameters, so any
// decomposition produced offline can be dropped in.
//
// Interface: x/in_valid in; prod[n] = a[n] * x and out_valid out, where
// a[n] = sum over m of PM[n][m] * PV[m].
// Timing: 2 + DEPTH cycles, DEPTH being the deepest private-matrix adder
// tree (1 for the default, so 3 cycles); one input accepted every clock.
// MERGE_STAGES = 1 folds stage 1 and the first level of stage 2 into one
// clock cycle, as the source suggests for designs with a low clock rate:
// the stage-1 registers (M of them) disappear, the latency drops by one and
// the longest path becomes two adders.
module isd_mcm #(
  parameter int unsigned W_IN = isd_pkg::W_IN_DEF,
  parameter int unsigned W    = isd_pkg::W_DEF,
  parameter int unsigned M    = isd_pkg::GAUSS_M,
  parameter int unsigned N    = isd_pkg::GAUSS_N,
  parameter int          PV [M]    = isd_pkg::GAUSS_PV,
  parameter int          PM [N][M] = isd_pkg::GAUSS_PM,
  parameter bit          MERGE_STAGES = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [W_IN-1:0] x,
  output logic                   out_valid,
  output logic signed [W-1:0]    prod [N]
);

  logic                pv_valid;
  logic signed [W-1:0] pv_x [M];

  isd_adder_array #(.W_IN(W_IN), .W(W), .M(M), .PV(PV), .REG_OUT(!MERGE_STAGES)) u_stage1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .pv_valid (pv_valid),
    .pv_x     (pv_x)
  );

  isd_private_matrix #(.W(W), .M(M), .N(N), .PM(PM)) u_stage2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pv_valid),
    .pv_x     (pv_x),
    .out_valid(out_valid),
    .y        (prod)
  );

endmodule
