// isd_gaussian_filter: 11-tap Gaussian FIR filter,
//   y[n] = sum_k c_k x[n-k],  c = (1 4 19 57 108 134 108 57 19 4 1),
// built without multipliers from an ISD constant vector multiplier.
//
// The filter is split as in the source: a multiplier block (isd_mcm) that
// multiplies each sample by the six distinct coefficients using the
// decomposition a = PM * PV with public vector (1, 2^2+1, 2^4+1), and a
// register array (isd_register_array) that delays those six products to their
// taps and adds them.  Every register-to-register path holds at most one
// adder.  The coefficients sum to 512, so y / 512 is the unit-gain output;
// the full sum is given and the scaling is left to the user (this design's
// choice).  The sample width and the valid signal are also this design's.
//
// Interface: x (signed W_IN bits), in_valid in; y (signed W bits), out_valid
// out.  Filter history is the last 11 valid samples; reset clears it to 0.
// Timing: 7 cycles from a valid x to its y (input register, stage 1,
// stage 2, then four adder-tree levels); one sample per clock.  With
// MERGE_STAGES = 1 the two multiplier-block stages share one cycle (6 cycles,
// three fewer registers, two adders on the longest path).
module isd_gaussian_filter #(
  parameter int unsigned W_IN = isd_pkg::W_IN_DEF,
  parameter int unsigned W    = W_IN + 10,
  parameter bit          MERGE_STAGES = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [W_IN-1:0] x,
  output logic                   out_valid,
  output logic signed [W-1:0]    y
);

  localparam int unsigned NC = isd_pkg::GAUSS_N;

  // Elaboration check: the decomposition must reproduce the coefficients.
  for (genvar n = 0; n < NC; n++) begin : g_chk
    localparam int A = isd_pkg::gauss_pm_pv(n);
    localparam int C = isd_pkg::GAUSS_COEF[n];
    if (A != C) begin : g_bad
      $error("isd_gaussian_filter: PM * PV gives %0d for coefficient %0d", A, C);
    end
  end

  logic                prod_valid;
  logic signed [W-1:0] prod [NC];

  isd_mcm #(
    .W_IN(W_IN), .W(W), .M(isd_pkg::GAUSS_M), .N(NC),
    .PV(isd_pkg::GAUSS_PV), .PM(isd_pkg::GAUSS_PM),
    .MERGE_STAGES(MERGE_STAGES)
  ) u_mcm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .out_valid(prod_valid),
    .prod     (prod)
  );

  isd_register_array #(
    .W(W), .NC(NC), .TAPS(isd_pkg::GAUSS_TAPS), .TAP_IDX(isd_pkg::GAUSS_TAP_IDX)
  ) u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (prod_valid),
    .prod     (prod),
    .out_valid(out_valid),
    .y        (y)
  );

endmodule
