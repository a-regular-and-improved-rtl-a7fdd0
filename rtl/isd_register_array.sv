// isd_register_array: the delay-and-sum half of a FIR filter whose products
// come from a constant vector multiplier.
//
// The multiplier block delivers, for each new sample x[n], the products
// c_j * x[n] of the NC distinct coefficients.  Tap k of the filter needs
// c_{TAP_IDX[k]} * x[n-k], so each distinct product runs down one delay line
// of its own, as long as its farthest tap, and tap k reads position k of it
// (position 0 is the product itself).  The TAPS tap values are then summed
// by a pipelined binary adder tree (isd_adder_tree).  The delay lines only
// move on a valid product, so gaps in the input stream do not enter the
// filter history.  The source shows the register array as delay chains
// feeding adders, with one adder between registers; the sharing of one delay
// line by the two symmetric taps of a coefficient and the balanced tree are
// this design's own arrangement of that idea.
//
// Interface: prod[NC], in_valid in; y = sum over k of
// prod[TAP_IDX[k]] delayed by k valid samples, out_valid out.
// Timing: ceil(log2 TAPS) cycles (4 for 11 taps), one output per valid input.
module isd_register_array #(
  parameter int unsigned W    = isd_pkg::W_DEF,
  parameter int unsigned NC   = isd_pkg::GAUSS_N,
  parameter int unsigned TAPS = isd_pkg::GAUSS_TAPS,
  parameter int          TAP_IDX [TAPS] = isd_pkg::GAUSS_TAP_IDX
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] prod [NC],
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  // Farthest tap that uses coefficient j (-1 when none does).
  function automatic int max_tap(input int j);
    int d = -1;
    for (int k = 0; k < int'(TAPS); k++) if (TAP_IDX[k] == j) d = k;
    return d;
  endfunction

  logic signed [W-1:0] taps [TAPS];

  for (genvar j = 0; j < NC; j++) begin : g_line
    localparam int D = max_tap(j);
    if (D < 0) begin : g_unused
      $error("isd_register_array: coefficient %0d is used by no tap", j);
    end else if (D > 0) begin : g_dly
      // line[i] holds prod[j] of the sample i + 1 valid samples ago.
      logic signed [W-1:0] line [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < D; i++) line[i] <= '0;
        end else if (in_valid) begin
          line[0] <= prod[j];
          for (int i = 1; i < D; i++) line[i] <= line[i-1];
        end
      end
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    localparam int J = TAP_IDX[k];
    if (k == 0) begin : g_now
      assign taps[k] = prod[J];
    end else begin : g_old
      assign taps[k] = g_line[J].g_dly.line[k-1];
    end
  end

  isd_adder_tree #(.W(W), .N(TAPS), .NEG('0)) u_sum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .din      (taps),
    .out_valid(out_valid),
    .dout     (y)
  );

endmodule
