// isd_private_matrix: second step of an ISD constant vector multiplication,
// y = PM * pv_x, where every entry of the private matrix PM is 0 or a signed
// power of two.
//
// Each row n of PM becomes one output.  Its nonzero entries select public
// results pv_x[m], shift each left by log2|PM[n][m]| (free wiring) and feed
// them, with the entry's sign, to a pipelined binary adder tree
// (isd_adder_tree), so a row with k nonzero entries costs k - 1 adders and
// every path between registers holds one adder.  A row with one entry is a
// shifted (or negated) register, as for x and 4x in the source's Gaussian
// example.  Rows with fewer levels than the deepest row get extra registers
// so that all outputs leave in the same cycle (this design's choice; the
// source's example has one level in every row).  An all-zero row gives 0.
//
// Interface: pv_x[M], in_valid in; y[N], out_valid out.
// Timing: DEPTH = max over rows of max(1, ceil(log2 k)) cycles, one result
// vector per clock.  Results wrap at W bits.
module isd_private_matrix #(
  parameter int unsigned W = isd_pkg::W_DEF,
  parameter int unsigned M = isd_pkg::GAUSS_M,
  parameter int unsigned N = isd_pkg::GAUSS_N,
  parameter int          PM [N][M] = isd_pkg::GAUSS_PM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] pv_x [M],
  output logic                out_valid,
  output logic signed [W-1:0] y [N]
);

  // Nonzero entries in row r.
  function automatic int nz_count(input int r);
    int c = 0;
    for (int m = 0; m < int'(M); m++) if (PM[r][m] != 0) c++;
    return c;
  endfunction

  // Column of the k-th nonzero entry of row r.
  function automatic int nz_col(input int r, input int k);
    int c = 0;
    for (int m = 0; m < int'(M); m++) begin
      if (PM[r][m] != 0) begin
        if (c == k) return m;
        c++;
      end
    end
    return 0;
  endfunction

  // Value of the k-th nonzero entry of row r.
  function automatic int nz_val(input int r, input int k);
    return PM[r][nz_col(r, k)];
  endfunction

  // Bit k set when the k-th nonzero entry of row r is negative.
  function automatic bit [M-1:0] neg_mask(input int r);
    bit [M-1:0] b = '0;
    for (int k = 0; k < nz_count(r); k++) b[k] = nz_val(r, k) < 0;
    return b;
  endfunction

  // Pipeline depth shared by all rows.
  function automatic int depth();
    int d = 1;
    for (int r = 0; r < int'(N); r++)
      if (isd_pkg::tree_depth(nz_count(r)) > d) d = isd_pkg::tree_depth(nz_count(r));
    return d;
  endfunction

  localparam int DEPTH = depth();

  logic [N-1:0] row_valid;

  for (genvar r = 0; r < N; r++) begin : g_row
    localparam int K = nz_count(r);

    if (K == 0) begin : g_zero
      assign y[r]         = '0;
      assign row_valid[r] = 1'b0;
    end else begin : g_tree
      localparam int PAD = DEPTH - isd_pkg::tree_depth(K);

      localparam bit [M-1:0] NM = neg_mask(r);

      logic signed [W-1:0] terms [K];
      logic signed [W-1:0] sum;
      logic                sum_valid;

      for (genvar k = 0; k < K; k++) begin : g_term
        localparam int C = nz_val(r, k);
        localparam int S = isd_pkg::log2_exact(C < 0 ? -C : C);
        if (!isd_pkg::pm_ok(C)) begin : g_bad
          $error("isd_private_matrix: PM entry %0d is not +/- 2^k", C);
        end
        assign terms[k] = pv_x[nz_col(r, k)] <<< S;
      end

      isd_adder_tree #(.W(W), .N(K), .NEG(NM[K-1:0])) u_tree (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid),
        .din      (terms),
        .out_valid(sum_valid),
        .dout     (sum)
      );

      if (PAD == 0) begin : g_nopad
        assign y[r]         = sum;
        assign row_valid[r] = sum_valid;
      end else begin : g_pad
        logic signed [W-1:0] dly [PAD];
        logic [PAD-1:0]      vdly;
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            for (int i = 0; i < PAD; i++) dly[i] <= '0;
            vdly <= '0;
          end else begin
            dly[0]  <= sum;
            vdly[0] <= sum_valid;
            for (int i = 1; i < PAD; i++) begin
              dly[i]  <= dly[i-1];
              vdly[i] <= vdly[i-1];
            end
          end
        end
        assign y[r]         = dly[PAD-1];
        assign row_valid[r] = vdly[PAD-1];
      end
    end
  end

  // Every nonzero row carries the same valid; take any of them.
  assign out_valid = |row_valid;

endmodule
