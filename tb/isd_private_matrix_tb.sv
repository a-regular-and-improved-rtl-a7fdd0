// isd_private_matrix_tb: checks the private-matrix stage.
// Instance A uses the default Gaussian matrix (all rows one adder level, so
// 1 edge of latency).  Instance B uses a 3 x 4 matrix with a four-term row
// with mixed signs (two levels), a single negated term (padded to two
// levels) and an all-zero row, so its latency is 2 edges.  Random public
// values go in; the expected rows are the matrix-vector products worked out
// here with multiplications.
module isd_private_matrix_tb;
  localparam int W    = 22;
  localparam int NCYC = 300;
  localparam int PM_A [6][3] = '{'{1,0,0}, '{4,0,0}, '{2,0,1}, '{0,8,1}, '{0,8,4}, '{-2,0,8}};
  localparam int PM_B [3][4] = '{'{1,-2,4,-8}, '{0,0,-16,0}, '{0,0,0,0}};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] pa [3];
  logic signed [W-1:0] pb [4];
  logic signed [W-1:0] ya [6];
  logic signed [W-1:0] yb [3];
  logic va, vb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isd_private_matrix #(.W(W), .M(3), .N(6), .PM(PM_A)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pv_x(pa), .out_valid(va), .y(ya));
  isd_private_matrix #(.W(W), .M(4), .N(3), .PM(PM_B)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pv_x(pb), .out_valid(vb), .y(yb));

  initial begin
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ah [NCYC + 1][3];
  int bh [NCYC + 1][4];
  bit vh [NCYC + 1];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    for (int i = 0; i < 3; i++) pa[i] = '0;
    for (int i = 0; i < 4; i++) pb[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 1; t <= NCYC; t++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        ah[t][i] = int'($urandom_range(0, 4095)) - 2048;
        pa[i] = W'(ah[t][i]);
      end
      for (int i = 0; i < 4; i++) begin
        bh[t][i] = int'($urandom_range(0, 4095)) - 2048;
        pb[i] = W'(bh[t][i]);
      end
      vh[t] = ($urandom_range(0, 3) != 0);
      in_valid = vh[t];
      @(posedge clk); #1;
      // Instance A, latency 1.
      check("a valid", va, vh[t]);
      for (int n = 0; n < 6; n++) begin
        automatic int e = 0;
        for (int m = 0; m < 3; m++) e += PM_A[n][m] * ah[t][m];
        check($sformatf("a y[%0d]", n), ya[n], e);
      end
      // Instance B, latency 2.
      if (t >= 2) begin
        check("b valid", vb, vh[t-1]);
        for (int n = 0; n < 3; n++) begin
          automatic int e = 0;
          for (int m = 0; m < 4; m++) e += PM_B[n][m] * bh[t-1][m];
          check($sformatf("b y[%0d]", n), yb[n], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
