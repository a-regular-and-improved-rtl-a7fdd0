// isd_mcm_tb: checks the complete multiplier block.
// Instance A is the default Gaussian block: its six outputs must be
// 1, 4, 19, 57, 108 and 134 times the sample driven 3 edges earlier.
// Instance B uses another decomposition, PV = (1, 3, 9, 31) and a private
// matrix with a three-term row, whose products must be 1, 19 and 43 times the
// sample, 4 edges later.  Instance C is the Gaussian block with its two
// stages merged into one cycle (MERGE_STAGES = 1): same products, 2 edges.  The constants are written here directly, not
// derived from PV and PM.
module isd_mcm_tb;
  localparam int W_IN = 8;
  localparam int W    = 18;
  localparam int NCYC = 400;
  localparam int COEF_A [6] = '{1, 4, 19, 57, 108, 134};
  localparam int COEF_B [3] = '{1, 19, 43};
  localparam int PV_B [4]    = '{1, 3, 9, 31};
  localparam int PM_B [3][4] = '{'{1,0,0,0}, '{0,-4,0,1}, '{2,0,8,-1}};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W_IN-1:0] x;
  logic signed [W-1:0] pa [6];
  logic signed [W-1:0] pb [3];
  logic signed [W-1:0] pc [6];
  logic va, vb, vc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isd_mcm dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(va), .prod(pa));
  isd_mcm #(.W_IN(W_IN), .W(W), .M(4), .N(3), .PV(PV_B), .PM(PM_B)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(vb), .prod(pb));

  isd_mcm #(.MERGE_STAGES(1'b1)) dut_c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(vc), .prod(pc));

  initial begin
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xh [NCYC + 1];
  bit vh [NCYC + 1];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 1; t <= NCYC; t++) begin
      @(negedge clk);
      case (t % 5)
        0: xh[t] = -128;
        1: xh[t] = 127;
        default: xh[t] = int'($urandom_range(0, 255)) - 128;
      endcase
      vh[t] = ($urandom_range(0, 3) != 0);
      x = W_IN'(xh[t]);
      in_valid = vh[t];
      @(posedge clk); #1;
      if (t >= 2) begin
        check("c valid", vc, vh[t-1]);
        for (int n = 0; n < 6; n++) check($sformatf("c prod[%0d]", n), pc[n], COEF_A[n] * xh[t-1]);
      end else begin
        check("c valid after reset", vc, 0);
      end
      if (t >= 3) begin
        check("a valid", va, vh[t-2]);
        for (int n = 0; n < 6; n++) check($sformatf("a prod[%0d]", n), pa[n], COEF_A[n] * xh[t-2]);
      end else begin
        check("a valid after reset", va, 0);
      end
      if (t >= 4) begin
        check("b valid", vb, vh[t-3]);
        for (int n = 0; n < 3; n++) check($sformatf("b prod[%0d]", n), pb[n], COEF_B[n] * xh[t-3]);
      end else begin
        check("b valid after reset", vb, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
