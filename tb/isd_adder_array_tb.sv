// isd_adder_array_tb: checks the public-vector adder array.
// Three instances: the default (PV = 1, 5, 17), one with subtracting
// entries (PV = 1, 3, 7, 31, 2), and the default without its output register
// (REG_OUT = 0, used when stages are merged, latency 1 edge).  Random signed samples, including the
// extremes, go in with random gaps in in_valid; every cycle each output must
// equal PV[m] * x of the sample driven LAT = 2 edges earlier, worked out here
// with a plain multiplication, and pv_valid must follow in_valid by 2 edges.
module isd_adder_array_tb;
  localparam int W_IN = 8;
  localparam int W    = 18;
  localparam int LAT  = 2;
  localparam int NCYC = 400;
  localparam int PV_A [3] = '{1, 5, 17};
  localparam int PV_B [5] = '{1, 3, 7, 31, 2};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W_IN-1:0] x;
  logic va, vb;
  logic signed [W-1:0] pa [3];
  logic signed [W-1:0] pb [5];
  logic signed [W-1:0] pc [3];
  logic vc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isd_adder_array #(.W_IN(W_IN), .W(W), .M(3), .PV(PV_A)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .pv_valid(va), .pv_x(pa));
  isd_adder_array #(.W_IN(W_IN), .W(W), .M(5), .PV(PV_B)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .pv_valid(vb), .pv_x(pb));

  isd_adder_array #(.W_IN(W_IN), .W(W), .M(3), .PV(PV_A), .REG_OUT(1'b0)) dut_c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .pv_valid(vc), .pv_x(pc));

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
      case (t % 7)
        0: xh[t] = -128;
        1: xh[t] = 127;
        default: xh[t] = int'($urandom_range(0, 255)) - 128;
      endcase
      vh[t] = ($urandom_range(0, 3) != 0);
      x = W_IN'(xh[t]);
      in_valid = vh[t];
      @(posedge clk); #1;
      check("valid c", vc, vh[t]);
      for (int m = 0; m < 3; m++) check($sformatf("c[%0d]", m), pc[m], PV_A[m] * xh[t]);
      if (t - LAT + 1 >= 1) begin
        automatic int s = t - LAT + 1;
        check("valid a", va, vh[s]);
        check("valid b", vb, vh[s]);
        for (int m = 0; m < 3; m++) check($sformatf("a[%0d]", m), pa[m], PV_A[m] * xh[s]);
        for (int m = 0; m < 5; m++) check($sformatf("b[%0d]", m), pb[m], PV_B[m] * xh[s]);
      end else begin
        check("valid after reset", va, 0);
        check("data after reset", pa[1], 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
