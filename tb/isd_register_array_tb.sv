// isd_register_array_tb: checks the delay-and-sum register array with the
// default 11-tap, 6-coefficient Gaussian tap map.  Independent random
// products arrive with random gaps in in_valid.  For every valid input the
// expected output is the sum over taps k of the product of coefficient
// TAP_IDX[k] from the k-th previous valid input (zero before the first),
// worked out here from a history list; it must appear 4 edges later with
// out_valid set, and gaps must not enter the history.
module isd_register_array_tb;
  localparam int W    = 22;
  localparam int NC   = 6;
  localparam int TAPS = 11;
  localparam int LAT  = 4;
  localparam int NCYC = 400;
  localparam int TAP_IDX [TAPS] = '{0, 1, 2, 3, 4, 5, 4, 3, 2, 1, 0};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] prod [NC];
  logic signed [W-1:0] y;
  logic out_valid;
  int checks = 0, failures = 0, gaps = 0;

  always #5 clk = ~clk;

  isd_register_array #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .prod(prod), .out_valid(out_valid), .y(y));

  initial begin
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vs [NCYC + 1][NC];   // products of the valid inputs, in order
  int nv = 0;
  int exp_y [NCYC + 1];
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
    for (int j = 0; j < NC; j++) prod[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 1; t <= NCYC; t++) begin
      automatic int cur [NC];
      @(negedge clk);
      vh[t] = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < NC; j++) begin
        cur[j] = int'($urandom_range(0, 65535)) - 32768;
        prod[j] = W'(cur[j]);
      end
      in_valid = vh[t];
      if (vh[t]) begin
        automatic int e = 0;
        for (int j = 0; j < NC; j++) vs[nv][j] = cur[j];
        for (int k = 0; k < TAPS; k++) if (nv - k >= 0) e += vs[nv-k][TAP_IDX[k]];
        exp_y[t] = e;
        nv++;
      end else begin
        gaps++;
      end
      @(posedge clk); #1;
      if (t - LAT + 1 >= 1) begin
        automatic int s = t - LAT + 1;
        check("valid", out_valid, vh[s]);
        if (vh[s]) check($sformatf("y (input %0d)", s), y, exp_y[s]);
      end else begin
        check("valid after reset", out_valid, 0);
      end
    end
    if (gaps == 0) begin
      failures++;
      $display("FAIL no gap was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
