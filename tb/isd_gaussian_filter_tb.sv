// isd_gaussian_filter_tb: end-to-end test of the 11-tap Gaussian filter at
// its default parameters.  The reference is a direct-form FIR with the taps
// 1 4 19 57 108 134 108 57 19 4 1 applied to the valid samples, with zero
// history after each reset.  Every output must match and appear 7 edges after
// its sample.  The test runs two phases separated by a reset and counts the
// behaviours it must reach: input gaps, full-scale negative and positive
// samples, full-scale outputs (11 equal extreme samples in a row), and a
// reset in mid-stream that clears the history.  A second filter with its
// multiplier-block stages merged (MERGE_STAGES = 1) runs on the same stimulus
// and must give the same outputs 6 edges after each sample instead of 7.
module isd_gaussian_filter_tb;
  localparam int W_IN = 8;
  localparam int W    = 18;
  localparam int LAT  = 7;
  localparam int LATM = 6;
  localparam int NCYC = 600;
  localparam int TAPS = 11;
  localparam int C [TAPS] = '{1, 4, 19, 57, 108, 134, 108, 57, 19, 4, 1};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W_IN-1:0] x;
  logic signed [W-1:0] y;
  logic out_valid;
  logic signed [W-1:0] ym;
  logic out_valid_m;
  int checks = 0, failures = 0;
  int n_gap = 0, n_min = 0, n_max = 0, n_fs_neg = 0, n_fs_pos = 0, n_reset = 0, n_out = 0, n_merged = 0;

  always #5 clk = ~clk;

  isd_gaussian_filter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y));

  isd_gaussian_filter #(.MERGE_STAGES(1'b1)) dut_m (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid_m), .y(ym));

  initial begin
    repeat (2 * NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_phase(input int phase);
    int xs [NCYC + 1];     // valid samples in order
    int nv = 0;
    int exp_y [NCYC + 1];
    bit vh [NCYC + 1];
    @(negedge clk);
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    n_reset++;
    for (int t = 1; t <= NCYC; t++) begin
      int xv;
      @(negedge clk);
      if (t >= 100 && t < 115)      xv = -128;   // drive a full-scale run
      else if (t >= 200 && t < 215) xv = 127;
      else                          xv = int'($urandom_range(0, 255)) - 128;
      // keep the full-scale runs free of gaps
      vh[t] = ((t >= 95 && t < 115) || (t >= 195 && t < 215)) ? 1'b1
              : ($urandom_range(0, 4) != 0);
      x = W_IN'(xv);
      in_valid = vh[t];
      if (vh[t]) begin
        int e = 0;
        xs[nv] = xv;
        for (int k = 0; k < TAPS; k++) if (nv - k >= 0) e += C[k] * xs[nv-k];
        exp_y[t] = e;
        nv++;
        if (xv == -128) n_min++;
        if (xv == 127)  n_max++;
      end else begin
        n_gap++;
      end
      @(posedge clk); #1;
      if (t - LATM + 1 >= 1) begin
        int s = t - LATM + 1;
        check("merged valid", out_valid_m, vh[s]);
        if (vh[s]) begin
          check($sformatf("phase %0d merged y (cycle %0d)", phase, s), ym, exp_y[s]);
          n_merged++;
        end
      end else begin
        check("merged valid after reset", out_valid_m, 0);
      end
      if (t - LAT + 1 >= 1) begin
        int s = t - LAT + 1;
        check("valid", out_valid, vh[s]);
        if (vh[s]) begin
          check($sformatf("phase %0d y (cycle %0d)", phase, s), y, exp_y[s]);
          n_out++;
          if (y == -65536) n_fs_neg++;
          if (y == 65024)  n_fs_pos++;
        end
      end else begin
        check("valid after reset", out_valid, 0);
      end
    end
  endtask

  task automatic need(input string what, input int n);
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    run_phase(1);
    run_phase(2);   // reset in mid-stream: history must start from zero again
    need("outputs checked", n_out);
    need("input gaps", n_gap);
    need("min samples (-128)", n_min);
    need("max samples (127)", n_max);
    need("full-scale outputs -65536", n_fs_neg);
    need("full-scale outputs 65024", n_fs_pos);
    need("mid-stream resets", n_reset - 1);
    need("merged-stage outputs checked", n_merged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
