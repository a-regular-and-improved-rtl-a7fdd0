// isd_adder_tree_tb: checks the pipelined binary adder tree at several
// sizes and sign patterns: 1 leaf negated, 2 leaves (a - b), 4 leaves with a
// fully negated pair, 5 leaves with alternating signs, 8 leaves with one subtracted, 11 leaves all added.
// Expected sums are worked out here from the random inputs; the latency must
// be max(1, ceil(log2 N)) edges: 1, 1, 2, 3, 3 and 4.
module isd_adder_tree_tb;
  localparam int W    = 20;
  localparam int NCYC = 300;
  localparam int NMAX = 11;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] din [NMAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic signed [W-1:0] d1 [1];
  logic signed [W-1:0] d2 [2];
  logic signed [W-1:0] d4 [4];
  logic signed [W-1:0] d5 [5];
  logic signed [W-1:0] d8 [8];
  logic signed [W-1:0] o1, o2, o4, o5, o8, o11;
  logic v1, v2, v4, v5, v8, v11;

  assign d1[0] = din[0];
  for (genvar i = 0; i < 2; i++) begin : g2 assign d2[i] = din[i]; end
  for (genvar i = 0; i < 4; i++) begin : g4 assign d4[i] = din[i]; end
  for (genvar i = 0; i < 5; i++) begin : g5 assign d5[i] = din[i]; end
  for (genvar i = 0; i < 8; i++) begin : g8 assign d8[i] = din[i]; end

  isd_adder_tree #(.W(W), .N(1), .NEG(1'b1)) t1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(d1), .out_valid(v1), .dout(o1));
  isd_adder_tree #(.W(W), .N(2), .NEG(2'b10)) t2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(d2), .out_valid(v2), .dout(o2));
  isd_adder_tree #(.W(W), .N(4), .NEG(4'b1100)) t4 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(d4), .out_valid(v4), .dout(o4));
  isd_adder_tree #(.W(W), .N(5), .NEG(5'b10101)) t5 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(d5), .out_valid(v5), .dout(o5));
  isd_adder_tree #(.W(W), .N(8), .NEG(8'b01000000)) t8 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(d8), .out_valid(v8), .dout(o8));
  isd_adder_tree #(.W(W), .N(11), .NEG(11'b0)) t11 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din), .out_valid(v11), .dout(o11));

  initial begin
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dh [NCYC + 1][NMAX];
  bit vh [NCYC + 1];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int sum_of(input int s, input int n, input int neg);
    int acc = 0;
    for (int i = 0; i < n; i++) acc += ((neg >> i) & 1) ? -dh[s][i] : dh[s][i];
    return acc;
  endfunction

  task automatic check_tree(input string nm, input int t, input int lat, input int n,
                            input int neg, input logic v, input logic signed [W-1:0] o);
    int s = t - lat + 1;
    if (s >= 1) begin
      check({nm, " valid"}, v, vh[s]);
      check({nm, " sum"}, o, sum_of(s, n, neg));
    end else begin
      check({nm, " reset valid"}, v, 0);
      check({nm, " reset sum"}, o, 0);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    for (int i = 0; i < NMAX; i++) din[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 1; t <= NCYC; t++) begin
      @(negedge clk);
      for (int i = 0; i < NMAX; i++) begin
        dh[t][i] = int'($urandom_range(0, 16383)) - 8192;
        din[i] = W'(dh[t][i]);
      end
      vh[t] = ($urandom_range(0, 2) != 0);
      in_valid = vh[t];
      @(posedge clk); #1;
      check_tree("n1",  t, 1, 1,  'b1,     v1,  o1);
      check_tree("n2",  t, 1, 2,  'b10,    v2,  o2);
      check_tree("n4",  t, 2, 4,  'b1100,  v4,  o4);
      check_tree("n5",  t, 3, 5,  'b10101, v5,  o5);
      check_tree("n8",  t, 3, 8,  'b01000000, v8, o8);
      check_tree("n11", t, 4, 11, 0,       v11, o11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
