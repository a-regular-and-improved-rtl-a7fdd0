// isd_adder_tree: pipelined binary adder tree with a register after every
// adder, so the longest path between two registers is one adder.
//
// N signed inputs are added pairwise level by level; an odd input left over at
// a level goes through a register without an adder.  NEG[i] = 1 subtracts
// input i instead of adding it; the sign is folded into the first level, so a
// pair (a, -b) costs one subtractor.  A tree of one input is a single register
// (negated when NEG[0] is set).  The tree shape follows the source's binary
// adder tree; the sign handling and the odd-input rule are this design's.
//
// Interface: din[N], in_valid in; dout = sum of +/- din, out_valid out.
// Timing: LAT = max(1, ceil(log2 N)) clock cycles from din to dout, one
// result per clock.  Results wrap at W bits: W must be wide enough.
module isd_adder_tree #(
  parameter int unsigned W   = isd_pkg::W_DEF,
  parameter int unsigned N   = 2,
  parameter bit [N-1:0]  NEG = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din [N],
  output logic                out_valid,
  output logic signed [W-1:0] dout
);

  localparam int LAT = isd_pkg::tree_depth(N);

  // Number of nodes at level l (level 0 holds the inputs).
  function automatic int nodes(input int l);
    int c = N;
    for (int i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  for (genvar l = 1; l <= LAT; l++) begin : g_lvl
    localparam int CNT  = nodes(l);
    localparam int PREV = nodes(l - 1);
    logic signed [W-1:0] node [CNT];

    for (genvar i = 0; i < CNT; i++) begin : g_node
      logic signed [W-1:0] sum;
      if (l == 1) begin : g_first
        // First level: inputs with their signs.
        if (2 * i + 1 < PREV) begin : g_pair
          localparam bit NA = NEG[2*i];
          localparam bit NB = NEG[2*i+1];
          always_comb begin
            if (!NA && !NB)     sum = din[2*i] + din[2*i+1];
            else if (!NA && NB) sum = din[2*i] - din[2*i+1];
            else if (NA && !NB) sum = din[2*i+1] - din[2*i];
            else                sum = -(din[2*i] + din[2*i+1]);
          end
        end else begin : g_single
          localparam bit NA = NEG[2*i];
          assign sum = NA ? -din[2*i] : din[2*i];
        end
      end else begin : g_upper
        if (2 * i + 1 < PREV) begin : g_pair
          assign sum = g_lvl[l-1].node[2*i] + g_lvl[l-1].node[2*i+1];
        end else begin : g_single
          assign sum = g_lvl[l-1].node[2*i];
        end
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) node[i] <= '0;
        else        node[i] <= sum;
      end
    end
  end

  assign dout = g_lvl[LAT].node[0];

  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else begin
      vpipe[0] <= in_valid;
      for (int i = 1; i < LAT; i++) vpipe[i] <= vpipe[i-1];
    end
  end
  assign out_valid = vpipe[LAT-1];

endmodule
