// isd_adder_array: first step of an ISD constant vector multiplication,
// PV * x, where every entry of the public vector PV is 1, 2^q + 1 or 2^q - 1.
//
// The input sample is registered once.  Each public entry is then formed from
// the registered sample with one shifter (free wiring: the low bits are filled
// with zeros) and at most one adder or subtractor, and registered again, so no
// path between two registers holds more than one adder.  An entry equal to 1
// needs no adder and is just the registered sample.  This matches the
// structure of the source's adder array: input register, a row of shifters,
// one adder per entry, one register per entry.
//
// Interface: x/in_valid in; pv_x[m] = PV[m] * x and pv_valid out.
// Timing: two clock cycles from x to pv_x (input register, stage register).
// With REG_OUT = 0 the stage register is left out and pv_x follows the input
// register combinationally (one cycle, one adder after the register), for
// merging this stage with the next one when the clock is slow enough.
// in_valid travels alongside the data.  The asynchronous active-low reset
// clears every register (a choice of this design; the source names no reset).
module isd_adder_array #(
  parameter int unsigned W_IN = isd_pkg::W_IN_DEF,
  parameter int unsigned W    = isd_pkg::W_DEF,
  parameter int unsigned M    = isd_pkg::GAUSS_M,
  parameter int          PV [M] = isd_pkg::GAUSS_PV,
  parameter bit          REG_OUT = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [W_IN-1:0]     x,
  output logic                       pv_valid,
  output logic signed [W-1:0]        pv_x [M]
);

  logic signed [W-1:0] x_q;
  logic                v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      v_q <= 1'b0;
    end else begin
      x_q <= W'(x);          // sign-extends
      v_q <= in_valid;
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_pv
    localparam int V = PV[m];
    logic signed [W-1:0] sum;

    if (!isd_pkg::pv_ok(V)) begin : g_bad
      $error("isd_adder_array: PV entry %0d is not 1 or 2^q +/- 1", V);
    end

    if (V == 1) begin : g_one
      assign sum = x_q;
    end else if (isd_pkg::is_pow2(V - 1)) begin : g_add
      assign sum = (x_q <<< isd_pkg::log2_exact(V - 1)) + x_q;
    end else begin : g_sub
      assign sum = (x_q <<< isd_pkg::log2_exact(V + 1)) - x_q;
    end

    if (REG_OUT) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) pv_x[m] <= '0;
        else        pv_x[m] <= sum;
      end
    end else begin : g_comb
      assign pv_x[m] = sum;
    end
  end

  if (REG_OUT) begin : g_vreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pv_valid <= 1'b0;
      else        pv_valid <= v_q;
    end
  end else begin : g_vcomb
    assign pv_valid = v_q;
  end

endmodule
