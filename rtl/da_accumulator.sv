// da_accumulator: the shift-accumulate stage of a distributed-arithmetic
// (DA) inner product, shared by the analysis and synthesis units.
//
// A DA product sum y = sum_n x_n * c_n is evaluated one bit position of the
// W-bit two's complement inputs x_n per cycle, least significant bit first.
// For bit m the datapath supplies `partial` = sum of c_n over the n whose
// bit m is set (fetched from the coefficient memory). Following the two's
// complement expansion x = -x_{W-1} 2^(W-1) + sum_{b<W-1} x_b 2^b, the stage
// adds partial * 2^m, and subtracts it for the sign bit m = W-1. `first`
// marks bit 0 and restarts the sum; acc_next is the running sum including the
// current bit, so in the cycle with m = W-1 it is the complete product sum.
// `result`, taken from acc_next, is that sum shifted right by FRAC (truncation toward minus
// infinity) and saturated to W bits; the output format is this design's
// choice. The register updates on the rising edge when en is high.
module da_accumulator #(
  parameter int unsigned PW   = 19,
  parameter int unsigned W    = dwt_pkg::W,
  parameter int unsigned FRAC = dwt_pkg::FRAC,
  parameter int unsigned ACCW = PW + W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   first,
  input  logic [$clog2(W)-1:0]   m,
  input  logic signed [PW-1:0]   partial,
  output logic [W-1:0]           result
);

  localparam logic signed [ACCW-1:0] SAT_MAX = ACCW'((64'sd1 <<< (W - 1)) - 1);
  localparam logic signed [ACCW-1:0] SAT_MIN = -ACCW'(64'sd1 <<< (W - 1));

  logic signed [ACCW-1:0] acc, acc_next, term, shifted;

  always_comb begin
    term = ACCW'(partial) <<< m;
    if (32'(m) == W - 1) term = -term;
    acc_next = (first ? '0 : acc) + term;
    shifted  = acc_next >>> FRAC;
    if (shifted > SAT_MAX)      result = SAT_MAX[W-1:0];
    else if (shifted < SAT_MIN) result = SAT_MIN[W-1:0];
    else                        result = shifted[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule
