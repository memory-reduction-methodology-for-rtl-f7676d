// analysis_unit: the multiplierless DA filter of the analysis bank.
//
// Each output word (wavelet coefficient w_{i,j} or the residue) takes W
// cycles, one per bit position m of the frame samples, LSB first. In a cycle
// the address generation unit (analysis_agu) turns bit m of every sample
// into at most P/2 reads of the reduced coefficient memory: one per sample
// pair whose bits are not 00, and one for the unpaired sample. The words
// read are added by an adder tree into `partial`, which the shift-accumulate
// stage (da_accumulator) weights by 2^m, negatively for the sign bit. The
// slice sums g[2u] + g[2u-1] come precomputed from memory, so the unit only
// adds across slices, the "adder penalty" of the reduced memory.
//
// Timing: the controller holds q and steps m = 0 .. W-1 with en high and
// first high at m = 0. Memory reads are combinational, so `result` is the
// finished word in the cycle with m = W-1.
module analysis_unit #(
  parameter int unsigned P    = dwt_pkg::P,
  parameter int unsigned W    = dwt_pkg::W,
  parameter int unsigned CW   = dwt_pkg::CW,
  parameter int unsigned FRAC = dwt_pkg::FRAC,
  parameter int unsigned AW   = $clog2(dwt_pkg::mem_depth(P)),
  parameter int unsigned NS   = P / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  first,
  input  logic [$clog2(P)-1:0]  q,
  input  logic [$clog2(W)-1:0]  m,
  input  logic [P-1:0]          slice,
  output logic [NS-1:0][AW-1:0] raddr,
  input  logic [NS-1:0][CW-1:0] rdata,
  output logic [W-1:0]          result
);

  localparam int unsigned PW = CW + $clog2(NS);

  logic [NS-1:0]         fetch;
  logic signed [PW-1:0]  partial;

  analysis_agu #(.P(P), .AW(AW), .NS(NS)) u_agu (
    .q, .slice, .addr(raddr), .fetch, .code()
  );

  always_comb begin
    partial = '0;
    for (int unsigned t = 0; t < NS; t++)
      if (fetch[t]) partial += PW'(signed'(rdata[t]));
  end

  da_accumulator #(.PW(PW), .W(W), .FRAC(FRAC)) u_acc (
    .clk, .rst_n, .en, .first, .m, .partial, .result
  );

endmodule
