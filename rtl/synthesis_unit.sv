// synthesis_unit: the multiplierless DA filter of the synthesis bank.
//
// It rebuilds the frame from its P words (wavelet coefficients w_{i,j} in
// the order of dwt_pkg, residue last). Reconstructed sample n is
//     xr_n = r'_0 * res * [n = 0]
//          + sum_{i,j} w_{i,j} * f_i[(j-1)2^i - n],  0 <= (j-1)2^i - n <= P - 2^i,
// i.e. the same sample/coefficient pattern as the analysis bank read the
// other way round (the transpose): word (i,j) reaches back to the samples it
// was computed from. The synthesis taps f_i come from the synthesis region of
// the shared memory, one word per tap. The architecture gives this bank's
// function but not its equations; the tap pattern and one-word-per-tap
// storage are this design's choices.
//
// Each output sample takes W cycles, one per bit position m of the wavelet
// words, LSB first. For bit m, every word whose bit is set and that reaches
// sample n adds its tap word into `partial`; da_accumulator weights it by
// 2^m (negatively for the sign bit). `result` is the finished sample in the
// cycle with m = W-1. n is held by the controller while m steps.
module synthesis_unit #(
  parameter int unsigned P    = dwt_pkg::P,
  parameter int unsigned W    = dwt_pkg::W,
  parameter int unsigned CW   = dwt_pkg::CW,
  parameter int unsigned FRAC = dwt_pkg::FRAC,
  parameter int unsigned AW   = $clog2(dwt_pkg::mem_depth(P))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  first,
  input  logic [$clog2(P)-1:0]  n,
  input  logic [$clog2(W)-1:0]  m,
  input  logic [P-1:0]          slice,
  output logic [P-1:0][AW-1:0]  raddr,
  input  logic [P-1:0][CW-1:0]  rdata,
  output logic [W-1:0]          result
);

  localparam int unsigned PW = CW + $clog2(P);

  // per input word: sample position (j-1)2^i, largest reach, tap base address
  logic [P-1:0][$clog2(P)-1:0] pos_tab, reach_tab;
  logic [P-1:0][AW-1:0]        base_tab;

  for (genvar v = 0; v < P; v++) begin : g_tab
    localparam int unsigned LV = dwt_pkg::level_of(P, v);
    localparam int unsigned CJ = dwt_pkg::coef_of(P, v);
    assign pos_tab[v]   = (LV == 0) ? '0 : ($clog2(P))'((CJ - 1) << LV);
    assign reach_tab[v] = (LV == 0) ? '0 : ($clog2(P))'(P - (1 << LV));
    assign base_tab[v]  = (LV == 0) ? AW'(dwt_pkg::tmr(P)) : AW'(dwt_pkg::sbase(P, LV));
  end

  logic [P-1:0]          use_w;
  logic [$clog2(P)-1:0]  d;
  logic signed [PW-1:0]  partial;

  always_comb begin
    partial = '0;
    for (int unsigned v = 0; v < P; v++) begin
      d        = pos_tab[v] - n;
      use_w[v] = (pos_tab[v] >= n) && (d <= reach_tab[v]);
      raddr[v] = use_w[v] ? base_tab[v] + AW'(d) : '0;
      if (use_w[v] && slice[v]) partial += PW'(signed'(rdata[v]));
    end
  end

  da_accumulator #(.PW(PW), .W(W), .FRAC(FRAC)) u_acc (
    .clk, .rst_n, .en, .first, .m, .partial, .result
  );

endmodule
