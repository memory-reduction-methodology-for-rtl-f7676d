// analysis_agu: address generation unit of the reduced coefficient memory
// for the analysis bank.
//
// For output word q (level i, coefficient j, see dwt_pkg) and the current bit
// slice (bit m of every frame sample), it forms one memory request per sample
// pair and one for the unpaired sample. Coefficient (i,j) spans samples
// x_0 .. x_{(j-1)2^i}: npairs = (j-1)2^(i-1) pairs (x_{2t}, x_{2t+1}) and the
// single sample x_{(j-1)2^i}, which always meets g_i[0]. Pair t meets filter
// slice u = npairs - t. This is the symmetry x_m^j = x_{m+2^i}^{j+1}: the same
// slice serves sample m of coefficient j and sample m + 2^i of coefficient
// j+1, so one stored slice is shared by every coefficient of the level. The
// two bits of a pair form a code {x_{2t+1} bit, x_{2t} bit}: 00 fetches
// nothing, 01 the even-tap word g[2u], 10 the odd-tap word g[2u-1], 11 their
// stored sum. With g[0] first, a slice thus sits in memory in the order of
// the reduced table of the architecture (h_0, h_2, h_1, h_1 + h_2 for the
// first slice). The residue word
// (q = P-1) fetches address 0 when bit m of x_0 is set.
//
// Ports: addr[t], fetch[t], code[t] for pair slots t = 0 .. P/2-2, and slot
// P/2-1 for the single sample. Purely combinational.
module analysis_agu #(
  parameter int unsigned P  = dwt_pkg::P,
  parameter int unsigned AW = $clog2(dwt_pkg::mem_depth(P)),
  parameter int unsigned NS = P / 2
) (
  input  logic [$clog2(P)-1:0]  q,
  input  logic [P-1:0]          slice,
  output logic [NS-1:0][AW-1:0] addr,
  output logic [NS-1:0]         fetch,
  output logic [NS-2:0][1:0]    code
);

  // per-word constants: number of pairs, first address of the level
  // (the residue has no pairs and base 0, so it needs no special case)
  logic [P-1:0][$clog2(P)-1:0]   npairs_tab;
  logic [P-1:0][AW-1:0]          base_tab;

  for (genvar g = 0; g < P; g++) begin : g_tab
    localparam int unsigned LV = dwt_pkg::level_of(P, g);
    localparam int unsigned CJ = dwt_pkg::coef_of(P, g);
    assign npairs_tab[g] = (LV == 0) ? '0 : ($clog2(P))'((CJ - 1) << (LV - 1));
    assign base_tab[g]   = (LV == 0) ? '0 : AW'(dwt_pkg::abase(P, LV));
  end

  logic [$clog2(P)-1:0] npairs, u;
  logic [AW-1:0]        base;
  logic [$clog2(P)-1:0] sidx;

  always_comb begin
    npairs = npairs_tab[q];
    base   = base_tab[q];
    // the unpaired sample is the one after all pairs: x_{2*npairs}
    sidx   = ($clog2(P))'({npairs, 1'b0});
    for (int unsigned t = 0; t < NS - 1; t++) begin
      u       = npairs - ($clog2(P))'(t);
      code[t] = {slice[2*t+1], slice[2*t]};
      if (($clog2(P))'(t) < npairs) begin
        fetch[t] = (code[t] != dwt_pkg::CODE_NONE);
        addr[t]  = base + AW'(3 * u) - AW'(3) + AW'(code[t]);
      end else begin
        fetch[t] = 1'b0;
        addr[t]  = '0;
      end
    end
    // every coefficient, and the residue, ends on a single sample
    fetch[NS-1] = slice[sidx];
    addr[NS-1]  = base;
  end

endmodule
