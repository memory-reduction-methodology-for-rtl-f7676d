// dwt_pkg: constants, types and index functions shared by the DA-based
// DWT/IDWT datapath.
//
// A frame holds P samples x_0 .. x_{P-1}. Resolution level i (1 .. log2 P)
// produces P/2^i wavelet coefficients; coefficient j (1 .. P/2^i) of level i
// is the causal convolution
//     w_{i,j} = sum_{n=0}^{(j-1)2^i} x_n * g_i[(j-1)2^i - n]
// over s = 1 + (j-1)2^i samples, and the last level also yields one residue
// value x_0 * r_0. That is P-1 wavelet coefficients plus one residue: P words
// per frame. Words are numbered q = 0 .. P-1 in the order level 1 (j = 1 ..),
// level 2, ..., last level, residue.
//
// Reduced memory (analysis region). Samples are taken in pairs
// (x_{2t}, x_{2t+1}); a pair of coefficient (i,j) meets the filter slice
// u = (j-1)2^(i-1) - t, i.e. taps (g_i[2u], g_i[2u-1]). Only the three
// nonzero bit combinations of a slice are stored, plus g_i[0] for the
// unpaired last sample: M_i = 3k + 1 words, k = P/2 - 2^(i-1). Layout:
//     address 0                       residue coefficient r_0
//     abase(i) + 0                    g_i[0]
//     abase(i) + 3u - 3 + code        code = {x_{2t+1} bit, x_{2t} bit}:
//                                     1 -> g_i[2u], 2 -> g_i[2u-1],
//                                     3 -> g_i[2u] + g_i[2u-1]
// For the first slice this is the four-word table h_0, h_2, h_1, h_1 + h_2
// of the frame-length-4 example.
// The region is TMR = 1 + sum M_i words (56 for P = 16).
//
// Synthesis region (this design's own choice, see synthesis_unit): one word
// per synthesis tap, f_i[0 .. P-2^i] for each level plus one residue tap,
// placed after the analysis region.
//
// Number formats (own choice): samples and outputs are W-bit two's complement,
// memory words are CW-bit two's complement with FRAC fraction bits.
package dwt_pkg;

  localparam int unsigned P     = 16;   // frame length (architecture: 16)
  localparam int unsigned W     = 16;   // sample word length (architecture: 16 b)
  localparam int unsigned CW    = 16;   // memory word width
  localparam int unsigned FRAC  = 14;   // fraction bits of a memory word

  function automatic int unsigned log2i(input int unsigned v);
    int unsigned r = 0;
    while ((1 << (r + 1)) <= v) r++;
    return r;
  endfunction

  // number of sample pairs of level i, eq. (6): k = P/2 - 2^(i-1)
  function automatic int unsigned pairs_k(input int unsigned p, input int unsigned i);
    return p / 2 - (1 << (i - 1));
  endfunction

  // words of level i, eq. (7): M_i = 3k + 1
  function automatic int unsigned level_words(input int unsigned p, input int unsigned i);
    return 3 * pairs_k(p, i) + 1;
  endfunction

  // first analysis address of level i (address 0 is the residue coefficient)
  function automatic int unsigned abase(input int unsigned p, input int unsigned i);
    int unsigned b = 1;
    for (int unsigned l = 1; l < i; l++) b += level_words(p, l);
    return b;
  endfunction

  // total memory requirement of the analysis bank, eq. (8)
  function automatic int unsigned tmr(input int unsigned p);
    return abase(p, log2i(p) + 1);
  endfunction

  // synthesis taps of level i: f_i[0 .. p - 2^i]
  function automatic int unsigned syn_taps(input int unsigned p, input int unsigned i);
    return p - (1 << i) + 1;
  endfunction

  // synthesis region: residue tap at tmr(p), then the taps of level 1, 2, ...
  function automatic int unsigned sbase(input int unsigned p, input int unsigned i);
    int unsigned b = tmr(p) + 1;
    for (int unsigned l = 1; l < i; l++) b += syn_taps(p, l);
    return b;
  endfunction

  function automatic int unsigned mem_depth(input int unsigned p);
    return sbase(p, log2i(p) + 1);
  endfunction

  // map an output word number q to its level (1 .. log2 p) and coefficient
  // number j (1 .. p/2^i); the residue q = p-1 is reported as level 0
  function automatic int unsigned level_of(input int unsigned p, input int unsigned q);
    int unsigned first = 0;
    for (int unsigned l = 1; l <= log2i(p); l++) begin
      if (q < first + (p >> l)) return l;
      first += p >> l;
    end
    return 0;
  endfunction

  function automatic int unsigned coef_of(input int unsigned p, input int unsigned q);
    int unsigned first = 0;
    for (int unsigned l = 1; l <= log2i(p); l++) begin
      if (q < first + (p >> l)) return q - first + 1;
      first += p >> l;
    end
    return 1;
  endfunction

  // sample-pair bit code {x_{2t+1} bit, x_{2t} bit} picking a slice entry
  typedef enum logic [1:0] {
    CODE_NONE = 2'b00,   // no fetch
    CODE_EVEN = 2'b01,   // only x_{2t} bit set   -> g[2u]
    CODE_ODD  = 2'b10,   // only x_{2t+1} bit set -> g[2u-1]
    CODE_BOTH = 2'b11    // both set              -> g[2u] + g[2u-1]
  } pair_code_e;

  typedef enum logic [1:0] {
    ST_IDLE,     // accepting input words until a frame is complete
    ST_COMPUTE,  // W bit-serial DA cycles per output word
    ST_OUTPUT    // presenting the P results, over strobe low
  } bank_state_e;

endpackage
