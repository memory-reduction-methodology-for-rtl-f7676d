// dwt_idwt_top: DA-based DWT/IDWT processor with a reduced coefficient
// memory.
//
// Two banks share one coefficient memory. The analysis bank (input unit,
// analysis unit with its address generation unit, output unit, analysis bank
// controller) takes a frame of P samples and produces P-1 wavelet
// coefficients over log2 P resolution levels plus one residue word. The
// synthesis bank (input unit, synthesis unit, output unit, synthesis bank
// controller) takes such a frame of P words and produces P reconstructed
// samples. Both banks are multiplierless: distributed arithmetic with a
// memory that stores only the nonrepetitive filter-coefficient combinations
// (layout in dwt_pkg). The block structure, the shared memory, the active-low
// strobes and P = W = 16 follow the published architecture; the word-per-cycle transfer
// protocol, number formats and the load port are this design's choices.
//
// Interface (all synchronous to clk, rst_n active-low asynchronous reset):
//   mem_we/mem_waddr/mem_wdata  write one coefficient-memory word per cycle
//   in_data, data_ready_n       hold data_ready_n low for P cycles with one
//                               sample per cycle while the analysis bank is
//                               idle (samples sent while it is busy are lost)
//   wavelets_output,            after P*W compute cycles, analysis_over_n is
//   analysis_over_n             low for P cycles, one output word per cycle
//   wavelets_input,             same protocol for the synthesis bank; the
//   wavelet_ready_n             analysis outputs can be wired straight in
//   reconstructed_data,         P reconstructed samples, one per cycle while
//   synthesis_over_n            synthesis_over_n is low
// Latency of a frame through one bank: P + P*W + P cycles (288 for 16/16).
module dwt_idwt_top #(
  parameter int unsigned P    = dwt_pkg::P,
  parameter int unsigned W    = dwt_pkg::W,
  parameter int unsigned CW   = dwt_pkg::CW,
  parameter int unsigned FRAC = dwt_pkg::FRAC,
  parameter int unsigned AW   = $clog2(dwt_pkg::mem_depth(P))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_waddr,
  input  logic [CW-1:0] mem_wdata,
  input  logic [W-1:0]  in_data,
  input  logic          data_ready_n,
  output logic          analysis_over_n,
  output logic [W-1:0]  wavelets_output,
  input  logic [W-1:0]  wavelets_input,
  input  logic          wavelet_ready_n,
  output logic          synthesis_over_n,
  output logic [W-1:0]  reconstructed_data
);

  localparam int unsigned NS = P / 2;
  localparam int unsigned NR = NS + P;
  localparam int unsigned QW = $clog2(P);
  localparam int unsigned MW = $clog2(W);

  logic [NR-1:0][AW-1:0] raddr;
  logic [NR-1:0][CW-1:0] rdata;

  generic_memory #(.DEPTH(dwt_pkg::mem_depth(P)), .CW(CW), .NR(NR), .AW(AW)) u_mem (
    .clk, .rst_n, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr, .rdata
  );

  // ---------------------------------------------------------------- analysis
  logic          a_full, a_accept, a_en, a_first, a_wr, a_show;
  logic [QW-1:0] a_q, a_rd;
  logic [MW-1:0] a_m;
  logic [P-1:0]  a_slice;
  logic [W-1:0]  a_result;

  bank_controller #(.P(P), .W(W)) u_actrl (
    .clk, .rst_n, .frame_full(a_full), .accept(a_accept), .en(a_en),
    .first(a_first), .wr_en(a_wr), .q(a_q), .m(a_m), .show(a_show),
    .rd_idx(a_rd), .over_n(analysis_over_n)
  );

  input_unit #(.P(P), .W(W)) u_ain (
    .clk, .rst_n, .accept(a_accept), .ready_n(data_ready_n), .din(in_data),
    .frame_full(a_full), .bitsel(a_m), .slice(a_slice)
  );

  analysis_unit #(.P(P), .W(W), .CW(CW), .FRAC(FRAC), .AW(AW), .NS(NS)) u_ana (
    .clk, .rst_n, .en(a_en), .first(a_first), .q(a_q), .m(a_m),
    .slice(a_slice), .raddr(raddr[NS-1:0]), .rdata(rdata[NS-1:0]),
    .result(a_result)
  );

  output_unit #(.P(P), .W(W)) u_aout (
    .clk, .rst_n, .wr_en(a_wr), .wr_idx(a_q), .wr_data(a_result),
    .show(a_show), .rd_idx(a_rd), .dout(wavelets_output)
  );

  // --------------------------------------------------------------- synthesis
  logic          s_full, s_accept, s_en, s_first, s_wr, s_show;
  logic [QW-1:0] s_q, s_rd;
  logic [MW-1:0] s_m;
  logic [P-1:0]  s_slice;
  logic [W-1:0]  s_result;

  bank_controller #(.P(P), .W(W)) u_sctrl (
    .clk, .rst_n, .frame_full(s_full), .accept(s_accept), .en(s_en),
    .first(s_first), .wr_en(s_wr), .q(s_q), .m(s_m), .show(s_show),
    .rd_idx(s_rd), .over_n(synthesis_over_n)
  );

  input_unit #(.P(P), .W(W)) u_sin (
    .clk, .rst_n, .accept(s_accept), .ready_n(wavelet_ready_n),
    .din(wavelets_input), .frame_full(s_full), .bitsel(s_m),
    .slice(s_slice)
  );

  synthesis_unit #(.P(P), .W(W), .CW(CW), .FRAC(FRAC), .AW(AW)) u_syn (
    .clk, .rst_n, .en(s_en), .first(s_first), .n(s_q), .m(s_m),
    .slice(s_slice), .raddr(raddr[NR-1:NS]), .rdata(rdata[NR-1:NS]),
    .result(s_result)
  );

  output_unit #(.P(P), .W(W)) u_sout (
    .clk, .rst_n, .wr_en(s_wr), .wr_idx(s_q), .wr_data(s_result),
    .show(s_show), .rd_idx(s_rd), .dout(reconstructed_data)
  );

endmodule
