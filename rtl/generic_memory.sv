// generic_memory: the coefficient store shared by the analysis and synthesis
// banks ("Generic Memory"). It holds only the nonrepetitive combinations of
// filter coefficients (see dwt_pkg for the layout), DEPTH words of CW bits.
//
// As in the published architecture, it is built from registers rather than
// an SRAM macro, which lets both banks read many words in the same cycle:
// NR read ports, each a combinational mux (read data follows the address in
// the same cycle). One synchronous write port loads the table; a write lands
// on the rising clock edge when we is high. Reset (active low, asynchronous)
// clears every word. Port count, loading and reset are this design's choices.
module generic_memory #(
  parameter int unsigned DEPTH = dwt_pkg::mem_depth(dwt_pkg::P),
  parameter int unsigned CW    = dwt_pkg::CW,
  parameter int unsigned NR    = dwt_pkg::P / 2 + dwt_pkg::P,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [CW-1:0]        wdata,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][CW-1:0] rdata
);

  logic [CW-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < DEPTH; a++) mem[a] <= '0;
    end else if (we && (32'(waddr) < DEPTH)) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < NR; r++)
      rdata[r] = (32'(raddr[r]) < DEPTH) ? mem[raddr[r]] : '0;
  end

endmodule
