// output_unit: result buffer at the exit of a bank ("Output Unit"), used by
// both banks.
//
// The datapath writes one W-bit result per output word: when wr_en is high,
// wr_data is stored in slot wr_idx on the rising clock edge. While the
// controller shows the frame (show high) it steps rd_idx through 0 .. P-1 and
// dout presents slot rd_idx combinationally in the same cycle; dout is zero
// when show is low. Buffering the whole frame and streaming it one word per
// cycle is this design's choice; the architecture only names the unit.
module output_unit #(
  parameter int unsigned P = dwt_pkg::P,
  parameter int unsigned W = dwt_pkg::W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(P)-1:0] wr_idx,
  input  logic [W-1:0]         wr_data,
  input  logic                 show,
  input  logic [$clog2(P)-1:0] rd_idx,
  output logic [W-1:0]         dout
);

  logic [P-1:0][W-1:0] buffer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buffer <= '0;
    else if (wr_en) buffer[wr_idx] <= wr_data;
  end

  assign dout = show ? buffer[rd_idx] : '0;

endmodule
