// input_unit: frame buffer at the entry of a bank ("Input Unit"). The same
// module serves the analysis bank (input data) and the synthesis bank
// (wavelet words).
//
// While accept is high and the active-low strobe ready_n is low, the word on
// din is stored on each rising clock edge, in arrival order, into slots
// 0 .. P-1. The edge that stores the P-th word raises frame_full for one
// cycle. During computation the bank reads the buffer bit-serially: slice[n]
// is bit `bitsel` of stored word n, so the distributed-arithmetic datapath
// sees bit m of every word at once. Words presented while accept is low are
// not taken. One word per cycle and the bit-slice read-out are this design's
// choices; the architecture only names the unit.
module input_unit #(
  parameter int unsigned P = dwt_pkg::P,
  parameter int unsigned W = dwt_pkg::W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  accept,
  input  logic                  ready_n,
  input  logic [W-1:0]          din,
  output logic                  frame_full,
  input  logic [$clog2(W)-1:0]  bitsel,
  output logic [P-1:0]          slice
);

  logic [P-1:0][W-1:0]  words;
  logic [$clog2(P)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      frame_full <= 1'b0;
      words      <= '0;
    end else begin
      frame_full <= 1'b0;
      if (accept && !ready_n) begin
        words[cnt] <= din;
        if (32'(cnt) == P - 1) begin
          cnt        <= '0;
          frame_full <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int unsigned n = 0; n < P; n++) slice[n] = words[n][bitsel];
  end

endmodule
