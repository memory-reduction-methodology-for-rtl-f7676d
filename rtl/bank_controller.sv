// bank_controller: sequencer of one bank; the top uses one instance as the
// analysis bank controller and one as the synthesis bank controller.
//
// IDLE: the input unit may take words (accept high); the bank's active-low
// ready strobe gates it. When the input unit reports a full frame the
// controller enters COMPUTE and steps word index q = 0 .. P-1, holding each q
// for W cycles while the bit index m runs 0 .. W-1 (first high at m = 0,
// wr_en high at m = W-1 to store the finished word). It then enters OUTPUT
// for P cycles, showing word rd_idx = 0 .. P-1 with the active-low over_n
// strobe low, and returns to IDLE. One frame thus takes P input cycles,
// P*W compute cycles and P output cycles. The architecture defines the active-low
// ready and over signals; the state sequence and the meaning of over_n as a
// per-word strobe while the results are shown are this design's choices.
module bank_controller #(
  parameter int unsigned P = dwt_pkg::P,
  parameter int unsigned W = dwt_pkg::W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_full,
  output logic                  accept,
  output logic                  en,
  output logic                  first,
  output logic                  wr_en,
  output logic [$clog2(P)-1:0]  q,
  output logic [$clog2(W)-1:0]  m,
  output logic                  show,
  output logic [$clog2(P)-1:0]  rd_idx,
  output logic                  over_n
);

  import dwt_pkg::*;

  bank_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      q      <= '0;
      m      <= '0;
      rd_idx <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          q <= '0;
          m <= '0;
          if (frame_full) state <= ST_COMPUTE;
        end
        ST_COMPUTE: begin
          m <= m + 1'b1;
          if (32'(m) == W - 1) begin
            m <= '0;
            q <= q + 1'b1;
            if (32'(q) == P - 1) begin
              q      <= '0;
              rd_idx <= '0;
              state  <= ST_OUTPUT;
            end
          end
        end
        ST_OUTPUT: begin
          rd_idx <= rd_idx + 1'b1;
          if (32'(rd_idx) == P - 1) begin
            rd_idx <= '0;
            state  <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign accept = (state == ST_IDLE);
  assign en     = (state == ST_COMPUTE);
  assign first  = en && (m == '0);
  assign wr_en  = en && (32'(m) == W - 1);
  assign show   = (state == ST_OUTPUT);
  assign over_n = !show;

  // the input unit only takes words while the bank is idle, so a completed
  // frame can only be reported in IDLE
  a_full_only_idle: assert property (@(posedge clk) disable iff (!rst_n)
    frame_full |-> state == ST_IDLE);

endmodule
