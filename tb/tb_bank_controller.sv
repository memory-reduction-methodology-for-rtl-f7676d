// tb_bank_controller: self-checking test of the bank sequencer. After a
// frame_full pulse it must spend exactly P*W cycles in computation, holding
// each word index q for W cycles with m counting 0 .. W-1 (first at m = 0,
// wr_en at m = W-1), then hold over_n low for exactly P cycles with rd_idx
// counting 0 .. P-1, and only accept input while idle. (frame_full while
// busy breaks the interface rule the controller asserts, so it is not sent.)
module tb_bank_controller;
  localparam int unsigned P = 16, W = 16;

  logic clk = 1'b0, rst_n = 1'b0, frame_full = 1'b0;
  logic accept, en, first, wr_en, show, over_n;
  logic [$clog2(P)-1:0] q, rd_idx;
  logic [$clog2(W)-1:0] m;

  bank_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect1(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 3; fr++) begin
      repeat ($urandom_range(1, 5)) begin
        @(negedge clk);
        expect1(accept && !en && over_n, "idle outputs");
      end
      frame_full = 1'b1;
      @(negedge clk);
      frame_full = 1'b0;
      for (int qq = 0; qq < P; qq++)
        for (int mm = 0; mm < W; mm++) begin
          expect1(en && !accept && over_n, "compute outputs");
          expect1(int'(q) == qq && int'(m) == mm, $sformatf("q/m %0d/%0d expected %0d/%0d", q, m, qq, mm));
          expect1(first == (mm == 0), "first");
          expect1(wr_en == (mm == W - 1), "wr_en");
          @(negedge clk);
        end
      for (int k = 0; k < P; k++) begin
        expect1(!over_n && show && !en && !accept, "output phase");
        expect1(int'(rd_idx) == k, "rd_idx");
        @(negedge clk);
      end
      expect1(over_n && accept, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
