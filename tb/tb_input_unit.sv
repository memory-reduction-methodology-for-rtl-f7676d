// tb_input_unit: self-checking test of the frame input buffer. Frames of
// random words are sent with gaps in the active-low ready strobe; the test
// checks the one-cycle frame_full pulse on the P-th word, that words offered
// while accept is low are not stored, and every bit slice of the stored
// frame against its own copy.
module tb_input_unit;
  localparam int unsigned P = 16, W = 16;

  logic clk = 1'b0, rst_n = 1'b0, accept = 1'b0, ready_n = 1'b1;
  logic [W-1:0] din = '0;
  logic frame_full;
  logic [$clog2(W)-1:0] bitsel = '0;
  logic [P-1:0] slice;

  input_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] model [P];

  always @(posedge clk) if (frame_full) fulls++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 6; fr++) begin
      accept = 1'b1;
      for (int n = 0; n < P; n++) begin
        while ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          ready_n = 1'b1; din = W'($urandom);
        end
        @(negedge clk);
        ready_n = 1'b0; din = W'($urandom); model[n] = din;
        checks++;
        if (frame_full) begin failures++; $display("FAIL: early frame_full"); end
      end
      @(negedge clk);
      ready_n = 1'b1; accept = 1'b0;
      checks++;
      if (!frame_full) begin failures++; $display("FAIL: no frame_full after word %0d", P); end
      // offered while not accepting: must be ignored
      for (int k = 0; k < 5; k++) begin
        @(negedge clk);
        ready_n = 1'b0; din = W'($urandom);
        checks++;
        if (frame_full) begin failures++; $display("FAIL: frame_full while not accepting"); end
      end
      @(negedge clk);
      ready_n = 1'b1;
      for (int b = 0; b < W; b++) begin
        bitsel = 4'(b);
        #1;
        for (int n = 0; n < P; n++) begin
          checks++;
          if (slice[n] !== model[n][b]) begin
            failures++;
            $display("FAIL: frame %0d word %0d bit %0d", fr, n, b);
          end
        end
      end
    end
    checks++;
    if (fulls != 6) begin failures++; $display("FAIL: %0d frame_full pulses", fulls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
