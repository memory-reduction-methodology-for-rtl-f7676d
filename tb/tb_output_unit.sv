// tb_output_unit: self-checking test of the frame output buffer. Random
// words are written to random slots; while show is high every slot must
// read back its last written word, and dout must be zero while show is low.
module tb_output_unit;
  localparam int unsigned P = 16, W = 16;

  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, show = 1'b0;
  logic [$clog2(P)-1:0] wr_idx = '0, rd_idx = '0;
  logic [W-1:0] wr_data = '0, dout;

  output_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] model [P];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < P; n++) model[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rnd = 0; rnd < 8; rnd++) begin
      for (int k = 0; k < 2 * P; k++) begin
        @(negedge clk);
        wr_en = ($urandom_range(0, 3) != 0);
        wr_idx = 4'($urandom_range(0, P - 1));
        wr_data = W'($urandom);
        show = 1'b0; rd_idx = 4'($urandom_range(0, P - 1));
        #1;
        checks++;
        if (dout !== '0) begin failures++; $display("FAIL: dout not zero while hidden"); end
        @(posedge clk);
        if (wr_en) model[wr_idx] = wr_data;
      end
      @(negedge clk);
      wr_en = 1'b0;
      show = 1'b1;
      for (int n = 0; n < P; n++) begin
        rd_idx = 4'(n);
        #1;
        checks++;
        if (dout !== model[n]) begin
          failures++;
          $display("FAIL: slot %0d got %h expected %h", n, dout, model[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
