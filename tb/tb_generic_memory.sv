// tb_generic_memory: self-checking test of the register-based coefficient
// memory. After reset every word must read zero; the testbench then writes
// random words to random addresses, keeps its own copy, and checks all read
// ports at once against that copy, including writes that land while the
// ports read, and that out-of-range addresses read zero.
module tb_generic_memory;
  localparam int unsigned DEPTH = dwt_pkg::mem_depth(dwt_pkg::P);
  localparam int unsigned CW = 16, NR = 24, AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [CW-1:0] wdata = '0;
  logic [NR-1:0][AW-1:0] raddr = '0;
  logic [NR-1:0][CW-1:0] rdata;

  generic_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [CW-1:0] model [DEPTH];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ports();
    for (int r = 0; r < NR; r++) begin
      logic [CW-1:0] e = (raddr[r] < DEPTH) ? model[raddr[r]] : '0;
      checks++;
      if (rdata[r] !== e) begin
        failures++;
        $display("FAIL: port %0d addr %0d got %h expected %h", r, raddr[r], rdata[r], e);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) model[a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a += NR) begin
      for (int r = 0; r < NR; r++) raddr[r] = AW'((a + r) % DEPTH);
      #1 check_ports();
    end
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = CW'($urandom);
      for (int r = 0; r < NR; r++) raddr[r] = AW'($urandom_range(0, (1 << AW) - 1));
      #1 check_ports();
      @(posedge clk);
      model[waddr] = wdata;
      #1 check_ports();
    end
    @(negedge clk);
    we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
