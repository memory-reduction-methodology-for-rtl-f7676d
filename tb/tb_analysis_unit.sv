// tb_analysis_unit: self-checking test of the DA analysis filter with a
// behavioural copy of the reduced memory (filled by the testbench's own
// layout code). For each output word the testbench steps the bit index
// m = 0 .. W-1 as the controller does and compares `result` in the last
// bit cycle with the direct convolution, shifted by FRAC and saturated.
module tb_analysis_unit;
  import dwt_pkg::*;
  localparam int unsigned L = log2i(P), AW = $clog2(mem_depth(P)), NS = P / 2;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic [$clog2(P)-1:0]  q = '0;
  logic [$clog2(W)-1:0]  m = '0;
  logic [P-1:0]          slice;
  logic [NS-1:0][AW-1:0] raddr;
  logic [NS-1:0][CW-1:0] rdata;
  logic [W-1:0]          result;

  analysis_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nsat = 0;
  int g[L+1][P];
  logic [CW-1:0] mem[1 << AW];
  logic [W-1:0] x[P];

  always_comb begin
    for (int n = 0; n < P; n++) slice[n] = x[n][m];
    for (int s = 0; s < NS; s++) rdata[s] = mem[raddr[s]];
  end

  function automatic int lvl_of(int qq);
    int f0 = 0;
    for (int i = 1; i <= L; i++) begin
      if (qq < f0 + (P >> i)) return i;
      f0 += P >> i;
    end
    return 0;
  endfunction

  function automatic int pos_of(int qq);
    int f0 = 0;
    for (int i = 1; i <= L; i++) begin
      if (qq < f0 + (P >> i)) return (qq - f0) << i;
      f0 += P >> i;
    end
    return 0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a = 1;
    for (int k = 0; k < (1 << AW); k++) mem[k] = '0;
    for (int i = 0; i <= L; i++)
      for (int k = 0; k < P; k++) g[i][k] = $signed($urandom_range(0, 16383)) - 8192;
    mem[0] = CW'(g[0][0]);
    for (int i = 1; i <= L; i++) begin
      automatic int k = P / 2 - (1 << (i - 1));
      mem[a] = CW'(g[i][0]);
      for (int u = 1; u <= k; u++) begin
        mem[a + 3*u - 2] = CW'(g[i][2*u]);
        mem[a + 3*u - 1] = CW'(g[i][2*u-1]);
        mem[a + 3*u]     = CW'(g[i][2*u] + g[i][2*u-1]);
      end
      a += 3*k + 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 20; fr++) begin
      for (int n = 0; n < P; n++)
        x[n] = (fr < 10) ? W'($urandom_range(0, 4095) - 2048) : W'($urandom);
      for (int qq = 0; qq < P; qq++) begin
        automatic longint s = 0, v;
        automatic int i = lvl_of(qq), pos = pos_of(qq);
        if (i == 0) s = longint'($signed(x[0])) * g[0][0];
        else for (int n = 0; n <= pos; n++) s += longint'($signed(x[n])) * g[i][pos - n];
        v = s >>> FRAC;
        if (v > 32767)  begin v = 32767;  nsat++; end
        if (v < -32768) begin v = -32768; nsat++; end
        q = 4'(qq);
        for (int mm = 0; mm < W; mm++) begin
          @(negedge clk);
          en = 1'b1; m = 4'(mm); first = (mm == 0);
        end
        #1;
        checks++;
        if (int'($signed(result)) != int'(v)) begin
          failures++;
          $display("FAIL: frame %0d q %0d got %0d expected %0d", fr, qq, $signed(result), v);
        end
      end
    end
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
