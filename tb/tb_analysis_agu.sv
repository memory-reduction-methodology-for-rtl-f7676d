// tb_analysis_agu: self-checking test of the address generation unit.
// The testbench fills a model of the reduced memory from random taps using
// its own copy of the layout, then for every output word q and random bit
// slices adds up the words the unit asks for and compares that with the
// direct sum of g_i[(j-1)2^i - n] over the samples n whose bit is set. It
// also checks the Table II case: samples x_2, x_3 of the third level-1
// coefficient fetch nothing, h_1, h_2 or h_1 + h_2 for bits 00, 01, 10, 11,
// and that the first level-1 slice sits in memory as g_0, h_2, h_1, h_1 + h_2.
module tb_analysis_agu;
  import dwt_pkg::*;
  localparam int unsigned L = log2i(P), AW = $clog2(mem_depth(P)), NS = P / 2;

  logic [$clog2(P)-1:0]  q = '0;
  logic [P-1:0]          slice = '0;
  logic [NS-1:0][AW-1:0] addr;
  logic [NS-1:0]         fetch;
  logic [NS-2:0][1:0]    code;

  analysis_agu dut (.*);

  int checks = 0, failures = 0;
  int g[L+1][P];
  int mem[1 << AW];

  function automatic int lvl_of(int qq);
    int first = 0;
    for (int i = 1; i <= L; i++) begin
      if (qq < first + (P >> i)) return i;
      first += P >> i;
    end
    return 0;
  endfunction

  function automatic int pos_of(int qq);
    int first = 0;
    for (int i = 1; i <= L; i++) begin
      if (qq < first + (P >> i)) return (qq - first) << i;
      first += P >> i;
    end
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    // reduced-table order of the first level-1 slice: word q = 1 (x_0..x_2),
    // x_2 alone -> g_1[0] at address 1; pair (x_0, x_1) -> h_2, h_1, h_1 + h_2
    // at addresses 2, 3, 4
    for (int c = 1; c < 4; c++) begin
      q = 4'd1;
      slice = P'(c);
      #1;
      checks++;
      if (!fetch[0] || addr[0] != AW'(1 + c) || fetch[NS-1]) begin
        failures++;
        $display("FAIL: first slice, bits %b: fetch %b addr %0d", 2'(c), fetch[0], addr[0]);
      end
    end
    q = 4'd1;
    slice = P'(3'b100);
    #1;
    checks++;
    if (!fetch[NS-1] || addr[NS-1] != AW'(1) || fetch[0]) begin
      failures++;
      $display("FAIL: single sample of word 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a = 1;
    for (int k = 0; k < (1 << AW); k++) mem[k] = 0;
    for (int i = 0; i <= L; i++)
      for (int k = 0; k < P; k++) g[i][k] = $urandom_range(1, 1000) * ((k % 2) ? 1 : 1000);
    mem[0] = g[0][0];
    for (int i = 1; i <= L; i++) begin
      automatic int k = P / 2 - (1 << (i - 1));
      mem[a] = g[i][0];
      for (int u = 1; u <= k; u++) begin
        mem[a + 3*u - 2] = g[i][2*u];
        mem[a + 3*u - 1] = g[i][2*u-1];
        mem[a + 3*u]     = g[i][2*u] + g[i][2*u-1];
      end
      a += 3*k + 1;
    end
    for (int qq = 0; qq < P; qq++)
      for (int it = 0; it < 200; it++) begin
        automatic int i = lvl_of(qq), pos = pos_of(qq), got = 0, exp_s = 0;
        q = 4'(qq);
        slice = P'($urandom);
        #1;
        for (int s = 0; s < NS; s++) if (fetch[s]) got += mem[addr[s]];
        if (i == 0) exp_s = slice[0] ? g[0][0] : 0;
        else for (int n = 0; n <= pos; n++) if (slice[n]) exp_s += g[i][pos - n];
        checks++;
        if (got != exp_s) begin
          failures++;
          $display("FAIL: q %0d slice %h sum %0d expected %0d", qq, slice, got, exp_s);
        end
      end
    // Table II: third coefficient of level 1 (q = 2), samples x_2 and x_3
    for (int c = 0; c < 4; c++) begin
      int e;
      q = 4'd2;
      slice = '0;
      slice[2] = c[1];
      slice[3] = c[0];
      #1;
      e = (c == 1) ? g[1][1] : (c == 2) ? g[1][2] : (c == 3) ? g[1][1] + g[1][2] : 0;
      checks++;
      if (fetch[1] != (c != 0) || (c != 0 && mem[addr[1]] != e)) begin
        failures++;
        $display("FAIL: Table II bits %b", 2'(c));
      end
    end
    // reduced-table order of the first level-1 slice: word q = 1 (x_0..x_2),
    // x_2 alone -> g_1[0] at address 1; pair (x_0, x_1) -> h_2, h_1, h_1 + h_2
    // at addresses 2, 3, 4
    for (int c = 1; c < 4; c++) begin
      q = 4'd1;
      slice = P'(c);
      #1;
      checks++;
      if (!fetch[0] || addr[0] != AW'(1 + c) || fetch[NS-1]) begin
        failures++;
        $display("FAIL: first slice, bits %b: fetch %b addr %0d", 2'(c), fetch[0], addr[0]);
      end
    end
    q = 4'd1;
    slice = P'(3'b100);
    #1;
    checks++;
    if (!fetch[NS-1] || addr[NS-1] != AW'(1) || fetch[0]) begin
      failures++;
      $display("FAIL: single sample of word 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
