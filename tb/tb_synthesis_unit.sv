// tb_synthesis_unit: self-checking test of the DA synthesis filter with a
// behavioural copy of the synthesis region of the memory. For each output
// sample n the testbench steps m = 0 .. W-1 and compares `result` in the
// last bit cycle with the transpose model
//   sum over words (i,j) with 0 <= (j-1)2^i - n <= P - 2^i of
//   w_{i,j} * f_i[(j-1)2^i - n], plus the residue term for n = 0,
// shifted by FRAC and saturated.
module tb_synthesis_unit;
  import dwt_pkg::*;
  localparam int unsigned L = log2i(P), AW = $clog2(mem_depth(P));

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic [$clog2(P)-1:0] n = '0;
  logic [$clog2(W)-1:0] m = '0;
  logic [P-1:0]         slice;
  logic [P-1:0][AW-1:0] raddr;
  logic [P-1:0][CW-1:0] rdata;
  logic [W-1:0]         result;

  synthesis_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nsat = 0;
  int f[L+1][P];
  logic [CW-1:0] mem[1 << AW];
  logic [W-1:0] w[P];

  always_comb begin
    for (int v = 0; v < P; v++) slice[v] = w[v][m];
    for (int v = 0; v < P; v++) rdata[v] = mem[raddr[v]];
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
    int a = 56;  // synthesis region starts after the 56-word analysis region
    for (int k = 0; k < (1 << AW); k++) mem[k] = CW'($urandom);  // analysis words: never used
    for (int i = 0; i <= L; i++)
      for (int k = 0; k < P; k++) f[i][k] = $signed($urandom_range(0, 16383)) - 8192;
    mem[a++] = CW'(f[0][0]);
    for (int i = 1; i <= L; i++)
      for (int k = 0; k <= P - (1 << i); k++) mem[a++] = CW'(f[i][k]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 20; fr++) begin
      for (int v = 0; v < P; v++)
        w[v] = (fr < 10) ? W'($urandom_range(0, 4095) - 2048) : W'($urandom);
      for (int nn = 0; nn < P; nn++) begin
        automatic longint s = 0, val;
        for (int v = 0; v < P; v++) begin
          automatic int i = lvl_of(v), pos = pos_of(v);
          if (i == 0) begin
            if (nn == 0) s += longint'($signed(w[v])) * f[0][0];
          end else if (pos >= nn && pos - nn <= P - (1 << i)) begin
            s += longint'($signed(w[v])) * f[i][pos - nn];
          end
        end
        val = s >>> FRAC;
        if (val > 32767)  begin val = 32767;  nsat++; end
        if (val < -32768) begin val = -32768; nsat++; end
        n = 4'(nn);
        for (int mm = 0; mm < W; mm++) begin
          @(negedge clk);
          en = 1'b1; m = 4'(mm); first = (mm == 0);
        end
        #1;
        checks++;
        if (int'($signed(result)) != int'(val)) begin
          failures++;
          $display("FAIL: frame %0d n %0d got %0d expected %0d", fr, nn, $signed(result), val);
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
