// tb_dwt_idwt_top: end-to-end test of the DWT/IDWT processor at its default
// size (P = 16 samples per frame, 16-bit words).
//
// The testbench draws random analysis and synthesis filter taps, builds the
// reduced coefficient table from them with its own copy of the layout rules,
// and loads it through the write port. It then sends frames through the
// analysis bank, checks every wavelet word against a direct convolution
// model (sum of x_n * g_i[(j-1)2^i - n], shifted and saturated), feeds the
// hardware's wavelet words to the synthesis bank and checks the
// reconstructed samples against the transpose model. It also checks the
// frame latency (P*W + 1 cycles from the last input to the first output),
// the memory size of eq. (8) (56 words for P = 16), that words sent while
// a bank is busy are dropped, and it counts how often each mechanism
// occurred: the four pair codes of the address generator, saturation, and
// dropped input. A mechanism that never occurs counts as a failure.
module tb_dwt_idwt_top;
  import dwt_pkg::*;

  localparam int unsigned L  = log2i(P);
  localparam int unsigned AW = $clog2(mem_depth(P));
  localparam int unsigned NFRAMES = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic          mem_we = 1'b0;
  logic [AW-1:0] mem_waddr = '0;
  logic [CW-1:0] mem_wdata = '0;
  logic [W-1:0]  in_data = '0, wavelets_input = '0;
  logic          data_ready_n = 1'b1, wavelet_ready_n = 1'b1;
  logic          analysis_over_n, synthesis_over_n;
  logic [W-1:0]  wavelets_output, reconstructed_data;

  dwt_idwt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_code[4];
  int n_sat = 0, n_drop = 0, n_frames_a = 0, n_frames_s = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // filter taps: g[i][k] analysis (level i, tap k), f[i][k] synthesis;
  // index 0 holds the residue tap
  int g[L+1][P];
  int f[L+1][P];

  function automatic int lvl_of(int q);
    int first = 0;
    for (int i = 1; i <= L; i++) begin
      if (q < first + (P >> i)) return i;
      first += P >> i;
    end
    return 0;
  endfunction

  function automatic int pos_of(int q);  // (j-1) 2^i, the last sample index
    int first = 0;
    for (int i = 1; i <= L; i++) begin
      if (q < first + (P >> i)) return (q - first) << i;
      first += P >> i;
    end
    return 0;
  endfunction

  function automatic int quant(longint s, output bit sat);
    longint v = s >>> FRAC;
    sat = 1'b0;
    if (v > 32767)  begin v = 32767;  sat = 1'b1; end
    if (v < -32768) begin v = -32768; sat = 1'b1; end
    return int'(v);
  endfunction

  function automatic longint ana_sum(int x[P], int q);
    int i = lvl_of(q), pos = pos_of(q);
    longint s = 0;
    if (i == 0) return longint'(x[0]) * g[0][0];
    for (int n = 0; n <= pos; n++) s += longint'(x[n]) * g[i][pos - n];
    return s;
  endfunction

  function automatic longint syn_sum(int w[P], int n);
    longint s = 0;
    for (int v = 0; v < P; v++) begin
      int i = lvl_of(v), pos = pos_of(v);
      if (i == 0) begin
        if (n == 0) s += longint'(w[v]) * f[0][0];
      end else if (pos >= n && pos - n <= P - (1 << i)) begin
        s += longint'(w[v]) * f[i][pos - n];
      end
    end
    return s;
  endfunction

  task automatic write_mem(int a, int d);
    @(negedge clk);
    mem_we = 1'b1; mem_waddr = AW'(a); mem_wdata = CW'(d);
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  task automatic load_table();
    int a = 1;
    write_mem(0, g[0][0]);
    for (int i = 1; i <= L; i++) begin
      int k = P / 2 - (1 << (i - 1));
      write_mem(a, g[i][0]);
      for (int u = 1; u <= k; u++) begin
        write_mem(a + 3*u - 2, g[i][2*u]);
        write_mem(a + 3*u - 1, g[i][2*u-1]);
        write_mem(a + 3*u,     g[i][2*u] + g[i][2*u-1]);
      end
      a += 3*k + 1;
    end
    checks++;
    if (a != 56 || tmr(P) != 56) begin
      failures++;
      $display("FAIL: analysis memory %0d/%0d words, expected 56", a, tmr(P));
    end
    write_mem(a, f[0][0]);
    a++;
    for (int i = 1; i <= L; i++)
      for (int k = 0; k <= P - (1 << i); k++) begin
        write_mem(a, f[i][k]);
        a++;
      end
  endtask

  // send a frame to the analysis bank, collect and check its output
  task automatic run_frame(int x[P], output int w[P], input bit poke_busy);
    longint t_last;
    int idx;
    bit sat;
    for (int n = 0; n < P; n++) begin
      @(negedge clk);
      data_ready_n = 1'b0; in_data = W'(x[n]);
    end
    @(negedge clk);
    t_last = cycle;
    data_ready_n = 1'b1;
    if (poke_busy) begin
      // words offered while the bank computes must be dropped
      repeat (20) @(negedge clk);
      data_ready_n = 1'b0; in_data = 16'h7fff;
      repeat (3) @(negedge clk);
      data_ready_n = 1'b1;
      n_drop += 3;
    end
    while (analysis_over_n) @(negedge clk);
    checks++;
    if (cycle - t_last != P * W + 1) begin
      failures++;
      $display("FAIL: analysis latency %0d, expected %0d", cycle - t_last, P * W + 1);
    end
    idx = 0;
    while (!analysis_over_n) begin
      int e = quant(ana_sum(x, idx), sat);
      n_sat += sat;
      w[idx] = int'(signed'(wavelets_output));
      checks++;
      if (w[idx] != e) begin
        failures++;
        $display("FAIL: frame %0d word %0d got %0d expected %0d", n_frames_a, idx, w[idx], e);
      end
      idx++;
      @(negedge clk);
    end
    checks++;
    if (idx != P) begin failures++; $display("FAIL: %0d analysis words", idx); end
    n_frames_a++;
  endtask

  task automatic run_synth(int w[P]);
    int idx;
    bit sat;
    for (int n = 0; n < P; n++) begin
      @(negedge clk);
      wavelet_ready_n = 1'b0; wavelets_input = W'(w[n]);
    end
    @(negedge clk);
    wavelet_ready_n = 1'b1;
    while (synthesis_over_n) @(negedge clk);
    idx = 0;
    while (!synthesis_over_n) begin
      int e = quant(syn_sum(w, idx), sat);
      n_sat += sat;
      checks++;
      if (int'(signed'(reconstructed_data)) != e) begin
        failures++;
        $display("FAIL: synthesis frame %0d sample %0d got %0d expected %0d",
                 n_frames_s, idx, int'(signed'(reconstructed_data)), e);
      end
      idx++;
      @(negedge clk);
    end
    checks++;
    if (idx != P) begin failures++; $display("FAIL: %0d synthesis samples", idx); end
    n_frames_s++;
  endtask

  // count the pair codes the address generator sees on active pairs
  always @(posedge clk)
    if (dut.u_ana.en)
      for (int t = 0; t < P/2 - 1; t++)
        if (t < pos_of(int'(dut.u_ana.q)) / 2) n_code[dut.u_ana.u_agu.code[t]]++;

  initial begin : main
    int x[P], w[P];
    for (int i = 0; i <= L; i++)
      for (int k = 0; k < P; k++) begin
        g[i][k] = $signed($urandom_range(0, 16383)) - 8192;  // |g| < 0.5
        f[i][k] = $signed($urandom_range(0, 16383)) - 8192;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_table();
    for (int fr = 0; fr < NFRAMES; fr++) begin
      for (int n = 0; n < P; n++) begin
        case (fr % 4)
          0: x[n] = $signed($urandom_range(0, 65535)) - 32768;  // full scale
          1: x[n] = $signed($urandom_range(0, 8191)) - 4096;    // small
          2: x[n] = (n % 3 == 0) ? -32768 : 32767;               // extremes
          default: x[n] = (fr == 3) ? 0 : $signed($urandom_range(0, 255)) - 128;
        endcase
      end
      run_frame(x, w, fr == 1);
      run_synth(w);
    end
    $display("frames: analysis %0d synthesis %0d; pair codes 00:%0d 01:%0d 10:%0d 11:%0d; saturated words %0d; dropped inputs %0d",
             n_frames_a, n_frames_s, n_code[0], n_code[1], n_code[2], n_code[3], n_sat, n_drop);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (n_code[c] == 0) begin failures++; $display("FAIL: pair code %0d never seen", c); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation exercised"); end
    checks++;
    if (n_drop == 0) begin failures++; $display("FAIL: no busy drop exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
