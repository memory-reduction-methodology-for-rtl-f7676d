// tb_workload_stream: long-stream workload for the DWT/IDWT processor at its
// default size. It pushes 264 000 samples (16 500 frames of 16) of a
// synthetic speech-like signal (voiced bursts: a few harmonics under a
// syllable-rate envelope, with silent gaps), followed by 264 000 random
// 16-bit samples, through the analysis bank; each frame's wavelet words are
// fed on to the synthesis bank while the analysis bank already works on the
// next frame. Every wavelet word and every reconstructed sample is compared
// with the convolution model (same model as tb_dwt_idwt_top). The filter
// taps are random, so the check is bit-exact equivalence, not signal quality.
module tb_workload_stream;
  import dwt_pkg::*;

  localparam int unsigned L  = log2i(P);
  localparam int unsigned AW = $clog2(mem_depth(P));
  localparam int unsigned NSAMPLES = 264000;
  localparam int unsigned NFRAMES  = 2 * NSAMPLES / P;  // speech, then random

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
  longint unsigned cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic int pos_of(int q);
    int first = 0;
    for (int i = 1; i <= L; i++) begin
      if (q < first + (P >> i)) return (q - first) << i;
      first += P >> i;
    end
    return 0;
  endfunction

  function automatic int quant(longint s);
    longint v = s >>> FRAC;
    if (v > 32767)  v = 32767;
    if (v < -32768) v = -32768;
    return int'(v);
  endfunction

  function automatic int ana(int x[P], int q);
    int i = lvl_of(q), pos = pos_of(q);
    longint s = 0;
    if (i == 0) return quant(longint'(x[0]) * g[0][0]);
    for (int n = 0; n <= pos; n++) s += longint'(x[n]) * g[i][pos - n];
    return quant(s);
  endfunction

  function automatic int syn(int w[P], int n);
    longint s = 0;
    for (int v = 0; v < P; v++) begin
      int i = lvl_of(v), pos = pos_of(v);
      if (i == 0) begin
        if (n == 0) s += longint'(w[v]) * f[0][0];
      end else if (pos >= n && pos - n <= P - (1 << i)) begin
        s += longint'(w[v]) * f[i][pos - n];
      end
    end
    return quant(s);
  endfunction

  function automatic int sample(int k);
    real t, env, v;
    if (k >= NSAMPLES) return $signed($urandom_range(0, 65535)) - 32768;
    t   = real'(k) / 8000.0;
    env = $sin(2.0 * 3.14159265 * 2.5 * t);
    env = (env > 0.2) ? env : 0.0;                      // syllables and gaps
    v   = 0.5 * $sin(2.0 * 3.14159265 * 180.0 * t)
        + 0.3 * $sin(2.0 * 3.14159265 * 540.0 * t)
        + 0.15 * $sin(2.0 * 3.14159265 * 1250.0 * t);
    return int'(env * v * 30000.0);
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
    write_mem(a, f[0][0]);
    a++;
    for (int i = 1; i <= L; i++)
      for (int k = 0; k <= P - (1 << i); k++) begin
        write_mem(a, f[i][k]);
        a++;
      end
  endtask

  typedef int frame_t[P];
  frame_t wq[$];
  int a_frames = 0, s_frames = 0, a_err = 0, s_err = 0;

  task automatic analysis_stream();
    int x[P], w[P];
    for (int fr = 0; fr < NFRAMES; fr++) begin
      for (int n = 0; n < P; n++) x[n] = sample(fr * P + n);
      for (int n = 0; n < P; n++) begin
        @(negedge clk);
        data_ready_n = 1'b0; in_data = W'(x[n]);
      end
      @(negedge clk);
      data_ready_n = 1'b1;
      while (analysis_over_n) @(negedge clk);
      for (int q = 0; q < P; q++) begin
        w[q] = int'(signed'(wavelets_output));
        checks++;
        if (w[q] != ana(x, q)) begin
          failures++;
          if (a_err++ < 10) $display("FAIL: frame %0d word %0d got %0d expected %0d", fr, q, w[q], ana(x, q));
        end
        @(negedge clk);
      end
      wq.push_back(w);
      a_frames++;
    end
  endtask

  task automatic synthesis_stream();
    frame_t w;
    for (int fr = 0; fr < NFRAMES; fr++) begin
      while (wq.size() == 0) @(negedge clk);
      w = wq.pop_front();
      for (int n = 0; n < P; n++) begin
        @(negedge clk);
        wavelet_ready_n = 1'b0; wavelets_input = W'(w[n]);
      end
      @(negedge clk);
      wavelet_ready_n = 1'b1;
      while (synthesis_over_n) @(negedge clk);
      for (int n = 0; n < P; n++) begin
        checks++;
        if (int'(signed'(reconstructed_data)) != syn(w, n)) begin
          failures++;
          if (s_err++ < 10) $display("FAIL: synthesis frame %0d sample %0d", fr, n);
        end
        @(negedge clk);
      end
      s_frames++;
    end
  endtask

  initial begin : main
    longint unsigned c0;
    for (int i = 0; i <= L; i++)
      for (int k = 0; k < P; k++) begin
        g[i][k] = $signed($urandom_range(0, 8191)) - 4096;
        f[i][k] = $signed($urandom_range(0, 8191)) - 4096;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_table();
    c0 = cycles;
    fork
      analysis_stream();
      synthesis_stream();
    join
    checks++;
    if (a_frames != NFRAMES || s_frames != NFRAMES) begin
      failures++;
      $display("FAIL: %0d/%0d frames", a_frames, s_frames);
    end
    $display("%0d frames (%0d samples) analysed and reconstructed in %0d cycles",
             NFRAMES, NFRAMES * P, cycles - c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
