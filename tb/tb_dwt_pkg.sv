// tb_dwt_pkg: checks the memory-map and indexing functions of dwt_pkg
// against values worked out by hand from the sizing rules:
// k = P/2 - 2^(i-1) slices and M_i = 3k + 1 words per level, one residue
// word, so 56 analysis words for P = 16 (22 + 19 + 13 + 1 + 1), 19 for P = 8
// and 6 for P = 4; level bases 1, 23, 42, 55; the synthesis region of
// 1 + 15 + 13 + 9 + 1 words after it (95 words in all); and the mapping of
// output word numbers to (level, coefficient).
module tb_dwt_pkg;
  import dwt_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    static int lv[16] = '{1,1,1,1,1,1,1,1,2,2,2,2,3,3,4,0};
    static int cj[16] = '{1,2,3,4,5,6,7,8,1,2,3,4,1,2,1,1};
    static int ab[4]  = '{1,23,42,55};
    static int sb[4]  = '{57,72,85,94};
    static int mw[4]  = '{22,19,13,1};
    expect_eq(int'(log2i(16)), 4, "log2i(16)");
    expect_eq(int'(tmr(16)), 56, "tmr(16)");
    expect_eq(int'(tmr(8)), 19, "tmr(8)");
    expect_eq(int'(tmr(4)), 6, "tmr(4)");
    expect_eq(int'(mem_depth(16)), 95, "mem_depth(16)");
    for (int i = 1; i <= 4; i++) begin
      expect_eq(int'(level_words(16, i)), mw[i-1], $sformatf("M_%0d", i));
      expect_eq(int'(abase(16, i)), ab[i-1], $sformatf("abase(%0d)", i));
      expect_eq(int'(sbase(16, i)), sb[i-1], $sformatf("sbase(%0d)", i));
    end
    for (int q = 0; q < 16; q++) begin
      expect_eq(int'(level_of(16, q)), lv[q], $sformatf("level_of(%0d)", q));
      expect_eq(int'(coef_of(16, q)), cj[q], $sformatf("coef_of(%0d)", q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
