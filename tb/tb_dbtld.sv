// tb_dbtld: random pairs of levels are encoded with the reference encoder
// (suffixLength, first-level adjustment and escape codes as in the standard)
// and placed at the head of a 32-bit window followed by random bits. The
// decoder must return level 1, return level 2 exactly when the pair may be
// decoded together (two levels wanted, level 1 not an escape, level 2 not a
// level_prefix 15 escape, both within 32 bits), report the bits used and the
// suffixLength that the standard's rule gives after the decoded levels.
module tb_dbtld;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] win;
  logic [2:0] suffix_len, suffix_len_next;
  logic first, two_ok, level2_valid, err;
  coef_t level1, level2;
  logic [5:0] len;
  dbtld dut (.*);
  int checks = 0, failures = 0;
  int n_pair = 0, n_flush = 0;

  function automatic int next_sl(int sl, int level);
    int a, n;
    a = (level < 0) ? -level : level;
    n = (sl == 0) ? 1 : sl;
    if (a > (3 << (n - 1)) && n < 6) n++;
    return n;
  endfunction

  function automatic int rnd_level(bit not_one);
    int m, r;
    r = int'($urandom_range(9));
    m = (r < 4) ? int'($urandom_range(3, 1)) : (r < 8) ? int'($urandom_range(40, 1))
                                              : int'($urandom_range(2000, 1));
    if (not_one && m == 1) m = 2;
    return $urandom_range(1) ? m : -m;
  endfunction

  initial begin
    for (int it = 0; it < 20000; it++) begin
      bit q[$];
      int sl, l1, l2, len1, len2, p1, p2, sl2, e_len, e_sl;
      bit f, esc1, esc2, ok2, e_v2;
      q.delete();
      sl = int'($urandom_range(6));
      f  = (sl <= 1) && $urandom_range(1);
      l1 = rnd_level(f);
      l2 = rnd_level(0);
      len1 = put_level(q, l1, sl, f, esc1, p1);
      sl2  = next_sl(sl, l1);
      len2 = put_level(q, l2, sl2, 0, esc2, p2);
      while (q.size() < 32) q.push_back(1'($urandom));
      for (int i = 0; i < 32; i++) win[31 - i] = q[i];
      suffix_len = 3'(sl); first = f; ok2 = $urandom_range(3) != 0; two_ok = ok2;
      @(posedge clk);
      e_v2  = ok2 && !esc1 && p2 < 15 && len1 + len2 <= 32;
      e_len = e_v2 ? len1 + len2 : len1;
      e_sl  = e_v2 ? next_sl(sl2, l2) : sl2;
      checks++;
      if (int'(level1) != l1 || level2_valid != e_v2 || (e_v2 && int'(level2) != l2) ||
          int'(len) != e_len || int'(suffix_len_next) != e_sl || err) begin
        failures++;
        if (failures < 10)
          $display("FAIL sl=%0d first=%0d levels %0d,%0d: got %0d,%0d v2=%0d len=%0d sl=%0d; exp v2=%0d len=%0d sl=%0d",
                   sl, f, l1, l2, level1, level2, level2_valid, len, suffix_len_next, e_v2, e_len, e_sl);
      end
      if (e_v2) n_pair++;
      else if (ok2) n_flush++;
    end
    // both outcomes must have been exercised
    checks++;
    if (n_pair == 0 || n_flush == 0) failures++;
    $display("pairs %0d, flushed second levels %0d", n_pair, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
