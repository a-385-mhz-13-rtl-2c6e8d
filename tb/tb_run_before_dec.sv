// tb_run_before_dec: random coefficient position patterns are coded as
// run_before symbols with the standard table, and the decoder is stepped
// through them cycle by cycle as the block controller would. Each cycle the
// decoded runs, the move destinations (which must be the coefficients' true
// final positions), the bits used and the remaining counts are checked; the
// number of cycles must be the one that two symbols per cycle give.
module tb_run_before_dec;
  import cavlc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] win;
  logic [3:0] zeros_left, rb1, rb2, zeros_left_next;
  logic [4:0] coeffs_left, len, coeffs_left_next;
  logic rb1_valid, rb2_valid, done, err;
  logic [1:0] mv_en;
  logic [3:0] mv_src [2];
  logic [3:0] mv_dst [2];
  run_before_dec dut (.*);
  int checks = 0, failures = 0;
  int n_two = 0, n_one = 0, n_last = 0;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL %s", what);
  endtask

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int pos[16];   // pos[0] = highest-frequency coefficient position
      int tc, tz, zl, cl, p, cyc, exp_cyc;
      bit q[$];
      bit used[16];
      q.delete();
      used = '{default: 0};
      tc = int'($urandom_range(15, 2));
      for (int i = 0; i < tc; ) begin
        int x;
        x = int'($urandom_range(15));
        if (!used[x]) begin used[x] = 1; i++; end
      end
      tc = 0;
      for (int x = 15; x >= 0; x--) if (used[x]) begin pos[tc] = x; tc++; end
      tz = pos[0] + 1 - tc;
      if (tz == 0) continue;
      zl = tz;
      for (int i = 0; i < tc - 1 && zl > 0; i++) begin
        vlc_t e;
        int run;
        run = pos[i] - pos[i + 1] - 1;
        e = run_before_code(3'((zl > 6) ? 7 : zl), 4'(run));
        for (int b = int'(e.len) - 1; b >= 0; b--) q.push_back(e.code[b]);
        zl -= run;
      end
      // expected cycles: two coefficients placed per cycle until no zeros remain
      exp_cyc = 0; zl = tz; cl = tc;
      while (zl > 0 && cl > 0) begin
        exp_cyc++;
        if (cl > 1) zl -= pos[tc - cl] - pos[tc - cl + 1] - 1;
        if (cl > 1 && zl > 0) begin
          if (cl > 2) zl -= pos[tc - cl + 1] - pos[tc - cl + 2] - 1;
          cl -= 2;
        end else cl -= 1;
      end
      // step the decoder
      zl = tz; cl = tc; p = 0; cyc = 0;
      forever begin
        int a, ezl;
        for (int i = 0; i < 32; i++) win[31 - i] = (p + i < q.size()) ? q[p + i] : 1'($urandom);
        zeros_left = 4'(zl); coeffs_left = 5'(cl);
        @(posedge clk);
        cyc++;
        a = tc - cl;   // reverse-order index of coefficient A
        checks++;
        if (!mv_en[0] || int'(mv_src[0]) != cl - 1 || int'(mv_dst[0]) != pos[a]) fail("move A");
        ezl = zl;
        if (cl > 1) begin
          checks++;
          if (!rb1_valid || int'(rb1) != pos[a] - pos[a + 1] - 1) fail("rb1");
          ezl -= pos[a] - pos[a + 1] - 1;
        end else if (rb1_valid) fail("rb1 valid on last coefficient");
        if (cl > 1 && ezl > 0) begin
          checks++;
          if (!mv_en[1] || int'(mv_src[1]) != cl - 2 || int'(mv_dst[1]) != pos[a + 1]) fail("move B");
          if (cl > 2) begin
            checks++;
            if (!rb2_valid || int'(rb2) != pos[a + 1] - pos[a + 2] - 1) fail("rb2");
            ezl -= pos[a + 1] - pos[a + 2] - 1;
            n_two++;
          end else n_last++;
          cl -= 2;
        end else begin
          if (mv_en[1]) fail("move B not expected");
          cl -= 1;
          n_one++;
        end
        checks++;
        if (int'(zeros_left_next) != ezl || int'(coeffs_left_next) != cl || err) fail("next counts");
        p += int'(len);
        zl = ezl;
        if (done != (zl == 0 || cl == 0)) fail("done");
        if (done || cyc > 20) break;
      end
      checks++;
      if (cyc != exp_cyc || p != q.size()) fail($sformatf("cycles %0d/%0d bits %0d/%0d", cyc, exp_cyc, p, q.size()));
    end
    checks++;
    if (n_two == 0 || n_one == 0 || n_last == 0) fail("a case never occurred");
    $display("two-symbol cycles %0d, one-symbol cycles %0d, last-coefficient pairs %0d", n_two, n_one, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
