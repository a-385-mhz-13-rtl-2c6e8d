// tb_coeff_token_dec: every coeff_token codeword of every table is placed at
// the head of a window followed by random bits, with neighbour counts drawn
// at random; the table must be the one the nC rule selects and the decoded
// TotalCoeff, TrailingOnes and length must be those of the codeword. A few
// codewords are also checked against hand-written values from the standard.
module tb_coeff_token_dec;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [15:0] win;
  logic [4:0] na, nb, total_coeff, len;
  logic avail_a, avail_b, chroma_dc, hit;
  logic [1:0] trailing_ones;
  coeff_token_dec dut (.*);
  int checks = 0, failures = 0;

  task automatic check(int etc, int et1, int elen, string what);
    checks++;
    if (!hit || int'(total_coeff) != etc || int'(trailing_ones) != et1 || int'(len) != elen) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: win=%b nC=%0d got tc=%0d t1=%0d len=%0d hit=%0d exp tc=%0d t1=%0d len=%0d",
                 what, win, nc_of(int'(na), int'(nb), avail_a, avail_b, chroma_dc),
                 total_coeff, trailing_ones, len, hit, etc, et1, elen);
    end
  endtask

  initial begin
    // hand-written spot checks, nC = 0 unless stated
    na = 0; nb = 0; avail_a = 0; avail_b = 0; chroma_dc = 0;
    win = 16'b0000100_111111111; #1 check(5, 3, 7, "worked example");
    win = 16'b1_000000000000000; #1 check(0, 0, 1, "nC0 empty");
    win = 16'b01_10101010101010; #1 check(1, 1, 2, "nC0 1/1");
    win = 16'b000101_1111111111; #1 check(1, 0, 6, "nC0 1/0");
    na = 9; avail_a = 1;                                  // nC = 9: fixed length
    win = 16'b000011_1010101010; #1 check(0, 0, 6, "FLC empty");
    win = 16'b111111_0000000000; #1 check(16, 3, 6, "FLC 16/3");
    chroma_dc = 1;
    win = 16'b01_00000000000000; #1 check(0, 0, 2, "chroma DC empty");
    win = 16'b0000000_111111111; #1 check(4, 3, 7, "chroma DC 4/3");
    // every codeword of every table
    for (int rep = 0; rep < 20; rep++)
      for (int tc = 0; tc <= 16; tc++)
        for (int t1 = 0; t1 <= 3; t1++) begin
          int nc;
          ct_tab_e tab;
          vlc_t e;
          na = 5'($urandom_range(16)); nb = 5'($urandom_range(16));
          avail_a = 1'($urandom); avail_b = 1'($urandom);
          chroma_dc = ($urandom_range(4) == 0);
          nc = nc_of(int'(na), int'(nb), avail_a, avail_b, chroma_dc);
          tab = (nc < 0) ? CT_CDC : (nc < 2) ? CT_NC0 : (nc < 4) ? CT_NC2 : (nc < 8) ? CT_NC4 : CT_NC8;
          e = coeff_token_code(tab, 2'(t1), 5'(tc));
          if (e.len == 0) continue;
          win = 16'($urandom);
          for (int i = 0; i < int'(e.len); i++) win[15 - i] = e.code[int'(e.len) - 1 - i];
          @(posedge clk);
          check(tc, t1, int'(e.len), "table entry");
        end
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
