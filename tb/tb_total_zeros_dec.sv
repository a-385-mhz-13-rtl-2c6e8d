// tb_total_zeros_dec: every total_zeros codeword of the 4x4 and chroma DC
// tables is placed at the head of a window followed by random bits; the
// decoded value and length must match. The worked example (TotalCoeff 5,
// bits 111 -> total_zeros 3) and a few hand-written codes are checked too.
module tb_total_zeros_dec;
  import cavlc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [15:0] win;
  logic [4:0] total_coeff, total_zeros, len;
  logic chroma_dc, hit;
  total_zeros_dec dut (.*);
  int checks = 0, failures = 0;

  task automatic check(int etz, int elen, string what);
    checks++;
    if (!hit || int'(total_zeros) != etz || int'(len) != elen) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: tc=%0d cdc=%0d win=%b got tz=%0d len=%0d hit=%0d exp tz=%0d len=%0d",
                 what, total_coeff, chroma_dc, win, total_zeros, len, hit, etz, elen);
    end
  endtask

  initial begin
    chroma_dc = 0;
    total_coeff = 5; win = 16'b111_0110110000000; #1 check(3, 3, "worked example");
    total_coeff = 1; win = 16'b000000001_0000000; #1 check(15, 9, "tc1 tz15");
    total_coeff = 15; win = 16'b1_000000000000000; #1 check(1, 1, "tc15 tz1");
    chroma_dc = 1; total_coeff = 1; win = 16'b000_1111111111111; #1 check(3, 3, "cdc tc1 tz3");
    for (int rep = 0; rep < 30; rep++)
      for (int c = 0; c <= 1; c++)
        for (int tc = 1; tc <= 15; tc++)
          for (int tz = 0; tz <= 15; tz++) begin
            vlc_t e;
            if (c == 1 && tc > 3) continue;
            if (tz > ((c == 1) ? 4 : 16) - tc) continue;
            chroma_dc = c[0]; total_coeff = 5'(tc);
            e = total_zeros_code(chroma_dc, total_coeff, 5'(tz));
            win = 16'($urandom);
            for (int i = 0; i < int'(e.len); i++) win[15 - i] = e.code[int'(e.len) - 1 - i];
            @(posedge clk);
            check(tz, int'(e.len), "table entry");
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
