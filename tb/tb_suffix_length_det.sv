// tb_suffix_length_det: exhaustive check of the suffixLength detector against
// the standard's rule applied to the decoded level value. For every
// suffixLength, level_prefix and first-level flag, each possible level_suffix
// is decoded to a level with the standard formulas, the standard update of
// suffixLength is applied, and the result must equal the detector's output.
module tb_suffix_length_det;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] suffix_len, suffix_len_next;
  logic [4:0] level_prefix;
  logic       first;
  suffix_length_det dut (.*);
  int checks = 0, failures = 0;

  function automatic int std_next(int sl, int prefix, int suffix, bit fst);
    int size, code, level, a, n;
    size = (prefix == 14 && sl == 0) ? 4 : (prefix == 15) ? 12 : sl;
    code = (prefix << sl) + ((size > 0) ? suffix % (1 << size) : 0);
    if (prefix == 15 && sl == 0) code += 15;
    if (fst) code += 2;
    level = (code % 2 == 0) ? (code + 2) / 2 : -(code + 1) / 2;
    a = (level < 0) ? -level : level;
    n = (sl == 0) ? 1 : sl;
    if (a > (3 << (n - 1)) && n < 6) n++;
    return n;
  endfunction

  initial begin
    for (int sl = 0; sl <= 6; sl++)
      for (int p = 0; p <= 15; p++)
        for (int f = 0; f <= 1; f++) begin
          if (f == 1 && sl > 1) continue;   // a first level starts with suffixLength 0 or 1
          suffix_len = 3'(sl); level_prefix = 5'(p); first = f[0];
          @(posedge clk);
          for (int s = 0; s < 4096; s += 7) begin
            int e;
            e = std_next(sl, p, s, f[0]);
            checks++;
            if (int'(suffix_len_next) != e) begin
              failures++;
              if (failures < 10)
                $display("FAIL sl=%0d prefix=%0d first=%0d suffix=%0d: got %0d exp %0d",
                         sl, p, f, s, suffix_len_next, e);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
