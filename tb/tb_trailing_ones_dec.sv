// tb_trailing_ones_dec: exhaustive check of the trailing-one sign decoder
// over all 3-bit windows and TrailingOnes 0..3.
module tb_trailing_ones_dec;
  import cavlc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] win;
  logic [1:0] trailing_ones, len;
  coef_t value [3];
  trailing_ones_dec dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 4; t++)
      for (int w = 0; w < 8; w++) begin
        win = 3'(w); trailing_ones = 2'(t);
        @(posedge clk);
        for (int k = 0; k < 3; k++) begin
          int e;
          e = (k >= t) ? 0 : ((w >> (2 - k)) & 1) ? -1 : 1;
          checks++;
          if (int'(value[k]) != e) begin
            failures++;
            $display("FAIL t1=%0d win=%b k=%0d got %0d exp %0d", t, w[2:0], k, value[k], e);
          end
        end
        checks++;
        if (int'(len) != t) failures++;
      end
    // worked example: signs 0,1,1 -> +1, -1, -1
    win = 3'b011; trailing_ones = 2'd3;
    @(posedge clk);
    checks++;
    if (!(value[0] == 1 && value[1] == -1 && value[2] == -1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
