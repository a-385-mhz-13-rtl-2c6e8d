// tb_output_buffer: replays the reconstruction example of the design
// description (coefficients 4 3 2 -2 -1 1, total_zeros 3, run_before 1 and 1
// in the first cycle, 1 in the second) and then random writes and move pairs
// against a model of the buffer.
module tb_output_buffer;
  import cavlc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear;
  logic [2:0] wr_en;
  logic [3:0] wr_idx [3];
  coef_t wr_val [3];
  logic [1:0] mv_en;
  logic [3:0] mv_src [2];
  logic [3:0] mv_dst [2];
  coef_t coeff [16];
  output_buffer dut (.*);
  int checks = 0, failures = 0;
  int model [16];

  task automatic idle();
    clear = 0; wr_en = 0; mv_en = 0;
    for (int k = 0; k < 3; k++) begin wr_idx[k] = 0; wr_val[k] = 0; end
    for (int m = 0; m < 2; m++) begin mv_src[m] = 0; mv_dst[m] = 0; end
  endtask

  task automatic compare(string what);
    checks++;
    for (int i = 0; i < 16; i++)
      if (int'(coeff[i]) != model[i]) begin
        failures++;
        if (failures < 10) begin
          $write("FAIL %s:", what);
          for (int j = 0; j < 16; j++) $write(" %0d/%0d", coeff[j], model[j]);
          $display("");
        end
        break;
      end
  endtask

  task automatic push(int idx[3], int val[3], bit en[3]);
    idle();
    for (int k = 0; k < 3; k++) begin
      wr_en[k] = en[k]; wr_idx[k] = 4'(idx[k]); wr_val[k] = coef_t'(val[k]);
    end
    @(posedge clk); #1;
    for (int k = 0; k < 3; k++) if (en[k]) model[idx[k]] = val[k];
  endtask

  task automatic move(bit en0, int s0, int d0, bit en1, int s1, int d1);
    int old [16];
    idle();
    mv_en = {en1, en0};
    mv_src[0] = 4'(s0); mv_dst[0] = 4'(d0); mv_src[1] = 4'(s1); mv_dst[1] = 4'(d1);
    @(posedge clk); #1;
    old = model;
    if (en0) model[s0] = 0;
    if (en1) model[s1] = 0;
    if (en0) model[d0] = old[s0];
    if (en1) model[d1] = old[s1];
  endtask

  initial begin
    idle();
    model = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    clear = 1; @(posedge clk); #1; idle();
    push('{5, 4, 3}, '{1, -1, -2}, '{1, 1, 1});
    push('{2, 1, 0}, '{2, 3, 4}, '{1, 1, 1});
    compare("example load");
    // cycle 1: coeffsLeft 6, zerosLeft 3: 1 -> 8, run 1; -1 -> 6, run 1
    move(1, 5, 8, 1, 4, 6);
    compare("example cycle 1");
    checks++;
    if (!(coeff[8] == 1 && coeff[6] == -1 && coeff[5] == 0 && coeff[4] == 0)) failures++;
    // cycle 2: coeffsLeft 4, zerosLeft 1: -2 -> 4
    move(1, 3, 4, 0, 0, 0);
    compare("example cycle 2");
    checks++;
    if (!(coeff[0] == 4 && coeff[1] == 3 && coeff[2] == 2 && coeff[3] == 0 && coeff[4] == -2 &&
          coeff[6] == -1 && coeff[8] == 1)) failures++;
    // random traffic
    for (int it = 0; it < 3000; it++) begin
      int r;
      r = int'($urandom_range(9));
      if (r == 0) begin
        idle(); clear = 1; @(posedge clk); #1; model = '{default: 0};
      end else if (r < 5) begin
        int idx[3], val[3];
        bit en[3];
        for (int k = 0; k < 3; k++) begin
          idx[k] = int'($urandom_range(15)); val[k] = int'($urandom_range(8191)) - 4096;
          en[k] = 1'($urandom);
        end
        if (idx[1] == idx[0]) en[1] = 0;
        if (idx[2] == idx[0] || idx[2] == idx[1]) en[2] = 0;
        push(idx, val, en);
      end else begin
        // move pair shaped as in reconstruction: s1 < s0 <= d0, s1 <= d1 < d0
        int s0, d0, s1, d1;
        s0 = int'($urandom_range(14, 1)); d0 = int'($urandom_range(15, s0 + 1));
        s1 = s0 - 1; d1 = int'($urandom_range(d0 - 1, s1));
        move(1, s0, d0, 1'($urandom), s1, d1);
      end
      compare("random");
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
