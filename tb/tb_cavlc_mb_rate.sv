// tb_cavlc_mb_rate: macroblock throughput of the CAVLC decoder on a steady
// stream. 4:2:0 intra macroblocks (16 luma 4x4, 2 chroma DC, 8 chroma AC
// blocks) are generated with statistics closer to coded video than the
// end-to-end test: many empty blocks, coefficients concentrated at low
// frequencies, mostly small levels with occasional large ones. Bitstream words
// and block commands are always available, so the cycle count is the
// decoder's own. Every block is checked against its original. The measured
// cycles per macroblock must fit the H.264 Level 5.1 budget at 385 MHz
// (983040 macroblocks/s, i.e. 391 cycles per macroblock), and the clock
// needed for each level is printed.
module tb_cavlc_mb_rate;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int N_MB     = 200;
  localparam int N_BLK    = N_MB * 26;
  localparam int BUDGET   = 385000000 / 983040;   // cycles per MB at Level 5.1, 385 MHz
  localparam int WATCHDOG = N_MB * 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] bs_data;
  logic        bs_valid, bs_ready;
  logic        blk_valid, blk_ready;
  logic [4:0]  blk_na, blk_nb, blk_max_coeff;
  logic        blk_avail_a, blk_avail_b, blk_chroma_dc;
  logic        out_valid, err;
  coef_t       out_coeff [MAX_COEFFS];
  logic [4:0]  out_total_coeff;

  cavlc_decoder dut (.*);

  int checks = 0, failures = 0;
  int exp_coef [N_BLK][16];
  int c_na [N_BLK], c_nb [N_BLK], c_max [N_BLK];
  bit c_cdc [N_BLK];
  logic [31:0] words[$];
  int n_words;

  // video-like block: empty with probability p_zero, otherwise a run of
  // coefficients concentrated at the start of the scan
  task automatic make_block(int k, int maxc, int p_zero);
    int last;
    for (int p = 0; p < 16; p++) exp_coef[k][p] = 0;
    if (int'($urandom_range(99)) < p_zero) return;
    last = int'($urandom_range(maxc - 1));
    if ($urandom_range(1)) last = last / 2;
    for (int p = 0; p <= last; p++)
      if (int'($urandom_range(99)) < 70 - 40 * p / maxc) begin
        int r, m;
        r = int'($urandom_range(99));
        m = (r < 60) ? 1 : (r < 85) ? 2 : (r < 97) ? int'($urandom_range(8, 3)) : int'($urandom_range(60, 9));
        exp_coef[k][p] = $urandom_range(1) ? m : -m;
      end
    if (exp_coef[k][last] == 0) exp_coef[k][last] = $urandom_range(1) ? 1 : -1;
  endtask

  initial begin
    bit stream[$];
    bit q[$];
    for (int k = 0; k < N_BLK; k++) begin
      int b, nc;
      b = k % 26;
      c_cdc[k] = (b == 16 || b == 17);
      c_max[k] = (b < 16) ? 16 : c_cdc[k] ? 4 : 15;
      make_block(k, c_max[k], (b < 16) ? 30 : c_cdc[k] ? 40 : 75);
      // neighbour counts taken from the previous block of the same kind
      c_na[k] = 0; c_nb[k] = 0;
      for (int p = 0; p < 16; p++) if (k >= 1 && exp_coef[k - 1][p] != 0) c_na[k]++;
      for (int p = 0; p < 16; p++) if (k >= 4 && exp_coef[k - 4][p] != 0) c_nb[k]++;
      nc = nc_of(c_na[k], c_nb[k], 1, 1, c_cdc[k]);
      q.delete();
      void'(encode_block(q, exp_coef[k], c_max[k], c_cdc[k], nc));
      stream = {stream, q};
    end
    while (stream.size() % 32 != 0) stream.push_back(1'b0);
    repeat (64) stream.push_back(1'b0);
    for (int w = 0; w < stream.size() / 32; w++) begin
      logic [31:0] x;
      for (int i = 0; i < 32; i++) x[31 - i] = stream[w * 32 + i];
      words.push_back(x);
    end
    n_words = words.size();
  end

  int wi = 0, ci = 0, oi = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (bs_valid && bs_ready) wi <= wi + 1;
    if (blk_valid && blk_ready) ci <= ci + 1;
  end
  assign bs_valid      = rst_n && (wi < n_words);
  assign bs_data       = (wi < n_words) ? words[wi] : '0;
  assign blk_valid     = rst_n && (ci < N_BLK);
  assign blk_na        = 5'(c_na[ci < N_BLK ? ci : 0]);
  assign blk_nb        = 5'(c_nb[ci < N_BLK ? ci : 0]);
  assign blk_avail_a   = 1'b1;
  assign blk_avail_b   = 1'b1;
  assign blk_chroma_dc = c_cdc[ci < N_BLK ? ci : 0];
  assign blk_max_coeff = 5'(c_max[ci < N_BLK ? ci : 0]);

  longint t_first = -1, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (t_first < 0 && blk_valid && blk_ready) t_first = cycles;
    cycles++;
    if (out_valid) begin
      bit ok;
      ok = 1;
      for (int p = 0; p < 16; p++) if (int'(out_coeff[p]) != exp_coef[oi][p]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 5) $display("FAIL block %0d", oi);
      end
      oi++;
      if (oi == N_BLK) report(cycles - t_first);
    end
  end

  task automatic report(longint used);
    real per_mb;
    int  mbps [9];
    string lv [9];
    per_mb = real'(used) / N_MB;
    mbps = '{1458, 11880, 40500, 108000, 216000, 245760, 522240, 589824, 983040};
    lv   = '{"1", "2", "3", "3.1", "3.2", "4", "4.2", "5", "5.1"};
    $display("%0d macroblocks in %0d cycles: %0.2f cycles per macroblock", N_MB, used, per_mb);
    for (int i = 0; i < 9; i++)
      $display("  Level %-4s %7d MB/s -> %8.2f MHz needed", lv[i], mbps[i], per_mb * mbps[i] / 1.0e6);
    checks++;
    if (per_mb > real'(BUDGET)) begin
      failures++;
      $display("FAIL: %0.2f cycles per macroblock exceeds the Level 5.1 budget of %0d", per_mb, BUDGET);
    end
    checks++;
    if (err) begin failures++; $display("FAIL: error flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d blocks", oi, N_BLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
