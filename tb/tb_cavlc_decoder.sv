// tb_cavlc_decoder: end-to-end test of the CAVLC decoder.
//
// Blocks are generated at random (sparse, dense, trailing-one runs, large
// levels that need escape codes) for all block types (16 and 15 coefficients
// with every nC table, 2x2 chroma DC), grouped as 4:2:0 macroblocks (16 luma,
// 2 chroma DC, 8 chroma AC blocks). The reference encoder turns them into one
// bitstream, which is fed to the decoder with random gaps; the block commands
// also arrive with random gaps. Each decoded block is compared with the
// original, and the active decoding cycles of each block (cycles in which a
// unit worked on a full window) with the cycle count expected from two levels
// and two run_before symbols per cycle. The first block is the worked example
// of the design description (bits 000010001110010111101101). Each mechanism
// (skips, two-level and flushed level pairs, escape codes, two-symbol runs,
// stalls, every coeff_token table) must occur at least once.
module tb_cavlc_decoder;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int N_MB     = 100;
  localparam int N_BLK    = 1 + N_MB * 26;
  localparam int WATCHDOG = 200000;

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

  // ---------------- stimulus ----------------
  int  exp_coef [N_BLK][16];
  int  c_na [N_BLK], c_nb [N_BLK], c_max [N_BLK];
  bit  c_aa [N_BLK], c_ab [N_BLK], c_cdc [N_BLK];
  enc_info_t info [N_BLK];
  bit  stream[$];
  int  n_words;
  logic [31:0] words[$];

  function automatic int rand_level(int mode);
    int m, r;
    r = int'($urandom_range(99));
    if (mode == 3 && r < 30) m = int'($urandom_range(2000, 30));
    else if (mode == 3 && r < 60) m = int'($urandom_range(29, 8));
    else if (r < 55) m = 1;
    else if (r < 80) m = int'($urandom_range(3, 2));
    else m = int'($urandom_range(12, 4));
    return $urandom_range(1) ? m : -m;
  endfunction

  task automatic make_block(int k, int kind);
    int mode, maxc, dens;
    mode = int'($urandom_range(4));
    // kind: 0 luma 4x4 (16), 1 chroma DC (4), 2 chroma AC (15)
    maxc = (kind == 0) ? 16 : (kind == 1) ? 4 : 15;
    c_max[k] = maxc;
    c_cdc[k] = (kind == 1);
    c_aa[k]  = $urandom_range(3) != 0;
    c_ab[k]  = $urandom_range(3) != 0;
    c_na[k]  = int'($urandom_range(16));
    c_nb[k]  = int'($urandom_range(16));
    case (mode)
      0: dens = 0;                              // zero block
      1: dens = int'($urandom_range(25));       // sparse
      2: dens = int'($urandom_range(100, 60));  // dense
      default: dens = int'($urandom_range(100));
    endcase
    if ($urandom_range(9) == 0) dens = 100;     // full block
    for (int p = 0; p < 16; p++)
      exp_coef[k][p] = (p < maxc && int'($urandom_range(99)) < dens) ? rand_level(mode) : 0;
  endtask

  initial begin
    int nc;
    bit q[$];
    // block 0: the worked example, nC = 0
    exp_coef[0] = '{0, 3, 0, 1, -1, -1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
    c_max[0] = 16; c_cdc[0] = 0; c_aa[0] = 0; c_ab[0] = 0; c_na[0] = 0; c_nb[0] = 0;
    info[0] = encode_block(q, exp_coef[0], 16, 0, 0);
    checks++;
    begin
      bit paper[$];
      put(paper, 24'b000010001110010111101101, 24);
      if (q != paper) begin
        failures++;
        $display("FAIL: encoder does not reproduce the worked example bitstream");
      end
    end
    stream = q;
    for (int m = 0; m < N_MB; m++)
      for (int b = 0; b < 26; b++) begin
        int k;
        k = 1 + m * 26 + b;
        make_block(k, (b < 16) ? 0 : (b < 18) ? 1 : 2);
        nc = nc_of(c_na[k], c_nb[k], c_aa[k], c_ab[k], c_cdc[k]);
        q.delete();
        info[k] = encode_block(q, exp_coef[k], c_max[k], c_cdc[k], nc);
        stream = {stream, q};
      end
    // two words of padding so the last block sees a full window
    while (stream.size() % 32 != 0) stream.push_back(1'b0);
    repeat (64) stream.push_back(1'b0);
    for (int w = 0; w < stream.size() / 32; w++) begin
      logic [31:0] x;
      for (int i = 0; i < 32; i++) x[31 - i] = stream[w * 32 + i];
      words.push_back(x);
    end
    n_words = words.size();
    $display("stream: %0d blocks, %0d bits", N_BLK, stream.size());
  end

  // bitstream words with random gaps
  int wi = 0;
  bit gap;
  always_ff @(posedge clk) begin
    if (rst_n && bs_valid && bs_ready) wi <= wi + 1;
    gap <= ($urandom_range(7) == 0);
  end
  assign bs_valid = rst_n && (wi < n_words) && !gap;
  assign bs_data  = (wi < n_words) ? words[wi] : '0;

  // block commands with random gaps
  int ci = 0;
  bit cgap;
  always_ff @(posedge clk) begin
    if (rst_n && blk_valid && blk_ready) ci <= ci + 1;
    cgap <= ($urandom_range(5) == 0);
  end
  assign blk_valid     = rst_n && (ci < N_BLK) && !cgap;
  assign blk_na        = 5'(c_na[ci < N_BLK ? ci : 0]);
  assign blk_nb        = 5'(c_nb[ci < N_BLK ? ci : 0]);
  assign blk_avail_a   = c_aa[ci < N_BLK ? ci : 0];
  assign blk_avail_b   = c_ab[ci < N_BLK ? ci : 0];
  assign blk_chroma_dc = c_cdc[ci < N_BLK ? ci : 0];
  assign blk_max_coeff = 5'(c_max[ci < N_BLK ? ci : 0]);

  // ---------------- mechanism counters ----------------
  int n_zero_skip, n_level_skip, n_tz_skip, n_run_skip_tz0, n_run_skip_tc1;
  int n_two_level, n_one_level, n_flush_esc, n_flush_len, n_esc14, n_esc15;
  int n_two_run, n_one_run, n_stall, n_sl6, n_gated;
  int n_tab [5];
  int active, total_cycles;

  always_ff @(posedge clk) if (rst_n) begin
    total_cycles <= total_cycles + 1;
    if (dut.state inside {S_CTOKEN, S_T1, S_LEVEL, S_TZ, S_RUN}) begin
      if (!dut.win_valid) n_stall <= n_stall + 1;
      else active <= active + 1;
    end
    if (dut.win_valid) begin
      if (dut.state == S_CTOKEN) begin
        n_tab[dut.u_ct.tab] <= n_tab[dut.u_ct.tab] + 1;
        if (dut.ct_tc == 0) n_zero_skip <= n_zero_skip + 1;
      end
      if (dut.state == S_T1 && dut.tc_q == 5'(dut.t1_q)) n_level_skip <= n_level_skip + 1;
      if (dut.state == S_T1 && dut.tc_q == dut.max_q && dut.tc_q != 5'(dut.t1_q)) n_tz_skip <= n_tz_skip + 1;
      if (dut.state == S_TZ && dut.tz_val == 0) n_run_skip_tz0 <= n_run_skip_tz0 + 1;
      if (dut.state == S_TZ && dut.tz_val != 0 && dut.tc_q == 1) n_run_skip_tc1 <= n_run_skip_tc1 + 1;
      if (dut.state == S_LEVEL) begin
        if (dut.lv2_valid) n_two_level <= n_two_level + 1;
        else n_one_level <= n_one_level + 1;
        if (dut.lv_left_q >= 2 && !dut.lv2_valid && (dut.u_dbtld.esc14 || dut.u_dbtld.esc15))
          n_flush_esc <= n_flush_esc + 1;
        if (dut.lv_left_q >= 2 && !dut.lv2_valid && !(dut.u_dbtld.esc14 || dut.u_dbtld.esc15))
          n_flush_len <= n_flush_len + 1;
        if (dut.u_dbtld.esc14) n_esc14 <= n_esc14 + 1;
        if (dut.u_dbtld.esc15) n_esc15 <= n_esc15 + 1;
        if (dut.lv_sl_next == 3'd6) n_sl6 <= n_sl6 + 1;
      end
      if (dut.state == S_RUN) begin
        if (dut.rb2_valid) n_two_run <= n_two_run + 1;
        else n_one_run <= n_one_run + 1;
      end
      // functional gating: the level unit sees a zero window outside LEVEL
      if (dut.state != S_LEVEL && dut.win_lv == '0 && dut.window != '0) n_gated <= n_gated + 1;
    end
  end

  // ---------------- checking ----------------
  int oi = 0;
  int blk_active_start;
  int mb_cycles_sum = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      bit ok;
      int got_cycles;
      ok = 1;
      for (int p = 0; p < 16; p++) if (int'(out_coeff[p]) != exp_coef[oi][p]) ok = 0;
      if (int'(out_total_coeff) != info[oi].tc) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) begin
          $display("FAIL block %0d (tc=%0d t1=%0d tz=%0d max=%0d cdc=%0d):", oi, info[oi].tc,
                   info[oi].t1, info[oi].tz, c_max[oi], c_cdc[oi]);
          for (int p = 0; p < 16; p++) $write("%0d/%0d ", out_coeff[p], exp_coef[oi][p]);
          $display("");
        end
      end
      got_cycles = active - blk_active_start;
      mb_cycles_sum += got_cycles + 1;  // + the DONE cycle
      checks++;
      if (got_cycles != info[oi].cycles) begin
        failures++;
        if (failures < 10)
          $display("FAIL block %0d: %0d active cycles, expected %0d", oi, got_cycles, info[oi].cycles);
      end
      oi++;
      if (oi == N_BLK) begin
        checks++;
        if (err) begin failures++; $display("FAIL: error flag set"); end
        report();
        $finish;
      end
    end
    if (dut.state == S_IDLE || dut.state == S_DONE) blk_active_start = active;
  end

  task automatic need(string name, int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL: mechanism never occurred: %s", name); end
  endtask

  task automatic report();
    $display("mechanisms:");
    need("zero block skip", n_zero_skip);
    need("level skip", n_level_skip);
    need("total_zeros skip", n_tz_skip);
    need("run skip (total_zeros=0)", n_run_skip_tz0);
    need("run skip (TotalCoeff=1)", n_run_skip_tc1);
    need("two levels in a cycle", n_two_level);
    need("one level in a cycle", n_one_level);
    need("level 2 flushed (escape)", n_flush_esc);
    need("level 2 flushed (length)", n_flush_len);
    need("level_prefix 14 escape", n_esc14);
    need("level_prefix 15 escape", n_esc15);
    need("suffixLength reaches 6", n_sl6);
    need("two run_before in a cycle", n_two_run);
    need("one run_before in a cycle", n_one_run);
    need("bitstream stall", n_stall);
    need("unit input gated", n_gated);
    need("table 0<=nC<2", n_tab[0]);
    need("table 2<=nC<4", n_tab[1]);
    need("table 4<=nC<8", n_tab[2]);
    need("table nC>=8", n_tab[3]);
    need("table chroma DC", n_tab[4]);
    $display("average decoding cycles per macroblock (26 blocks, stalls excluded): %0.2f",
             real'(mb_cycles_sum - info[0].cycles - 1) / N_MB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d blocks decoded", oi, N_BLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
