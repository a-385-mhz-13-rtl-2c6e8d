// cavlc_decoder: H.264/AVC CAVLC residual block decoder with two-level
// (two level symbols per cycle) level decoding and two-symbol run_before
// decoding.
//
// A bitstream fetcher presents a 32-bit window of the stream through a
// non-registered barrel shifter. One decoding unit works per cycle, chosen by
// the stage controller; the window reaches only that unit, the inputs of the
// idle units being held at zero (functional gating). The stages are:
//   CTOKEN  coeff_token: TotalCoeff (tc) and TrailingOnes (t1)     1 cycle
//   T1      all t1 sign flags; the +-1 values go to the buffer     1 cycle
//   LEVEL   delay balanced two-level decoder, 1 or 2 levels/cycle
//   TZ      total_zeros
//   RUN     run_before, 1 or 2 symbols/cycle, coefficients moved
//   DONE    out_valid pulse with the reconstructed block           1 cycle
// Coefficients are written to output buffer indices tc-1 down to 0 in
// decoding order and then moved to their final positions. Four skips remove
// stages that have nothing to decode:
//   zero block skip     tc == 0                -> straight to DONE
//   level skip          tc == t1               -> LEVEL skipped
//   total_zeros skip    tc == maxNumCoeff      -> TZ and RUN skipped
//   run skip            total_zeros == 0 or tc == 1 -> RUN skipped (with
//                       tc == 1 the single coefficient is moved in the TZ cycle)
// A stage waits while the fetcher has no full window.
//
// Interface: bs_* is a valid/ready stream of 32-bit bitstream words, first bit
// in the MSB; the stream must hold residual blocks back to back with their
// codewords aligned as coded. blk_* is a valid/ready command per block: the
// neighbour counts nA/nB with their availability (giving nC), a chroma DC
// flag (nC = -1, maxNumCoeff 4) and maxNumCoeff (16 or 15) otherwise. A
// command is taken in IDLE or in DONE, so blocks can follow back to back.
// out_valid pulses for one cycle while out_coeff (scan order) and
// out_total_coeff hold the block. err is sticky and flags a codeword that
// matches no table entry or a level_prefix above 15.
// Timing per block with a steady stream: 1 + 1 + ceil-ish(levels/2) + 1 +
// ceil-ish(runs/2) + 1 cycles, fewer where a skip applies.
// The stage order, the skips, the gating and the sizes follow the design
// description; the handshakes, the nC rule input format, the error flag and
// the T1 stage running even when TrailingOnes is 0 are this design's own.
module cavlc_decoder
  import cavlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] bs_data,
  input  logic        bs_valid,
  output logic        bs_ready,
  input  logic        blk_valid,
  output logic        blk_ready,
  input  logic [4:0]  blk_na,
  input  logic [4:0]  blk_nb,
  input  logic        blk_avail_a,
  input  logic        blk_avail_b,
  input  logic        blk_chroma_dc,
  input  logic [4:0]  blk_max_coeff,
  output logic        out_valid,
  output coef_t       out_coeff [MAX_COEFFS],
  output logic [4:0]  out_total_coeff,
  output logic        err
);
  // ---------------- block state ----------------
  stage_e     state;
  logic [4:0] na_q, nb_q, max_q;
  logic       aa_q, ab_q, cdc_q;
  logic [4:0] tc_q;
  logic [1:0] t1_q;
  logic [4:0] lv_left_q;   // levels still to decode
  logic [3:0] lv_idx_q;    // buffer index of the next level
  logic [2:0] sl_q;        // suffixLength
  logic       first_q;     // next level is the block's first with t1 < 3
  logic [3:0] zl_q;        // zerosLeft
  logic [4:0] cl_q;        // coeffsLeft

  // ---------------- bitstream fetcher ----------------
  logic [31:0] window;
  logic        win_valid;
  logic [5:0]  consume;

  bitstream_fetcher #(.WIN_W(WIN_W)) u_fetch (
    .clk, .rst_n,
    .in_data(bs_data), .in_valid(bs_valid), .in_ready(bs_ready),
    .window, .win_valid, .consume_len(consume));

  // ---------------- functional gating of the unit inputs ----------------
  logic [15:0] win_ct, win_tz;
  logic [2:0]  win_t1;
  logic [31:0] win_lv, win_rb;
  assign win_ct = (state == S_CTOKEN) ? window[31:16] : '0;
  assign win_t1 = (state == S_T1)     ? window[31:29] : '0;
  assign win_lv = (state == S_LEVEL)  ? window : '0;
  assign win_tz = (state == S_TZ)     ? window[31:16] : '0;
  assign win_rb = (state == S_RUN)    ? window : '0;

  // ---------------- decoding units ----------------
  logic [4:0] ct_tc, ct_len;
  logic [1:0] ct_t1;
  logic       ct_hit;
  coeff_token_dec u_ct (
    .win(win_ct), .na(na_q), .nb(nb_q), .avail_a(aa_q), .avail_b(ab_q),
    .chroma_dc(cdc_q), .total_coeff(ct_tc), .trailing_ones(ct_t1), .len(ct_len), .hit(ct_hit));

  coef_t      t1_val [3];
  logic [1:0] t1_len;
  trailing_ones_dec u_t1 (
    .win(win_t1), .trailing_ones(t1_q), .value(t1_val), .len(t1_len));

  coef_t      lv1, lv2;
  logic       lv2_valid, lv_err;
  logic [5:0] lv_len;
  logic [2:0] lv_sl_next;
  dbtld u_dbtld (
    .win(win_lv), .suffix_len(sl_q), .first(first_q), .two_ok(lv_left_q >= 5'd2),
    .level1(lv1), .level2(lv2), .level2_valid(lv2_valid), .len(lv_len),
    .suffix_len_next(lv_sl_next), .err(lv_err));

  logic [4:0] tz_val, tz_len;
  logic       tz_hit;
  total_zeros_dec u_tz (
    .win(win_tz), .total_coeff(tc_q), .chroma_dc(cdc_q),
    .total_zeros(tz_val), .len(tz_len), .hit(tz_hit));

  logic [3:0] rb1, rb2, rb_zl_next;
  logic       rb1_valid, rb2_valid, rb_done, rb_err;
  logic [4:0] rb_len, rb_cl_next;
  logic [1:0] rb_mv_en;
  logic [3:0] rb_mv_src [2];
  logic [3:0] rb_mv_dst [2];
  run_before_dec u_rb (
    .win(win_rb), .zeros_left(zl_q), .coeffs_left(cl_q),
    .rb1, .rb2, .rb1_valid, .rb2_valid, .len(rb_len),
    .mv_en(rb_mv_en), .mv_src(rb_mv_src), .mv_dst(rb_mv_dst),
    .zeros_left_next(rb_zl_next), .coeffs_left_next(rb_cl_next), .done(rb_done), .err(rb_err));

  // ---------------- output buffer ----------------
  logic       buf_clear;
  logic [2:0] wr_en;
  logic [3:0] wr_idx [3];
  coef_t      wr_val [3];
  logic [1:0] mv_en;
  logic [3:0] mv_src [2];
  logic [3:0] mv_dst [2];

  output_buffer u_obuf (
    .clk, .rst_n, .clear(buf_clear), .wr_en, .wr_idx, .wr_val,
    .mv_en, .mv_src, .mv_dst, .coeff(out_coeff));

  // ---------------- stage control ----------------
  logic   take_cmd, go;
  logic   max_reached;      // tc == maxNumCoeff: total_zeros skip
  stage_e state_d;

  assign blk_ready   = (state == S_IDLE) || (state == S_DONE);
  assign take_cmd    = blk_ready && blk_valid;
  assign go          = win_valid;
  assign buf_clear   = take_cmd;
  assign max_reached = (tc_q == max_q);
  assign out_valid   = (state == S_DONE);
  assign out_total_coeff = tc_q;

  // stage after the levels (or after T1 when the levels are skipped)
  function automatic stage_e after_levels(input logic max_r);
    return max_r ? S_DONE : S_TZ;
  endfunction

  always_comb begin
    state_d = state;
    consume = '0;
    wr_en   = '0;
    mv_en   = '0;
    for (int k = 0; k < 3; k++) begin
      wr_idx[k] = '0;
      wr_val[k] = '0;
    end
    for (int m = 0; m < 2; m++) begin
      mv_src[m] = '0;
      mv_dst[m] = '0;
    end
    unique case (state)
      S_IDLE, S_DONE: begin
        state_d = take_cmd ? S_CTOKEN : S_IDLE;
      end
      S_CTOKEN: if (go) begin
        consume = 6'(ct_len);
        state_d = (ct_tc == 5'd0) ? S_DONE : S_T1;           // zero block skip
      end
      S_T1: if (go) begin
        consume = 6'(t1_len);
        for (int k = 0; k < 3; k++) begin
          wr_en[k]  = (k < int'(t1_q));
          wr_idx[k] = 4'(tc_q - 5'd1 - 5'(k));
          wr_val[k] = t1_val[k];
        end
        state_d = (tc_q == 5'(t1_q)) ? after_levels(max_reached) : S_LEVEL;  // level skip
      end
      S_LEVEL: if (go) begin
        consume   = lv_len;
        wr_en[0]  = 1'b1;
        wr_idx[0] = lv_idx_q;
        wr_val[0] = lv1;
        wr_en[1]  = lv2_valid;
        wr_idx[1] = lv_idx_q - 4'd1;
        wr_val[1] = lv2;
        if (lv_left_q <= 5'(1 + int'(lv2_valid))) state_d = after_levels(max_reached);
      end
      S_TZ: if (go) begin
        consume = 6'(tz_len);
        // run skip: nothing to decode; a single coefficient takes all zeros
        if (tz_val == 5'd0 || tc_q == 5'd1) begin
          mv_en[0]  = (tz_val != 5'd0);
          mv_src[0] = 4'd0;
          mv_dst[0] = 4'(tz_val);
          state_d   = S_DONE;
        end else begin
          state_d   = S_RUN;
        end
      end
      S_RUN: if (go) begin
        consume = 6'(rb_len);
        mv_en   = rb_mv_en;
        mv_src  = rb_mv_src;
        mv_dst  = rb_mv_dst;
        if (rb_done) state_d = S_DONE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      na_q      <= '0;
      nb_q      <= '0;
      max_q     <= '0;
      aa_q      <= 1'b0;
      ab_q      <= 1'b0;
      cdc_q     <= 1'b0;
      tc_q      <= '0;
      t1_q      <= '0;
      lv_left_q <= '0;
      lv_idx_q  <= '0;
      sl_q      <= '0;
      first_q   <= 1'b0;
      zl_q      <= '0;
      cl_q      <= '0;
      err       <= 1'b0;
    end else begin
      state <= state_d;
      if (take_cmd) begin
        na_q  <= blk_na;
        nb_q  <= blk_nb;
        aa_q  <= blk_avail_a;
        ab_q  <= blk_avail_b;
        cdc_q <= blk_chroma_dc;
        max_q <= blk_chroma_dc ? 5'd4 : blk_max_coeff;
        tc_q  <= '0;
      end
      if (go) begin
        unique case (state)
          S_CTOKEN: begin
            tc_q <= ct_tc;
            t1_q <= ct_t1;
            if (!ct_hit) err <= 1'b1;
          end
          S_T1: begin
            lv_left_q <= tc_q - 5'(t1_q);
            lv_idx_q  <= 4'(tc_q - 5'(t1_q) - 5'd1);
            sl_q      <= (tc_q > 5'd10 && t1_q < 2'd3) ? 3'd1 : 3'd0;
            first_q   <= (t1_q < 2'd3);
          end
          S_LEVEL: begin
            lv_left_q <= lv_left_q - (lv2_valid ? 5'd2 : 5'd1);
            lv_idx_q  <= lv_idx_q - (lv2_valid ? 4'd2 : 4'd1);
            sl_q      <= lv_sl_next;
            first_q   <= 1'b0;
            if (lv_err) err <= 1'b1;
          end
          S_TZ: begin
            zl_q <= 4'(tz_val);
            cl_q <= tc_q;
            if (!tz_hit) err <= 1'b1;
          end
          S_RUN: begin
            zl_q <= rb_zl_next;
            cl_q <= rb_cl_next;
            if (rb_err) err <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // a second run_before is only decoded after a first one, and never beyond zerosLeft
  a_run_pair: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && go) |-> ((!rb2_valid || rb1_valid) &&
                                (5'(rb1_valid ? rb1 : 4'd0) + 5'(rb2_valid ? rb2 : 4'd0) <= 5'(zl_q))));

  a_one_level_min: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LEVEL) |-> (lv_left_q != 5'd0));
endmodule
