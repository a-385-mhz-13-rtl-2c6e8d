// cavlc_ref_pkg: reference CAVLC encoder used by the testbenches.
//
// encode_block turns a residual block (coefficients in scan order) into its
// CAVLC bit string exactly as an H.264 encoder would: coeff_token, trailing
// one signs, levels with the adaptive suffixLength, total_zeros and
// run_before. It works from the coefficients, in the encoding direction, so
// the decoder is checked against the original block. It also predicts how
// many cycles the decoder should need, from the two-per-cycle rules for
// levels and run_before symbols.
package cavlc_ref_pkg;
  import cavlc_pkg::*;

  typedef struct {
    int tc;
    int t1;
    int tz;
    int level_cycles;
    int run_cycles;
    int cycles;       // expected active decoding cycles (CTOKEN .. RUN)
    int n_esc;        // level codewords using level_prefix 14 (sL 0) or 15
  } enc_info_t;

  // nC from the neighbour counts, H.264 rule
  function automatic int nc_of(int na, int nb, bit aa, bit ab, bit cdc);
    if (cdc) return -1;
    if (aa && ab) return (na + nb + 1) / 2;
    if (aa) return na;
    if (ab) return nb;
    return 0;
  endfunction

  function automatic void put(ref bit q[$], input int unsigned code, input int len);
    for (int i = len - 1; i >= 0; i--) q.push_back(bit'((code >> i) & 1));
  endfunction

  function automatic void put_vlc(ref bit q[$], input vlc_t e);
    if (e.len == 0) $fatal(1, "reference encoder: missing table entry");
    put(q, int'(e.code), int'(e.len));
  endfunction

  // Encode one level; returns its codeword length and whether it is an escape.
  function automatic int put_level(ref bit q[$], input int level, input int sl, input bit first,
                                   output bit esc, output int prefix);
    int code, suffix, ssize;
    code = (level > 0) ? 2 * level - 2 : -2 * level - 1;
    if (first) code -= 2;
    esc = 0;
    if (sl == 0) begin
      if (code < 14) begin prefix = code; ssize = 0; suffix = 0; end
      else if (code < 30) begin prefix = 14; ssize = 4; suffix = code - 14; esc = 1; end
      else begin prefix = 15; ssize = 12; suffix = code - 30; esc = 1; end
    end else begin
      if (code < (15 << sl)) begin prefix = code >> sl; ssize = sl; suffix = code & ((1 << sl) - 1); end
      else begin prefix = 15; ssize = 12; suffix = code - (15 << sl); esc = 1; end
    end
    if (suffix >= (1 << 12) && ssize == 12) $fatal(1, "reference encoder: level too large");
    put(q, 1, prefix + 1);
    if (ssize > 0) put(q, suffix, ssize);
    return prefix + 1 + ssize;
  endfunction

  function automatic enc_info_t encode_block(ref bit q[$], input int coef[16], input int max_coeff,
                                             input bit cdc, input int nc);
    enc_info_t info;
    int lv[16];
    int pos[16];
    int tc, t1, sl, tz, zl, cl;
    int lens[16];
    bit escs[16];
    int pfx[16];
    ct_tab_e tab;
    info = '{default: 0};
    tc = 0;
    for (int p = max_coeff - 1; p >= 0; p--)
      if (coef[p] != 0) begin lv[tc] = coef[p]; pos[tc] = p; tc++; end
    t1 = 0;
    while (t1 < tc && t1 < 3 && (lv[t1] == 1 || lv[t1] == -1)) t1++;
    if (cdc) tab = CT_CDC;
    else if (nc < 2) tab = CT_NC0;
    else if (nc < 4) tab = CT_NC2;
    else if (nc < 8) tab = CT_NC4;
    else tab = CT_NC8;
    put_vlc(q, coeff_token_code(tab, 2'(t1), 5'(tc)));
    info.tc = tc; info.t1 = t1;
    info.cycles = 1;
    if (tc == 0) return info;
    for (int i = 0; i < t1; i++) q.push_back(lv[i] < 0);
    info.cycles += 1;
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      int a;
      lens[i] = put_level(q, lv[i], sl, (i == t1 && t1 < 3), escs[i], pfx[i]);
      if (escs[i]) info.n_esc++;
      if (sl == 0) sl = 1;
      a = (lv[i] < 0) ? -lv[i] : lv[i];
      if (a > (3 << (sl - 1)) && sl < 6) sl++;
    end
    // level cycles: a pair is decoded together unless the first is an escape,
    // the second uses level_prefix 15, or the pair exceeds 32 bits
    for (int i = t1; i < tc; ) begin
      info.level_cycles++;
      if (i + 1 < tc && !escs[i] && pfx[i + 1] < 15 && lens[i] + lens[i + 1] <= 32) i += 2;
      else i += 1;
    end
    info.cycles += info.level_cycles;
    if (tc < max_coeff) begin
      tz = pos[0] + 1 - tc;
      info.tz = tz;
      put_vlc(q, total_zeros_code(cdc, 5'(tc), 5'(tz)));
      info.cycles += 1;
      zl = tz;
      for (int i = 0; i < tc - 1 && zl > 0; i++) begin
        int run;
        run = pos[i] - pos[i + 1] - 1;
        put_vlc(q, run_before_code(3'((zl > 6) ? 7 : zl), 4'(run)));
        zl -= run;
      end
      // run cycles: coefficients are placed two per cycle until no zeros remain
      if (tz != 0 && tc != 1) begin
        zl = tz; cl = tc;
        while (zl > 0 && cl > 0) begin
          info.run_cycles++;
          if (cl > 1) zl -= pos[tc - cl] - pos[tc - cl + 1] - 1;
          if (cl > 1 && zl > 0) begin
            if (cl > 2) zl -= pos[tc - cl + 1] - pos[tc - cl + 2] - 1;
            cl -= 2;
          end else cl -= 1;
        end
      end
      info.cycles += info.run_cycles;
    end
    return info;
  endfunction
endpackage
