// dbtld: delay balanced two-level decoder. Decodes up to two level symbols
// per cycle from a 32-bit bitstream window.
//
// Level 1 is a complete level decoder: level_prefix is the leading-zero count,
// levelSuffixSize is 4 for the escape level_prefix 14 with suffixLength 0, 12
// for level_prefix 15 and suffixLength otherwise, levelCode =
// (level_prefix << suffixLength) + level_suffix, raised by 15 for the escape
// level_prefix 15 with suffixLength 0 and by 2 for the block's first level
// when TrailingOnes < 3, and the level is (levelCode+2)/2 for even levelCode
// and (-levelCode-1)/2 for odd. The suffix length detector SD_1 gives level
// 2's suffixLength from level_prefix_1 alone.
//
// Level 2 is built only for the general case, which is what balances the two
// paths: its bitstream is the window shifted by level_prefix_1 + 1 +
// suffixLength (without waiting for levelSuffixSize_1), its suffix is
// SD_1's output wide, and neither levelCode correction is applied. Level 2 is
// discarded (flushed) when level 1 was an escape code, when level 2 is itself
// an escape (level_prefix 15), when both codewords do not fit in the 32-bit
// window, or when fewer than two levels remain (two_ok low).
//
// Interface: purely combinational. first marks the block's first level with
// TrailingOnes < 3. len is the number of bits used by the valid levels;
// suffix_len_next is the suffixLength for the next cycle. err flags a
// level_prefix above 15, which the design does not support.
// The structure follows the description (Fig. 6); the flush conditions
// beyond the window-overflow rule are this design's reading of it.
module dbtld
  import cavlc_pkg::*;
(
  input  logic [31:0] win,
  input  logic [2:0]  suffix_len,
  input  logic        first,
  input  logic        two_ok,
  output coef_t       level1,
  output coef_t       level2,
  output logic        level2_valid,
  output logic [5:0]  len,
  output logic [2:0]  suffix_len_next,
  output logic        err
);
  function automatic coef_t level_map(input logic [13:0] code);
    logic [12:0] half;
    half = 13'((code + 14'd2) >> 1);
    return code[0] ? -coef_t'(half) : coef_t'(half);
  endfunction

  // ---------------- level 1: full decoder ----------------
  logic [4:0]  prefix1;
  logic        esc14, esc15;
  logic [3:0]  size1;
  logic [11:0] after1;
  logic [11:0] suffix1;
  logic [13:0] code1;
  logic [5:0]  len1;
  logic [2:0]  sl2;

  leading_zero_cnt u_lzc1 (.bits(win[31:16]), .count(prefix1));

  assign esc14  = (prefix1 == 5'd14) && (suffix_len == 3'd0);
  assign esc15  = (prefix1 == 5'd15);
  assign size1  = esc15 ? 4'd12 : esc14 ? 4'd4 : {1'b0, suffix_len};
  assign after1 = 12'((win << (prefix1 + 5'd1)) >> 20);
  assign suffix1 = after1 >> (4'd12 - size1);
  assign len1   = 6'(prefix1) + 6'd1 + 6'(size1);

  always_comb begin
    code1 = (14'(prefix1) << suffix_len) + 14'(suffix1);
    if (esc15 && suffix_len == 3'd0) code1 = code1 + 14'd15;
    if (first)                       code1 = code1 + 14'd2;
  end
  assign level1 = level_map(code1);

  suffix_length_det u_sd1 (
    .suffix_len(suffix_len), .level_prefix(prefix1), .first(first), .suffix_len_next(sl2));

  // ---------------- level 2: general case only ----------------
  logic [31:0] win2;
  logic [4:0]  prefix2;
  logic [11:0] after2;
  logic [11:0] suffix2;
  logic [13:0] code2;
  logic [5:0]  len2;
  logic [2:0]  sl3;

  assign win2 = win << (prefix1 + 5'd1 + 5'(suffix_len));
  leading_zero_cnt u_lzc2 (.bits(win2[31:16]), .count(prefix2));
  assign after2  = 12'((win2 << (prefix2 + 5'd1)) >> 20);
  assign suffix2 = after2 >> (4'd12 - {1'b0, sl2});
  assign code2   = (14'(prefix2) << sl2) + 14'(suffix2);
  assign len2    = 6'(prefix2) + 6'd1 + 6'(sl2);
  assign level2  = level_map(code2);

  suffix_length_det u_sd2 (
    .suffix_len(sl2), .level_prefix(prefix2), .first(1'b0), .suffix_len_next(sl3));

  logic [6:0] len12;
  assign len12 = 7'(len1) + 7'(len2);
  assign level2_valid = two_ok && !esc14 && !esc15 && (prefix2 < 5'd15) && (len12 <= 7'd32);

  assign len             = level2_valid ? len12[5:0] : len1;
  assign suffix_len_next = level2_valid ? sl3 : sl2;
  assign err             = (prefix1 > 5'd15);
endmodule
