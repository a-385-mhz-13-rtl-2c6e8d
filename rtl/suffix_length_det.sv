// suffix_length_det: the modified suffixLength detector (MSD). It gives the
// suffixLength for the next level from the current suffixLength and the
// current level_prefix alone, before the level value itself is known.
//
// The standard raises suffixLength from 0 to 1 after the first level and by
// one more whenever |level| > 3 << (suffixLength-1), up to 6. Expressed in
// level_prefix this becomes:
//   suffixLength 0: next = 1 + MSD_1,
//     MSD_1 = (first && level_prefix > 3) || level_prefix > 5
//   suffixLength >= 1: next = suffixLength + 1 (capped at 6) when
//     MSD_2 = (first && suffixLength == 1 && level_prefix > 1) || level_prefix > 2
// where first marks the block's first level when TrailingOnes < 3 (the level
// whose levelCode is raised by 2). The two conditions follow the detector
// described for the design; the surrounding 0->1 step and the cap at 6 are
// the standard's rule.
//
// Interface: purely combinational.
module suffix_length_det (
  input  logic [2:0] suffix_len,
  input  logic [4:0] level_prefix,
  input  logic       first,
  output logic [2:0] suffix_len_next
);
  logic msd1, msd2;
  assign msd1 = (first && level_prefix > 5'd3) || (level_prefix > 5'd5);
  assign msd2 = (first && suffix_len == 3'd1 && level_prefix > 5'd1) || (level_prefix > 5'd2);

  always_comb begin
    if (suffix_len == 3'd0)      suffix_len_next = msd1 ? 3'd2 : 3'd1;
    else if (suffix_len < 3'd6)  suffix_len_next = suffix_len + 3'(msd2);
    else                         suffix_len_next = suffix_len;
  end
endmodule
