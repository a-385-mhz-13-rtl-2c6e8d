// coeff_token_dec: decodes the coeff_token syntax element (TotalCoeff and
// TrailingOnes) from the head of the bitstream window in one cycle.
//
// The table is chosen from the neighbouring blocks' coefficient counts:
// nC = (nA + nB + 1) >> 1 when both neighbours are available, the available
// one alone, 0 when neither is, and -1 for a 2x2 chroma DC block. nC selects
// one of three variable-length tables (0..1, 2..3, 4..7), the 6-bit
// fixed-length table (8 and up) or the chroma DC table. Every entry of the
// selected table is compared in parallel with the first 16 window bits and the
// single matching entry gives the result.
//
// Interface: purely combinational. win holds the next 16 bitstream bits, MSB
// first. len is the codeword length (1..16); hit is low when no entry matches,
// which only a corrupt stream causes.
// Following the description: table selection by nA/nB and the four 4x4 tables.
// The nC rule, the chroma DC table and the compare-all structure are the
// standard's tables put into hardware in the simplest way.
module coeff_token_dec
  import cavlc_pkg::*;
(
  input  logic [15:0] win,
  input  logic [4:0]  na,
  input  logic [4:0]  nb,
  input  logic        avail_a,
  input  logic        avail_b,
  input  logic        chroma_dc,
  output logic [4:0]  total_coeff,
  output logic [1:0]  trailing_ones,
  output logic [4:0]  len,
  output logic        hit
);
  logic [5:0] nc;
  ct_tab_e    tab;

  always_comb begin
    unique case ({avail_a, avail_b})
      2'b11:   nc = ({1'b0, na} + {1'b0, nb} + 6'd1) >> 1;
      2'b10:   nc = {1'b0, na};
      2'b01:   nc = {1'b0, nb};
      default: nc = 6'd0;
    endcase
    if (chroma_dc)     tab = CT_CDC;
    else if (nc < 6'd2) tab = CT_NC0;
    else if (nc < 6'd4) tab = CT_NC2;
    else if (nc < 6'd8) tab = CT_NC4;
    else               tab = CT_NC8;
  end

  always_comb begin
    vlc_t e;
    total_coeff   = '0;
    trailing_ones = '0;
    len           = '0;
    hit           = 1'b0;
    for (int tc = 0; tc <= 16; tc++) begin
      for (int t1 = 0; t1 <= 3; t1++) begin
        e = coeff_token_code(tab, 2'(t1), 5'(tc));
        if (vlc_hit(win, e)) begin
          total_coeff   = 5'(tc);
          trailing_ones = 2'(t1);
          len           = e.len;
          hit           = 1'b1;
        end
      end
    end
  end
endmodule
