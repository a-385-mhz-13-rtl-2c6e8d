// total_zeros_dec: decodes the total_zeros syntax element in one cycle.
//
// The table is selected by TotalCoeff (tzVlcIndex) and by the block type: the
// 4x4 tables serve blocks of 16 or 15 coefficients, the 2x2 tables serve
// chroma DC blocks. All entries of the selected table are compared in
// parallel with the head of the window.
//
// Interface: purely combinational. win holds the next 16 bitstream bits, MSB
// first (a total_zeros codeword is at most 9 bits). total_coeff is 1..15
// (1..3 for chroma DC); hit is low when no entry matches.
// The description gives only the function and the table selection by
// TotalCoeff; the compare-all structure is this design's own.
module total_zeros_dec
  import cavlc_pkg::*;
(
  input  logic [15:0] win,
  input  logic [4:0]  total_coeff,
  input  logic        chroma_dc,
  output logic [4:0]  total_zeros,
  output logic [4:0]  len,
  output logic        hit
);
  always_comb begin
    vlc_t e;
    total_zeros = '0;
    len         = '0;
    hit         = 1'b0;
    for (int tz = 0; tz <= 15; tz++) begin
      e = total_zeros_code(chroma_dc, total_coeff, 5'(tz));
      if (vlc_hit(win, e)) begin
        total_zeros = 5'(tz);
        len         = e.len;
        hit         = 1'b1;
      end
    end
  end
endmodule
