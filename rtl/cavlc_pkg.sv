// cavlc_pkg: types, sizes and code tables shared by the CAVLC decoder.
//
// The decoder works on a 32-bit bitstream window, stores coefficients 13 bits
// wide in a 16-entry buffer (both sizes follow the design description) and
// reads the H.264/AVC CAVLC variable-length code tables: coeff_token (three VLC
// tables for 0<=nC<2, 2<=nC<4, 4<=nC<8, the 6-bit fixed-length table for
// nC>=8 and the chroma DC 2x2 table, nC=-1), total_zeros (4x4 and chroma DC
// 2x2) and run_before. The table contents are those of ITU-T H.264
// Tables 9-5, 9-7, 9-8, 9-9a and 9-10; each entry is held as {length, code}
// with the code right-aligned, and a decoder finds the entry whose code equals
// the first `length` bits of its window. The same functions serve the
// testbench encoders. 4:2:2 chroma DC (nC=-2) is not supported.
package cavlc_pkg;

  localparam int unsigned WIN_W      = 32;  // bitstream window width
  localparam int unsigned COEF_W     = 13;  // output buffer word width
  localparam int unsigned MAX_COEFFS = 16;  // output buffer depth

  typedef logic signed [COEF_W-1:0] coef_t;

  // One variable-length code: its length in bits and its value, right-aligned.
  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;
  } vlc_t;

  // coeff_token table selection
  typedef enum logic [2:0] {
    CT_NC0 = 3'd0,  // 0 <= nC < 2
    CT_NC2 = 3'd1,  // 2 <= nC < 4
    CT_NC4 = 3'd2,  // 4 <= nC < 8
    CT_NC8 = 3'd3,  // 8 <= nC, fixed-length
    CT_CDC = 3'd4   // nC == -1, chroma DC 2x2
  } ct_tab_e;

  // Decoding stages of the block controller; only one unit works per cycle.
  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_CTOKEN = 3'd1,
    S_T1     = 3'd2,
    S_LEVEL  = 3'd3,
    S_TZ     = 3'd4,
    S_RUN    = 3'd5,
    S_DONE   = 3'd6
  } stage_e;

  // True when the first e.len bits of the 16-bit window w equal e.code.
  function automatic logic vlc_hit(input logic [15:0] w, input vlc_t e);
    logic [15:0] head;
    head = w >> (5'd16 - e.len);
    return (e.len != 5'd0) && (head == e.code);
  endfunction

  // coeff_token: {len, code} by (table, TrailingOnes, TotalCoeff)
  function automatic vlc_t coeff_token_code(input ct_tab_e tab, input logic [1:0] t1, input logic [4:0] tc);
    vlc_t r;
    r = '{len: 5'd0, code: 16'd0};
    unique case ({tab, t1, tc})
      {CT_NC0, 2'd0, 5'd0}: r = '{len: 5'd1, code: 16'b1};
      {CT_NC0, 2'd0, 5'd1}: r = '{len: 5'd6, code: 16'b000101};
      {CT_NC0, 2'd1, 5'd1}: r = '{len: 5'd2, code: 16'b01};
      {CT_NC0, 2'd0, 5'd2}: r = '{len: 5'd8, code: 16'b00000111};
      {CT_NC0, 2'd1, 5'd2}: r = '{len: 5'd6, code: 16'b000100};
      {CT_NC0, 2'd2, 5'd2}: r = '{len: 5'd3, code: 16'b001};
      {CT_NC0, 2'd0, 5'd3}: r = '{len: 5'd9, code: 16'b000000111};
      {CT_NC0, 2'd1, 5'd3}: r = '{len: 5'd8, code: 16'b00000110};
      {CT_NC0, 2'd2, 5'd3}: r = '{len: 5'd7, code: 16'b0000101};
      {CT_NC0, 2'd3, 5'd3}: r = '{len: 5'd5, code: 16'b00011};
      {CT_NC0, 2'd0, 5'd4}: r = '{len: 5'd10, code: 16'b0000000111};
      {CT_NC0, 2'd1, 5'd4}: r = '{len: 5'd9, code: 16'b000000110};
      {CT_NC0, 2'd2, 5'd4}: r = '{len: 5'd8, code: 16'b00000101};
      {CT_NC0, 2'd3, 5'd4}: r = '{len: 5'd6, code: 16'b000011};
      {CT_NC0, 2'd0, 5'd5}: r = '{len: 5'd11, code: 16'b00000000111};
      {CT_NC0, 2'd1, 5'd5}: r = '{len: 5'd10, code: 16'b0000000110};
      {CT_NC0, 2'd2, 5'd5}: r = '{len: 5'd9, code: 16'b000000101};
      {CT_NC0, 2'd3, 5'd5}: r = '{len: 5'd7, code: 16'b0000100};
      {CT_NC0, 2'd0, 5'd6}: r = '{len: 5'd13, code: 16'b0000000001111};
      {CT_NC0, 2'd1, 5'd6}: r = '{len: 5'd11, code: 16'b00000000110};
      {CT_NC0, 2'd2, 5'd6}: r = '{len: 5'd10, code: 16'b0000000101};
      {CT_NC0, 2'd3, 5'd6}: r = '{len: 5'd8, code: 16'b00000100};
      {CT_NC0, 2'd0, 5'd7}: r = '{len: 5'd13, code: 16'b0000000001011};
      {CT_NC0, 2'd1, 5'd7}: r = '{len: 5'd13, code: 16'b0000000001110};
      {CT_NC0, 2'd2, 5'd7}: r = '{len: 5'd11, code: 16'b00000000101};
      {CT_NC0, 2'd3, 5'd7}: r = '{len: 5'd9, code: 16'b000000100};
      {CT_NC0, 2'd0, 5'd8}: r = '{len: 5'd13, code: 16'b0000000001000};
      {CT_NC0, 2'd1, 5'd8}: r = '{len: 5'd13, code: 16'b0000000001010};
      {CT_NC0, 2'd2, 5'd8}: r = '{len: 5'd13, code: 16'b0000000001101};
      {CT_NC0, 2'd3, 5'd8}: r = '{len: 5'd10, code: 16'b0000000100};
      {CT_NC0, 2'd0, 5'd9}: r = '{len: 5'd14, code: 16'b00000000001111};
      {CT_NC0, 2'd1, 5'd9}: r = '{len: 5'd14, code: 16'b00000000001110};
      {CT_NC0, 2'd2, 5'd9}: r = '{len: 5'd13, code: 16'b0000000001001};
      {CT_NC0, 2'd3, 5'd9}: r = '{len: 5'd11, code: 16'b00000000100};
      {CT_NC0, 2'd0, 5'd10}: r = '{len: 5'd14, code: 16'b00000000001011};
      {CT_NC0, 2'd1, 5'd10}: r = '{len: 5'd14, code: 16'b00000000001010};
      {CT_NC0, 2'd2, 5'd10}: r = '{len: 5'd14, code: 16'b00000000001101};
      {CT_NC0, 2'd3, 5'd10}: r = '{len: 5'd13, code: 16'b0000000001100};
      {CT_NC0, 2'd0, 5'd11}: r = '{len: 5'd15, code: 16'b000000000001111};
      {CT_NC0, 2'd1, 5'd11}: r = '{len: 5'd15, code: 16'b000000000001110};
      {CT_NC0, 2'd2, 5'd11}: r = '{len: 5'd14, code: 16'b00000000001001};
      {CT_NC0, 2'd3, 5'd11}: r = '{len: 5'd14, code: 16'b00000000001100};
      {CT_NC0, 2'd0, 5'd12}: r = '{len: 5'd15, code: 16'b000000000001011};
      {CT_NC0, 2'd1, 5'd12}: r = '{len: 5'd15, code: 16'b000000000001010};
      {CT_NC0, 2'd2, 5'd12}: r = '{len: 5'd15, code: 16'b000000000001101};
      {CT_NC0, 2'd3, 5'd12}: r = '{len: 5'd14, code: 16'b00000000001000};
      {CT_NC0, 2'd0, 5'd13}: r = '{len: 5'd16, code: 16'b0000000000001111};
      {CT_NC0, 2'd1, 5'd13}: r = '{len: 5'd15, code: 16'b000000000000001};
      {CT_NC0, 2'd2, 5'd13}: r = '{len: 5'd15, code: 16'b000000000001001};
      {CT_NC0, 2'd3, 5'd13}: r = '{len: 5'd15, code: 16'b000000000001100};
      {CT_NC0, 2'd0, 5'd14}: r = '{len: 5'd16, code: 16'b0000000000001011};
      {CT_NC0, 2'd1, 5'd14}: r = '{len: 5'd16, code: 16'b0000000000001110};
      {CT_NC0, 2'd2, 5'd14}: r = '{len: 5'd16, code: 16'b0000000000001101};
      {CT_NC0, 2'd3, 5'd14}: r = '{len: 5'd15, code: 16'b000000000001000};
      {CT_NC0, 2'd0, 5'd15}: r = '{len: 5'd16, code: 16'b0000000000000111};
      {CT_NC0, 2'd1, 5'd15}: r = '{len: 5'd16, code: 16'b0000000000001010};
      {CT_NC0, 2'd2, 5'd15}: r = '{len: 5'd16, code: 16'b0000000000001001};
      {CT_NC0, 2'd3, 5'd15}: r = '{len: 5'd16, code: 16'b0000000000001100};
      {CT_NC0, 2'd0, 5'd16}: r = '{len: 5'd16, code: 16'b0000000000000100};
      {CT_NC0, 2'd1, 5'd16}: r = '{len: 5'd16, code: 16'b0000000000000110};
      {CT_NC0, 2'd2, 5'd16}: r = '{len: 5'd16, code: 16'b0000000000000101};
      {CT_NC0, 2'd3, 5'd16}: r = '{len: 5'd16, code: 16'b0000000000001000};
      {CT_NC2, 2'd0, 5'd0}: r = '{len: 5'd2, code: 16'b11};
      {CT_NC2, 2'd0, 5'd1}: r = '{len: 5'd6, code: 16'b001011};
      {CT_NC2, 2'd1, 5'd1}: r = '{len: 5'd2, code: 16'b10};
      {CT_NC2, 2'd0, 5'd2}: r = '{len: 5'd6, code: 16'b000111};
      {CT_NC2, 2'd1, 5'd2}: r = '{len: 5'd5, code: 16'b00111};
      {CT_NC2, 2'd2, 5'd2}: r = '{len: 5'd3, code: 16'b011};
      {CT_NC2, 2'd0, 5'd3}: r = '{len: 5'd7, code: 16'b0000111};
      {CT_NC2, 2'd1, 5'd3}: r = '{len: 5'd6, code: 16'b001010};
      {CT_NC2, 2'd2, 5'd3}: r = '{len: 5'd6, code: 16'b001001};
      {CT_NC2, 2'd3, 5'd3}: r = '{len: 5'd4, code: 16'b0101};
      {CT_NC2, 2'd0, 5'd4}: r = '{len: 5'd8, code: 16'b00000111};
      {CT_NC2, 2'd1, 5'd4}: r = '{len: 5'd6, code: 16'b000110};
      {CT_NC2, 2'd2, 5'd4}: r = '{len: 5'd6, code: 16'b000101};
      {CT_NC2, 2'd3, 5'd4}: r = '{len: 5'd4, code: 16'b0100};
      {CT_NC2, 2'd0, 5'd5}: r = '{len: 5'd8, code: 16'b00000100};
      {CT_NC2, 2'd1, 5'd5}: r = '{len: 5'd7, code: 16'b0000110};
      {CT_NC2, 2'd2, 5'd5}: r = '{len: 5'd7, code: 16'b0000101};
      {CT_NC2, 2'd3, 5'd5}: r = '{len: 5'd5, code: 16'b00110};
      {CT_NC2, 2'd0, 5'd6}: r = '{len: 5'd9, code: 16'b000000111};
      {CT_NC2, 2'd1, 5'd6}: r = '{len: 5'd8, code: 16'b00000110};
      {CT_NC2, 2'd2, 5'd6}: r = '{len: 5'd8, code: 16'b00000101};
      {CT_NC2, 2'd3, 5'd6}: r = '{len: 5'd6, code: 16'b001000};
      {CT_NC2, 2'd0, 5'd7}: r = '{len: 5'd11, code: 16'b00000001111};
      {CT_NC2, 2'd1, 5'd7}: r = '{len: 5'd9, code: 16'b000000110};
      {CT_NC2, 2'd2, 5'd7}: r = '{len: 5'd9, code: 16'b000000101};
      {CT_NC2, 2'd3, 5'd7}: r = '{len: 5'd6, code: 16'b000100};
      {CT_NC2, 2'd0, 5'd8}: r = '{len: 5'd11, code: 16'b00000001011};
      {CT_NC2, 2'd1, 5'd8}: r = '{len: 5'd11, code: 16'b00000001110};
      {CT_NC2, 2'd2, 5'd8}: r = '{len: 5'd11, code: 16'b00000001101};
      {CT_NC2, 2'd3, 5'd8}: r = '{len: 5'd7, code: 16'b0000100};
      {CT_NC2, 2'd0, 5'd9}: r = '{len: 5'd12, code: 16'b000000001111};
      {CT_NC2, 2'd1, 5'd9}: r = '{len: 5'd11, code: 16'b00000001010};
      {CT_NC2, 2'd2, 5'd9}: r = '{len: 5'd11, code: 16'b00000001001};
      {CT_NC2, 2'd3, 5'd9}: r = '{len: 5'd9, code: 16'b000000100};
      {CT_NC2, 2'd0, 5'd10}: r = '{len: 5'd12, code: 16'b000000001011};
      {CT_NC2, 2'd1, 5'd10}: r = '{len: 5'd12, code: 16'b000000001110};
      {CT_NC2, 2'd2, 5'd10}: r = '{len: 5'd12, code: 16'b000000001101};
      {CT_NC2, 2'd3, 5'd10}: r = '{len: 5'd11, code: 16'b00000001100};
      {CT_NC2, 2'd0, 5'd11}: r = '{len: 5'd12, code: 16'b000000001000};
      {CT_NC2, 2'd1, 5'd11}: r = '{len: 5'd12, code: 16'b000000001010};
      {CT_NC2, 2'd2, 5'd11}: r = '{len: 5'd12, code: 16'b000000001001};
      {CT_NC2, 2'd3, 5'd11}: r = '{len: 5'd11, code: 16'b00000001000};
      {CT_NC2, 2'd0, 5'd12}: r = '{len: 5'd13, code: 16'b0000000001111};
      {CT_NC2, 2'd1, 5'd12}: r = '{len: 5'd13, code: 16'b0000000001110};
      {CT_NC2, 2'd2, 5'd12}: r = '{len: 5'd13, code: 16'b0000000001101};
      {CT_NC2, 2'd3, 5'd12}: r = '{len: 5'd12, code: 16'b000000001100};
      {CT_NC2, 2'd0, 5'd13}: r = '{len: 5'd13, code: 16'b0000000001011};
      {CT_NC2, 2'd1, 5'd13}: r = '{len: 5'd13, code: 16'b0000000001010};
      {CT_NC2, 2'd2, 5'd13}: r = '{len: 5'd13, code: 16'b0000000001001};
      {CT_NC2, 2'd3, 5'd13}: r = '{len: 5'd13, code: 16'b0000000001100};
      {CT_NC2, 2'd0, 5'd14}: r = '{len: 5'd13, code: 16'b0000000000111};
      {CT_NC2, 2'd1, 5'd14}: r = '{len: 5'd14, code: 16'b00000000001011};
      {CT_NC2, 2'd2, 5'd14}: r = '{len: 5'd13, code: 16'b0000000000110};
      {CT_NC2, 2'd3, 5'd14}: r = '{len: 5'd13, code: 16'b0000000001000};
      {CT_NC2, 2'd0, 5'd15}: r = '{len: 5'd14, code: 16'b00000000001001};
      {CT_NC2, 2'd1, 5'd15}: r = '{len: 5'd14, code: 16'b00000000001000};
      {CT_NC2, 2'd2, 5'd15}: r = '{len: 5'd14, code: 16'b00000000001010};
      {CT_NC2, 2'd3, 5'd15}: r = '{len: 5'd13, code: 16'b0000000000001};
      {CT_NC2, 2'd0, 5'd16}: r = '{len: 5'd14, code: 16'b00000000000111};
      {CT_NC2, 2'd1, 5'd16}: r = '{len: 5'd14, code: 16'b00000000000110};
      {CT_NC2, 2'd2, 5'd16}: r = '{len: 5'd14, code: 16'b00000000000101};
      {CT_NC2, 2'd3, 5'd16}: r = '{len: 5'd14, code: 16'b00000000000100};
      {CT_NC4, 2'd0, 5'd0}: r = '{len: 5'd4, code: 16'b1111};
      {CT_NC4, 2'd0, 5'd1}: r = '{len: 5'd6, code: 16'b001111};
      {CT_NC4, 2'd1, 5'd1}: r = '{len: 5'd4, code: 16'b1110};
      {CT_NC4, 2'd0, 5'd2}: r = '{len: 5'd6, code: 16'b001011};
      {CT_NC4, 2'd1, 5'd2}: r = '{len: 5'd5, code: 16'b01111};
      {CT_NC4, 2'd2, 5'd2}: r = '{len: 5'd4, code: 16'b1101};
      {CT_NC4, 2'd0, 5'd3}: r = '{len: 5'd6, code: 16'b001000};
      {CT_NC4, 2'd1, 5'd3}: r = '{len: 5'd5, code: 16'b01100};
      {CT_NC4, 2'd2, 5'd3}: r = '{len: 5'd5, code: 16'b01110};
      {CT_NC4, 2'd3, 5'd3}: r = '{len: 5'd4, code: 16'b1100};
      {CT_NC4, 2'd0, 5'd4}: r = '{len: 5'd7, code: 16'b0001111};
      {CT_NC4, 2'd1, 5'd4}: r = '{len: 5'd5, code: 16'b01010};
      {CT_NC4, 2'd2, 5'd4}: r = '{len: 5'd5, code: 16'b01011};
      {CT_NC4, 2'd3, 5'd4}: r = '{len: 5'd4, code: 16'b1011};
      {CT_NC4, 2'd0, 5'd5}: r = '{len: 5'd7, code: 16'b0001011};
      {CT_NC4, 2'd1, 5'd5}: r = '{len: 5'd5, code: 16'b01000};
      {CT_NC4, 2'd2, 5'd5}: r = '{len: 5'd5, code: 16'b01001};
      {CT_NC4, 2'd3, 5'd5}: r = '{len: 5'd4, code: 16'b1010};
      {CT_NC4, 2'd0, 5'd6}: r = '{len: 5'd7, code: 16'b0001001};
      {CT_NC4, 2'd1, 5'd6}: r = '{len: 5'd6, code: 16'b001110};
      {CT_NC4, 2'd2, 5'd6}: r = '{len: 5'd6, code: 16'b001101};
      {CT_NC4, 2'd3, 5'd6}: r = '{len: 5'd4, code: 16'b1001};
      {CT_NC4, 2'd0, 5'd7}: r = '{len: 5'd7, code: 16'b0001000};
      {CT_NC4, 2'd1, 5'd7}: r = '{len: 5'd6, code: 16'b001010};
      {CT_NC4, 2'd2, 5'd7}: r = '{len: 5'd6, code: 16'b001001};
      {CT_NC4, 2'd3, 5'd7}: r = '{len: 5'd4, code: 16'b1000};
      {CT_NC4, 2'd0, 5'd8}: r = '{len: 5'd8, code: 16'b00001111};
      {CT_NC4, 2'd1, 5'd8}: r = '{len: 5'd7, code: 16'b0001110};
      {CT_NC4, 2'd2, 5'd8}: r = '{len: 5'd7, code: 16'b0001101};
      {CT_NC4, 2'd3, 5'd8}: r = '{len: 5'd5, code: 16'b01101};
      {CT_NC4, 2'd0, 5'd9}: r = '{len: 5'd8, code: 16'b00001011};
      {CT_NC4, 2'd1, 5'd9}: r = '{len: 5'd8, code: 16'b00001110};
      {CT_NC4, 2'd2, 5'd9}: r = '{len: 5'd7, code: 16'b0001010};
      {CT_NC4, 2'd3, 5'd9}: r = '{len: 5'd6, code: 16'b001100};
      {CT_NC4, 2'd0, 5'd10}: r = '{len: 5'd9, code: 16'b000001111};
      {CT_NC4, 2'd1, 5'd10}: r = '{len: 5'd8, code: 16'b00001010};
      {CT_NC4, 2'd2, 5'd10}: r = '{len: 5'd8, code: 16'b00001101};
      {CT_NC4, 2'd3, 5'd10}: r = '{len: 5'd7, code: 16'b0001100};
      {CT_NC4, 2'd0, 5'd11}: r = '{len: 5'd9, code: 16'b000001011};
      {CT_NC4, 2'd1, 5'd11}: r = '{len: 5'd9, code: 16'b000001110};
      {CT_NC4, 2'd2, 5'd11}: r = '{len: 5'd8, code: 16'b00001001};
      {CT_NC4, 2'd3, 5'd11}: r = '{len: 5'd8, code: 16'b00001100};
      {CT_NC4, 2'd0, 5'd12}: r = '{len: 5'd9, code: 16'b000001000};
      {CT_NC4, 2'd1, 5'd12}: r = '{len: 5'd9, code: 16'b000001010};
      {CT_NC4, 2'd2, 5'd12}: r = '{len: 5'd9, code: 16'b000001101};
      {CT_NC4, 2'd3, 5'd12}: r = '{len: 5'd8, code: 16'b00001000};
      {CT_NC4, 2'd0, 5'd13}: r = '{len: 5'd10, code: 16'b0000001101};
      {CT_NC4, 2'd1, 5'd13}: r = '{len: 5'd9, code: 16'b000000111};
      {CT_NC4, 2'd2, 5'd13}: r = '{len: 5'd9, code: 16'b000001001};
      {CT_NC4, 2'd3, 5'd13}: r = '{len: 5'd9, code: 16'b000001100};
      {CT_NC4, 2'd0, 5'd14}: r = '{len: 5'd10, code: 16'b0000001001};
      {CT_NC4, 2'd1, 5'd14}: r = '{len: 5'd10, code: 16'b0000001100};
      {CT_NC4, 2'd2, 5'd14}: r = '{len: 5'd10, code: 16'b0000001011};
      {CT_NC4, 2'd3, 5'd14}: r = '{len: 5'd10, code: 16'b0000001010};
      {CT_NC4, 2'd0, 5'd15}: r = '{len: 5'd10, code: 16'b0000000101};
      {CT_NC4, 2'd1, 5'd15}: r = '{len: 5'd10, code: 16'b0000001000};
      {CT_NC4, 2'd2, 5'd15}: r = '{len: 5'd10, code: 16'b0000000111};
      {CT_NC4, 2'd3, 5'd15}: r = '{len: 5'd10, code: 16'b0000000110};
      {CT_NC4, 2'd0, 5'd16}: r = '{len: 5'd10, code: 16'b0000000001};
      {CT_NC4, 2'd1, 5'd16}: r = '{len: 5'd10, code: 16'b0000000100};
      {CT_NC4, 2'd2, 5'd16}: r = '{len: 5'd10, code: 16'b0000000011};
      {CT_NC4, 2'd3, 5'd16}: r = '{len: 5'd10, code: 16'b0000000010};
      {CT_NC8, 2'd0, 5'd0}: r = '{len: 5'd6, code: 16'b000011};
      {CT_NC8, 2'd0, 5'd1}: r = '{len: 5'd6, code: 16'b000000};
      {CT_NC8, 2'd1, 5'd1}: r = '{len: 5'd6, code: 16'b000001};
      {CT_NC8, 2'd0, 5'd2}: r = '{len: 5'd6, code: 16'b000100};
      {CT_NC8, 2'd1, 5'd2}: r = '{len: 5'd6, code: 16'b000101};
      {CT_NC8, 2'd2, 5'd2}: r = '{len: 5'd6, code: 16'b000110};
      {CT_NC8, 2'd0, 5'd3}: r = '{len: 5'd6, code: 16'b001000};
      {CT_NC8, 2'd1, 5'd3}: r = '{len: 5'd6, code: 16'b001001};
      {CT_NC8, 2'd2, 5'd3}: r = '{len: 5'd6, code: 16'b001010};
      {CT_NC8, 2'd3, 5'd3}: r = '{len: 5'd6, code: 16'b001011};
      {CT_NC8, 2'd0, 5'd4}: r = '{len: 5'd6, code: 16'b001100};
      {CT_NC8, 2'd1, 5'd4}: r = '{len: 5'd6, code: 16'b001101};
      {CT_NC8, 2'd2, 5'd4}: r = '{len: 5'd6, code: 16'b001110};
      {CT_NC8, 2'd3, 5'd4}: r = '{len: 5'd6, code: 16'b001111};
      {CT_NC8, 2'd0, 5'd5}: r = '{len: 5'd6, code: 16'b010000};
      {CT_NC8, 2'd1, 5'd5}: r = '{len: 5'd6, code: 16'b010001};
      {CT_NC8, 2'd2, 5'd5}: r = '{len: 5'd6, code: 16'b010010};
      {CT_NC8, 2'd3, 5'd5}: r = '{len: 5'd6, code: 16'b010011};
      {CT_NC8, 2'd0, 5'd6}: r = '{len: 5'd6, code: 16'b010100};
      {CT_NC8, 2'd1, 5'd6}: r = '{len: 5'd6, code: 16'b010101};
      {CT_NC8, 2'd2, 5'd6}: r = '{len: 5'd6, code: 16'b010110};
      {CT_NC8, 2'd3, 5'd6}: r = '{len: 5'd6, code: 16'b010111};
      {CT_NC8, 2'd0, 5'd7}: r = '{len: 5'd6, code: 16'b011000};
      {CT_NC8, 2'd1, 5'd7}: r = '{len: 5'd6, code: 16'b011001};
      {CT_NC8, 2'd2, 5'd7}: r = '{len: 5'd6, code: 16'b011010};
      {CT_NC8, 2'd3, 5'd7}: r = '{len: 5'd6, code: 16'b011011};
      {CT_NC8, 2'd0, 5'd8}: r = '{len: 5'd6, code: 16'b011100};
      {CT_NC8, 2'd1, 5'd8}: r = '{len: 5'd6, code: 16'b011101};
      {CT_NC8, 2'd2, 5'd8}: r = '{len: 5'd6, code: 16'b011110};
      {CT_NC8, 2'd3, 5'd8}: r = '{len: 5'd6, code: 16'b011111};
      {CT_NC8, 2'd0, 5'd9}: r = '{len: 5'd6, code: 16'b100000};
      {CT_NC8, 2'd1, 5'd9}: r = '{len: 5'd6, code: 16'b100001};
      {CT_NC8, 2'd2, 5'd9}: r = '{len: 5'd6, code: 16'b100010};
      {CT_NC8, 2'd3, 5'd9}: r = '{len: 5'd6, code: 16'b100011};
      {CT_NC8, 2'd0, 5'd10}: r = '{len: 5'd6, code: 16'b100100};
      {CT_NC8, 2'd1, 5'd10}: r = '{len: 5'd6, code: 16'b100101};
      {CT_NC8, 2'd2, 5'd10}: r = '{len: 5'd6, code: 16'b100110};
      {CT_NC8, 2'd3, 5'd10}: r = '{len: 5'd6, code: 16'b100111};
      {CT_NC8, 2'd0, 5'd11}: r = '{len: 5'd6, code: 16'b101000};
      {CT_NC8, 2'd1, 5'd11}: r = '{len: 5'd6, code: 16'b101001};
      {CT_NC8, 2'd2, 5'd11}: r = '{len: 5'd6, code: 16'b101010};
      {CT_NC8, 2'd3, 5'd11}: r = '{len: 5'd6, code: 16'b101011};
      {CT_NC8, 2'd0, 5'd12}: r = '{len: 5'd6, code: 16'b101100};
      {CT_NC8, 2'd1, 5'd12}: r = '{len: 5'd6, code: 16'b101101};
      {CT_NC8, 2'd2, 5'd12}: r = '{len: 5'd6, code: 16'b101110};
      {CT_NC8, 2'd3, 5'd12}: r = '{len: 5'd6, code: 16'b101111};
      {CT_NC8, 2'd0, 5'd13}: r = '{len: 5'd6, code: 16'b110000};
      {CT_NC8, 2'd1, 5'd13}: r = '{len: 5'd6, code: 16'b110001};
      {CT_NC8, 2'd2, 5'd13}: r = '{len: 5'd6, code: 16'b110010};
      {CT_NC8, 2'd3, 5'd13}: r = '{len: 5'd6, code: 16'b110011};
      {CT_NC8, 2'd0, 5'd14}: r = '{len: 5'd6, code: 16'b110100};
      {CT_NC8, 2'd1, 5'd14}: r = '{len: 5'd6, code: 16'b110101};
      {CT_NC8, 2'd2, 5'd14}: r = '{len: 5'd6, code: 16'b110110};
      {CT_NC8, 2'd3, 5'd14}: r = '{len: 5'd6, code: 16'b110111};
      {CT_NC8, 2'd0, 5'd15}: r = '{len: 5'd6, code: 16'b111000};
      {CT_NC8, 2'd1, 5'd15}: r = '{len: 5'd6, code: 16'b111001};
      {CT_NC8, 2'd2, 5'd15}: r = '{len: 5'd6, code: 16'b111010};
      {CT_NC8, 2'd3, 5'd15}: r = '{len: 5'd6, code: 16'b111011};
      {CT_NC8, 2'd0, 5'd16}: r = '{len: 5'd6, code: 16'b111100};
      {CT_NC8, 2'd1, 5'd16}: r = '{len: 5'd6, code: 16'b111101};
      {CT_NC8, 2'd2, 5'd16}: r = '{len: 5'd6, code: 16'b111110};
      {CT_NC8, 2'd3, 5'd16}: r = '{len: 5'd6, code: 16'b111111};
      {CT_CDC, 2'd0, 5'd0}: r = '{len: 5'd2, code: 16'b01};
      {CT_CDC, 2'd0, 5'd1}: r = '{len: 5'd6, code: 16'b000111};
      {CT_CDC, 2'd1, 5'd1}: r = '{len: 5'd1, code: 16'b1};
      {CT_CDC, 2'd0, 5'd2}: r = '{len: 5'd6, code: 16'b000100};
      {CT_CDC, 2'd1, 5'd2}: r = '{len: 5'd6, code: 16'b000110};
      {CT_CDC, 2'd2, 5'd2}: r = '{len: 5'd3, code: 16'b001};
      {CT_CDC, 2'd0, 5'd3}: r = '{len: 5'd6, code: 16'b000011};
      {CT_CDC, 2'd1, 5'd3}: r = '{len: 5'd7, code: 16'b0000011};
      {CT_CDC, 2'd2, 5'd3}: r = '{len: 5'd7, code: 16'b0000010};
      {CT_CDC, 2'd3, 5'd3}: r = '{len: 5'd6, code: 16'b000101};
      {CT_CDC, 2'd0, 5'd4}: r = '{len: 5'd6, code: 16'b000010};
      {CT_CDC, 2'd1, 5'd4}: r = '{len: 5'd8, code: 16'b00000011};
      {CT_CDC, 2'd2, 5'd4}: r = '{len: 5'd8, code: 16'b00000010};
      {CT_CDC, 2'd3, 5'd4}: r = '{len: 5'd7, code: 16'b0000000};
      default: r = '{len: 5'd0, code: 16'd0};
    endcase
    return r;
  endfunction

  // total_zeros: {len, code} by (chroma DC 2x2 flag, TotalCoeff, total_zeros)
  function automatic vlc_t total_zeros_code(input logic cdc, input logic [4:0] tc, input logic [4:0] tz);
    vlc_t r;
    r = '{len: 5'd0, code: 16'd0};
    case ({cdc, tc, tz})
      {1'b0, 5'd1, 5'd0}: r = '{len: 5'd1, code: 16'b1};
      {1'b0, 5'd1, 5'd1}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd1, 5'd2}: r = '{len: 5'd3, code: 16'b010};
      {1'b0, 5'd1, 5'd3}: r = '{len: 5'd4, code: 16'b0011};
      {1'b0, 5'd1, 5'd4}: r = '{len: 5'd4, code: 16'b0010};
      {1'b0, 5'd1, 5'd5}: r = '{len: 5'd5, code: 16'b00011};
      {1'b0, 5'd1, 5'd6}: r = '{len: 5'd5, code: 16'b00010};
      {1'b0, 5'd1, 5'd7}: r = '{len: 5'd6, code: 16'b000011};
      {1'b0, 5'd1, 5'd8}: r = '{len: 5'd6, code: 16'b000010};
      {1'b0, 5'd1, 5'd9}: r = '{len: 5'd7, code: 16'b0000011};
      {1'b0, 5'd1, 5'd10}: r = '{len: 5'd7, code: 16'b0000010};
      {1'b0, 5'd1, 5'd11}: r = '{len: 5'd8, code: 16'b00000011};
      {1'b0, 5'd1, 5'd12}: r = '{len: 5'd8, code: 16'b00000010};
      {1'b0, 5'd1, 5'd13}: r = '{len: 5'd9, code: 16'b000000011};
      {1'b0, 5'd1, 5'd14}: r = '{len: 5'd9, code: 16'b000000010};
      {1'b0, 5'd1, 5'd15}: r = '{len: 5'd9, code: 16'b000000001};
      {1'b0, 5'd2, 5'd0}: r = '{len: 5'd3, code: 16'b111};
      {1'b0, 5'd2, 5'd1}: r = '{len: 5'd3, code: 16'b110};
      {1'b0, 5'd2, 5'd2}: r = '{len: 5'd3, code: 16'b101};
      {1'b0, 5'd2, 5'd3}: r = '{len: 5'd3, code: 16'b100};
      {1'b0, 5'd2, 5'd4}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd2, 5'd5}: r = '{len: 5'd4, code: 16'b0101};
      {1'b0, 5'd2, 5'd6}: r = '{len: 5'd4, code: 16'b0100};
      {1'b0, 5'd2, 5'd7}: r = '{len: 5'd4, code: 16'b0011};
      {1'b0, 5'd2, 5'd8}: r = '{len: 5'd4, code: 16'b0010};
      {1'b0, 5'd2, 5'd9}: r = '{len: 5'd5, code: 16'b00011};
      {1'b0, 5'd2, 5'd10}: r = '{len: 5'd5, code: 16'b00010};
      {1'b0, 5'd2, 5'd11}: r = '{len: 5'd6, code: 16'b000011};
      {1'b0, 5'd2, 5'd12}: r = '{len: 5'd6, code: 16'b000010};
      {1'b0, 5'd2, 5'd13}: r = '{len: 5'd6, code: 16'b000001};
      {1'b0, 5'd2, 5'd14}: r = '{len: 5'd6, code: 16'b000000};
      {1'b0, 5'd3, 5'd0}: r = '{len: 5'd4, code: 16'b0101};
      {1'b0, 5'd3, 5'd1}: r = '{len: 5'd3, code: 16'b111};
      {1'b0, 5'd3, 5'd2}: r = '{len: 5'd3, code: 16'b110};
      {1'b0, 5'd3, 5'd3}: r = '{len: 5'd3, code: 16'b101};
      {1'b0, 5'd3, 5'd4}: r = '{len: 5'd4, code: 16'b0100};
      {1'b0, 5'd3, 5'd5}: r = '{len: 5'd4, code: 16'b0011};
      {1'b0, 5'd3, 5'd6}: r = '{len: 5'd3, code: 16'b100};
      {1'b0, 5'd3, 5'd7}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd3, 5'd8}: r = '{len: 5'd4, code: 16'b0010};
      {1'b0, 5'd3, 5'd9}: r = '{len: 5'd5, code: 16'b00011};
      {1'b0, 5'd3, 5'd10}: r = '{len: 5'd5, code: 16'b00010};
      {1'b0, 5'd3, 5'd11}: r = '{len: 5'd6, code: 16'b000001};
      {1'b0, 5'd3, 5'd12}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd3, 5'd13}: r = '{len: 5'd6, code: 16'b000000};
      {1'b0, 5'd4, 5'd0}: r = '{len: 5'd5, code: 16'b00011};
      {1'b0, 5'd4, 5'd1}: r = '{len: 5'd3, code: 16'b111};
      {1'b0, 5'd4, 5'd2}: r = '{len: 5'd4, code: 16'b0101};
      {1'b0, 5'd4, 5'd3}: r = '{len: 5'd4, code: 16'b0100};
      {1'b0, 5'd4, 5'd4}: r = '{len: 5'd3, code: 16'b110};
      {1'b0, 5'd4, 5'd5}: r = '{len: 5'd3, code: 16'b101};
      {1'b0, 5'd4, 5'd6}: r = '{len: 5'd3, code: 16'b100};
      {1'b0, 5'd4, 5'd7}: r = '{len: 5'd4, code: 16'b0011};
      {1'b0, 5'd4, 5'd8}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd4, 5'd9}: r = '{len: 5'd4, code: 16'b0010};
      {1'b0, 5'd4, 5'd10}: r = '{len: 5'd5, code: 16'b00010};
      {1'b0, 5'd4, 5'd11}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd4, 5'd12}: r = '{len: 5'd5, code: 16'b00000};
      {1'b0, 5'd5, 5'd0}: r = '{len: 5'd4, code: 16'b0101};
      {1'b0, 5'd5, 5'd1}: r = '{len: 5'd4, code: 16'b0100};
      {1'b0, 5'd5, 5'd2}: r = '{len: 5'd4, code: 16'b0011};
      {1'b0, 5'd5, 5'd3}: r = '{len: 5'd3, code: 16'b111};
      {1'b0, 5'd5, 5'd4}: r = '{len: 5'd3, code: 16'b110};
      {1'b0, 5'd5, 5'd5}: r = '{len: 5'd3, code: 16'b101};
      {1'b0, 5'd5, 5'd6}: r = '{len: 5'd3, code: 16'b100};
      {1'b0, 5'd5, 5'd7}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd5, 5'd8}: r = '{len: 5'd4, code: 16'b0010};
      {1'b0, 5'd5, 5'd9}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd5, 5'd10}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd5, 5'd11}: r = '{len: 5'd5, code: 16'b00000};
      {1'b0, 5'd6, 5'd0}: r = '{len: 5'd6, code: 16'b000001};
      {1'b0, 5'd6, 5'd1}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd6, 5'd2}: r = '{len: 5'd3, code: 16'b111};
      {1'b0, 5'd6, 5'd3}: r = '{len: 5'd3, code: 16'b110};
      {1'b0, 5'd6, 5'd4}: r = '{len: 5'd3, code: 16'b101};
      {1'b0, 5'd6, 5'd5}: r = '{len: 5'd3, code: 16'b100};
      {1'b0, 5'd6, 5'd6}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd6, 5'd7}: r = '{len: 5'd3, code: 16'b010};
      {1'b0, 5'd6, 5'd8}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd6, 5'd9}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd6, 5'd10}: r = '{len: 5'd6, code: 16'b000000};
      {1'b0, 5'd7, 5'd0}: r = '{len: 5'd6, code: 16'b000001};
      {1'b0, 5'd7, 5'd1}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd7, 5'd2}: r = '{len: 5'd3, code: 16'b101};
      {1'b0, 5'd7, 5'd3}: r = '{len: 5'd3, code: 16'b100};
      {1'b0, 5'd7, 5'd4}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd7, 5'd5}: r = '{len: 5'd2, code: 16'b11};
      {1'b0, 5'd7, 5'd6}: r = '{len: 5'd3, code: 16'b010};
      {1'b0, 5'd7, 5'd7}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd7, 5'd8}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd7, 5'd9}: r = '{len: 5'd6, code: 16'b000000};
      {1'b0, 5'd8, 5'd0}: r = '{len: 5'd6, code: 16'b000001};
      {1'b0, 5'd8, 5'd1}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd8, 5'd2}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd8, 5'd3}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd8, 5'd4}: r = '{len: 5'd2, code: 16'b11};
      {1'b0, 5'd8, 5'd5}: r = '{len: 5'd2, code: 16'b10};
      {1'b0, 5'd8, 5'd6}: r = '{len: 5'd3, code: 16'b010};
      {1'b0, 5'd8, 5'd7}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd8, 5'd8}: r = '{len: 5'd6, code: 16'b000000};
      {1'b0, 5'd9, 5'd0}: r = '{len: 5'd6, code: 16'b000001};
      {1'b0, 5'd9, 5'd1}: r = '{len: 5'd6, code: 16'b000000};
      {1'b0, 5'd9, 5'd2}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd9, 5'd3}: r = '{len: 5'd2, code: 16'b11};
      {1'b0, 5'd9, 5'd4}: r = '{len: 5'd2, code: 16'b10};
      {1'b0, 5'd9, 5'd5}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd9, 5'd6}: r = '{len: 5'd2, code: 16'b01};
      {1'b0, 5'd9, 5'd7}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd10, 5'd0}: r = '{len: 5'd5, code: 16'b00001};
      {1'b0, 5'd10, 5'd1}: r = '{len: 5'd5, code: 16'b00000};
      {1'b0, 5'd10, 5'd2}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd10, 5'd3}: r = '{len: 5'd2, code: 16'b11};
      {1'b0, 5'd10, 5'd4}: r = '{len: 5'd2, code: 16'b10};
      {1'b0, 5'd10, 5'd5}: r = '{len: 5'd2, code: 16'b01};
      {1'b0, 5'd10, 5'd6}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd11, 5'd0}: r = '{len: 5'd4, code: 16'b0000};
      {1'b0, 5'd11, 5'd1}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd11, 5'd2}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd11, 5'd3}: r = '{len: 5'd3, code: 16'b010};
      {1'b0, 5'd11, 5'd4}: r = '{len: 5'd1, code: 16'b1};
      {1'b0, 5'd11, 5'd5}: r = '{len: 5'd3, code: 16'b011};
      {1'b0, 5'd12, 5'd0}: r = '{len: 5'd4, code: 16'b0000};
      {1'b0, 5'd12, 5'd1}: r = '{len: 5'd4, code: 16'b0001};
      {1'b0, 5'd12, 5'd2}: r = '{len: 5'd2, code: 16'b01};
      {1'b0, 5'd12, 5'd3}: r = '{len: 5'd1, code: 16'b1};
      {1'b0, 5'd12, 5'd4}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd13, 5'd0}: r = '{len: 5'd3, code: 16'b000};
      {1'b0, 5'd13, 5'd1}: r = '{len: 5'd3, code: 16'b001};
      {1'b0, 5'd13, 5'd2}: r = '{len: 5'd1, code: 16'b1};
      {1'b0, 5'd13, 5'd3}: r = '{len: 5'd2, code: 16'b01};
      {1'b0, 5'd14, 5'd0}: r = '{len: 5'd2, code: 16'b00};
      {1'b0, 5'd14, 5'd1}: r = '{len: 5'd2, code: 16'b01};
      {1'b0, 5'd14, 5'd2}: r = '{len: 5'd1, code: 16'b1};
      {1'b0, 5'd15, 5'd0}: r = '{len: 5'd1, code: 16'b0};
      {1'b0, 5'd15, 5'd1}: r = '{len: 5'd1, code: 16'b1};
      {1'b1, 5'd1, 5'd0}: r = '{len: 5'd1, code: 16'b1};
      {1'b1, 5'd1, 5'd1}: r = '{len: 5'd2, code: 16'b01};
      {1'b1, 5'd1, 5'd2}: r = '{len: 5'd3, code: 16'b001};
      {1'b1, 5'd1, 5'd3}: r = '{len: 5'd3, code: 16'b000};
      {1'b1, 5'd2, 5'd0}: r = '{len: 5'd1, code: 16'b1};
      {1'b1, 5'd2, 5'd1}: r = '{len: 5'd2, code: 16'b01};
      {1'b1, 5'd2, 5'd2}: r = '{len: 5'd2, code: 16'b00};
      {1'b1, 5'd3, 5'd0}: r = '{len: 5'd1, code: 16'b1};
      {1'b1, 5'd3, 5'd1}: r = '{len: 5'd1, code: 16'b0};
      default: r = '{len: 5'd0, code: 16'd0};
    endcase
    return r;
  endfunction

  // run_before: {len, code} by (min(zerosLeft,7), run_before)
  function automatic vlc_t run_before_code(input logic [2:0] zl, input logic [3:0] rbv);
    vlc_t r;
    r = '{len: 5'd0, code: 16'd0};
    case ({zl, rbv})
      {3'd1, 4'd0}: r = '{len: 5'd1, code: 16'b1};
      {3'd1, 4'd1}: r = '{len: 5'd1, code: 16'b0};
      {3'd2, 4'd0}: r = '{len: 5'd1, code: 16'b1};
      {3'd2, 4'd1}: r = '{len: 5'd2, code: 16'b01};
      {3'd2, 4'd2}: r = '{len: 5'd2, code: 16'b00};
      {3'd3, 4'd0}: r = '{len: 5'd2, code: 16'b11};
      {3'd3, 4'd1}: r = '{len: 5'd2, code: 16'b10};
      {3'd3, 4'd2}: r = '{len: 5'd2, code: 16'b01};
      {3'd3, 4'd3}: r = '{len: 5'd2, code: 16'b00};
      {3'd4, 4'd0}: r = '{len: 5'd2, code: 16'b11};
      {3'd4, 4'd1}: r = '{len: 5'd2, code: 16'b10};
      {3'd4, 4'd2}: r = '{len: 5'd2, code: 16'b01};
      {3'd4, 4'd3}: r = '{len: 5'd3, code: 16'b001};
      {3'd4, 4'd4}: r = '{len: 5'd3, code: 16'b000};
      {3'd5, 4'd0}: r = '{len: 5'd2, code: 16'b11};
      {3'd5, 4'd1}: r = '{len: 5'd2, code: 16'b10};
      {3'd5, 4'd2}: r = '{len: 5'd3, code: 16'b011};
      {3'd5, 4'd3}: r = '{len: 5'd3, code: 16'b010};
      {3'd5, 4'd4}: r = '{len: 5'd3, code: 16'b001};
      {3'd5, 4'd5}: r = '{len: 5'd3, code: 16'b000};
      {3'd6, 4'd0}: r = '{len: 5'd2, code: 16'b11};
      {3'd6, 4'd1}: r = '{len: 5'd3, code: 16'b000};
      {3'd6, 4'd2}: r = '{len: 5'd3, code: 16'b001};
      {3'd6, 4'd3}: r = '{len: 5'd3, code: 16'b011};
      {3'd6, 4'd4}: r = '{len: 5'd3, code: 16'b010};
      {3'd6, 4'd5}: r = '{len: 5'd3, code: 16'b101};
      {3'd6, 4'd6}: r = '{len: 5'd3, code: 16'b100};
      {3'd7, 4'd0}: r = '{len: 5'd3, code: 16'b111};
      {3'd7, 4'd1}: r = '{len: 5'd3, code: 16'b110};
      {3'd7, 4'd2}: r = '{len: 5'd3, code: 16'b101};
      {3'd7, 4'd3}: r = '{len: 5'd3, code: 16'b100};
      {3'd7, 4'd4}: r = '{len: 5'd3, code: 16'b011};
      {3'd7, 4'd5}: r = '{len: 5'd3, code: 16'b010};
      {3'd7, 4'd6}: r = '{len: 5'd3, code: 16'b001};
      {3'd7, 4'd7}: r = '{len: 5'd4, code: 16'b0001};
      {3'd7, 4'd8}: r = '{len: 5'd5, code: 16'b00001};
      {3'd7, 4'd9}: r = '{len: 5'd6, code: 16'b000001};
      {3'd7, 4'd10}: r = '{len: 5'd7, code: 16'b0000001};
      {3'd7, 4'd11}: r = '{len: 5'd8, code: 16'b00000001};
      {3'd7, 4'd12}: r = '{len: 5'd9, code: 16'b000000001};
      {3'd7, 4'd13}: r = '{len: 5'd10, code: 16'b0000000001};
      {3'd7, 4'd14}: r = '{len: 5'd11, code: 16'b00000000001};
      default: r = '{len: 5'd0, code: 16'd0};
    endcase
    return r;
  endfunction
endpackage
