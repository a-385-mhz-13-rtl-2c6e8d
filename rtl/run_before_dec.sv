// run_before_dec: decodes up to two run_before symbols per cycle and computes
// the matching coefficient moves of the residual block reconstruction.
//
// The nonzero coefficients sit at output buffer indices 0..TotalCoeff-1 in
// scan order. coeffsLeft (cl) counts the coefficients not yet placed and
// zerosLeft (zl) the zeros not yet accounted for. In each cycle coefficient
// A (index cl-1) moves to index cl+zl-1; if it is not the last one, its
// run_before rb1 is decoded with the table for zl, and zl becomes zl-rb1.
// If zeros remain, coefficient B (index cl-2) moves to cl-2+zl-rb1 and,
// unless B is the last coefficient, its run_before rb2 is decoded from the
// bits after rb1 with the table for zl-rb1. The second table is chosen from
// the first result in the same cycle, so two symbols are decoded per cycle.
// Once zl reaches 0 the remaining coefficients are already in place; the last
// coefficient takes all remaining zeros without a run_before codeword.
//
// Interface: purely combinational. win holds the next 32 bitstream bits.
// zeros_left is at least 1 when this unit is used. len is the number of bits
// used; mv_* are the two moves for the output buffer; done is high when the
// block is complete after this cycle.
// The index rule (coeffsLeft + zerosLeft - 1) and the two symbols per cycle
// follow the description; how the second look-up table is chosen within the
// cycle (a direct cascade) is this design's own choice.
module run_before_dec
  import cavlc_pkg::*;
(
  input  logic [31:0] win,
  input  logic [3:0]  zeros_left,
  input  logic [4:0]  coeffs_left,
  output logic [3:0]  rb1,
  output logic [3:0]  rb2,
  output logic        rb1_valid,
  output logic        rb2_valid,
  output logic [4:0]  len,
  output logic [1:0]  mv_en,
  output logic [3:0]  mv_src [2],
  output logic [3:0]  mv_dst [2],
  output logic [3:0]  zeros_left_next,
  output logic [4:0]  coeffs_left_next,
  output logic        done,
  output logic        err
);
  // One run_before look-up: the symbol and its length for a given zerosLeft.
  function automatic logic [9:0] rb_lookup(input logic [15:0] w, input logic [3:0] zl);
    vlc_t       e;
    logic [2:0] t;
    logic [9:0] r;  // {hit, len[4:0], value[3:0]}
    t = (zl > 4'd6) ? 3'd7 : zl[2:0];
    r = '0;
    for (int v = 0; v <= 14; v++) begin
      e = run_before_code(t, 4'(v));
      if (4'(v) <= zl && vlc_hit(w, e)) r = {1'b1, e.len, 4'(v)};
    end
    return r;
  endfunction

  logic [9:0]  d1, d2;
  logic [4:0]  l1, l2;
  logic [3:0]  zl2;
  logic [15:0] win_b;
  logic        b_exists;

  assign d1  = rb_lookup(win[31:16], zeros_left);
  assign rb1 = d1[3:0];
  assign l1  = d1[8:4];
  assign rb1_valid = (zeros_left != 4'd0) && (coeffs_left > 5'd1);
  assign zl2 = rb1_valid ? zeros_left - rb1 : zeros_left;

  assign win_b = 16'((win << l1) >> 16);
  assign d2  = rb_lookup(win_b, zl2);
  assign rb2 = d2[3:0];
  assign l2  = d2[8:4];
  assign b_exists  = rb1_valid && (zl2 != 4'd0);
  assign rb2_valid = b_exists && (coeffs_left > 5'd2);

  assign len = (rb1_valid ? l1 : 5'd0) + (rb2_valid ? l2 : 5'd0);

  assign mv_en[0]  = (zeros_left != 4'd0) && (coeffs_left != 5'd0);
  assign mv_src[0] = 4'(coeffs_left - 5'd1);
  assign mv_dst[0] = 4'(coeffs_left + 5'(zeros_left) - 5'd1);
  assign mv_en[1]  = b_exists;
  assign mv_src[1] = 4'(coeffs_left - 5'd2);
  assign mv_dst[1] = 4'(coeffs_left + 5'(zl2) - 5'd2);

  assign zeros_left_next  = zl2 - (rb2_valid ? rb2 : 4'd0);
  assign coeffs_left_next = coeffs_left - 5'd1 - 5'(b_exists);
  assign done = (zeros_left_next == 4'd0) || (coeffs_left_next == 5'd0);
  assign err  = (rb1_valid && !d1[9]) || (rb2_valid && !d2[9]);
endmodule
