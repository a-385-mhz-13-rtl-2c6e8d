// trailing_ones_dec: decodes all trailing_ones_sign_flag bits of a block in
// one cycle.
//
// TrailingOnes (0..3) is known from coeff_token, so its sign flags are simply
// the next TrailingOnes bits of the window: flag k (k = 0 first) gives the
// coefficient +1 when 0 and -1 when 1. Coefficient k is the (k+1)-th nonzero
// coefficient counted back from the highest frequency.
//
// Interface: purely combinational. win holds the next 3 bitstream bits, MSB
// first. value[k] is valid for k < trailing_ones, and 0 otherwise; len equals
// trailing_ones. The one-cycle parse follows the description.
module trailing_ones_dec
  import cavlc_pkg::*;
(
  input  logic [2:0] win,
  input  logic [1:0] trailing_ones,
  output coef_t      value [3],
  output logic [1:0] len
);
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      if (k < int'(trailing_ones)) value[k] = win[2-k] ? -coef_t'(1) : coef_t'(1);
      else                         value[k] = '0;
    end
  end
  assign len = trailing_ones;
endmodule
