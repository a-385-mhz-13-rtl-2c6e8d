// leading_zero_cnt: counts the zeros in front of the first 1 of a 16-bit
// word, MSB first; 16 when the word is all zero. Used to find level_prefix.
// Purely combinational.
module leading_zero_cnt (
  input  logic [15:0] bits,
  output logic [4:0]  count
);
  always_comb begin
    count = 5'd16;
    for (int i = 0; i < 16; i++) begin
      if (bits[i]) count = 5'(15 - i);
    end
  end
endmodule
