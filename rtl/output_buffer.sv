// output_buffer: the 16-entry, 13-bit-wide coefficient buffer in which the
// residual block is reconstructed.
//
// Trailing ones and levels are written at their indices in scan order
// (index 0 .. TotalCoeff-1) through up to three write ports per cycle. During
// run_before decoding up to two coefficients per cycle are moved to their
// final indices: each move copies entry src to entry dst and clears src. The
// sources are cleared before the destinations are written, so a move may
// land on the entry the other move of the same cycle vacates. clear empties
// the buffer for a new block.
//
// Interface: all updates take effect at the next rising clock edge; coeff
// shows the registered contents. Writes and moves are not used in the same
// cycle. Depth and width follow the description; the port arrangement is
// this design's own.
module output_buffer
  import cavlc_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_COEFFS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [2:0] wr_en,
  input  logic [3:0] wr_idx [3],
  input  coef_t      wr_val [3],
  input  logic [1:0] mv_en,
  input  logic [3:0] mv_src [2],
  input  logic [3:0] mv_dst [2],
  output coef_t      coeff  [DEPTH]
);
  coef_t mem  [DEPTH];
  coef_t nxt  [DEPTH];

  always_comb begin
    nxt = mem;
    if (clear) begin
      for (int i = 0; i < DEPTH; i++) nxt[i] = '0;
    end else begin
      for (int m = 0; m < 2; m++)
        if (mv_en[m]) nxt[mv_src[m]] = '0;
      for (int m = 0; m < 2; m++)
        if (mv_en[m]) nxt[mv_dst[m]] = mem[mv_src[m]];
      for (int w = 0; w < 3; w++)
        if (wr_en[w]) nxt[wr_idx[w]] = wr_val[w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      mem <= nxt;
    end
  end

  assign coeff = mem;

  a_no_mix: assert property (@(posedge clk) disable iff (!rst_n)
    !((|wr_en) && (|mv_en)));
endmodule
