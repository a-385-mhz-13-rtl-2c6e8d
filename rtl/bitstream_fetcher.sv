// bitstream_fetcher: supplies a 32-bit window of the bitstream at the current
// bit position, through a combinational (non-registered) barrel shifter.
//
// Two 32-bit words are held, w0 (older) and w1, with a 5-bit bit pointer into
// w0. The window is bits [ptr .. ptr+31] of {w0, w1}, MSB first. The decoder
// reports how many bits it used this cycle (consume_len, 0..32); the pointer
// advances by that amount, and when it passes the end of w0 the pair shifts
// by one word and a new word is taken from the input. Because at most 32 bits
// are used per cycle, at most one word is needed per cycle.
//
// Interface: in_data/in_valid/in_ready is a valid/ready word stream, first
// bit in the MSB. win_valid is high when both words are loaded; consume_len
// must be 0 while win_valid is low. Timing: a word offered while the fetcher
// has room appears in the window the cycle after it is taken; a window is
// available every cycle as long as the input keeps up.
// The description names the unit and its non-registered barrel shifter; the
// two-word buffer and the handshake are this design's own choice.
module bitstream_fetcher #(
  parameter int unsigned WIN_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIN_W-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIN_W-1:0] window,
  output logic             win_valid,
  input  logic [$clog2(WIN_W):0] consume_len
);
  localparam int unsigned PW = $clog2(WIN_W);

  logic [WIN_W-1:0] w0, w1;
  logic             v0, v1;
  logic [PW-1:0]    ptr;
  logic [PW:0]      ptr_sum;
  logic             word_cross;
  assign window       = WIN_W'(({w0, w1} << ptr) >> WIN_W);
  assign win_valid    = v0 && v1;

  assign ptr_sum  = {1'b0, ptr} + consume_len;
  assign word_cross    = win_valid && ptr_sum[PW];
  assign in_ready = !v1 || word_cross;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0  <= '0;
      w1  <= '0;
      v0  <= 1'b0;
      v1  <= 1'b0;
      ptr <= '0;
    end else begin
      if (win_valid) ptr <= ptr_sum[PW-1:0];
      if (word_cross) begin
        w0 <= w1;
        v0 <= v1;
        w1 <= in_data;
        v1 <= in_valid;
      end else if (!v0) begin
        if (in_valid) begin
          w0 <= in_data;
          v0 <= 1'b1;
        end
      end else if (!v1) begin
        if (in_valid) begin
          w1 <= in_data;
          v1 <= 1'b1;
        end
      end
    end
  end


  // The decoder never uses more bits than the window holds.
  a_consume: assert property (@(posedge clk) disable iff (!rst_n)
    (consume_len <= (PW+1)'(WIN_W)) && (win_valid || consume_len == '0));

endmodule
