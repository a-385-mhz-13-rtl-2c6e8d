// tb_bitstream_fetcher: feeds random words with random gaps and consumes a
// random number of bits (0..32) whenever a window is offered; every window
// must equal the next 32 bits of the stream as kept by the testbench. Also
// checks that a steady input gives a window in every cycle after start-up.
module tb_bitstream_fetcher;
  localparam int N_WORDS = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] in_data, window;
  logic in_valid, in_ready, win_valid;
  logic [5:0] consume_len;

  bitstream_fetcher dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] words [N_WORDS];
  int wi = 0;       // next word to offer
  longint bitpos = 0;
  bit steady;       // input never pauses in this phase
  bit gap;
  int no_win_steady = 0;

  function automatic bit stream_bit(longint p);
    return words[int'(p / 32)][5'(31 - (p % 32))];
  endfunction

  initial for (int i = 0; i < N_WORDS; i++) words[i] = $urandom;

  always_ff @(posedge clk) gap <= !steady && ($urandom_range(3) == 0);
  assign in_valid = rst_n && wi < N_WORDS && !gap;
  assign in_data  = (wi < N_WORDS) ? words[wi] : '0;

  always @(negedge clk) begin
    consume_len = (rst_n && win_valid) ? 6'($urandom_range(32)) : 6'd0;
  end
  initial consume_len = '0;

  always @(posedge clk) if (rst_n) begin
    if (win_valid && bitpos + 32 <= longint'(wi) * 32) begin
      logic [31:0] expv;
      for (int i = 0; i < 32; i++) expv[31 - i] = stream_bit(bitpos + longint'(i));
      checks++;
      if (window !== expv) begin
        failures++;
        if (failures < 5) $display("FAIL at bit %0d: window %h expected %h", bitpos, window, expv);
      end
      bitpos += longint'(consume_len);
    end else if (win_valid) bitpos += longint'(consume_len);
    if (steady && !win_valid && wi > 4 && wi < N_WORDS) no_win_steady++;
    if (in_valid && in_ready) wi++;
    if (wi >= N_WORDS - 2) begin
      checks++;
      if (no_win_steady != 0) begin
        failures++;
        $display("FAIL: %0d cycles without a window under a steady input", no_win_steady);
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    steady = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (wi > N_WORDS / 2);
    steady = 1;
  end

  initial begin
    repeat (20 * N_WORDS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
