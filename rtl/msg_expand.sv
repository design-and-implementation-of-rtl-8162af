// msg_expand -- SHA-512 message expansion function (message schedule).
//
// When block_valid is high the 1024-bit block is latched into sixteen 64-bit
// registers W[0..15]: W[0] gets block bytes 0..7 (byte 0 as bits 63:56), W[15]
// gets bytes 120..127. From the next clock on, W[0] is presented as word_out for
// 80 consecutive clocks with word_valid high. Each clock the registers shift
// down by one (W[t] <= W[t+1]) and W[15] takes the next schedule word
//   sigma1(W[14]) + W[9] + sigma0(W[1]) + W[0],
// i.e. sigma1(W_{t-2}) + W_{t-7} + sigma0(W_{t-15}) + W_{t-16} in the standard
// notation, so 16 registers do the work of the 17-entry window. word_last marks
// the 80th word of a block flagged block_last.
//
// Timing: the first word appears the clock after block_valid; a new block may be
// loaded at the earliest while the 80th word of the previous one is on word_out.
// All of this follows the described design; the reset values are this design's
// choice.
module msg_expand
  import sha512_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  logic   block_valid,
  input  logic   block_last,
  input  block_t block,
  output word_t  word_out,
  output logic   word_valid,
  output logic   word_last
);

  word_t  w_q [BLOCK_WORDS];
  round_t cnt_q;
  logic   busy_q, last_q;
  word_t  w_next;

  assign w_next = small_sigma1(w_q[14]) + w_q[9] + small_sigma0(w_q[1]) + w_q[0];

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < BLOCK_WORDS; i++) w_q[i] <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      last_q <= 1'b0;
    end else if (block_valid) begin
      for (int i = 0; i < BLOCK_WORDS; i++)
        w_q[i] <= block[BLOCK_BYTES*8-1 - WORD_W*i -: WORD_W];
      cnt_q  <= '0;
      busy_q <= 1'b1;
      last_q <= block_last;
    end else if (busy_q) begin
      for (int i = 0; i < BLOCK_WORDS-1; i++) w_q[i] <= w_q[i+1];
      w_q[BLOCK_WORDS-1] <= w_next;
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == round_t'(ROUNDS-1)) busy_q <= 1'b0;
    end
  end

  assign word_out   = w_q[0];
  assign word_valid = busy_q;
  assign word_last  = busy_q && last_q && (cnt_q == round_t'(ROUNDS-1));

  a_no_overrun : assert property (@(posedge clk) disable iff (!reset_n)
    block_valid |-> !busy_q || cnt_q == round_t'(ROUNDS-1))
    else $error("new block arrived before the previous one was expanded");

endmodule
