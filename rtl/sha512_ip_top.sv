// sha512_ip_top -- SHA-512 hash IP core with an 8-bit AXI-stream input.
//
// A message is sent as a byte stream (axi_tvalid / axi_tready / axi_tdata, the
// last byte marked with axi_tlast, axi_tid identifying the message). The core
// pads it, splits it into 1024-bit blocks, expands every block into 80 words and
// compresses them one round per clock; when the last block is done, hash_out
// carries the 512-bit digest (first digest byte in bits 511:504) and
// hash_valid pulses for one clock. hash_id returns the axi_tid value of the
// first byte of that message.
//
// Structure: msg_pad_expand (padding state machine, 128-byte buffer, expansion
// function) feeds msg_compress (rounds, constant matrix, chaining value). The
// digest pulse is fed back to the padding machine, which takes no new message
// before the digest of the current one is out.
//
// Timing: bytes are taken at up to one per clock, so at 150 MHz the input runs at
// up to 1.2 Gbit/s. After the last byte the core writes the padding (one byte per
// clock), expands the last block (80 clocks) and adds the chaining value (one
// clock). axi_tready is low while a message is padded and until its digest is
// out, and during the first clock of a message.
// Port names follow the core's port list; hash_id is an addition of this design.
module sha512_ip_top
  import sha512_pkg::*;
(
  input  logic          clk,
  input  logic          reset_n,
  input  logic          axi_tvalid,
  input  logic          axi_tlast,
  input  logic [7:0]    axi_tdata,
  input  logic [31:0]   axi_tid,
  output logic          axi_tready,
  output logic [511:0]  hash_out,
  output logic          hash_valid,
  output logic [31:0]   hash_id
);

  word_t       word;
  logic        word_valid, word_last, hash_init;
  logic [31:0] message_id;

  msg_pad_expand #(.ID_W(32)) u_pad_expand (
    .clk              (clk),
    .reset_n          (reset_n),
    .s_tvalid         (axi_tvalid),
    .s_tlast          (axi_tlast),
    .s_tdata          (axi_tdata),
    .s_tid            (axi_tid),
    .s_tready         (axi_tready),
    .hash_done        (hash_valid),
    .word_out         (word),
    .word_valid_out   (word_valid),
    .word_last        (word_last),
    .hash_vector_init (hash_init),
    .message_id       (message_id),
    .state            ()
  );

  msg_compress #(.ID_W(32)) u_compress (
    .clk        (clk),
    .reset_n    (reset_n),
    .word_in    (word),
    .word_valid (word_valid),
    .word_last  (word_last),
    .message_id (message_id),
    .hash_init  (hash_init),
    .hash_out   (hash_out),
    .hash_valid (hash_valid),
    .hash_id    (hash_id),
    .round_done ()
  );

endmodule
