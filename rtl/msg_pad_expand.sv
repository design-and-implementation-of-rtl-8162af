// msg_pad_expand -- message padding and expansion module.
//
// The front half of the SHA-512 core: the padding state machine (msg_pad_fsm)
// buffers and pads the AXI-stream byte stream into 1024-bit blocks, and the
// expansion function (msg_expand) latches each block as soon as it is complete
// and streams out its 80 expanded 64-bit words, one per clock.
//
// Outputs towards the compression module: word_out / word_valid_out (80 clocks
// per block), word_last (80th word of the final block), hash_vector_init (one
// clock when a message starts) and message_id (s_tid latched at that moment).
// hash_done is the feedback from the compression module that lets the padding
// machine accept the next message. Because the buffer refills (128 clocks at
// least) more slowly than a block is expanded (80 clocks), blocks never have to
// wait and the byte stream is taken at one byte per clock while a message lasts.
module msg_pad_expand
  import sha512_pkg::*;
#(
  parameter int unsigned ID_W = 32
) (
  input  logic            clk,
  input  logic            reset_n,
  input  logic            s_tvalid,
  input  logic            s_tlast,
  input  logic [7:0]      s_tdata,
  input  logic [ID_W-1:0] s_tid,
  output logic            s_tready,
  input  logic            hash_done,
  output word_t           word_out,
  output logic            word_valid_out,
  output logic            word_last,
  output logic            hash_vector_init,
  output logic [ID_W-1:0] message_id,
  output pad_state_e      state
);

  logic   block_valid, block_last;
  block_t block;

  msg_pad_fsm #(.ID_W(ID_W)) u_pad (
    .clk              (clk),
    .reset_n          (reset_n),
    .s_tvalid         (s_tvalid),
    .s_tlast          (s_tlast),
    .s_tdata          (s_tdata),
    .s_tid            (s_tid),
    .s_tready         (s_tready),
    .hash_done        (hash_done),
    .hash_vector_init (hash_vector_init),
    .message_id       (message_id),
    .block_valid      (block_valid),
    .block_last       (block_last),
    .block            (block),
    .state            (state)
  );

  msg_expand u_expand (
    .clk         (clk),
    .reset_n     (reset_n),
    .block_valid (block_valid),
    .block_last  (block_last),
    .block       (block),
    .word_out    (word_out),
    .word_valid  (word_valid_out),
    .word_last   (word_last)
  );

endmodule
