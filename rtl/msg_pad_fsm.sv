// msg_pad_fsm -- message padding state machine with its 128-byte block buffer.
//
// Takes a message as an AXI-stream byte stream (one byte per clock at most) and
// writes it into a 128 x 8-bit buffer. When the buffer holds 128 bytes the whole
// 1024-bit block is offered, in parallel, for one clock (block_valid) and the
// next bytes go straight into the buffer again, so a long message streams in
// without pause. After the byte marked last the machine writes SHA-512 padding
// into the same buffer, one byte per clock: a 0x80 byte, zero bytes up to byte
// 112 of a block (running on into a further block when fewer than 16 bytes are
// left) and the 128-bit message length in bits, most significant byte first.
// The block that ends with the length field is flagged block_last.
//
// States (sha512_pkg::pad_state_e) follow the padding state diagram: IDLE, receive
// a single-byte message, receive a longer message, add 0x80, add 0x00, add the
// length, end. IDLE -> REC_ONE when the first byte is also the last one,
// IDLE -> REC_DATA otherwise.
//
// Interface and timing (this design's choices):
//   * s_tready is high only in REC_ONE and REC_DATA. In IDLE the machine looks at
//     the waiting first byte, moves to a receive state and takes it one clock
//     later; it sends hash_vector_init for one clock and latches s_tid as
//     message_id at that moment.
//   * block_valid rises the clock after the 128th byte is written; block is the
//     buffer, byte 0 (first received) in bits 1023:1016.
//   * END waits for hash_done, the digest pulse of the compression side, before
//     accepting the next message, so the chaining registers are never
//     re-initialised while the last block is still being compressed.
//   * Zero-length messages cannot be expressed on the byte stream and are not
//     supported. The byte counter holds messages up to 2^125 - 1 bytes.
module msg_pad_fsm
  import sha512_pkg::*;
#(
  parameter int unsigned ID_W = 32
) (
  input  logic            clk,
  input  logic            reset_n,
  // AXI-stream byte input
  input  logic            s_tvalid,
  input  logic            s_tlast,
  input  logic [7:0]      s_tdata,
  input  logic [ID_W-1:0] s_tid,
  output logic            s_tready,
  // feedback from the compression side: digest of the current message is out
  input  logic            hash_done,
  // to the expansion function and the compression module
  output logic            hash_vector_init,
  output logic [ID_W-1:0] message_id,
  output logic            block_valid,
  output logic            block_last,
  output block_t          block,
  output pad_state_e      state
);

  localparam int unsigned LEN_POS = BLOCK_BYTES - LEN_W / 8;  // 112: first length byte

  pad_state_e            state_q, state_d;
  logic [7:0]            buf_q [BLOCK_BYTES];
  logic [6:0]            byte_cnt_q;                // next buffer position to write
  logic [LEN_W-4:0]      msg_bytes_q;               // bytes received so far
  logic                  init_q, blk_valid_q, blk_last_q;
  logic [ID_W-1:0]       id_q;

  logic                  wr_en;
  logic [7:0]            wr_data;
  logic [LEN_W-1:0]      len_bits;
  logic [3:0]            len_idx;

  assign len_bits = {msg_bytes_q, 3'b000};
  assign len_idx  = byte_cnt_q[3:0];               // 0..15 while in ADD_LEN

  always_comb begin
    state_d  = state_q;
    s_tready = 1'b0;
    wr_en    = 1'b0;
    wr_data  = 8'h00;
    unique case (state_q)
      PAD_IDLE: begin
        if (s_tvalid) state_d = s_tlast ? PAD_REC_ONE : PAD_REC_DATA;
      end
      PAD_REC_ONE: begin
        s_tready = 1'b1;
        if (s_tvalid) begin
          wr_en   = 1'b1;
          wr_data = s_tdata;
          state_d = PAD_ADD_80;
        end
      end
      PAD_REC_DATA: begin
        s_tready = 1'b1;
        if (s_tvalid) begin
          wr_en   = 1'b1;
          wr_data = s_tdata;
          if (s_tlast) state_d = PAD_ADD_80;
        end
      end
      PAD_ADD_80: begin
        wr_en   = 1'b1;
        wr_data = 8'h80;
        state_d = PAD_ADD_00;
      end
      PAD_ADD_00: begin
        if (byte_cnt_q == 7'(LEN_POS)) begin
          state_d = PAD_ADD_LEN;
        end else begin
          wr_en   = 1'b1;
          wr_data = 8'h00;
        end
      end
      PAD_ADD_LEN: begin
        wr_en   = 1'b1;
        wr_data = len_bits[LEN_W-1 - 8*len_idx -: 8];
        if (byte_cnt_q == 7'(BLOCK_BYTES-1)) state_d = PAD_END;
      end
      PAD_END: begin
        if (hash_done) state_d = PAD_IDLE;
      end
      default: state_d = PAD_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state_q     <= PAD_IDLE;
      byte_cnt_q  <= '0;
      msg_bytes_q <= '0;
      init_q      <= 1'b0;
      blk_valid_q <= 1'b0;
      blk_last_q  <= 1'b0;
      id_q        <= '0;
    end else begin
      state_q     <= state_d;
      init_q      <= 1'b0;
      blk_valid_q <= 1'b0;
      if (state_q == PAD_IDLE && s_tvalid) begin
        init_q      <= 1'b1;
        id_q        <= s_tid;
        msg_bytes_q <= '0;
        byte_cnt_q  <= '0;
      end
      if ((state_q == PAD_REC_ONE || state_q == PAD_REC_DATA) && s_tvalid)
        msg_bytes_q <= msg_bytes_q + 1'b1;
      if (wr_en) begin
        byte_cnt_q <= byte_cnt_q + 1'b1;           // wraps from 127 to 0
        if (byte_cnt_q == 7'(BLOCK_BYTES-1)) begin
          blk_valid_q <= 1'b1;
          blk_last_q  <= (state_q == PAD_ADD_LEN);
        end
      end
    end
  end

  // Block buffer: plain storage, no reset needed since every byte is written
  // before the block that holds it is offered.
  always_ff @(posedge clk) begin
    if (wr_en) buf_q[byte_cnt_q] <= wr_data;
  end

  always_comb begin
    for (int i = 0; i < BLOCK_BYTES; i++)
      block[BLOCK_BYTES*8-1 - 8*i -: 8] = buf_q[i];
  end

  assign state            = state_q;
  assign hash_vector_init = init_q;
  assign message_id       = id_q;
  assign block_valid      = blk_valid_q;
  assign block_last       = blk_last_q;

  // AXI-stream rule for the source: a byte on offer stays on offer, unchanged,
  // until it is taken.
  a_axis_hold : assert property (@(posedge clk) disable iff (!reset_n)
    s_tvalid && !s_tready |=> s_tvalid && $stable(s_tdata) && $stable(s_tlast))
    else $error("AXI-stream byte withdrawn or changed before it was taken");

endmodule
