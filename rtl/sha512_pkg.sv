// sha512_pkg -- types, sizes, initial hash vector and round functions shared by
// the SHA-512 core.
//
// The core processes a message in 1024-bit blocks of sixteen 64-bit words and runs
// 80 compression rounds per block. The initial hash vector H0..H7 and the
// six round functions (Ch, Maj, Sigma0, Sigma1, sigma0, sigma1) are those of the
// SHA-512 standard; the padding state encoding and the type names are this
// design's own choices.
package sha512_pkg;

  localparam int unsigned WORD_W      = 64;    // width of one expanded word W_t
  localparam int unsigned BLOCK_BYTES = 128;   // 1024-bit message block
  localparam int unsigned BLOCK_WORDS = 16;    // W0..W15 taken straight from the block
  localparam int unsigned ROUNDS      = 80;    // compression rounds per block
  localparam int unsigned LEN_W       = 128;   // width of the appended bit-length field
  localparam int unsigned DIGEST_W    = 512;

  typedef logic [WORD_W-1:0]            word_t;
  typedef logic [BLOCK_BYTES*8-1:0]     block_t;   // byte 0 of the block in bits 1023:1016
  typedef logic [DIGEST_W-1:0]          digest_t;  // H0 in bits 511:448
  typedef word_t                        hash_vec_t [8];
  typedef logic [$clog2(ROUNDS)-1:0]    round_t;

  // Initial hash vector H0..H7.
  localparam word_t IV [8] = '{
    64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b, 64'ha54ff53a5f1d36f1,
    64'h510e527fade682d1, 64'h9b05688c2b3e6c1f, 64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179
  };

  // States of the message padding state machine.
  typedef enum logic [2:0] {
    PAD_IDLE,      // waiting for the first byte of a message
    PAD_REC_ONE,   // message of a single byte: take it
    PAD_REC_DATA,  // take message bytes until the one marked last
    PAD_ADD_80,    // write the 0x80 marker byte
    PAD_ADD_00,    // write zero bytes up to byte 112 of a block
    PAD_ADD_LEN,   // write the 16 bytes of the bit length, most significant first
    PAD_END        // wait until the digest of this message is out
  } pad_state_e;

  function automatic word_t rotr(input word_t x, input int unsigned n);
    return (x >> n) | (x << (WORD_W - n));
  endfunction

  function automatic word_t ch(input word_t x, input word_t y, input word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(input word_t x, input word_t y, input word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

  function automatic word_t big_sigma0(input word_t x);
    return rotr(x, 28) ^ rotr(x, 34) ^ rotr(x, 39);
  endfunction

  function automatic word_t big_sigma1(input word_t x);
    return rotr(x, 14) ^ rotr(x, 18) ^ rotr(x, 41);
  endfunction

  function automatic word_t small_sigma0(input word_t x);
    return rotr(x, 1) ^ rotr(x, 8) ^ (x >> 7);
  endfunction

  function automatic word_t small_sigma1(input word_t x);
    return rotr(x, 19) ^ rotr(x, 61) ^ (x >> 6);
  endfunction

endpackage
