// tb_msg_compress -- feeds msg_compress the expanded words of whole messages
// (computed by the reference model) and checks the digest, the one-clock
// hash_valid pulse one clock after the last word, that no pulse comes after
// an inner block, that hash_out holds the digest afterwards, and hash_id.
// Messages: the three test messages with printed digests ("20250507",
// "CAEPSWAI", and A..Z five times = 130 bytes) plus random ones of 1 to 4 blocks.
module tb_msg_compress;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic        clk = 0, reset_n = 0;
  word_t       word_in = '0;
  logic        word_valid = 0, word_last = 0, hash_init = 0;
  logic [31:0] message_id = '0;
  digest_t     hash_out;
  logic        hash_valid, round_done;
  logic [31:0] hash_id;
  int          checks = 0, failures = 0;
  int          pulses = 0;

  msg_compress dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (reset_n && hash_valid) pulses++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic hash_msg(input bytes_t msg, input logic [511:0] expect_d, input logic [31:0] id);
    bytes_t p = pad(msg);
    int     nblk = p.size() / 128;
    int     p0;
    message_id <= id; hash_init <= 1;
    @(posedge clk);
    hash_init <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    for (int b = 0; b < nblk; b++) begin
      sched_t w = schedule(get_block(p, b));
      for (int t = 0; t < 80; t++) begin
        word_in <= w[t]; word_valid <= 1; word_last <= (b == nblk-1) && (t == 79);
        @(posedge clk);
      end
      word_valid <= 0; word_last <= 0; word_in <= '0;
      p0 = pulses;
      #1;
      if (b == nblk-1) begin
        check(hash_valid === 1'b1, "hash_valid one clock after the last word");
        check(hash_out === expect_d, "digest");
        check(hash_id === id, "hash_id");
        @(posedge clk); #1;
        check(hash_valid === 1'b0, "hash_valid lasts one clock");
        check(hash_out === expect_d, "digest held");
        check(pulses == p0 + 1, "one pulse per message");
      end else begin
        check(hash_valid === 1'b0, "no pulse after an inner block");
        check(round_done === 1'b1, "round_done after 80 rounds");
        @(posedge clk);
        repeat ($urandom_range(0, 6)) @(posedge clk);
      end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    @(posedge clk);
    hash_msg(str2bytes("20250507"),
      512'h29ead4225497b34bd0079f284a6198954bbbcfc3b7d90ac21a73e18d41a4b7822bdc27b9ac2960cc7b13d65acb45b9d137d106334785d4a2530d461d91c7fa3c,
      32'h11);
    hash_msg(str2bytes("CAEPSWAI"),
      512'h742acdfe2881f0899b8eca79f2cd94f0df1ea1db22c8bfcceb639f22952ab0fb9e973ffe4640b9e7a5829d2fcbf2bcc5c731d9e07197f94bbf063c0798f99312,
      32'h22);
    hash_msg(str2bytes({5{"ABCDEFGHIJKLMNOPQRSTUVWXYZ"}}),
      512'h85bdfc4308894e121e2e5699aa66b6540da6bd5151e8f0ca543747b4f8da337073ea8a8a428c03d4d4a15797547b8aee285bbde1d0db8752ee18082f8d78a13c,
      32'h33);
    for (int n = 0; n < 6; n++) begin
      bytes_t m;
      m = rand_bytes($urandom_range(1, 480));
      hash_msg(m, sha512(m), $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
