// tb_msg_pad_expand -- sends messages into the padding and expansion module and
// compares the stream of expanded words with the reference schedule of the
// padded message, block by block. Checks that every block gives exactly 80
// consecutive valid words, word_last on the last word of the message only, one
// hash_vector_init per message, and that a long unbroken byte stream is taken
// at one byte per clock while earlier blocks are being expanded.
module tb_msg_pad_expand;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic        clk = 0, reset_n = 0;
  logic        s_tvalid = 0, s_tlast = 0;
  logic [7:0]  s_tdata = '0;
  logic [31:0] s_tid = '0;
  logic        s_tready;
  logic        hash_done = 0;
  word_t       word_out;
  logic        word_valid_out, word_last;
  logic        hash_vector_init;
  logic [31:0] message_id;
  pad_state_e  state;
  int          checks = 0, failures = 0;

  word_t words [$];
  logic  wlast [$];
  int    runs  [$];          // lengths of runs of consecutive valid words
  int    run_len = 0, inits = 0, overlap = 0;

  msg_pad_expand dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (reset_n) begin
    if (word_valid_out) begin
      words.push_back(word_out); wlast.push_back(word_last); run_len++;
      if (s_tvalid && s_tready) overlap++;     // bytes taken while a block expands
    end else if (run_len != 0) begin
      runs.push_back(run_len); run_len = 0;
    end
    if (hash_vector_init) inits++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run_msg(input bytes_t msg, input bit gaps);
    bytes_t p = pad(msg);
    int     nblk = p.size() / 128;
    int     first = -1, cyc = 0, span = 0, inits0 = inits;
    words.delete(); wlast.delete(); runs.delete();
    for (int i = 0; i < msg.size(); i++) begin
      if (gaps && ($urandom_range(0, 3) == 0)) begin
        s_tvalid <= 0;
        repeat ($urandom_range(1, 3)) begin @(posedge clk); cyc++; end
      end
      s_tvalid <= 1; s_tdata <= msg[i]; s_tlast <= (i == msg.size()-1); s_tid <= 32'(i);
      do begin @(posedge clk); cyc++; end while (!(s_tvalid && s_tready));
      if (first < 0) first = cyc;
      span = cyc - first;
    end
    s_tvalid <= 0; s_tlast <= 0;
    if (!gaps) check(span == msg.size() - 1, "one byte per clock");
    wait (wlast.size() == 80 * nblk);
    @(posedge clk);
    repeat (3) @(posedge clk);
    hash_done <= 1;                      // stands in for the compression module
    @(posedge clk);
    hash_done <= 0;
    @(posedge clk);
    check(runs.size() == nblk, $sformatf("%0d word runs for %0d blocks", runs.size(), nblk));
    foreach (runs[i]) check(runs[i] == 80, "80 consecutive words per block");
    for (int b = 0; b < nblk; b++) begin
      sched_t w = schedule(get_block(p, b));
      for (int t = 0; t < 80; t++) begin
        check(words[80*b + t] === w[t], $sformatf("block %0d W%0d", b, t));
        check(wlast[80*b + t] === (b == nblk-1 && t == 79), "word_last");
      end
    end
    check(inits == inits0 + 1, "one hash_vector_init per message");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (2) @(posedge clk);
    run_msg(str2bytes({5{"ABCDEFGHIJKLMNOPQRSTUVWXYZ"}}), 0);
    run_msg(str2bytes("SIECK"), 0);
    run_msg(rand_bytes(1), 0);
    run_msg(rand_bytes(129), 0);         // 1032-bit message: two blocks
    run_msg(rand_bytes(112), 0);
    run_msg(rand_bytes(600), 0);
    run_msg(rand_bytes(333), 1);
    check(overlap > 0, "bytes taken while an earlier block was expanded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
