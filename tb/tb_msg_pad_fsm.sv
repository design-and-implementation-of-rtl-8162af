// tb_msg_pad_fsm -- sends messages of chosen and random lengths into
// msg_pad_fsm over AXI-stream and compares every 1024-bit block it hands on with
// the reference padding. Checks block_last, one hash_vector_init and the latched
// message_id per message, s_tready low in IDLE and while padding, that END waits
// for hash_done, the single-byte path through REC_ONE, and that an unbroken
// byte stream is taken at one byte per clock. Lengths include the padding edge
// cases 111/112 (length field just fits / needs another block), 127, 128, 129.
module tb_msg_pad_fsm;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic        clk = 0, reset_n = 0;
  logic        s_tvalid = 0, s_tlast = 0;
  logic [7:0]  s_tdata = '0;
  logic [31:0] s_tid = '0;
  logic        s_tready;
  logic        hash_done = 0;
  logic        hash_vector_init;
  logic [31:0] message_id;
  logic        block_valid, block_last;
  block_t      block;
  pad_state_e  state;
  int          checks = 0, failures = 0;

  logic [1023:0] blocks [$];
  logic          lasts  [$];
  int            inits = 0, rec_one_seen = 0, end_wait_cycles = 0;

  msg_pad_fsm dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (reset_n) begin
    if (block_valid) begin blocks.push_back(block); lasts.push_back(block_last); end
    if (hash_vector_init) inits++;
    if (state == PAD_REC_ONE) rec_one_seen++;
    if (state == PAD_END && !hash_done) end_wait_cycles++;
    if (state inside {PAD_IDLE, PAD_ADD_80, PAD_ADD_00, PAD_ADD_LEN, PAD_END} && s_tready) begin
      failures++;
      $display("FAIL s_tready high in state %s", state.name());
    end
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

  // Send one message; gaps != 0 inserts random idle clocks between bytes.
  // Returns the clocks from the first to the last accepted byte.
  task automatic send(input bytes_t msg, input logic [31:0] id, input bit gaps, output int span);
    int first = -1, cyc = 0;
    for (int i = 0; i < msg.size(); i++) begin
      if (gaps && ($urandom_range(0, 3) == 0)) begin
        s_tvalid <= 0;
        repeat ($urandom_range(1, 3)) begin @(posedge clk); cyc++; end
      end
      s_tvalid <= 1; s_tdata <= msg[i]; s_tlast <= (i == msg.size()-1); s_tid <= id;
      do begin @(posedge clk); cyc++; end while (!(s_tvalid && s_tready));
      if (first < 0) first = cyc;
      span = cyc - first;
    end
    s_tvalid <= 0; s_tlast <= 0;
  endtask

  task automatic run_msg(input bytes_t msg, input bit gaps);
    bytes_t      p = pad(msg);
    int          nblk = p.size() / 128;
    int          span, inits0 = inits;
    logic [31:0] id = $urandom;
    blocks.delete(); lasts.delete();
    send(msg, id, gaps, span);
    if (!gaps) check(span == msg.size() - 1, $sformatf("one byte per clock (%0d bytes in %0d clocks)", msg.size(), span + 1));
    wait (lasts.size() == nblk && lasts[nblk-1] == 1'b1);
    @(posedge clk); #1;
    check(state == PAD_END, "END after the last block");
    repeat ($urandom_range(2, 40)) @(posedge clk);
    #1 check(state == PAD_END, "END waits for hash_done");
    hash_done <= 1;
    @(posedge clk);
    hash_done <= 0;
    #1 check(state == PAD_IDLE, "IDLE after hash_done");
    check(blocks.size() == nblk, $sformatf("%0d blocks for %0d bytes", nblk, msg.size()));
    for (int b = 0; b < nblk; b++) begin
      check(blocks[b] === get_block(p, b), $sformatf("block %0d of a %0d-byte message", b, msg.size()));
      check(lasts[b] === (b == nblk-1), "block_last");
    end
    check(inits == inits0 + 1, "one hash_vector_init per message");
    check(message_id === id, "message_id");
  endtask

  initial begin
    automatic int lens [$] = '{1, 5, 8, 111, 112, 113, 127, 128, 129, 130, 239, 240, 256, 300};
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (2) @(posedge clk);
    foreach (lens[i]) run_msg(rand_bytes(lens[i]), 0);
    // worked example: 40 message bits, a 1 bit, 855 zero bits, length 40
    run_msg(str2bytes("SIECK"), 0);
    check(blocks[0] === {40'h534945434B, 1'b1, 855'b0, 128'd40}, "padded block of SIECK");
    for (int n = 0; n < 8; n++) run_msg(rand_bytes($urandom_range(1, 400)), 1);
    check(rec_one_seen > 0, "single-byte message went through REC_ONE");
    check(end_wait_cycles > 0, "END waited for the feedback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
