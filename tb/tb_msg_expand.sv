// tb_msg_expand -- drives random 1024-bit blocks into msg_expand and compares the
// 80 words of every block with a reference schedule. Also checks the timing:
// first word one clock after block_valid, 80 consecutive valid clocks, word_last
// only on the 80th word of a block flagged last, and a new block loaded while the
// 80th word of the previous one is still on the output.
module tb_msg_expand;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic   clk = 0, reset_n = 0;
  logic   block_valid = 0, block_last = 0;
  block_t block = '0;
  word_t  word_out;
  logic   word_valid, word_last;
  int     checks = 0, failures = 0;

  msg_expand dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Load a block, then check 80 words; if back_to_back, the next block is loaded
  // in the clock of the 80th word and the task returns right after it.
  task automatic run_block(input block_t b, input bit last, input bit back_to_back,
                           input block_t next_b, input bit next_last);
    sched_t w = schedule(b);
    block <= b; block_last <= last; block_valid <= 1;
    @(posedge clk);
    block_valid <= 0;
    for (int t = 0; t < 80; t++) begin
      #1;
      check(word_valid === 1'b1, "word_valid high during output");
      check(word_out === w[t], $sformatf("word W%0d", t));
      check(word_last === (last && t == 79), $sformatf("word_last at W%0d", t));
      if (t == 79 && back_to_back) begin
        block <= next_b; block_last <= next_last; block_valid <= 1;
      end
      @(posedge clk);
    end
  endtask

  initial begin
    block_t b0, b1, b2;
    repeat (3) @(posedge clk);
    reset_n = 1;
    @(posedge clk);
    #1 check(word_valid === 1'b0, "idle after reset");
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 32; i++) b0[32*i +: 32] = $urandom;
      run_block(b0, n == 3, 0, '0, 0);
      #1 check(word_valid === 1'b0, "word_valid low after 80 words");
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    // back-to-back: the second block is loaded while W79 of the first is out
    for (int i = 0; i < 32; i++) begin b1[32*i +: 32] = $urandom; b2[32*i +: 32] = $urandom; end
    @(posedge clk);
    fork
      run_block(b1, 0, 1, b2, 1);
    join
    // the task set block_valid for b2 in the last clock; now check b2's words
    block_valid <= 0;
    begin
      sched_t w;
      w = schedule(b2);
      for (int t = 0; t < 80; t++) begin
        #1;
        check(word_valid === 1'b1 && word_out === w[t], $sformatf("back-to-back W%0d", t));
        check(word_last === (t == 79), "back-to-back word_last");
        @(posedge clk);
      end
    end
    #1 check(word_valid === 1'b0, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
