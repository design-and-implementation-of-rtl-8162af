// tb_sha512_ip_top -- end-to-end test of the SHA-512 core at its default
// configuration. Messages go in over the 8-bit AXI-stream port and every digest
// is compared with the reference model, plus the printed digests of the test
// messages "20250507", "CAEPSWAI" and A..Z repeated five times (130 bytes).
//
// Also checked: hash_valid is a single pulse per message with hash_id equal to
// the message's axi_tid; an unbroken stream is taken at one byte per clock; the
// digest arrives P + 83 clocks after the last byte is taken, where P is the
// number of padding bytes (0x80, zeros and 16 length bytes).
// Each mechanism of the design is counted and must occur at least once:
// single-byte message, multi-byte message, padding that needs a block of its
// own, message filling whole blocks, multi-block message, idle clocks from the
// source, a new message held off by axi_tready until the digest is out.
module tb_sha512_ip_top;
  import sha512_ref_pkg::*;

  logic         clk = 0, reset_n = 0;
  logic         axi_tvalid = 0, axi_tlast = 0;
  logic [7:0]   axi_tdata = '0;
  logic [31:0]  axi_tid = '0;
  logic         axi_tready;
  logic [511:0] hash_out;
  logic         hash_valid;
  logic [31:0]  hash_id;
  int           checks = 0, failures = 0;
  longint       cyc = 0;

  sha512_ip_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_single = 0, n_multi_byte = 0, n_pad_block = 0, n_exact = 0, n_multi_block = 0;
  int n_source_gap = 0, n_held_off = 0;

  // a digest is pending from the last byte taken until hash_valid
  logic pending = 0;
  always @(posedge clk) if (reset_n) begin
    if (axi_tvalid && axi_tready && axi_tlast) pending <= 1;
    else if (hash_valid) pending <= 0;
    if (pending && axi_tvalid && !axi_tready) n_held_off++;
  end

  // digest collector
  logic [511:0] got_d  [$];
  logic [31:0]  got_id [$];
  longint       got_t  [$];
  always @(posedge clk) if (reset_n && hash_valid) begin
    got_d.push_back(hash_out); got_id.push_back(hash_id); got_t.push_back(cyc);
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  // Sends one message; returns the clock number at which its last byte was taken.
  task automatic send(input bytes_t msg, input logic [31:0] id, input bit gaps,
                      output longint t_last, output longint span);
    longint first = -1;
    for (int i = 0; i < msg.size(); i++) begin
      if (gaps && ($urandom_range(0, 3) == 0)) begin
        axi_tvalid <= 0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        n_source_gap++;
      end
      axi_tvalid <= 1; axi_tdata <= msg[i]; axi_tlast <= (i == msg.size()-1); axi_tid <= id;
      do @(posedge clk); while (!(axi_tvalid && axi_tready));
      if (first < 0) first = cyc;
      t_last = cyc;
    end
    span = t_last - first;
    axi_tvalid <= 0; axi_tlast <= 0;
  endtask

  task automatic run_msg(input bytes_t msg, input logic [511:0] expect_d, input bit gaps);
    logic [31:0] id = $urandom;
    longint      t_last, span;
    int          n = msg.size();
    int          npad = pad(msg).size() - n;
    int          g0 = got_d.size();
    send(msg, id, gaps, t_last, span);
    wait (got_d.size() == g0 + 1);
    repeat (2) @(posedge clk);
    check(got_d.size() == g0 + 1, "one hash_valid pulse per message");
    check(got_d[g0] === expect_d, $sformatf("digest of a %0d-byte message", n));
    check(got_id[g0] === id, "hash_id");
    check(got_t[g0] - t_last == 64'(npad) + 83,
          $sformatf("latency %0d clocks, expected %0d", got_t[g0] - t_last, npad + 83));
    if (!gaps) check(span == 64'(n) - 1, "one byte per clock");
    if (n == 1) n_single++; else n_multi_byte++;
    if (n % 128 >= 112) n_pad_block++;
    if (n % 128 == 0) n_exact++;
    if (n > 128) n_multi_block++;
  endtask

  initial begin
    automatic int lens [$] = '{1, 2, 111, 112, 127, 128, 129, 256, 1000};
    bytes_t m;
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (2) @(posedge clk);
    run_msg(str2bytes("20250507"),
      512'h29ead4225497b34bd0079f284a6198954bbbcfc3b7d90ac21a73e18d41a4b7822bdc27b9ac2960cc7b13d65acb45b9d137d106334785d4a2530d461d91c7fa3c, 0);
    run_msg(str2bytes("CAEPSWAI"),
      512'h742acdfe2881f0899b8eca79f2cd94f0df1ea1db22c8bfcceb639f22952ab0fb9e973ffe4640b9e7a5829d2fcbf2bcc5c731d9e07197f94bbf063c0798f99312, 0);
    run_msg(str2bytes({5{"ABCDEFGHIJKLMNOPQRSTUVWXYZ"}}),
      512'h85bdfc4308894e121e2e5699aa66b6540da6bd5151e8f0ca543747b4f8da337073ea8a8a428c03d4d4a15797547b8aee285bbde1d0db8752ee18082f8d78a13c, 0);
    foreach (lens[i]) begin
      m = rand_bytes(lens[i]);
      run_msg(m, sha512(m), 0);
    end
    for (int k = 0; k < 6; k++) begin
      m = rand_bytes($urandom_range(1, 400));
      run_msg(m, sha512(m), 1);
    end
    // Hold a message on the bus while the previous digest is still pending.
    begin
      bytes_t m1, m2;
      longint tl, sp;
      int g0;
      m1 = rand_bytes(20); m2 = rand_bytes(30);
      g0 = got_d.size();
      send(m1, 32'hA1, 0, tl, sp);
      send(m2, 32'hA2, 0, tl, sp);      // first byte waits while END holds
      wait (got_d.size() == g0 + 2);
      repeat (2) @(posedge clk);
      check(got_d[g0] === sha512(m1) && got_id[g0] === 32'hA1, "first of two queued messages");
      check(got_d[g0+1] === sha512(m2) && got_id[g0+1] === 32'hA2, "second of two queued messages");
    end
    check(n_single > 0,      "mechanism: single-byte message");
    check(n_multi_byte > 0,  "mechanism: multi-byte message");
    check(n_pad_block > 0,   "mechanism: padding needs an extra block");
    check(n_exact > 0,       "mechanism: message of whole blocks");
    check(n_multi_block > 0, "mechanism: multi-block message");
    check(n_source_gap > 0,  "mechanism: idle clocks from the source");
    check(n_held_off > 0,    "mechanism: next message held off until the digest is out");
    $display("mechanisms: single=%0d multi_byte=%0d pad_block=%0d exact=%0d multi_block=%0d gaps=%0d held_off=%0d",
             n_single, n_multi_byte, n_pad_block, n_exact, n_multi_block, n_source_gap, n_held_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
