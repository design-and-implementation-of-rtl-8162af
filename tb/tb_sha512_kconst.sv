// tb_sha512_kconst -- checks all 80 round constants of sha512_kconst against
// values derived from their definition (cube roots of the first 80 primes), and
// constant K79 against the value 6c44198c4a475817.
module tb_sha512_kconst;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  round_t round;
  word_t  k;
  int     checks = 0, failures = 0;

  sha512_kconst dut (.round(round), .k(k));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 80; t++) begin
      round = round_t'(t);
      #1;
      checks++;
      if (k !== ref_k(t)) begin
        failures++;
        $display("K%0d = %h, expected %h", t, k, ref_k(t));
      end
    end
    round = 7'd79;
    #1;
    checks++;
    if (k !== 64'h6c44198c4a475817) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
