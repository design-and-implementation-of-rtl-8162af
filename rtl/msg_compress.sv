// msg_compress -- SHA-512 message compression module.
//
// Holds the working registers A..H and the chaining value Hash_{t-1} (H0..H7).
// hash_init loads both with the initial hash vector and latches message_id.
// Every clock with word_valid high performs one compression round on A..H with
// the expanded word word_in and the constant K_t read from the constant matrix
// (sha512_kconst) at the round counter:
//   T1 = H + Sigma1(E) + Ch(E,F,G) + K_t + W_t,  T2 = Sigma0(A) + Maj(A,B,C),
//   H=G, G=F, F=E, E=D+T1, D=C, C=B, B=A, A=T1+T2.
// After the 80th round the module spends one clock (round_done high) adding A..H
// to the chaining value; the sums become the new chaining value and the start
// values of A..H for the next block.
//
// Outputs: hash_out is the chaining value (in the round_done clock already the
// new sum), H0 in bits 511:448. hash_valid is a one-clock pulse in the
// round_done clock of a block whose 80th word came with word_last; hash_out
// keeps the digest afterwards. hash_id is message_id latched at hash_init.
// Latency: hash_valid comes one clock after the last word.
// Round logic, init and word_last behaviour follow the described design; the
// separate summation clock and hash_id are this design's choices.
module msg_compress
  import sha512_pkg::*;
#(
  parameter int unsigned ID_W = 32
) (
  input  logic            clk,
  input  logic            reset_n,
  input  word_t           word_in,
  input  logic            word_valid,
  input  logic            word_last,
  input  logic [ID_W-1:0] message_id,
  input  logic            hash_init,
  output digest_t         hash_out,
  output logic            hash_valid,
  output logic [ID_W-1:0] hash_id,
  output logic            round_done
);

  word_t           st_q [8];     // A..H
  word_t           hv_q [8];     // chaining value H0..H7
  word_t           sum  [8];
  round_t          round_q;
  logic            done_q, last_q;
  logic [ID_W-1:0] id_q;
  word_t           k_t, t1, t2;

  sha512_kconst u_kconst (
    .round (round_q),
    .k     (k_t)
  );

  assign t1 = st_q[7] + big_sigma1(st_q[4]) + ch(st_q[4], st_q[5], st_q[6]) + k_t + word_in;
  assign t2 = big_sigma0(st_q[0]) + maj(st_q[0], st_q[1], st_q[2]);

  always_comb begin
    for (int i = 0; i < 8; i++) sum[i] = hv_q[i] + st_q[i];
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < 8; i++) begin
        st_q[i] <= IV[i];
        hv_q[i] <= IV[i];
      end
      round_q <= '0;
      done_q  <= 1'b0;
      last_q  <= 1'b0;
      id_q    <= '0;
    end else if (hash_init) begin
      for (int i = 0; i < 8; i++) begin
        st_q[i] <= IV[i];
        hv_q[i] <= IV[i];
      end
      round_q <= '0;
      done_q  <= 1'b0;
      last_q  <= 1'b0;
      id_q    <= message_id;
    end else begin
      done_q <= 1'b0;
      if (word_valid) begin
        st_q[0] <= t1 + t2;
        st_q[1] <= st_q[0];
        st_q[2] <= st_q[1];
        st_q[3] <= st_q[2];
        st_q[4] <= st_q[3] + t1;
        st_q[5] <= st_q[4];
        st_q[6] <= st_q[5];
        st_q[7] <= st_q[6];
        if (round_q == round_t'(ROUNDS-1)) begin
          round_q <= '0;
          done_q  <= 1'b1;
          last_q  <= word_last;
        end else begin
          round_q <= round_q + 1'b1;
        end
      end else if (done_q) begin
        for (int i = 0; i < 8; i++) begin
          hv_q[i] <= sum[i];
          st_q[i] <= sum[i];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++)
      hash_out[DIGEST_W-1 - WORD_W*i -: WORD_W] = done_q ? sum[i] : hv_q[i];
  end

  assign hash_valid = done_q && last_q;
  assign hash_id    = id_q;
  assign round_done = done_q;

  a_no_word_in_sum : assert property (@(posedge clk) disable iff (!reset_n)
    done_q |-> !word_valid)
    else $error("expanded word arrived during the summation clock");

endmodule
