# SHA-512 hash core with an 8-bit AXI-stream input

This core computes the SHA-512 digest of a message that arrives as a byte
stream. It was made for checking FPGA configuration images received during a
remote upgrade, where the image arrives byte by byte from a link and its hash is
needed as soon as the last byte is in. The core takes one byte per clock for as
long as the source can supply them. It pads the message itself. It uses no
vendor primitives and no block RAM, and the 80 round constants are a
combinational table.

The core works as a two-stage pipeline:

```
            +------------------- msg_pad_expand --------------------+
 AXI-stream |  msg_pad_fsm              1024-bit     msg_expand     |  W_t (64 bit)
 byte ----->|  padding state machine  --- block --> 16 x 64-bit     |------------+
            |  + 128 x 8-bit buffer                shift register   |            |
            +-----------^-------------------------------------------+            v
                        |  hash_done (feedback)                       +-- msg_compress --+
                        +---------------------------------------------|  A..H rounds     |--> hash_out[511:0]
                                                                      |  sha512_kconst   |--> hash_valid
                                                                      |  chaining value  |--> hash_id
                                                                      +------------------+
```

* **Front end** (`msg_pad_expand`). The padding state machine writes each byte
  into a 128-byte buffer. When the buffer is full, the whole 1024-bit block is
  handed to the expansion function in one clock. The buffer then fills again
  while that block is processed. The expansion function turns each block into
  the 80 schedule words W0..W79, one per clock.
* **Back end** (`msg_compress`). Each word drives one SHA-512 round on the
  working registers A..H. After round 80, one more clock adds A..H into the
  chaining value. After the last block of a message, that sum is the digest.

A block takes at least 128 clocks to fill (one byte per clock) but only
80 + 1 clocks to expand and compress. The back end therefore never falls behind
the buffer, and no handshake is needed between the two stages. Only two things
stall the byte stream:

* the clocks the core spends writing the padding;
* the wait for the digest before the next message may start.

## Padding: state machine and buffer

SHA-512 pads a message of L bits as follows:

* append a single 1 bit;
* append k zero bits, so that L + 1 + k ≡ 896 (mod 1024);
* append L as a 128-bit big-endian number.

The message is byte-aligned, so the padding becomes a byte sequence:

* one byte `0x80`;
* zero bytes up to byte 112 of a block;
* 16 length bytes.

The state machine (`msg_pad_fsm`, states in `sha512_pkg::pad_state_e`) writes
the padding into the same buffer as the message, one byte per clock. The states
are:

| state | what happens | leaves when |
|---|---|---|
| `PAD_IDLE` | looks at the first byte on offer, does not take it | `s_tvalid`: to `REC_ONE` if that byte is also the last, else to `REC_DATA` |
| `PAD_REC_ONE` | takes the single byte of a one-byte message | the byte is taken → `ADD_80` |
| `PAD_REC_DATA` | takes one byte per clock while `s_tvalid` is high | the byte marked `s_tlast` is taken → `ADD_80` |
| `PAD_ADD_80` | writes `0x80` | always → `ADD_00` |
| `PAD_ADD_00` | writes `0x00` | the write position reaches byte 112 (this check takes one clock) → `ADD_LEN` |
| `PAD_ADD_LEN` | writes the bit length, most significant byte first | byte 127 is written → `END` |
| `PAD_END` | waits | `hash_done` → `IDLE` |

Points that are easy to miss:

* **Writes past byte 127 wrap to byte 0 of the next block.** This happens when
  a message, its `0x80` or its zero bytes run past the end of a block. If a
  message ends in bytes 112..127 of a block, there is no room for the length
  field. The zero bytes then fill the rest of that block and carry on into a
  second block, made only of padding.
* **Block hand-off.** `block_valid` rises the clock after byte 127 is written,
  and `block` is the buffer itself. In that same clock the next byte may already
  be written to byte 0. The expansion function copies the block on the same
  clock edge that performs this write, so it still gets the old contents. The
  buffer therefore needs no second copy.
* **Byte order.** The first byte of a block sits in bits 1023:1016 of `block`.
  It becomes bits 63:56 of W0. Byte 127 becomes bits 7:0 of W15.
* **Length counter.** The machine counts message bytes in a 125-bit counter.
  The length field is that count shifted left by 3 bits.
* **Start of a message.** Leaving `IDLE` raises `hash_vector_init` for one
  clock. This resets the compression side to the initial hash vector. At the
  same time the machine latches `s_tid`, which comes back later as `hash_id`.
* **Feedback.** `hash_done` is the digest pulse of the compression module. The
  machine waits for it in `END`, so a new message cannot reset the chaining
  value while the last block of the previous message is still being
  compressed.

## Expansion in sixteen registers

The schedule is defined as:

* W_t = M_t for t < 16;
* W_t = σ1(W_{t-2}) + W_{t-7} + σ0(W_{t-15}) + W_{t-16} for 16 ≤ t < 80.

The functions are:

* σ0(x) = ROTR¹ ⊕ ROTR⁸ ⊕ SHR⁷;
* σ1(x) = ROTR¹⁹ ⊕ ROTR⁶¹ ⊕ SHR⁶.

A direct build would keep a 17-word window. `msg_expand` keeps only 16
registers W[0..15] and always outputs W[0]. On each clock:

* the registers shift down, W[i] ← W[i+1];
* W[15] takes σ1(W[14]) + W[9] + σ0(W[1]) + W[0].

W[0] still holds W_{t-16} while the new word is computed, so the 17th value
never needs a register of its own.

Timing of `msg_expand`:

* Words appear from the clock after `block_valid`, for 80 clocks in a row, with
  `word_valid` high.
* `word_last` marks W79 of a block that came with `block_last`.
* The next block may be loaded at the earliest in the clock of W79. An assertion
  flags anything earlier.

## Compression and chaining value

`msg_compress` holds two sets of eight 64-bit registers: the working registers
A..H and the chaining value H0..H7.

* **`hash_init`** loads both sets with the SHA-512 initial vector
  (`6a09e667f3bcc908 … 5be0cd19137e2179`, `sha512_pkg::IV`).
* **Each clock with `word_valid`** performs one round, using the constant K_t
  from `sha512_kconst` at the round counter:

  ```
  T1 = H + Σ1(E) + Ch(E,F,G) + K_t + W_t      Σ1 = ROTR14 ^ ROTR18 ^ ROTR41
  T2 = Σ0(A) + Maj(A,B,C)                     Σ0 = ROTR28 ^ ROTR34 ^ ROTR39
  H,G,F,E,D,C,B,A <= G, F, E, D+T1, C, B, A, T1+T2
  ```

* **After round 80** comes one summation clock, with `round_done` high. In it,
  H0..H7 + A..H is written into both sets of registers, ready for the next block.
* **`hash_out`** shows the chaining value. In the summation clock it already
  shows the sum.
* **`hash_valid`** is high in the summation clock if the 80th word came with
  `word_last`. `hash_out` keeps the digest afterwards.

The critical path is the round itself: five 64-bit additions for T1, then one
more for A or E.

## Interface and timing of the top level (`sha512_ip_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset_n` | in | 1 | asynchronous reset, active low |
| `axi_tvalid` | in | 1 | a message byte is on offer |
| `axi_tlast` | in | 1 | the byte on offer is the last of its message |
| `axi_tdata` | in | 8 | message byte, in message order |
| `axi_tid` | in | 32 | message number, sampled with the first byte |
| `axi_tready` | out | 1 | the byte on offer is taken at this clock edge |
| `hash_out` | out | 512 | digest; first digest byte in bits 511:504 |
| `hash_valid` | out | 1 | one-clock pulse: `hash_out` holds the digest of a finished message |
| `hash_id` | out | 32 | `axi_tid` of that message |

**Throughput.** While a message is being received, bytes are taken at one per
clock. At 150 MHz this is 1.2 Gbit/s, enough for a Gigabit Ethernet stream.

**`axi_tready`** is low in three cases:

* for one clock at the start of each message, in `IDLE`;
* while the padding is written;
* until the digest of the current message is out.

A source that keeps `axi_tvalid` and its byte steady until the byte is taken
loses nothing. An assertion in `msg_pad_fsm` checks this rule.

**Latency.** Let P be the number of padding bytes (17 to 144). Then
`hash_valid` rises P + 83 clocks after the clock edge that took the last
message byte. For a message of up to 111 bytes, P = 128 − (L mod 128).

**Limits.**

* The byte stream cannot carry a message of zero length.
* The core hashes one message at a time.

## Departures from the original description

The RTL follows the published structure of this core:

* padding state machine with a 128 × 8-bit buffer;
* expansion in 16 shift registers;
* compression module with a constant matrix.

Its port list matches the published one. The points below are this design's
own choices or changes:

* **`axi_tready`** is lowered while the core cannot take a byte. The published
  waveforms show `axi_tready` high throughout; if it really stayed high, bytes
  sent during padding would be lost.
* **The receive states take the first byte.** `IDLE` only inspects it, which
  costs one clock per message.
* **The feedback** from compression to padding is taken to be the digest pulse.
* **`hash_id`** is added to return the message number. The compression
  module's `message_id` input is published, but its use is not described.
* **The chaining addition** takes its own clock. `hash_valid` therefore
  comes one clock after the last word, not with it.
* **The round constants** are the standard SHA-512 values. The published text
  does not list them.

## Size

Coarse synthesis with yosys gives:

* 2272 flip-flop bits;
* the 1024-bit byte buffer, which stays a memory;
* the constant table, which synthesis maps as a 128 × 64-bit ROM.

Flip-flops plus buffer come to 3296 storage bits. The published FPGA result is
3276 slice registers, 2823 LUTs and no block RAM, at 167 MHz on a Kintex-7
XC7K325T.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare against
`tb/sha512_ref_pkg.sv`, a separate software SHA-512. That model derives:

* the round constants from integer cube roots of the first 80 primes;
* the initial vector from integer square roots of the first 8 primes.

It builds the padding as a byte list and computes full 80-word schedules.

| testbench | what it checks |
|---|---|
| `tb_sha512_kconst` | all 80 constants |
| `tb_msg_expand` | random blocks, all 80 words, `word_last`, back-to-back blocks |
| `tb_msg_compress` | whole messages word by word, digest, pulse timing, `hash_id`, no pulse after inner blocks |
| `tb_msg_pad_fsm` | padded blocks against the reference, for lengths 1–400 including 111/112/127/128/129 and the "SIECK" example (40 bits → 1, 855 zeros, length 40); handshake and state rules |
| `tb_msg_pad_expand` | full word stream for several messages; one byte per clock while earlier blocks expand |
| `tb_sha512_ip_top` | end to end, default configuration; see below |

`tb_sha512_ip_top` checks:

* three messages with known digests:
  * `"20250507"` → `29ead422…1c7fa3c`
  * `"CAEPSWAI"` → `742acdfe…98f99312`
  * `A..Z` five times (130 bytes) → `85bdfc43…8d78a13c`
* random messages, with and without idle clocks from the source;
* throughput and the P + 83 latency;
* that each mechanism occurs at least once: one-byte message, padding that
  needs an extra block, message of whole blocks, multi-block message, source
  gaps, and a queued message held off until the digest is out.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/sha512_pkg.sv tb/sha512_ref_pkg.sv tb/tb_sha512_ip_top.sv \
  --top-module tb_sha512_ip_top -Mdir obj && obj/Vtb_sha512_ip_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Swap the
testbench name to run another one. The simulations take well under a second.

## Files

| file | content |
|---|---|
| `rtl/sha512_pkg.sv` | sizes, types, initial vector, round functions, padding states |
| `rtl/sha512_kconst.sv` | round constant table K0..K79 |
| `rtl/msg_pad_fsm.sv` | padding state machine and 128-byte buffer |
| `rtl/msg_expand.sv` | message schedule in 16 shift registers |
| `rtl/msg_pad_expand.sv` | front end: padding + expansion |
| `rtl/msg_compress.sv` | rounds, chaining value, digest output |
| `rtl/sha512_ip_top.sv` | top level |
| `tb/sha512_ref_pkg.sv` | reference model for the testbenches |
| `tb/tb_*.sv` | testbenches |
