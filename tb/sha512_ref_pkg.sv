// sha512_ref_pkg -- reference model for the SHA-512 testbenches.
//
// A plain software SHA-512 that shares no code with the RTL: the round constants
// and the initial hash vector are derived here from their definitions (integer
// cube and square roots of the first primes), the padding is built as a byte
// list and every block is expanded into a full 80-entry schedule before its
// rounds are run.
package sha512_ref_pkg;

  typedef logic [7:0]  bytes_t [$];
  typedef logic [63:0] sched_t [80];

  function automatic int unsigned nth_prime(input int unsigned n);   // n = 0 -> 2
    int unsigned cnt = 0;
    for (int unsigned c = 2; ; c++) begin
      bit is_p = 1;
      for (int unsigned d = 2; d * d <= c; d++) if (c % d == 0) is_p = 0;
      if (is_p) begin
        if (cnt == n) return c;
        cnt++;
      end
    end
  endfunction

  // floor(cbrt(p * 2^192)) mod 2^64
  function automatic logic [63:0] ref_k(input int unsigned t);
    logic [255:0] target, lo, hi, mid;
    target = 256'(nth_prime(t)) << 192;
    lo = 0;
    hi = 256'(1) << 70;
    while (lo < hi) begin
      mid = (lo + hi + 1) >> 1;
      if (mid * mid * mid <= target) lo = mid;
      else hi = mid - 1;
    end
    return lo[63:0];
  endfunction

  // floor(sqrt(p * 2^128)) mod 2^64
  function automatic logic [63:0] ref_iv(input int unsigned i);
    logic [255:0] target, lo, hi, mid;
    target = 256'(nth_prime(i)) << 128;
    lo = 0;
    hi = 256'(1) << 70;
    while (lo < hi) begin
      mid = (lo + hi + 1) >> 1;
      if (mid * mid <= target) lo = mid;
      else hi = mid - 1;
    end
    return lo[63:0];
  endfunction

  function automatic logic [63:0] ror(input logic [63:0] x, input int n);
    logic [127:0] d = {x, x};
    return d[n +: 64];
  endfunction

  function automatic bytes_t pad(input bytes_t msg);
    bytes_t       p = msg;
    logic [127:0] bits = 128'(msg.size()) * 8;
    p.push_back(8'h80);
    while (p.size() % 128 != 112) p.push_back(8'h00);
    for (int i = 15; i >= 0; i--) p.push_back(bits[8*i +: 8]);
    return p;
  endfunction

  // 1024-bit block number b of a padded message, first byte in the top bits
  function automatic logic [1023:0] get_block(input bytes_t p, input int b);
    logic [1023:0] blk;
    for (int i = 0; i < 128; i++) blk[1023 - 8*i -: 8] = p[128*b + i];
    return blk;
  endfunction

  function automatic sched_t schedule(input logic [1023:0] blk);
    sched_t w;
    for (int t = 0; t < 16; t++) w[t] = blk[1023 - 64*t -: 64];
    for (int t = 16; t < 80; t++) begin
      logic [63:0] s0, s1;
      s0 = ror(w[t-15], 1) ^ ror(w[t-15], 8) ^ (w[t-15] >> 7);
      s1 = ror(w[t-2], 19) ^ ror(w[t-2], 61) ^ (w[t-2] >> 6);
      w[t] = s1 + w[t-7] + s0 + w[t-16];
    end
    return w;
  endfunction

  function automatic logic [511:0] sha512(input bytes_t msg);
    bytes_t      p = pad(msg);
    logic [63:0] hv [8];
    logic [63:0] k  [80];
    logic [511:0] out;
    for (int i = 0; i < 8; i++)  hv[i] = ref_iv(i);
    for (int t = 0; t < 80; t++) k[t] = ref_k(t);
    for (int b = 0; b < p.size() / 128; b++) begin
      sched_t w = schedule(get_block(p, b));
      logic [63:0] a = hv[0], bb = hv[1], c = hv[2], d = hv[3];
      logic [63:0] e = hv[4], f = hv[5], g = hv[6], h = hv[7];
      for (int t = 0; t < 80; t++) begin
        logic [63:0] x1, x2;
        x1 = h + (ror(e, 14) ^ ror(e, 18) ^ ror(e, 41)) + ((e & f) ^ (~e & g)) + k[t] + w[t];
        x2 = (ror(a, 28) ^ ror(a, 34) ^ ror(a, 39)) + ((a & bb) ^ (a & c) ^ (bb & c));
        h = g; g = f; f = e; e = d + x1; d = c; c = bb; bb = a; a = x1 + x2;
      end
      hv[0] += a; hv[1] += bb; hv[2] += c; hv[3] += d;
      hv[4] += e; hv[5] += f;  hv[6] += g; hv[7] += h;
    end
    for (int i = 0; i < 8; i++) out[511 - 64*i -: 64] = hv[i];
    return out;
  endfunction

  function automatic bytes_t str2bytes(input string s);
    bytes_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

  function automatic bytes_t rand_bytes(input int n);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    return q;
  endfunction

endpackage
