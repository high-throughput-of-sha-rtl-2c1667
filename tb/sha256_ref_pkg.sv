// sha256_ref_pkg: bit-exact SHA-256 reference model for the testbenches.
//
// Written independently of the RTL: the round constants and the initial
// hash value are not copied from a table but computed with exact integer
// arithmetic from their definitions (K_i = first 32 fractional bits of the
// cube root of the i-th prime = floor(cbrt(p * 2^96)) mod 2^32, and
// H_i = floor(sqrt(p * 2^64)) mod 2^32), and the compression is the plain
// one-round-at-a-time loop of the standard with a 64-word schedule.
// ref_hash() pads a byte message and returns its 256-bit digest.
package sha256_ref_pkg;

  typedef logic [31:0]   w32_t;
  typedef w32_t [0:7]    st_t;    // [0] = a / H0, most significant
  typedef w32_t [0:15]   blk_t;   // [0] = first word, most significant
  typedef logic [7:0]    byte_q_t [$];

  function automatic int unsigned nth_prime(int unsigned n);
    int unsigned cnt = 0;
    for (int unsigned c = 2; ; c++) begin
      bit is_p = 1;
      for (int unsigned d = 2; d * d <= c; d++)
        if (c % d == 0) is_p = 0;
      if (is_p) begin
        if (cnt == n) return c;
        cnt++;
      end
    end
  endfunction

  // floor of the k-th root (k = 2 or 3) of v, v < 2^110.
  function automatic logic [127:0] iroot(logic [127:0] v, int k);
    logic [127:0] lo = 0, hi = 128'h1 << 40, mid, pw;
    while (lo < hi) begin
      mid = (lo + hi + 1) >> 1;
      pw  = (k == 3) ? mid * mid * mid : mid * mid;
      if (pw <= v) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  function automatic w32_t ref_k(int unsigned i);
    logic [127:0] r = iroot(128'(nth_prime(i)) << 96, 3);
    return r[31:0];
  endfunction

  function automatic w32_t ref_iv(int unsigned i);
    logic [127:0] r = iroot(128'(nth_prime(i)) << 64, 2);
    return r[31:0];
  endfunction

  function automatic w32_t rr(w32_t x, int n);
    logic [63:0] d = {x, x};
    d = d >> n;
    return d[31:0];
  endfunction

  function automatic w32_t s0(w32_t x); return rr(x, 7)  ^ rr(x, 18) ^ (x >> 3);  endfunction
  function automatic w32_t s1(w32_t x); return rr(x, 17) ^ rr(x, 19) ^ (x >> 10); endfunction
  function automatic w32_t S0(w32_t x); return rr(x, 2)  ^ rr(x, 13) ^ rr(x, 22); endfunction
  function automatic w32_t S1(w32_t x); return rr(x, 6)  ^ rr(x, 11) ^ rr(x, 25); endfunction

  // One standard round on a..h.
  function automatic st_t ref_round(st_t s, w32_t w, w32_t k);
    w32_t t1, t2;
    st_t  n;
    t1 = s[7] + S1(s[4]) + ((s[4] & s[5]) | (~s[4] & s[6])) + k + w;
    t2 = S0(s[0]) + ((s[0] & s[1]) | (s[0] & s[2]) | (s[1] & s[2]));
    for (int i = 7; i > 0; i--) n[i] = s[i-1];
    n[4] = s[3] + t1;
    n[0] = t1 + t2;
    return n;
  endfunction

  // Full 64-entry schedule of one block.
  function automatic void ref_schedule(blk_t b, output w32_t w [64]);
    for (int t = 0; t < 64; t++)
      w[t] = (t < 16) ? b[t] : s1(w[t-2]) + w[t-7] + s0(w[t-15]) + w[t-16];
  endfunction

  function automatic st_t ref_compress(st_t h, blk_t b);
    w32_t w [64];
    st_t  s = h;
    ref_schedule(b, w);
    for (int t = 0; t < 64; t++) s = ref_round(s, w[t], ref_k(t));
    for (int i = 0; i < 8; i++) s[i] = s[i] + h[i];
    return s;
  endfunction

  function automatic st_t ref_iv_state();
    st_t h;
    for (int i = 0; i < 8; i++) h[i] = ref_iv(i);
    return h;
  endfunction

  // Standard padding: 0x80, zeros, 64-bit big-endian bit length.
  function automatic void ref_pad(byte_q_t msg, ref blk_t blocks [$]);
    byte_q_t      p = msg;
    logic [63:0]  bits = 64'(msg.size()) * 8;
    blocks.delete();
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(bits[i*8 +: 8]);
    for (int n = 0; n < p.size() / 64; n++) begin
      blk_t b;
      for (int i = 0; i < 16; i++)
        b[i] = {p[n*64 + i*4], p[n*64 + i*4 + 1], p[n*64 + i*4 + 2], p[n*64 + i*4 + 3]};
      blocks.push_back(b);
    end
  endfunction

  function automatic byte_q_t str_bytes(string s);
    byte_q_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

endpackage
