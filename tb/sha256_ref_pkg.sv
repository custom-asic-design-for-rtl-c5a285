// sha256_ref_pkg: software reference model of SHA-256 for the testbenches.
//
// Written independently of the RTL: the round constants and the initial
// hash value are computed here from their definitions (fractional parts of
// the cube roots of the first 64 primes and of the square roots of the
// first 8 primes) in double precision, and the algorithm is written
// directly from FIPS 180-4. Also provides message padding, which the
// accelerator leaves to the host.
package sha256_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t st_t [8];
  typedef w32_t blk_t [16];

  function automatic bit is_prime(int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic int nth_prime(int idx);  // idx 0 -> 2
    int n = 1;
    for (int c = 0; c <= idx; c++) begin
      n++;
      while (!is_prime(n)) n++;
    end
    return n;
  endfunction

  function automatic w32_t frac32(real v);
    real f = v - $floor(v);
    return w32_t'(longint'($floor(f * 4294967296.0)));
  endfunction

  function automatic w32_t ref_k(int t);
    return frac32($pow(real'(nth_prime(t)), 1.0 / 3.0));
  endfunction

  function automatic w32_t ref_iv(int j);
    return frac32($sqrt(real'(nth_prime(j))));
  endfunction

  function automatic w32_t rr(w32_t x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic w32_t ref_w(w32_t wm2, w32_t wm7, w32_t wm15, w32_t wm16);
    return (rr(wm2, 17) ^ rr(wm2, 19) ^ (wm2 >> 10)) + wm7 +
           (rr(wm15, 7) ^ rr(wm15, 18) ^ (wm15 >> 3)) + wm16;
  endfunction

  // One compression round on s with constant k and word w.
  function automatic st_t ref_round(st_t s, w32_t k, w32_t w);
    st_t r;
    w32_t t1, t2;
    t1 = s[7] + (rr(s[4], 6) ^ rr(s[4], 11) ^ rr(s[4], 25)) +
         ((s[4] & s[5]) ^ (~s[4] & s[6])) + k + w;
    t2 = (rr(s[0], 2) ^ rr(s[0], 13) ^ rr(s[0], 22)) +
         ((s[0] & s[1]) ^ (s[0] & s[2]) ^ (s[1] & s[2]));
    r[0] = t1 + t2; r[1] = s[0]; r[2] = s[1]; r[3] = s[2];
    r[4] = s[3] + t1; r[5] = s[4]; r[6] = s[5]; r[7] = s[6];
    return r;
  endfunction

  // Full block: expansion, 64 rounds and the final addition.
  function automatic st_t ref_block(st_t h, blk_t m);
    w32_t w [64];
    st_t  s;
    for (int t = 0; t < 64; t++)
      w[t] = (t < 16) ? m[t] : ref_w(w[t-2], w[t-7], w[t-15], w[t-16]);
    s = h;
    for (int t = 0; t < 64; t++) s = ref_round(s, ref_k(t), w[t]);
    for (int j = 0; j < 8; j++) s[j] = s[j] + h[j];
    return s;
  endfunction

  function automatic st_t ref_init();
    st_t h;
    for (int j = 0; j < 8; j++) h[j] = ref_iv(j);
    return h;
  endfunction

  // Pads a byte message and returns it as big-endian 32-bit words, a
  // multiple of sixteen.
  function automatic void ref_pad(input byte unsigned msg [$], output w32_t words [$]);
    byte unsigned b [$];
    longint unsigned bits;
    b = msg;
    bits = longint'(msg.size()) * 8;
    b.push_back(8'h80);
    while (b.size() % 64 != 56) b.push_back(8'h00);
    for (int i = 7; i >= 0; i--) b.push_back(8'(bits >> (8 * i)));
    words = {};
    for (int i = 0; i < b.size(); i += 4)
      words.push_back({b[i], b[i+1], b[i+2], b[i+3]});
  endfunction

  function automatic void str_bytes(input string s, output byte unsigned q [$]);
    q = {};
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

endpackage
