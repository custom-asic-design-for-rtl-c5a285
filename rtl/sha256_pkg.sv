// sha256_pkg: types, constants and logic functions shared by the SHA-256
// accelerator.
//
// The functions are the FIPS 180-4 operators used by the message expander
// (sigma0, sigma1) and the compressor (Ch, Maj, Sigma0, Sigma1). The initial
// hash value H(0) is the standard one. The word and state types, and the
// ordering of the state as an array indexed 0 (a / H0) to 7 (h / H7), are
// choices of this design.
package sha256_pkg;

  localparam int unsigned WORD_W   = 32;   // data-path width
  localparam int unsigned NWORDS   = 8;    // words in the hash state
  localparam int unsigned NROUNDS  = 64;   // compression rounds per block
  localparam int unsigned MSG_WORDS = 16;  // words per 512-bit block

  typedef logic [WORD_W-1:0] word_t;
  // Working variables a..h or hash words H0..H7, index 0 is a / H0.
  typedef word_t state_t [NWORDS];

  // Initial hash value H(0) (first 32 bits of the fractional parts of the
  // square roots of the first eight primes).
  localparam word_t IV [NWORDS] = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (WORD_W - n));
  endfunction

  // Message expansion operators (Algorithm 1).
  function automatic word_t ssig0(word_t x);
    return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3);
  endfunction

  function automatic word_t ssig1(word_t x);
    return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

  // Compression operators (Algorithm 2).
  function automatic word_t bsig0(word_t x);
    return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction

  function automatic word_t bsig1(word_t x);
    return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction

  function automatic word_t ch(word_t x, word_t y, word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(word_t x, word_t y, word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

endpackage
