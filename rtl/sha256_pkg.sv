// sha256_pkg: types, constants and word functions shared by the SHA-256
// unfolded hash core.
//
// The core works on 32-bit words. A 512-bit message block is sixteen words,
// word 0 being the first (most significant) word of the block. The eight
// working variables a..h and the eight hash words H0..H7 are kept as
// state_t, element 0 being a (or H0). The logical functions are the ones of
// the SHA-256 standard (FIPS 180-4): the big sigmas act on a and e inside the
// compression rounds, the small sigmas on the message schedule, Ch and Maj
// are the bitwise choose and majority functions. K is the 64-word round
// constant table and IV the initial hash value; both are the standard's
// values (first 32 fractional bits of the cube roots of the first 64 primes,
// and of the square roots of the first 8 primes, respectively).
//
// state_t and block_t use ascending packed ranges on purpose: element 0 is
// then the most significant word, so a 256-bit digest or a 512-bit block
// reads in the usual big-endian order of SHA-256 test vectors.
package sha256_pkg;

  typedef logic [31:0] word_t;
  typedef word_t [0:7]  state_t;   // [0]=a/H0 (most significant) ... [7]=h/H7
  typedef word_t [0:15] block_t;   // [0]=W0 (first, most significant word)

  localparam int unsigned ROUNDS = 64;

  localparam word_t K [ROUNDS] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5,
    32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3,
    32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc,
    32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7,
    32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13,
    32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3,
    32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5,
    32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208,
    32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };

  localparam state_t IV = '{
    7: 32'h5be0cd19, 6: 32'h1f83d9ab, 5: 32'h9b05688c, 4: 32'h510e527f,
    3: 32'ha54ff53a, 2: 32'h3c6ef372, 1: 32'hbb67ae85, 0: 32'h6a09e667
  };

  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // Compression-side sums (act on a and e).
  function automatic word_t big_sigma0(word_t x);
    return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction

  function automatic word_t big_sigma1(word_t x);
    return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction

  // Message-schedule sigmas.
  function automatic word_t small_sigma0(word_t x);
    return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3);
  endfunction

  function automatic word_t small_sigma1(word_t x);
    return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

  function automatic word_t ch(word_t x, word_t y, word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(word_t x, word_t y, word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

endpackage
