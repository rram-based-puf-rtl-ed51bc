// sha256_pkg: constants and bit functions shared by the SHA-256 blocks.
//
// Holds the eight initial hash words H0..H7 that are loaded into the
// working registers A..H before round 0, and the word functions used by
// the round datapath and the message schedule:
//   Ch(E,F,G)  = (E & F) ^ (~E & G)
//   Maj(A,B,C) = (A & B) ^ (A & C) ^ (B & C)
//   Sigma0(A)  = rotr(A,2)  ^ rotr(A,13) ^ rotr(A,22)
//   Sigma1(E)  = rotr(E,6)  ^ rotr(E,11) ^ rotr(E,25)
//   sigma0(W)  = rotr(W,7)  ^ rotr(W,18) ^ (W >> 3)
//   sigma1(W)  = rotr(W,17) ^ rotr(W,19) ^ (W >> 10)
// All additions elsewhere are modulo 2^32 (32-bit wrap-around).
// The rotate and shift amounts are those of the SHA-256 standard
// (FIPS 180-4); the initial hash words are the standard ones.
package sha256_pkg;

  typedef logic [31:0] word_t;

  localparam int ROUNDS = 64;

  localparam word_t H_INIT [8] = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  // Working registers A..H
  typedef struct packed {
    word_t a, b, c, d, e, f, g, h;
  } state_t;

  function automatic word_t rotr(input word_t x, input int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic word_t ch(input word_t e, input word_t f, input word_t g);
    return (e & f) ^ (~e & g);
  endfunction

  function automatic word_t maj(input word_t a, input word_t b, input word_t c);
    return (a & b) ^ (a & c) ^ (b & c);
  endfunction

  function automatic word_t big_sigma0(input word_t a);
    return rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22);
  endfunction

  function automatic word_t big_sigma1(input word_t e);
    return rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25);
  endfunction

  function automatic word_t small_sigma0(input word_t w);
    return rotr(w, 7) ^ rotr(w, 18) ^ (w >> 3);
  endfunction

  function automatic word_t small_sigma1(input word_t w);
    return rotr(w, 17) ^ rotr(w, 19) ^ (w >> 10);
  endfunction

  // Initial working state built from H_INIT
  function automatic state_t init_state();
    state_t s;
    s.a = H_INIT[0]; s.b = H_INIT[1]; s.c = H_INIT[2]; s.d = H_INIT[3];
    s.e = H_INIT[4]; s.f = H_INIT[5]; s.g = H_INIT[6]; s.h = H_INIT[7];
    return s;
  endfunction

endpackage
