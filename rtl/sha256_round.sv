// sha256_round: combinational SHA-256 round function.
//
// Given the working registers A..H, the round constant K_t and the message
// word W_t, returns A..H after one round:
//   T1 = H + Sigma1(E) + Ch(E,F,G) + K_t + W_t
//   T2 = Sigma0(A) + Maj(A,B,C)
//   A' = T1 + T2,  E' = D + T1,  B'..D' = A..C,  F'..H' = E..G
// All sums are modulo 2^32. This is the datapath of one round; the caller
// registers the result once per clock.
module sha256_round
  import sha256_pkg::*;
(
  input  state_t s_in,
  input  word_t  kt,
  input  word_t  wt,
  output state_t s_out
);

  word_t t1, t2;

  always_comb begin
    t1 = s_in.h + big_sigma1(s_in.e) + ch(s_in.e, s_in.f, s_in.g) + kt + wt;
    t2 = big_sigma0(s_in.a) + maj(s_in.a, s_in.b, s_in.c);
    s_out.a = t1 + t2;
    s_out.b = s_in.a;
    s_out.c = s_in.b;
    s_out.d = s_in.c;
    s_out.e = s_in.d + t1;
    s_out.f = s_in.e;
    s_out.g = s_in.f;
    s_out.h = s_in.g;
  end

endmodule
