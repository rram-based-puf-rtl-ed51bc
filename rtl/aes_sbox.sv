// aes_sbox: Rijndael S-box, computed rather than tabulated.
//
// out = A(in^-1) ^ 0x63, where in^-1 is the multiplicative inverse in
// GF(2^8) (0 maps to 0) and A is the AES affine map
//   b = a ^ rotl(a,1) ^ rotl(a,2) ^ rotl(a,3) ^ rotl(a,4).
// The inverse is taken as in^254 by square-and-multiply. Combinational;
// the result is identical to the standard 256-entry table.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in,
  output byte_t out
);

  function automatic byte_t rotl8(input byte_t a, input int n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  byte_t inv;

  always_comb begin
    // in^254 = in^(2+4+8+16+32+64+128)
    byte_t sq, acc;
    sq  = gf_mul(in, in);          // in^2
    acc = sq;
    for (int i = 0; i < 6; i++) begin
      sq  = gf_mul(sq, sq);        // in^4, in^8, ..., in^128
      acc = gf_mul(acc, sq);
    end
    inv = acc;
    out = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  end

endmodule
