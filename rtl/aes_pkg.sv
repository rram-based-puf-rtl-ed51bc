// aes_pkg: GF(2^8) arithmetic and state indexing shared by the AES-128
// blocks.
//
// Bytes are elements of GF(2^8) modulo x^8 + x^4 + x^3 + x + 1 (0x11b).
// The 128-bit state holds 16 bytes in column order: byte n = 4*c + r
// (row r, column c) is bits [127-8n -: 8], so the first input byte is
// state[127:120], as in the AES standard (FIPS-197).
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  localparam int NR = 10;  // rounds of AES-128

  // multiply by x ({02})
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // general multiply
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic byte_t get_byte(input block_t s, input int r, input int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

endpackage
