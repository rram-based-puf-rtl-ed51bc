// tb_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL (no RTL package is imported):
//  * sha256_ref: SHA-256 compression of one 512-bit block from the
//    standard initial hash (initial words and round constants computed
//    from square and cube roots of the first primes), with an optional 32-bit XOR mask applied to the
//    message word of each round (all-zero masks give plain SHA-256);
//  * sha256_pad_ref: bit-by-bit single-block padding;
//  * aes_sbox_ref: S-box by exhaustive search for the GF(2^8) inverse
//    followed by the affine map written bit by bit;
//  * aes128_ref: textbook AES-128 encryption with a full 44-word key
//    schedule.
package tb_ref_pkg;

  function automatic logic [31:0] ror(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // t-th prime, t = 0 -> 2
  function automatic int nth_prime(input int t);
    int n, found;
    bit is_p;
    n = 1; found = -1;
    while (found < t) begin
      n++;
      is_p = 1'b1;
      for (int d = 2; d * d <= n; d++) if (n % d == 0) is_p = 1'b0;
      if (is_p) found++;
    end
    return n;
  endfunction

  // first 32 bits of the fractional part of p^(1/exp_inv)
  function automatic logic [31:0] frac_root(input int p, input real exp_inv);
    real x, f;
    x = real'(p) ** (1.0 / exp_inv);
    f = x - $floor(x);
    return 32'(longint'($floor(f * 4294967296.0)));
  endfunction

  // Round constant: cube root of the t-th prime
  function automatic logic [31:0] k_const(input int t);
    return frac_root(nth_prime(t), 3.0);
  endfunction

  // Expanded message schedule W_0..W_63 of a block
  function automatic void sha256_w_ref(input logic [511:0] blk, output logic [31:0] w [64]);
    for (int t = 0; t < 16; t++) w[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 64; t++)
      w[t] = (ror(w[t-2], 17) ^ ror(w[t-2], 19) ^ (w[t-2] >> 10)) + w[t-7]
           + (ror(w[t-15], 7) ^ ror(w[t-15], 18) ^ (w[t-15] >> 3)) + w[t-16];
  endfunction

  function automatic logic [255:0] sha256_ref(input logic [511:0] blk, input logic [31:0] mask [64]);
    logic [31:0] w [64];
    logic [31:0] hh [8];
    logic [31:0] a, b, c, d, e, f, g, h, t1, t2;
    for (int i = 0; i < 8; i++) hh[i] = frac_root(nth_prime(i), 2.0);  // square roots
    sha256_w_ref(blk, w);
    a = hh[0]; b = hh[1]; c = hh[2]; d = hh[3];
    e = hh[4]; f = hh[5]; g = hh[6]; h = hh[7];
    for (int t = 0; t < 64; t++) begin
      t1 = h + (ror(e, 6) ^ ror(e, 11) ^ ror(e, 25)) + ((e & f) ^ (~e & g))
             + k_const(t) + (w[t] ^ mask[t]);
      t2 = (ror(a, 2) ^ ror(a, 13) ^ ror(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
      h = g; g = f; f = e; e = d + t1;
      d = c; c = b; b = a; a = t1 + t2;
    end
    return {hh[0] + a, hh[1] + b, hh[2] + c, hh[3] + d,
            hh[4] + e, hh[5] + f, hh[6] + g, hh[7] + h};
  endfunction

  // message of len bits, first bit at msg[446]
  function automatic logic [511:0] sha256_pad_ref(input logic [446:0] msg, input int len);
    logic [511:0] blk;
    blk = '0;
    for (int i = 0; i < len; i++) blk[511 - i] = msg[446 - i];
    blk[511 - len] = 1'b1;
    blk[63:0] = 64'(len);
    return blk;
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p = p ^ (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p = p ^ (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic logic [7:0] aes_sbox_ref(input logic [7:0] x);
    logic [7:0] inv, s;
    logic [7:0] cc;
    inv = 8'h00;
    for (int y = 1; y < 256; y++) if (gmul(x, 8'(y)) == 8'h01) inv = 8'(y);
    cc = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ cc[i];
    return s;
  endfunction

  function automatic logic [127:0] aes128_ref(input logic [127:0] key, input logic [127:0] pt);
    logic [31:0] w [44];
    logic [7:0]  s [4][4];
    logic [7:0]  tmp [4][4];
    logic [7:0]  sb [256];
    logic [31:0] t;
    logic [7:0]  rc;
    logic [127:0] ct;
    for (int i = 0; i < 256; i++) sb[i] = aes_sbox_ref(8'(i));
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t = t ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      s[r][c] = pt[127 - 8*(4*c + r) -: 8] ^ w[c][31 - 8*r -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) tmp[r][c] = sb[s[r][(c + r) % 4]];
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin
          s[0][c] = gmul(tmp[0][c], 2) ^ gmul(tmp[1][c], 3) ^ tmp[2][c] ^ tmp[3][c];
          s[1][c] = tmp[0][c] ^ gmul(tmp[1][c], 2) ^ gmul(tmp[2][c], 3) ^ tmp[3][c];
          s[2][c] = tmp[0][c] ^ tmp[1][c] ^ gmul(tmp[2][c], 2) ^ gmul(tmp[3][c], 3);
          s[3][c] = gmul(tmp[0][c], 3) ^ tmp[1][c] ^ tmp[2][c] ^ gmul(tmp[3][c], 2);
        end
      end else begin
        s = tmp;
      end
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
        s[r][c] = s[r][c] ^ w[4*rnd + c][31 - 8*r -: 8];
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) ct[127 - 8*(4*c + r) -: 8] = s[r][c];
    return ct;
  endfunction

endpackage
