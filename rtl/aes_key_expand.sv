// aes_key_expand: one step of the AES-128 key schedule (Nk = 4).
//
// From round key i (words w0..w3, w0 = key_in[127:96]) and the round
// constant Rcon[i+1] it forms round key i+1:
//   w4 = w0 ^ SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   w5 = w1 ^ w4,  w6 = w2 ^ w5,  w7 = w3 ^ w6
// RotWord turns [a0,a1,a2,a3] into [a1,a2,a3,a0]; SubWord applies the
// S-box to each byte. Combinational, four S-boxes. Applied ten times in
// turn it yields the 44-word expanded key, one round key per AES round.
module aes_key_expand
  import aes_pkg::*;
(
  input  block_t key_in,
  input  byte_t  rcon,
  output block_t key_out
);

  logic [31:0] w0, w1, w2, w3, w4, w5, w6, w7, rot, sub;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.in(rot[8*i +: 8]), .out(sub[8*i +: 8]));
  end

  assign w4 = w0 ^ sub ^ {rcon, 24'h0};
  assign w5 = w1 ^ w4;
  assign w6 = w2 ^ w5;
  assign w7 = w3 ^ w6;
  assign key_out = {w4, w5, w6, w7};

endmodule
