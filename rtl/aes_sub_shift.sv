// aes_sub_shift: SubBytes followed by ShiftRows on the 128-bit state.
//
// Every byte goes through an S-box; row r of the result is then rotated
// left by r byte positions (row 0 unchanged, rows 1..3 by 1..3):
//   out[r][c] = S(in[r][(c + r) mod 4]).
// Combinational, 16 S-boxes.
module aes_sub_shift
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  byte_t sb [16];

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    aes_sbox u_sbox (.in(state_in[127 - 8*n -: 8]), .out(sb[n]));
  end

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(4*c + r) -: 8] = sb[4*((c + r) % 4) + r];
  end

endmodule
