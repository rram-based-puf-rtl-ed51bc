// aes_mix_columns: MixColumns on the 128-bit state.
//
// Each column (a0..a3) is multiplied in GF(2^8) by the circulant matrix
//   [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2],
// i.e. by c(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4 + 1.
// {02}a is xtime(a) and {03}a is xtime(a) ^ a. Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a0, a1, a2, a3;
      a0 = get_byte(state_in, 0, c);
      a1 = get_byte(state_in, 1, c);
      a2 = get_byte(state_in, 2, c);
      a3 = get_byte(state_in, 3, c);
      state_out[127 - 8*(4*c + 0) -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      state_out[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      state_out[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      state_out[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
  end

endmodule
