// aes128_core: iterative AES-128 encryption, two clocks per round.
//
// A `start` pulse (accepted when idle) performs the initial AddRoundKey,
// state = plaintext ^ key, and loads the cipher key as round key 0. Each
// of the 10 rounds then takes two clocks:
//   phase 0: state <= ShiftRows(SubBytes(state))
//   phase 1: round key i = KeyExpand(round key i-1, Rcon[i]);
//            state <= MixColumns(state) ^ round key i   (rounds 1..9)
//            state <= state ^ round key 10               (final round)
// so the ciphertext is registered and `done` pulses 20 clocks after the
// start edge (20 ns at a 1 ns clock). Rcon starts at {01} and is doubled
// in GF(2^8) after every round. `ciphertext` holds until the next block
// finishes. Keys are expanded on the fly; no key table is stored.
module aes128_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t plaintext,
  output logic   busy,
  output logic   done,
  output block_t ciphertext
);

  block_t state, rk, rk_next, ss_out, mc_out;
  byte_t  rcon;
  logic [3:0] rnd;     // round 1..10
  logic       phase;

  aes_sub_shift   u_ss (.state_in(state), .state_out(ss_out));
  aes_mix_columns u_mc (.state_in(state), .state_out(mc_out));
  aes_key_expand  u_ke (.key_in(rk), .rcon(rcon), .key_out(rk_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= '0;
      rk         <= '0;
      rcon       <= 8'h01;
      rnd        <= '0;
      phase      <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
      ciphertext <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state <= plaintext ^ key;      // initial round: AddRoundKey
        rk    <= key;
        rcon  <= 8'h01;
        rnd   <= 4'd1;
        phase <= 1'b0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (!phase) begin
          state <= ss_out;
          phase <= 1'b1;
        end else begin
          rk    <= rk_next;
          rcon  <= xtime(rcon);
          phase <= 1'b0;
          if (rnd == 4'(NR)) begin
            state      <= state ^ rk_next;
            ciphertext <= state ^ rk_next;
            busy       <= 1'b0;
            done       <= 1'b1;
          end else begin
            state <= mc_out ^ rk_next;
            rnd   <= rnd + 4'd1;
          end
        end
      end
    end
  end

endmodule
