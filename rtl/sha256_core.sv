// sha256_core: iterative SHA-256 compression of one 512-bit block.
//
// One round per clock. A `start` pulse (accepted when not busy) loads the
// working registers A..H with H0..H7 and the message schedule with the
// block; the next 64 clocks compute rounds t = 0..63. On the clock of
// round 63 the digest H_i + {A..H} is registered and `done` pulses high for
// one cycle, 64 clocks after the start edge (320 ns at the 5 ns round
// clock). `digest` holds its value until the next block finishes;
// digest[255:224] is the first hash word.
//
// The message word is routed out and back in: `wt_raw` is W_t from the
// schedule and `wt_use` is the word the round actually consumes. Tying
// `wt_use` to `wt_raw` gives plain SHA-256; the embedded-PUF wrapper puts
// its bit-inversion logic in between. `round` is the number t of the
// round being computed while `busy` is high.
module sha256_core
  import sha256_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [511:0] block,
  output logic         busy,
  output logic [5:0]   round,
  output word_t        wt_raw,
  input  word_t        wt_use,
  output logic         done,
  output logic [255:0] digest
);

  state_t st, st_next;
  word_t  kt;
  logic   load;

  assign load = start && !busy;

  sha256_msg_schedule u_sched (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .block   (block),
    .advance (busy),
    .wt      (wt_raw)
  );

  sha256_k_rom u_krom (
    .round (round),
    .k     (kt)
  );

  sha256_round u_round (
    .s_in  (st),
    .kt    (kt),
    .wt    (wt_use),
    .s_out (st_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= '0;
      busy   <= 1'b0;
      round  <= '0;
      done   <= 1'b0;
      digest <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        st    <= init_state();
        busy  <= 1'b1;
        round <= '0;
      end else if (busy) begin
        st    <= st_next;
        round <= round + 6'd1;
        if (32'(round) == ROUNDS - 1) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          digest <= {H_INIT[0] + st_next.a, H_INIT[1] + st_next.b,
                     H_INIT[2] + st_next.c, H_INIT[3] + st_next.d,
                     H_INIT[4] + st_next.e, H_INIT[5] + st_next.f,
                     H_INIT[6] + st_next.g, H_INIT[7] + st_next.h};
        end
      end
    end
  end

endmodule
