// epuf_aes_system: device-specific hashing and encryption built on an
// embedded RRAM PUF.
//
// The embedded PUF (epuf) hashes a challenge with SHA-256 whose message
// words are altered, round by round, by bits stored in two RRAM PUF arrays,
// so the 256-bit digest depends on the chip. The system uses it in two
// ways:
//  * authentication (op_encrypt = 0): the digest of the challenge is the
//    device's response; a verifier holding the chip's PUF data recomputes
//    it and compares;
//  * key generation + encryption (op_encrypt = 1): digest[255:128] becomes
//    the AES-128 cipher key and `plaintext` is encrypted with it. The low
//    128 digest bits are dropped and the key never leaves the chip; only
//    the ciphertext is output (`digest` is then not updated).
//
// Sequence: pulse `prog_start` once to self-program the PUF arrays and wait
// for `prog_done`. Then an `op_start` pulse (taken when idle) latches the
// challenge, the plaintext and the mode. `done` pulses once at the end with
// `digest` or `ciphertext` valid: 66 clocks after the `op_start` edge for
// authentication (one clock to start the hash, 64 rounds, one to register
// the result) and 88 clocks for encryption (66, then one to start AES and
// its 20 clocks, plus one to register). While busy, `op_start` and
// `prog_start` are ignored.
module epuf_aes_system #(
  parameter int unsigned CELLS_PER_BIT = 8,
  parameter int unsigned SEED_HI       = 32'h5eed_0001,
  parameter int unsigned SEED_LO       = 32'h5eed_0002
) (
  input  logic         clk,
  input  logic         rst_n,
  // PUF self-programming
  input  logic         prog_start,
  output logic         prog_done,
  // operation request
  input  logic         op_start,
  input  logic         op_encrypt,
  input  logic [446:0] challenge,
  input  logic [8:0]   challenge_len,
  input  logic [127:0] plaintext,
  // results
  output logic         busy,
  output logic         done,
  output logic [255:0] digest,
  output logic [127:0] ciphertext
);

  typedef enum logic [1:0] {S_IDLE, S_HASH, S_AES} state_e;

  state_e       state;
  logic         enc_q;
  logic [446:0] chal_q;
  logic [8:0]   len_q;
  logic [127:0] pt_q;

  logic         epuf_start, epuf_busy, epuf_done;
  logic [255:0] epuf_digest;
  logic         aes_start, aes_done;
  logic [127:0] aes_ct;

  epuf #(
    .CELLS_PER_BIT (CELLS_PER_BIT),
    .SEED_HI       (SEED_HI),
    .SEED_LO       (SEED_LO)
  ) u_epuf (
    .clk        (clk),
    .rst_n      (rst_n),
    .prog_start (prog_start && state == S_IDLE),
    .prog_done  (prog_done),
    .start      (epuf_start),
    .msg        (chal_q),
    .len        (len_q),
    .busy       (epuf_busy),
    .done       (epuf_done),
    .digest     (epuf_digest)
  );

  aes128_core u_aes (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (aes_start),
    .key        (epuf_digest[255:128]),
    .plaintext  (pt_q),
    .busy       (),
    .done       (aes_done),
    .ciphertext (aes_ct)
  );

  assign busy = (state != S_IDLE) || epuf_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      enc_q      <= 1'b0;
      chal_q     <= '0;
      len_q      <= '0;
      pt_q       <= '0;
      epuf_start <= 1'b0;
      aes_start  <= 1'b0;
      done       <= 1'b0;
      digest     <= '0;
      ciphertext <= '0;
    end else begin
      done       <= 1'b0;
      epuf_start <= 1'b0;
      aes_start  <= 1'b0;
      unique case (state)
        S_IDLE: if (op_start && !epuf_busy) begin
          enc_q      <= op_encrypt;
          chal_q     <= challenge;
          len_q      <= challenge_len;
          pt_q       <= plaintext;
          epuf_start <= 1'b1;
          state      <= S_HASH;
        end
        S_HASH: if (epuf_done) begin
          if (enc_q) begin
            aes_start <= 1'b1;
            state     <= S_AES;
          end else begin
            digest <= epuf_digest;
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        S_AES: if (aes_done) begin
          ciphertext <= aes_ct;
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
