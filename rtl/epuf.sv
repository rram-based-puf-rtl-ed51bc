// epuf: Embedded PUF -- SHA-256 with an RRAM PUF in its message-word path.
//
// A challenge message (up to 447 bits, left-aligned in `msg`, `len` bits
// long) is padded to one 512-bit block and hashed by an iterative SHA-256
// core, one round per clock. In every round t the message word W_t leaving
// the schedule passes through the PUF bit-inversion unit before entering
// the round: one bit of its upper half and one of its lower half are
// inverted at positions read from row t of two RRAM PUF arrays. The
// schedule recurrence and the round constants are untouched, so the hash
// structure is standard SHA-256; only the per-round words differ from chip
// to chip, which makes the 256-bit digest device specific while the PUF
// bits themselves never leave the block.
//
// Operation: pulse `prog_start` once after power-up to self-program the
// arrays (`prog_done` after 2*64+1 clocks). Then each `start` pulse hashes
// the current challenge; `done` pulses 64 clocks later with `digest` valid.
// A `start` while programming or hashing is ignored.
module epuf #(
  parameter int unsigned CELLS_PER_BIT = 8,
  parameter int unsigned SEED_HI       = 32'h5eed_0001,
  parameter int unsigned SEED_LO       = 32'h5eed_0002
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         prog_start,
  output logic         prog_done,
  input  logic         start,
  input  logic [446:0] msg,
  input  logic [8:0]   len,
  output logic         busy,
  output logic         done,
  output logic [255:0] digest
);

  logic [511:0] block;
  logic [5:0]   round;
  logic [31:0]  wt_raw, wt_use;
  logic         prog_busy, sha_busy;

  sha256_padder #(.MSG_BITS(447)) u_pad (
    .msg   (msg),
    .len   (len),
    .block (block)
  );

  sha256_core u_sha (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start && !prog_busy),
    .block  (block),
    .busy   (sha_busy),
    .round  (round),
    .wt_raw (wt_raw),
    .wt_use (wt_use),
    .done   (done),
    .digest (digest)
  );

  puf_wt_modifier #(
    .ROWS (64), .CELLS_PER_BIT (CELLS_PER_BIT),
    .SEED_HI (SEED_HI), .SEED_LO (SEED_LO)
  ) u_puf (
    .clk        (clk),
    .rst_n      (rst_n),
    .prog_start (prog_start && !sha_busy),
    .prog_busy  (prog_busy),
    .prog_done  (prog_done),
    .rd_en      (sha_busy),
    .round      (round),
    .wt_in      (wt_raw),
    .wt_out     (wt_use),
    .flip_mask  ()
  );

  assign busy = sha_busy || prog_busy;

endmodule
