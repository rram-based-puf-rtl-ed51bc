// sha256_msg_schedule: produces the message word W_t for each round.
//
// A sliding window of the last 16 message words. On `load` the window is
// filled with the sixteen 32-bit words of the padded 512-bit block (word 0
// is block[511:480]), so W_0..W_15 are the block itself. Every `advance`
// shifts the window by one word and appends
//   W_{t+16} = sigma1(W_{t+14}) + W_{t+9} + sigma0(W_{t+1}) + W_t  (mod 2^32),
// which is the usual recurrence written for the word leaving the window.
// `wt` is always the oldest word of the window, i.e. W_t for the round
// being computed. It is registered: it changes one clock after `load` or
// `advance`. The window holds raw schedule words; any PUF modification of
// W_t is applied outside, so the recurrence itself is left as standard
// SHA-256 defines it.
module sha256_msg_schedule
  import sha256_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,     // capture a new block (has priority)
  input  logic [511:0] block,
  input  logic         advance,  // step to the next round
  output word_t        wt        // W_t of the current round
);

  word_t win [16];
  word_t w_new;

  assign w_new = small_sigma1(win[14]) + win[9] + small_sigma0(win[1]) + win[0];
  assign wt    = win[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) win[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 16; i++) win[i] <= block[511 - 32*i -: 32];
    end else if (advance) begin
      for (int i = 0; i < 15; i++) win[i] <= win[i+1];
      win[15] <= w_new;
    end
  end

endmodule
