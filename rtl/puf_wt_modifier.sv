// puf_wt_modifier: the PUF hardware embedded in the SHA-256 datapath.
//
// Two RRAM PUF arrays of ROWS x 4 bits (64 x 4, one row per round, 8 cells
// per bit) share one 6:64 row decoder addressed by the round number t. Each
// array's 4-bit response drives its own 4:16 decoder; the array `u_arr_hi`
// selects one bit of W_t[31:16], the array `u_arr_lo` one bit of W_t[15:0].
// The resulting 32-bit mask, with exactly two bits set, is XORed with W_t:
//   wt_out = wt_in ^ {dec16(resp_hi), dec16(resp_lo)}
// so round t always inverts one bit in each half of the message word, at
// positions fixed by the device.
//
// The read path is combinational (row decoder, sense amplifiers, 4:16
// decoders, XOR) and fits in the round clock. While the self-programming
// sequencer is busy it owns the row decoder and the arrays; `prog_start`
// starts it and `prog_done` pulses when every row is programmed.
// `rd_en` enables a read when the hash core is running.
module puf_wt_modifier #(
  parameter int unsigned ROWS          = 64,
  parameter int unsigned CELLS_PER_BIT = 8,
  parameter int unsigned SEED_HI       = 32'h5eed_0001,
  parameter int unsigned SEED_LO       = 32'h5eed_0002
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    prog_start,
  output logic                    prog_busy,
  output logic                    prog_done,
  input  logic                    rd_en,
  input  logic [$clog2(ROWS)-1:0] round,
  input  logic [31:0]             wt_in,
  output logic [31:0]             wt_out,
  output logic [31:0]             flip_mask
);

  localparam int unsigned AW = $clog2(ROWS);

  logic [AW-1:0]   prog_row, row_addr;
  logic            prog_rd_en, prog_mode;
  logic [7:0]      prog_set, prog_reset;
  logic [ROWS-1:0] wl;
  logic            arr_rd_en;
  logic [3:0]      resp_hi, resp_lo;
  logic [15:0]     sel_hi, sel_lo;

  puf_program_ctrl #(.ROWS(ROWS), .BITS(8)) u_prog (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (prog_start),
    .resp      ({resp_hi, resp_lo}),
    .busy      (prog_busy),
    .done      (prog_done),
    .row       (prog_row),
    .rd_en     (prog_rd_en),
    .prog_mode (prog_mode),
    .set_en    (prog_set),
    .reset_en  (prog_reset)
  );

  assign row_addr  = prog_busy ? prog_row : round;
  assign arr_rd_en = prog_busy ? prog_rd_en : rd_en;

  row_decoder #(.ADDR_W(AW)) u_rowdec (
    .en   (arr_rd_en),
    .addr (row_addr),
    .wl   (wl)
  );

  rram_puf_array #(
    .ROWS (ROWS), .BITS (4), .CELLS_PER_BIT (CELLS_PER_BIT), .SEED (SEED_HI)
  ) u_arr_hi (
    .clk       (clk),
    .wl        (wl),
    .rd_en     (arr_rd_en),
    .prog_mode (prog_mode),
    .set_en    (prog_set[7:4]),
    .reset_en  (prog_reset[7:4]),
    .resp      (resp_hi)
  );

  rram_puf_array #(
    .ROWS (ROWS), .BITS (4), .CELLS_PER_BIT (CELLS_PER_BIT), .SEED (SEED_LO)
  ) u_arr_lo (
    .clk       (clk),
    .wl        (wl),
    .rd_en     (arr_rd_en),
    .prog_mode (prog_mode),
    .set_en    (prog_set[3:0]),
    .reset_en  (prog_reset[3:0]),
    .resp      (resp_lo)
  );

  bit_select_decoder #(.IN_W(4)) u_dec_hi (.puf(resp_hi), .sel(sel_hi));
  bit_select_decoder #(.IN_W(4)) u_dec_lo (.puf(resp_lo), .sel(sel_lo));

  assign flip_mask = {sel_hi, sel_lo};
  assign wt_out    = wt_in ^ flip_mask;

endmodule
