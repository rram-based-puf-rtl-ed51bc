// rram_puf_array: one RRAM PUF array with its sense amplifiers.
// Behavioural model (it contains the analog crossbar and sense-amplifier
// models); the reference selection is the only logic of its own.
//
// ROWS x BITS PUF bits, each bit stored in CELLS_PER_BIT RRAM cells wired in
// parallel to one bit line, so the array has ROWS x (BITS*CELLS_PER_BIT)
// cells (64 x 32 for the default 8 cells per bit). A one-hot word line
// selects the row; BITS sense amplifiers compare the summed bit-line
// currents with a reference and give the BITS-bit response `resp`
// combinationally.
//
// Two references are used:
//  * read (prog_mode = 0): CELLS_PER_BIT x I_FAIL_NA, i.e. the single-cell
//    failure current of 3 uA scaled by the number of cells per bit
//    (6, 12, 24 uA for 2, 4, 8 cells), so a bit still reads 1 as long as
//    its cells together carry more than that;
//  * programming (prog_mode = 1): CELLS_PER_BIT x PROG_REF_NA, a level
//    inside the as-fabricated current distribution against which each bit
//    is first sorted during self-programming.
// `set_en`/`reset_en` program the selected row's bits on the clock edge.
module rram_puf_array #(
  parameter int unsigned ROWS          = 64,
  parameter int unsigned BITS          = 4,
  parameter int unsigned CELLS_PER_BIT = 8,
  parameter int unsigned SEED          = 32'h1234_5678,
  parameter int unsigned I_FAIL_NA     = 3000,
  parameter int unsigned PROG_REF_NA   = 5000
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,
  input  logic            rd_en,
  input  logic            prog_mode,
  input  logic [BITS-1:0] set_en,
  input  logic [BITS-1:0] reset_en,
  output logic [BITS-1:0] resp
);

  logic [BITS-1:0][31:0] bl_na;
  logic [31:0]           i_ref_na;

  assign i_ref_na = prog_mode ? 32'(CELLS_PER_BIT * PROG_REF_NA)
                              : 32'(CELLS_PER_BIT * I_FAIL_NA);

  rram_crossbar #(
    .ROWS          (ROWS),
    .BITS          (BITS),
    .CELLS_PER_BIT (CELLS_PER_BIT),
    .SEED          (SEED)
  ) u_xbar (
    .clk      (clk),
    .wl       (wl),
    .set_en   (set_en),
    .reset_en (reset_en),
    .bl_na    (bl_na)
  );

  for (genvar b = 0; b < BITS; b++) begin : g_sa
    rram_sense_amp u_sa (
      .en       (rd_en),
      .i_bl_na  (bl_na[b]),
      .i_ref_na (i_ref_na),
      .out      (resp[b])
    );
  end

endmodule
