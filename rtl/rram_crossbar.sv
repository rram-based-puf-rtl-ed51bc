// rram_crossbar: behavioural model of an RRAM crossbar whose cells are
// grouped CELLS_PER_BIT to a PUF bit. Not synthesizable logic: it stands
// for the analog array and is written for simulation only.
//
// Each cell is a read current in nA at the read voltage. The as-fabricated
// array (simulation time 0) gets a device-specific spread of currents drawn
// from a hash of SEED, row and column: this spread is the PUF's entropy.
// The CELLS_PER_BIT cells of one bit are wired to one bit line, so reading
// a row (one-hot word line `wl`) yields, for each bit, the sum of its cells'
// currents on `bl_na`. With no word line raised every bit line reads 0.
//
// Programming: on a rising clock edge, for the selected row, every cell of
// a bit with `set_en` goes to the low resistance state (LRS) and every cell
// of a bit with `reset_en` to the high resistance state (HRS). The
// programmed current of each cell is again device specific: LRS currents
// lie in LRS_MIN_NA..LRS_MAX_NA (7..15 uA, as in the retention study of a
// single cell) and HRS currents in HRS_MIN_NA..HRS_MAX_NA, chosen here to
// give the on/off ratio above 10x that the programmed array shows.
//
// Drift of a cell (retention loss, read disturbance) is not modelled over
// time; a test can impose it with the task set_cell_na().
module rram_crossbar #(
  parameter int unsigned ROWS          = 64,
  parameter int unsigned BITS          = 4,
  parameter int unsigned CELLS_PER_BIT = 8,
  parameter int unsigned SEED          = 32'h1234_5678,
  parameter int unsigned FRESH_MIN_NA  = 1000,
  parameter int unsigned FRESH_MAX_NA  = 9000,
  parameter int unsigned LRS_MIN_NA    = 7000,
  parameter int unsigned LRS_MAX_NA    = 15000,
  parameter int unsigned HRS_MIN_NA    = 300,
  parameter int unsigned HRS_MAX_NA    = 1000
) (
  input  logic                      clk,
  input  logic [ROWS-1:0]           wl,        // one-hot word lines
  input  logic [BITS-1:0]           set_en,    // program bit's cells to LRS
  input  logic [BITS-1:0]           reset_en,  // program bit's cells to HRS
  output logic [BITS-1:0][31:0]     bl_na      // summed bit-line currents, nA
);

  localparam int unsigned COLS = BITS * CELLS_PER_BIT;

  int unsigned cell_na [ROWS][COLS];

  // 32-bit integer hash (xorshift-multiply finaliser)
  function automatic int unsigned mix(input int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic int unsigned draw(input int r, input int c,
                                       input int unsigned salt,
                                       input int unsigned lo, input int unsigned hi);
    int unsigned h;
    h = mix(SEED ^ mix(32'(r) * 32'h0001_0001 + 32'(c) + 1) ^ mix(salt));
    return lo + (h % (hi - lo + 1));
  endfunction

  initial begin
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++)
        cell_na[r][c] = draw(r, c, 1, FRESH_MIN_NA, FRESH_MAX_NA);
  end

  // Test hook: impose a drifted read current on one cell.
  task automatic set_cell_na(input int r, input int c, input int unsigned na);
    cell_na[r][c] = na;
  endtask

  always @(posedge clk) begin
    for (int r = 0; r < int'(ROWS); r++) begin
      if (wl[r]) begin
        for (int b = 0; b < int'(BITS); b++) begin
          for (int k = 0; k < int'(CELLS_PER_BIT); k++) begin
            if (set_en[b])
              cell_na[r][b*CELLS_PER_BIT+k] <= draw(r, b*CELLS_PER_BIT+k, 2, LRS_MIN_NA, LRS_MAX_NA);
            else if (reset_en[b])
              cell_na[r][b*CELLS_PER_BIT+k] <= draw(r, b*CELLS_PER_BIT+k, 3, HRS_MIN_NA, HRS_MAX_NA);
          end
        end
      end
    end
  end

  always_comb begin
    for (int b = 0; b < int'(BITS); b++) begin
      bl_na[b] = '0;
      for (int r = 0; r < int'(ROWS); r++)
        if (wl[r])
          for (int k = 0; k < int'(CELLS_PER_BIT); k++)
            bl_na[b] = bl_na[b] + cell_na[r][b*CELLS_PER_BIT+k];
    end
  end

endmodule
