// puf_program_ctrl: self-programming sequencer for the RRAM PUF arrays.
//
// After fabrication the cells carry a broad spread of read currents. This
// controller sorts every PUF bit into one of two well separated states:
// for each row in turn it reads the row against the programming reference
// (a level inside the as-fabricated distribution) and then programs the
// bits that read above the reference to LRS ("1") and the others to HRS
// ("0"). Two clocks per row:
//   RD : row selected, prog_mode = 1, the sense-amplifier outputs `resp`
//        are captured at the end of the cycle;
//   WR : same row, set_en = captured bits, reset_en = their complement;
//        the arrays program on the closing clock edge.
// `start` (when idle) begins at row 0; `done` pulses for one cycle after
// the last row, 2*ROWS+1 clocks after the start edge. BITS is the total
// number of bits read per row over all arrays driven (2 arrays x 4 bits in
// the embedded PUF). The program enables are held low while reset is
// asserted, so the non-volatile arrays are never written from an
// uninitialised state.
module puf_program_ctrl #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned BITS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [BITS-1:0]          resp,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(ROWS)-1:0]  row,
  output logic                     rd_en,
  output logic                     prog_mode,
  output logic [BITS-1:0]          set_en,
  output logic [BITS-1:0]          reset_en
);

  typedef enum logic [1:0] {IDLE, RD, WR, FIN} state_e;

  state_e         state;
  logic [BITS-1:0] captured;

  assign busy      = (state != IDLE);
  assign rd_en     = (state == RD) || (state == WR);
  assign prog_mode = rd_en;
  // never program while reset is asserted: the register contents are not
  // yet meaningful then, and a stray write would alter the PUF for good
  assign set_en    = (state == WR && rst_n) ? captured  : '0;
  assign reset_en  = (state == WR && rst_n) ? ~captured : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      row      <= '0;
      captured <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= RD;
          row   <= '0;
        end
        RD: begin
          captured <= resp;
          state    <= WR;
        end
        WR: begin
          if (32'(row) == ROWS - 1) begin
            state <= FIN;
          end else begin
            row   <= row + 1'b1;
            state <= RD;
          end
        end
        FIN: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
