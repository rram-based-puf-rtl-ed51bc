// row_decoder: binary to one-hot word-line decoder (6:64 by default).
//
// With `en` high exactly one word line, wl[addr], is raised; with `en` low
// none is. Combinational. In the embedded PUF one such decoder is shared by
// both PUF arrays and is addressed by the SHA-256 round number, so round t
// reads row t of each array.
module row_decoder #(
  parameter int unsigned ADDR_W = 6
) (
  input  logic                 en,
  input  logic [ADDR_W-1:0]    addr,
  output logic [2**ADDR_W-1:0] wl
);

  always_comb begin
    wl = '0;
    if (en) wl[addr] = 1'b1;
  end

endmodule
