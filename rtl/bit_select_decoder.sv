// bit_select_decoder: 4:16 decoder turning a 4-bit PUF response into a
// one-hot inversion mask for one 16-bit half of the message word W_t.
//
// sel[bit] = 1 for bit = the unsigned value of `puf` (puf[3] is the most
// significant bit). Always exactly one bit of the mask is set, so exactly
// one bit of the half-word is inverted. Combinational.
module bit_select_decoder #(
  parameter int unsigned IN_W = 4
) (
  input  logic [IN_W-1:0]    puf,
  output logic [2**IN_W-1:0] sel
);

  always_comb begin
    sel = '0;
    sel[puf] = 1'b1;
  end

endmodule
