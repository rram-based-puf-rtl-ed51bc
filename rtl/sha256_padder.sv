// sha256_padder: pads a short message to one 512-bit SHA-256 block.
//
// The message of `len` bits (0..447) sits left-aligned in `msg`: its first
// bit is msg[447] and bits below msg[447-len+1] are ignored. The block is
// the message, a single 1 bit, zeros up to bit 448, then `len` as a 64-bit
// big-endian number: L + 1 + k = 448, plus 64 length bits. Purely
// combinational. Only single-block messages are handled, which is the
// case the design is built around (one challenge, one block).
module sha256_padder #(
  parameter int unsigned MSG_BITS = 447
) (
  input  logic [MSG_BITS-1:0] msg,
  input  logic [8:0]          len,    // message length in bits, <= 447
  output logic [511:0]        block
);

  logic [447:0] body;
  logic [447:0] keep_mask;
  logic [447:0] one_bit;

  always_comb begin
    body = '0;
    body[447 -: MSG_BITS] = msg;
    // keep the top `len` bits, set the bit right after them
    keep_mask = ~({448{1'b1}} >> len);
    one_bit   = {1'b1, 447'b0} >> len;
    block     = {(body & keep_mask) | one_bit, 55'b0, len};
  end

endmodule
