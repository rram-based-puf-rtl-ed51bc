// tb_aes_mix_columns: the standard test column db 13 53 45 -> 8e 4d a1 bc,
// the AES standard's first-round example, and random states against the
// matrix product computed with a generic GF(2^8) multiply.
module tb_aes_mix_columns;
  import tb_ref_pkg::*;

  logic [127:0] sin, sout, expd;
  int checks = 0, failures = 0;
  int mat [4][4] = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{3, 1, 1, 2}};

  aes_mix_columns dut (.state_in(sin), .state_out(sout));

  initial begin
    sin = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6}; #1;
    checks++;
    if (sout !== {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}) begin
      failures++; $display("known columns: %h", sout);
    end
    sin = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    checks++;
    if (sout !== 128'h046681e5e0cb199a48f8d37a2806264c) begin failures++; $display("FIPS round 1: %h", sout); end
    for (int n = 0; n < 100; n++) begin
      sin = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
        logic [7:0] acc;
        acc = '0;
        for (int k = 0; k < 4; k++) acc ^= gmul(8'(mat[r][k]), sin[127 - 8*(4*c + k) -: 8]);
        expd[127 - 8*(4*c + r) -: 8] = acc;
      end
      checks++;
      if (sout !== expd) begin failures++; $display("in %h out %h exp %h", sin, sout, expd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
