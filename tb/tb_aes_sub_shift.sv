// tb_aes_sub_shift: random states; each output byte (r,c) must be the
// S-box of input byte (r, (c+r) mod 4). Plus the first-round value of the
// AES standard's example (after SubBytes and ShiftRows).
module tb_aes_sub_shift;
  import tb_ref_pkg::*;

  logic [127:0] sin, sout, expd;
  int checks = 0, failures = 0;

  aes_sub_shift dut (.state_in(sin), .state_out(sout));

  initial begin
    for (int n = 0; n < 100; n++) begin
      sin = {$urandom, $urandom, $urandom, $urandom}; #1;
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
        expd[127 - 8*(4*c + r) -: 8] = aes_sbox_ref(sin[127 - 8*(4*((c + r) % 4) + r) -: 8]);
      checks++;
      if (sout !== expd) begin failures++; $display("in %h out %h exp %h", sin, sout, expd); end
    end
    sin = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    checks++;
    if (sout !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin failures++; $display("FIPS round 1: %h", sout); end
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
