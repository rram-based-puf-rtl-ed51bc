// tb_aes_key_expand: chains ten steps from the AES standard's example key
// 2b7e1516 28aed2a6 abf71588 09cf4f3c and checks the first and last round
// keys against the published schedule, with Rcon generated here by
// doubling in GF(2^8).
module tb_aes_key_expand;
  import tb_ref_pkg::*;

  logic [127:0] kin, kout;
  logic [7:0]   rcon;
  int checks = 0, failures = 0;

  aes_key_expand dut (.key_in(kin), .rcon(rcon), .key_out(kout));

  initial begin
    kin = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    rcon = 8'h01;
    for (int i = 1; i <= 10; i++) begin
      #1;
      if (i == 1) begin
        checks++;
        if (kout !== 128'ha0fafe1788542cb123a339392a6c7605) begin failures++; $display("rk1 %h", kout); end
      end
      if (i == 10) begin
        checks++;
        if (kout !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("rk10 %h", kout); end
      end
      kin = kout;
      rcon = gmul(rcon, 8'h02);
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
