// tb_sha256_k_rom: checks all 64 round constants against the first 32
// fractional bits of the cube roots of the first 64 primes, computed here
// in floating point.
module tb_sha256_k_rom;
  import tb_ref_pkg::*;

  logic [5:0]  round;
  logic [31:0] k;
  int checks = 0, failures = 0;

  sha256_k_rom dut (.round(round), .k(k));

  initial begin
    for (int t = 0; t < 64; t++) begin
      round = 6'(t);
      #1;
      checks++;
      if (k !== k_const(t)) begin
        failures++;
        $display("K[%0d] = %h, expected %h", t, k, k_const(t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
