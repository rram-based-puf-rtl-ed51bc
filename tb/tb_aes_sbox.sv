// tb_aes_sbox: all 256 inputs against an S-box built by exhaustive
// inverse search; also spot values from the AES standard and the fact that
// the S-box is a permutation.
module tb_aes_sbox;
  import tb_ref_pkg::*;

  logic [7:0] in, out;
  bit   seen [256];
  int checks = 0, failures = 0;

  aes_sbox dut (.in(in), .out(out));

  initial begin
    for (int v = 0; v < 256; v++) begin
      in = 8'(v); #1;
      checks++;
      if (out !== aes_sbox_ref(8'(v))) begin
        failures++; $display("S(%h) = %h expected %h", v, out, aes_sbox_ref(8'(v)));
      end
      seen[out] = 1'b1;
    end
    in = 8'h00; #1; checks++; if (out !== 8'h63) failures++;
    in = 8'h53; #1; checks++; if (out !== 8'hed) failures++;
    in = 8'hff; #1; checks++; if (out !== 8'h16) failures++;
    checks++;
    foreach (seen[i]) if (!seen[i]) begin failures++; break; end
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
