// tb_bit_select_decoder: every 4-bit input selects exactly one of 16 bits,
// the bit numbered by the input value.
module tb_bit_select_decoder;
  logic [3:0]  puf;
  logic [15:0] sel;
  int checks = 0, failures = 0;

  bit_select_decoder #(.IN_W(4)) dut (.puf(puf), .sel(sel));

  initial begin
    for (int v = 0; v < 16; v++) begin
      puf = 4'(v); #1;
      checks++;
      if (sel !== (16'd1 << v) || $countones(sel) != 1) begin
        failures++; $display("puf %0d sel %b", v, sel);
      end
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
