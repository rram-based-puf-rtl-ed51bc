// tb_rram_sense_amp: random bit-line and reference currents, equal
// currents and the enable; output must be (en && i_bl > i_ref).
module tb_rram_sense_amp;
  logic        en, out;
  logic [31:0] i_bl, i_ref;
  int checks = 0, failures = 0;

  rram_sense_amp dut (.en(en), .i_bl_na(i_bl), .i_ref_na(i_ref), .out(out));

  task automatic check(input logic e, input int unsigned b, input int unsigned r);
    en = e; i_bl = b; i_ref = r; #1;
    checks++;
    if (out !== (e && b > r)) begin
      failures++; $display("en %0d bl %0d ref %0d out %0d", e, b, r, out);
    end
  endtask

  initial begin
    check(1, 24001, 24000); check(1, 24000, 24000); check(1, 23999, 24000);
    check(0, 90000, 24000);
    for (int i = 0; i < 500; i++) check(1'($urandom), $urandom_range(0, 100000), $urandom_range(0, 100000));
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
