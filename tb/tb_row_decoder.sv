// tb_row_decoder: all 64 addresses with enable high give exactly the one
// expected word line; with enable low no word line is raised.
module tb_row_decoder;
  logic        en;
  logic [5:0]  addr;
  logic [63:0] wl;
  int checks = 0, failures = 0;

  row_decoder #(.ADDR_W(6)) dut (.en(en), .addr(addr), .wl(wl));

  initial begin
    for (int a = 0; a < 64; a++) begin
      en = 1; addr = 6'(a); #1;
      checks++;
      if (wl !== (64'd1 << a)) begin failures++; $display("addr %0d wl %h", a, wl); end
      en = 0; #1;
      checks++;
      if (wl !== '0) begin failures++; $display("addr %0d disabled wl %h", a, wl); end
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
