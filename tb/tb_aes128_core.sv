// tb_aes128_core: the two AES-128 examples of the standard, then random
// key/plaintext pairs against the reference model; checks the 20-clock
// latency and that a start while busy is ignored.
module tb_aes128_core;
  import tb_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] key, pt, ct;
  logic         busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_core dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key), .plaintext(pt),
                   .busy(busy), .done(done), .ciphertext(ct));

  task automatic enc(input logic [127:0] k, input logic [127:0] p, input logic [127:0] expd, input bit poke);
    int cyc;
    @(negedge clk); key = k; pt = p; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    if (poke) begin
      key = ~k; pt = ~p; start = 1;
      @(negedge clk); start = 0; cyc++;
    end
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 20) begin failures++; $display("latency %0d, expected 20", cyc); end
    checks++;
    if (ct !== expd) begin failures++; $display("ct %h expected %h", ct, expd); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    enc(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    enc(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32, 1);
    for (int n = 0; n < 10; n++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      enc(k, p, aes128_ref(k, p), n[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
