// tb_sha256_core: plain SHA-256 (wt_use tied to wt_raw). Checks the digest
// of "abc" and of the empty message against their published values, random
// blocks against the reference model, the 64-clock latency from start to
// done, and that a start while busy is ignored.
module tb_sha256_core;
  import tb_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [511:0] block;
  logic         busy, done;
  logic [5:0]   round;
  logic [31:0]  wt;
  logic [255:0] digest;
  logic [31:0]  zero_mask [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_core dut (.clk(clk), .rst_n(rst_n), .start(start), .block(block), .busy(busy),
                   .round(round), .wt_raw(wt), .wt_use(wt), .done(done), .digest(digest));

  task automatic hash(input logic [511:0] b, input logic [255:0] expd, input bit poke);
    int cyc;
    @(negedge clk); block = b; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;   // clock edges after the one that took start
    if (poke) begin
      block = ~b; start = 1;    // must be ignored: core is busy
      @(negedge clk); start = 0; block = b; cyc++;
    end
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 64) begin failures++; $display("latency %0d, expected 64", cyc); end
    checks++;
    if (digest !== expd) begin
      failures++;
      $display("digest %h expected %h", digest, expd);
    end
  endtask

  initial begin
    logic [511:0] b;
    foreach (zero_mask[i]) zero_mask[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    b = '0; b[511 -: 32] = 32'h61626380; b[63:0] = 64'd24;
    hash(b, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, 0);
    b = '0; b[511] = 1'b1;
    hash(b, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, 1);
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
      hash(b, sha256_ref(b, zero_mask), n[0]);
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
