// tb_epuf: embedded PUF hashing.
//  * programs the PUF, then reads the programmed cell currents of both
//    arrays (the enrolment data a verifier would keep) and derives each
//    round's two inverted bit positions (8-cell sum above 24 uA = 1);
//  * hashes random challenges of random length and compares the digest
//    with reference SHA-256 whose round words carry those inversions;
//  * checks the 64-clock hash latency, that the digest differs from
//    plain SHA-256 of the same message, and that two chips (different
//    device seeds) give different digests for one challenge.
module tb_epuf;
  import tb_ref_pkg::*;

  logic         clk = 0, rst_n = 0, prog_start = 0, start = 0;
  logic         prog_done, busy, done, busy2, done2, prog_done2;
  logic [446:0] msg;
  logic [8:0]   len;
  logic [255:0] digest, digest2;
  logic [31:0]  mask [64], zero [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  epuf #(.SEED_HI(32'hA5A5_0001), .SEED_LO(32'hA5A5_0002)) dut (
    .clk(clk), .rst_n(rst_n), .prog_start(prog_start), .prog_done(prog_done), .start(start),
    .msg(msg), .len(len), .busy(busy), .done(done), .digest(digest));

  epuf #(.SEED_HI(32'h7777_0001), .SEED_LO(32'h7777_0002)) dut2 (
    .clk(clk), .rst_n(rst_n), .prog_start(prog_start), .prog_done(prog_done2), .start(start),
    .msg(msg), .len(len), .busy(busy2), .done(done2), .digest(digest2));

  function automatic logic [3:0] puf_nibble(input bit hi, input int r);
    logic [3:0] v;
    for (int b = 0; b < 4; b++) begin
      int unsigned s = 0;
      for (int k = 0; k < 8; k++)
        s += hi ? dut.u_puf.u_arr_hi.u_xbar.cell_na[r][b*8+k] : dut.u_puf.u_arr_lo.u_xbar.cell_na[r][b*8+k];
      v[b] = (s > 24000);
    end
    return v;
  endfunction

  task automatic chk(input bit cond, input string msg_s);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg_s); end
  endtask

  initial begin
    int cyc, l;
    logic [255:0] expd;
    foreach (zero[i]) zero[i] = '0;
    msg = '0; len = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); prog_start = 1;
    @(negedge clk); prog_start = 0;
    while (!prog_done) @(negedge clk);
    for (int t = 0; t < 64; t++)
      mask[t] = {16'd1 << puf_nibble(1, t), 16'd1 << puf_nibble(0, t)};
    for (int n = 0; n < 12; n++) begin
      for (int i = 0; i < 447; i += 32) msg[i +: 32] = $urandom;
      l = (n == 0) ? 0 : (n == 1) ? 447 : $urandom_range(1, 446);
      len = 9'(l);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      expd = sha256_ref(sha256_pad_ref(msg, l), mask);
      chk(cyc == 64, $sformatf("latency %0d", cyc));
      chk(digest == expd, $sformatf("digest %h expected %h", digest, expd));
      chk(digest != sha256_ref(sha256_pad_ref(msg, l), zero), "differs from plain SHA-256");
      chk(digest != digest2, "two chips differ");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
