// tb_epuf_aes_system: the whole system at its default size (64-row arrays,
// 8 cells per bit, full SHA-256 and AES-128), end to end.
//
// 1. self-programs the PUF and checks that every bit took the state its
//    as-fabricated current put it in (sum above 8 x 5 uA -> LRS);
// 2. enrolment: reads the programmed cell currents (what a verifier keeps)
//    and derives the two inverted W_t bits of every round;
// 3. authentication: random challenges, digest compared with a reference
//    SHA-256 carrying those inversions; 66-clock latency;
// 4. key generation + encryption: ciphertext compared with reference
//    AES-128 under the upper 128 digest bits; 88-clock latency;
// 5. an op_start while busy is ignored;
// 6. drift tolerance: one cell of every LRS bit in ten rows drops to
//    2 uA (below the single-cell failure level); the digest is unchanged;
// 7. a bit that fails (all its cells drift low) changes the digest in
//    roughly half of its bits.
// Every mechanism is counted; one that never happened is a failure.
module tb_epuf_aes_system;
  import tb_ref_pkg::*;

  logic         clk = 0, rst_n = 0, prog_start = 0, op_start = 0, op_encrypt = 0;
  logic         prog_done, busy, done;
  logic [446:0] challenge = '0;
  logic [8:0]   challenge_len = '0;
  logic [127:0] plaintext = '0, ciphertext;
  logic [255:0] digest;
  logic [3:0]   fresh_hi [64], fresh_lo [64];
  logic [31:0]  mask [64];
  int checks = 0, failures = 0;
  int n_prog = 0, n_auth = 0, n_enc = 0, n_flip_rounds = 0, n_ignored = 0,
      n_drift_ok = 0, n_bitfail = 0;

  always #5 clk = ~clk;

  epuf_aes_system dut (
    .clk(clk), .rst_n(rst_n), .prog_start(prog_start), .prog_done(prog_done),
    .op_start(op_start), .op_encrypt(op_encrypt), .challenge(challenge),
    .challenge_len(challenge_len), .plaintext(plaintext), .busy(busy), .done(done),
    .digest(digest), .ciphertext(ciphertext));

  // count rounds in which the PUF inverted exactly one bit in each half
  always @(posedge clk)
    if (dut.u_epuf.sha_busy &&
        $countones(dut.u_epuf.wt_raw[31:16] ^ dut.u_epuf.wt_use[31:16]) == 1 &&
        $countones(dut.u_epuf.wt_raw[15:0]  ^ dut.u_epuf.wt_use[15:0])  == 1)
      n_flip_rounds++;

  function automatic int unsigned gsum(input bit hi, input int r, input int b, input int unsigned lvl);
    int unsigned s;
    s = 0;
    for (int k = 0; k < 8; k++)
      s += hi ? dut.u_epuf.u_puf.u_arr_hi.u_xbar.cell_na[r][b*8+k]
              : dut.u_epuf.u_puf.u_arr_lo.u_xbar.cell_na[r][b*8+k];
    return s;
  endfunction

  function automatic logic [3:0] nib(input bit hi, input int r, input int unsigned ref_na);
    logic [3:0] v;
    for (int b = 0; b < 4; b++) v[b] = gsum(hi, r, b, 0) > ref_na;
    return v;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic enroll();
    for (int t = 0; t < 64; t++)
      mask[t] = {16'd1 << nib(1, t, 24000), 16'd1 << nib(0, t, 24000)};
  endtask

  task automatic run_op(input bit enc, input int l, output int cyc);
    @(negedge clk);
    op_encrypt = enc; challenge_len = 9'(l); op_start = 1;
    @(negedge clk); op_start = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk); cyc++;
      if (cyc == 5) begin            // request while busy: must be ignored
        op_start = 1; challenge = ~challenge;
        @(negedge clk); cyc++; op_start = 0; challenge = ~challenge;
        n_ignored++;
      end
    end
  endtask

  initial begin
    int cyc, l;
    logic [255:0] expd, d0;
    #1;
    for (int t = 0; t < 64; t++) begin
      fresh_hi[t] = nib(1, t, 40000);
      fresh_lo[t] = nib(0, t, 40000);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. self-programming
    @(negedge clk); prog_start = 1;
    @(negedge clk); prog_start = 0;
    while (!prog_done) @(negedge clk);
    n_prog++;
    for (int t = 0; t < 64; t++) begin
      chk(nib(1, t, 24000) == fresh_hi[t] && nib(0, t, 24000) == fresh_lo[t], $sformatf("programmed state row %0d: %h%h vs %h%h", t, nib(1, t, 24000), nib(0, t, 24000), fresh_hi[t], fresh_lo[t]));
      for (int b = 0; b < 4; b++) begin
        chk(fresh_hi[t][b] ? gsum(1, t, b, 0) >= 56000 : gsum(1, t, b, 0) <= 8000, "bit separated");
      end
    end
    // 2. enrolment
    enroll();
    // 3./4./5. operations
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 447; i += 32) challenge[i +: 32] = $urandom;
      plaintext = {$urandom, $urandom, $urandom, $urandom};
      l = $urandom_range(0, 447);
      expd = sha256_ref(sha256_pad_ref(challenge, l), mask);
      run_op(n[0], l, cyc);
      if (!n[0]) begin
        chk(cyc == 66, $sformatf("auth latency %0d", cyc));
        chk(digest == expd, $sformatf("digest %h expected %h", digest, expd));
        n_auth++;
      end else begin
        chk(cyc == 88, $sformatf("encrypt latency %0d", cyc));
        chk(ciphertext == aes128_ref(expd[255:128], plaintext), "ciphertext");
        n_enc++;
      end
    end
    // 6. drift tolerance
    challenge = {$urandom, 415'd0}; l = 32;
    run_op(0, l, cyc);
    d0 = digest;
    for (int t = 0; t < 10; t++)
      for (int b = 0; b < 4; b++) begin
        if (fresh_hi[t][b]) dut.u_epuf.u_puf.u_arr_hi.u_xbar.set_cell_na(t, b*8, 2000);
        if (fresh_lo[t][b]) dut.u_epuf.u_puf.u_arr_lo.u_xbar.set_cell_na(t, b*8 + 3, 2000);
      end
    run_op(0, l, cyc);
    chk(digest == d0, "digest unchanged after single-cell drift");
    if (digest == d0) n_drift_ok++;
    // 7. a whole bit fails: row 40, first LRS bit of the upper array
    begin
      int fb;
      fb = -1;
      for (int b = 0; b < 4; b++) if (fresh_hi[40][b] && fb < 0) fb = b;
      if (fb < 0) fb = 0;
      for (int k = 0; k < 8; k++) dut.u_epuf.u_puf.u_arr_hi.u_xbar.set_cell_na(40, fb*8 + k, 2900);
    end
    run_op(0, l, cyc);
    enroll();
    chk(digest == sha256_ref(sha256_pad_ref(challenge, l), mask), "digest follows failed bit");
    if (digest != d0) begin
      n_bitfail++;
      chk($countones(digest ^ d0) > 64, $sformatf("avalanche: %0d bits changed", $countones(digest ^ d0)));
    end
    $display("mechanisms: programming=%0d auth=%0d encrypt=%0d flip_rounds=%0d ignored_start=%0d drift_tolerated=%0d bit_failure=%0d",
             n_prog, n_auth, n_enc, n_flip_rounds, n_ignored, n_drift_ok, n_bitfail);
    chk(n_prog > 0, "programming happened");
    chk(n_auth > 0, "authentication happened");
    chk(n_enc > 0, "encryption happened");
    chk(n_flip_rounds >= 64 * 11, "bit inversion in every round");
    chk(n_ignored > 0, "busy start ignored");
    chk(n_drift_ok > 0, "drift tolerated");
    chk(n_bitfail > 0, "bit failure seen");
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
