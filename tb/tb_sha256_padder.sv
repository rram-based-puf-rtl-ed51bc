// tb_sha256_padder: pads messages of random content and every length class
// (0, 1, byte multiples, 447 and random) and compares with a bit-by-bit
// reference padding.
module tb_sha256_padder;
  import tb_ref_pkg::*;

  logic [446:0] msg;
  logic [8:0]   len;
  logic [511:0] block, exp_blk;
  int checks = 0, failures = 0;

  sha256_padder #(.MSG_BITS(447)) dut (.msg(msg), .len(len), .block(block));

  task automatic try_len(input int l);
    for (int i = 0; i < 447; i += 32) msg[i +: 32] = $urandom;
    len = 9'(l);
    #1;
    exp_blk = sha256_pad_ref(msg, l);
    checks++;
    if (block !== exp_blk) begin
      failures++;
      $display("len %0d: got %h expected %h", l, block, exp_blk);
    end
  endtask

  initial begin
    try_len(0); try_len(1); try_len(8); try_len(24); try_len(446); try_len(447);
    for (int i = 0; i < 200; i++) try_len($urandom_range(0, 447));
    // "abc" gives the well-known first word 0x61626380
    msg = '0; msg[446 -: 24] = 24'h616263; len = 9'd24; #1;
    checks++;
    if (block[511:480] !== 32'h61626380 || block[63:0] !== 64'd24) begin
      failures++; $display("abc padding wrong: %h", block);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
