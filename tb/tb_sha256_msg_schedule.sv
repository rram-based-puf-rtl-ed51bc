// tb_sha256_msg_schedule: loads random blocks and checks W_0..W_63, one per
// advance, against a reference expansion. Also checks that W_t holds while
// `advance` is low.
module tb_sha256_msg_schedule;
  import tb_ref_pkg::*;

  logic         clk = 0, rst_n = 0, load = 0, advance = 0;
  logic [511:0] block;
  logic [31:0]  wt;
  logic [31:0]  w_exp [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_msg_schedule dut (.clk(clk), .rst_n(rst_n), .load(load), .block(block),
                           .advance(advance), .wt(wt));

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5; n++) begin
      for (int i = 0; i < 16; i++) block[32*i +: 32] = $urandom;
      sha256_w_ref(block, w_exp);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int t = 0; t < 64; t++) begin
        checks++;
        if (wt !== w_exp[t]) begin
          failures++;
          $display("block %0d W[%0d] = %h expected %h", n, t, wt, w_exp[t]);
        end
        if (t == 20) begin     // a stall: no advance for 3 cycles
          repeat (3) @(negedge clk);
          checks++;
          if (wt !== w_exp[t]) begin failures++; $display("W changed while stalled"); end
        end
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
