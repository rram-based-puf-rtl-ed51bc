// tb_puf_wt_modifier: the PUF bit-inversion unit end to end.
//  * before programming, the expected PUF bit of every row/bit is taken
//    from the as-fabricated cell currents (8-cell sum above 8 x 5 uA);
//  * self-programming must finish in 2*64+1 clocks;
//  * afterwards, for every round t, wt_out = wt_in ^ mask with
//    mask[31:16] = one-hot(upper array row t), mask[15:0] = one-hot(lower
//    array row t): exactly two bits inverted, one per half.
module tb_puf_wt_modifier;
  localparam int ROWS = 64;

  logic        clk = 0, rst_n = 0, prog_start = 0, rd_en = 0;
  logic        prog_busy, prog_done;
  logic [5:0]  round = '0;
  logic [31:0] wt_in = '0, wt_out, flip_mask;
  logic [3:0]  exp_hi [ROWS], exp_lo [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  puf_wt_modifier #(.ROWS(ROWS), .CELLS_PER_BIT(8), .SEED_HI(32'h1111_0001), .SEED_LO(32'h2222_0002)) dut (
    .clk(clk), .rst_n(rst_n), .prog_start(prog_start), .prog_busy(prog_busy), .prog_done(prog_done),
    .rd_en(rd_en), .round(round), .wt_in(wt_in), .wt_out(wt_out), .flip_mask(flip_mask));

  function automatic bit fresh_bit(input bit hi, input int r, input int b);
    int unsigned s = 0;
    for (int k = 0; k < 8; k++)
      s += hi ? dut.u_arr_hi.u_xbar.cell_na[r][b*8+k] : dut.u_arr_lo.u_xbar.cell_na[r][b*8+k];
    return s > 40000;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int cyc, ones;
    #1;
    ones = 0;
    for (int r = 0; r < ROWS; r++)
      for (int b = 0; b < 4; b++) begin
        exp_hi[r][b] = fresh_bit(1, r, b);
        exp_lo[r][b] = fresh_bit(0, r, b);
        ones += exp_hi[r][b] + exp_lo[r][b];
      end
    $display("PUF bits at 1: %0d of 512", ones);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); prog_start = 1;
    @(negedge clk); prog_start = 0;
    cyc = 0;
    while (!prog_done) begin @(negedge clk); cyc++; end
    chk(cyc == 2*ROWS + 1, "programming time");
    rd_en = 1;
    for (int pass = 0; pass < 4; pass++)
      for (int t = 0; t < ROWS; t++) begin
        logic [31:0] m;
        round = 6'(t); wt_in = $urandom; #1;
        m = {16'd1 << exp_hi[t], 16'd1 << exp_lo[t]};
        chk(wt_out == (wt_in ^ m), $sformatf("round %0d: wt_out %h expected %h", t, wt_out, wt_in ^ m));
        chk($countones(wt_in ^ wt_out) == 2 && $countones(flip_mask[31:16]) == 1, "two bits, one per half");
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
