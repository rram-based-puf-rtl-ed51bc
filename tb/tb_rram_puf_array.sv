// tb_rram_puf_array: PUF array with sense amplifiers.
//  * programming-reference reads give (group current > 8 x 5 uA);
//  * after programming rows with known patterns, normal reads return them;
//  * read disable gives 0;
//  * redundancy: in the 8-cells/bit array one LRS cell drifting down to
//    2 uA leaves the bit at 1, whereas in a 1-cell/bit array (second
//    instance, reference 3 uA) the same drift flips the bit to 0;
//  * random drift of several cells: the bit reads 1 exactly while the
//    summed current stays above 24 uA.
module tb_rram_puf_array;
  localparam int ROWS = 64;

  logic            clk = 0;
  logic [5:0]      addr;
  logic [ROWS-1:0] wl;
  logic            rd_en = 0, prog_mode = 0;
  logic [3:0]      set_en = '0, reset_en = '0;
  logic [3:0]      resp, resp1;
  logic [3:0]      pattern [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign wl = rd_en ? (64'd1 << addr) : '0;

  rram_puf_array #(.ROWS(ROWS), .BITS(4), .CELLS_PER_BIT(8), .SEED(32'h0BAD_F00D)) dut (
    .clk(clk), .wl(wl), .rd_en(rd_en), .prog_mode(prog_mode),
    .set_en(set_en), .reset_en(reset_en), .resp(resp));

  rram_puf_array #(.ROWS(ROWS), .BITS(4), .CELLS_PER_BIT(1), .SEED(32'h0BAD_F00D)) dut1 (
    .clk(clk), .wl(wl), .rd_en(rd_en), .prog_mode(prog_mode),
    .set_en(set_en), .reset_en(reset_en), .resp(resp1));

  function automatic int unsigned gsum(input int r, input int b);
    int unsigned s = 0;
    for (int k = 0; k < 8; k++) s += dut.u_xbar.cell_na[r][b*8 + k];
    return s;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    // as fabricated: programming reference
    @(negedge clk);
    rd_en = 1; prog_mode = 1;
    for (int r = 0; r < ROWS; r++) begin
      addr = 6'(r); #1;
      for (int b = 0; b < 4; b++) chk(resp[b] == (gsum(r, b) > 40000), "fresh read vs program reference");
    end
    // program every row with a random pattern
    for (int r = 0; r < ROWS; r++) begin
      pattern[r] = 4'($urandom);
      @(negedge clk); addr = 6'(r); prog_mode = 1; set_en = pattern[r]; reset_en = ~pattern[r];
    end
    @(negedge clk); set_en = '0; reset_en = '0; prog_mode = 0;
    for (int r = 0; r < ROWS; r++) begin
      addr = 6'(r); #1;
      chk(resp == pattern[r], "programmed pattern (8 cells/bit)");
      chk(resp1 == pattern[r], "programmed pattern (1 cell/bit)");
    end
    rd_en = 0; #1;
    chk(resp == 4'b0 && resp1 == 4'b0, "read disabled");
    // force a known LRS bit in row 10, bit 2, for the drift experiment
    @(negedge clk); rd_en = 1; addr = 6'd10; set_en = 4'b0100;
    @(negedge clk); set_en = '0;
    dut.u_xbar.set_cell_na(10, 2*8, 2000);
    dut1.u_xbar.set_cell_na(10, 2, 2000);
    #1;
    chk(resp[2] == 1'b1, "8 cells/bit survives one drifted cell");
    chk(resp1[2] == 1'b0, "1 cell/bit fails with the same drift");
    // random multi-cell drift
    for (int n = 0; n < 200; n++) begin
      int r, b;
      r = $urandom_range(0, ROWS-1); b = $urandom_range(0, 3);
      for (int k = 0; k < 8; k++)
        if ($urandom_range(0, 1) == 1) dut.u_xbar.set_cell_na(r, b*8 + k, $urandom_range(0, 6000));
      addr = 6'(r); #1;
      chk(resp[b] == (gsum(r, b) > 24000), "bit vs 24 uA reference after drift");
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
