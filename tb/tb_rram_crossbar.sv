// tb_rram_crossbar: checks the behavioural crossbar model.
//  * as fabricated, every cell current lies in the fresh range and the
//    bit-line currents of a row are the sums of its 8-cell groups;
//  * no word line -> all bit lines read 0;
//  * programming a row with set/reset moves the cells into the LRS range
//    (7..15 uA) or HRS range; the LRS/HRS ratio of bit currents exceeds 10;
//  * rows that were not selected keep their currents;
//  * set_cell_na() changes the summed current by the imposed amount.
module tb_rram_crossbar;
  localparam int ROWS = 64, BITS = 4, CPB = 8;

  logic                  clk = 0;
  logic [ROWS-1:0]       wl = '0;
  logic [BITS-1:0]       set_en = '0, reset_en = '0;
  logic [BITS-1:0][31:0] bl_na;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rram_crossbar #(.ROWS(ROWS), .BITS(BITS), .CELLS_PER_BIT(CPB), .SEED(32'hCAFE_0001)) dut (
    .clk(clk), .wl(wl), .set_en(set_en), .reset_en(reset_en), .bl_na(bl_na));

  function automatic int unsigned group_sum(input int r, input int b);
    int unsigned s = 0;
    for (int k = 0; k < CPB; k++) s += dut.cell_na[r][b*CPB + k];
    return s;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int unsigned prev, lrs_min, hrs_max;
    #1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < BITS*CPB; c++)
        chk(dut.cell_na[r][c] >= 1000 && dut.cell_na[r][c] <= 9000, "fresh range");
    #1;
    chk(bl_na == '0, "idle bit lines");
    for (int r = 0; r < ROWS; r += 7) begin
      wl = '0; wl[r] = 1'b1; #1;
      for (int b = 0; b < BITS; b++) chk(bl_na[b] == group_sum(r, b), "fresh sum");
    end
    // program row 5: bits 3,0 LRS, bits 2,1 HRS
    prev = group_sum(6, 0);
    @(negedge clk); wl = '0; wl[5] = 1'b1; set_en = 4'b1001; reset_en = 4'b0110;
    @(negedge clk); set_en = '0; reset_en = '0;
    lrs_min = 32'hffff_ffff; hrs_max = 0;
    for (int b = 0; b < BITS; b++)
      for (int k = 0; k < CPB; k++) begin
        if (b == 0 || b == 3)
          chk(dut.cell_na[5][b*CPB+k] >= 7000 && dut.cell_na[5][b*CPB+k] <= 15000, "LRS range");
        else
          chk(dut.cell_na[5][b*CPB+k] >= 300 && dut.cell_na[5][b*CPB+k] <= 1000, "HRS range");
      end
    #1;
    for (int b = 0; b < BITS; b++) begin
      chk(bl_na[b] == group_sum(5, b), "programmed sum");
      if (b == 0 || b == 3) lrs_min = (bl_na[b] < lrs_min) ? bl_na[b] : lrs_min;
      else hrs_max = (bl_na[b] > hrs_max) ? bl_na[b] : hrs_max;
    end
    chk(lrs_min > 10 * hrs_max, "on/off ratio above 10");
    chk(group_sum(6, 0) == prev, "unselected row unchanged");
    // drift imposed on one cell
    prev = bl_na[3];
    lrs_min = dut.cell_na[5][3*CPB+2];
    dut.set_cell_na(5, 3*CPB + 2, 0);
    #1;
    chk(bl_na[3] == prev - lrs_min, "drift visible in sum");
    chk(dut.cell_na[5][3*CPB+2] == 0, "cell set");
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
