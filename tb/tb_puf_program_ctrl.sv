// tb_puf_program_ctrl: the sequencer drives a simple array model in this
// testbench whose per-row read values are random. Checks, for every row:
// the row address, read in programming mode, then set_en equal to the
// value read and reset_en its complement; one row per two clocks; `done`
// 2*ROWS+1 clocks after start; and nothing programmed when idle.
module tb_puf_program_ctrl;
  localparam int ROWS = 64, BITS = 8;

  logic            clk = 0, rst_n = 0, start = 0;
  logic [BITS-1:0] resp;
  logic            busy, done, rd_en, prog_mode;
  logic [5:0]      row;
  logic [BITS-1:0] set_en, reset_en;
  logic [BITS-1:0] fresh [ROWS];
  int  wr_seen [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  puf_program_ctrl #(.ROWS(ROWS), .BITS(BITS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .resp(resp), .busy(busy), .done(done),
    .row(row), .rd_en(rd_en), .prog_mode(prog_mode), .set_en(set_en), .reset_en(reset_en));

  // array stand-in: read value of the addressed row while reading
  assign resp = (rd_en && prog_mode) ? fresh[row] : '0;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (row %0d)", msg, row); end
  endtask

  initial begin
    int cyc;
    foreach (fresh[i]) begin fresh[i] = BITS'($urandom); wr_seen[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && set_en == '0 && reset_en == '0, "idle outputs");
    start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin
      if (set_en != '0 || reset_en != '0) begin
        chk(set_en == fresh[row], "set_en equals value read");
        chk(reset_en == ~fresh[row], "reset_en is complement");
        chk(rd_en, "row selected while programming");
        wr_seen[row]++;
      end
      @(negedge clk); cyc++;
    end
    chk(cyc == 2*ROWS + 1, "done after 2*ROWS+1 clocks");
    foreach (wr_seen[i]) chk(wr_seen[i] == 1, "each row written once");
    repeat (3) @(negedge clk);
    chk(!busy && set_en == '0 && reset_en == '0, "idle after done");
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
