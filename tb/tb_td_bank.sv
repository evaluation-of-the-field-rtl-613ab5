// tb_td_bank: checks the T-D memory against a testbench array: tag/valid/
// dirty writes, byte-masked data writes, one-cycle synchronous read that
// returns the old contents during a write, and holding of the read
// registers while cs is low.
module tb_td_bank;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic cs, we_meta;
  logic [ROW_W-1:0] row;
  td_meta_t wmeta, rd_meta;
  logic [7:0] be;
  logic [DATA_W-1:0] wdata, rd_data;

  td_bank dut (.clk, .cs, .row, .we_meta, .wmeta, .be, .wdata, .rd_meta, .rd_data);

  td_meta_t          rmeta [ROWS];
  logic [DATA_W-1:0] rdat  [ROWS];
  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs = 0; we_meta = 0; be = 0; row = 0; wmeta = '0; wdata = '0;
    // fill every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      cs = 1; we_meta = 1; be = '1; row = ROW_W'(r);
      wmeta = '{valid: 1'b1, dirty: r[0], tag: TAG_W'($urandom)};
      wdata = {$urandom, $urandom};
      rmeta[r] = wmeta; rdat[r] = wdata;
    end
    // random reads and partial writes
    for (int i = 0; i < 3000; i++) begin
      int r;
      logic [DATA_W-1:0] old_d;
      td_meta_t old_m;
      r = $urandom_range(0, ROWS - 1);
      @(negedge clk);
      cs = 1; row = ROW_W'(r);
      we_meta = ($urandom_range(0, 3) == 0);
      be = ($urandom_range(0, 1) == 0) ? 8'($urandom) : 8'h00;
      wmeta = '{valid: 1'($urandom), dirty: 1'($urandom), tag: TAG_W'($urandom)};
      wdata = {$urandom, $urandom};
      old_m = rmeta[r]; old_d = rdat[r];
      if (we_meta) rmeta[r] = wmeta;
      for (int b = 0; b < 8; b++) if (be[b]) rdat[r][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
      check(rd_meta == old_m && rd_data == old_d, $sformatf("read row %0d", r));
      // hold with cs low
      cs = 0; we_meta = 1; be = '1; row = ROW_W'(r + 1);
      @(negedge clk);
      check(rd_meta == old_m && rd_data == old_d, "outputs hold while idle");
      we_meta = 0; be = 0;
    end
    // final read-back of every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      cs = 1; we_meta = 0; be = 0; row = ROW_W'(r);
      @(negedge clk);
      check(rd_meta == rmeta[r] && rd_data == rdat[r], $sformatf("final row %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
