// tb_ccb: checks a Configurable Cache Block: the eight T-Ds share one row,
// each is written through its own enables, all are read in parallel, and
// with Vcc low nothing is written and the outputs read as zero.
module tb_ccb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic vcc, rd_en;
  logic [ROW_W-1:0] row;
  logic [7:0] we_meta;
  td_meta_t wmeta;
  logic [7:0][7:0] be;
  logic [DATA_W-1:0] wdata;
  td_meta_t [7:0] rd_meta;
  logic [7:0][DATA_W-1:0] rd_data;

  ccb dut (.clk, .vcc, .rd_en, .row, .we_meta, .wmeta, .be, .wdata, .rd_meta, .rd_data);

  td_meta_t          rmeta [8][ROWS];
  logic [DATA_W-1:0] rdat  [8][ROWS];
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
    vcc = 1; rd_en = 0; row = 0; we_meta = 0; be = '0; wmeta = '0; wdata = '0;
    for (int r = 0; r < ROWS; r++)
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        row = ROW_W'(r); we_meta = 8'(1 << t); be = '0; be[t] = '1;
        wmeta = '{valid: 1'b1, dirty: 1'b0, tag: TAG_W'(r * 8 + t)};
        wdata = {32'(t), 32'(r)};
        rmeta[t][r] = wmeta; rdat[t][r] = wdata;
      end
    @(negedge clk);
    we_meta = 0; be = '0;
    for (int i = 0; i < 500; i++) begin
      int r;
      r = $urandom_range(0, ROWS - 1);
      @(negedge clk);
      rd_en = 1; row = ROW_W'(r);
      @(negedge clk);
      rd_en = 0;
      for (int t = 0; t < 8; t++)
        check(rd_meta[t] == rmeta[t][r] && rd_data[t] == rdat[t][r], $sformatf("T-D %0d row %0d", t, r));
    end
    // power off: no writes, zero outputs
    @(negedge clk);
    vcc = 0; row = 5; we_meta = '1; be = '1; wmeta = '{valid: 1'b1, dirty: 1'b1, tag: '1}; wdata = '1;
    @(negedge clk);
    we_meta = 0; be = '0; rd_en = 1;
    @(negedge clk);
    for (int t = 0; t < 8; t++)
      check(rd_meta[t] == '0 && rd_data[t] == '0, "outputs clamp to zero when off");
    vcc = 1; rd_en = 1; row = 5;
    @(negedge clk);
    rd_en = 0;
    for (int t = 0; t < 8; t++)
      check(rd_meta[t] == rmeta[t][5] && rd_data[t] == rdat[t][5], "no write while off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
