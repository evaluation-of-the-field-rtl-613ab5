// tb_config_table: writes all 16 Configuration Table entries (25 bits:
// FPCA configuration, frequency code, miss latency) and reads them back,
// field by field, with one-cycle latency.
module tb_config_table;
  import fpca_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, re;
  logic [3:0] waddr, raddr;
  cfg_entry_t wdata, rdata;
  config_table dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  cfg_entry_t m [16];
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    checks++;
    if ($bits(cfg_entry_t) * 16 != 50 * 8) begin failures++; $display("FAIL: table is not 50 bytes"); end
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); we = 1; waddr = 4'(i);
        wdata.cfg = make_cfg($urandom_range(1, 4), $urandom_range(0, 3), $urandom_range(0, 3), 0, $urandom_range(1, 4));
        wdata.freq = 6'($urandom); wdata.miss_lat = 5'($urandom);
        m[i] = wdata;
      end
    @(negedge clk); we = 0;
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); re = 1; raddr = 4'(i);
      @(negedge clk); re = 0;
      checks += 3;
      if (rdata.cfg !== m[i].cfg) begin failures++; $display("FAIL: cfg %0d", i); end
      if (rdata.freq !== m[i].freq) begin failures++; $display("FAIL: freq %0d", i); end
      if (rdata.miss_lat !== m[i].miss_lat) begin failures++; $display("FAIL: miss_lat %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
