// tb_pattern_table: writes every entry of the Pattern Table,
// rewrites a random subset, and reads all back with one-cycle latency.
module tb_pattern_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, re;
  logic [3:0] waddr, raddr;
  logic [3:0] wdata, rdata;
  pattern_table dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  logic [3:0] m [16];
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = 4'($urandom); m[i] = wdata;
    end
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); waddr = 4'($urandom); wdata = 4'($urandom); m[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); re = 1; raddr = 4'(i);
        @(negedge clk); re = 0;
        checks++;
        if (rdata !== m[i]) begin failures++; $display("FAIL: entry %0d %h exp %h", i, rdata, m[i]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
