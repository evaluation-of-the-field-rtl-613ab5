// tb_bb_sensor: drives random basic blocks into a BB sensor with random
// limits and checks the running count (blocks in [lo, hi] only), the
// 3-MSB component, clearing at an interval end (the block of that cycle
// still counted), and saturation at 2^17-1.
module tb_bb_sensor;
  import fpca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] lo, hi, bb_size;
  logic bb_valid, clr;
  logic [16:0] count;
  logic [2:0] comp;

  bb_sensor dut (.clk, .rst_n, .lo, .hi, .bb_valid, .bb_size, .clr, .count, .comp);

  int checks = 0, failures = 0;
  int unsigned model;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    lo = 12'd5; hi = 12'd20; bb_valid = 0; bb_size = 0; clr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i % 2000 == 0) begin
        lo = 12'($urandom_range(1, 40));
        hi = lo + 12'($urandom_range(0, 40));
      end
      bb_valid = ($urandom_range(0, 3) != 0);
      bb_size  = 12'($urandom_range(1, 80));
      clr      = ($urandom_range(0, 999) == 0);
      #1;
      exp = model;
      if (bb_valid && bb_size >= lo && bb_size <= hi) exp += bb_size;
      check(count == 17'(exp) && comp == 3'(exp >> 14), $sformatf("count %0d exp %0d", count, exp));
      model = clr ? 0 : exp;
    end
    // saturation: only large blocks, no clear
    @(negedge clk);
    lo = 12'd1; hi = 12'hfff; clr = 0; bb_valid = 1; bb_size = 12'd4000;
    repeat (40) @(negedge clk);
    check(count == 17'h1ffff && comp == 3'd7, "saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
