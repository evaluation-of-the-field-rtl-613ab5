// tb_fpca_sl: checks the selection logic for every line size and number of
// sets against field extraction written out independently with part-selects.
module tb_fpca_sl;
  import fpca_pkg::*;

  fpca_cfg_t cfg;
  logic [ADDR_W-1:0] addr;
  logic [ROW_W-1:0] row;
  logic [TD_W-1:0] stack;
  logic [2:0] col;

  fpca_sl dut (.cfg, .addr, .row, .stack, .col);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 4; l++)
      for (int s = 0; s < 6; s++)
        for (int i = 0; i < 200; i++) begin
          logic [ADDR_W-1:0] a;
          logic [6:0] er;
          logic [4:0] es;
          logic [2:0] ec;
          cfg = make_cfg(4, 0, l, s, 1);
          a = ADDR_W'($urandom);
          addr = a;
          #1;
          ec = 0; es = 0;
          for (int b = 0; b < l; b++) ec[b] = a[3 + b];
          for (int b = 0; b < 7; b++) er[b] = a[3 + l + b];
          for (int b = 0; b < s; b++) es[b] = a[10 + l + b];
          checks++;
          if (row !== er || stack !== es || col !== ec) begin
            failures++;
            $display("FAIL: l=%0d s=%0d a=%h row %h/%h stack %h/%h col %h/%h", l, s, a, row, er, stack, es, col, ec);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
