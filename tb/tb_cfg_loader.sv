// tb_cfg_loader: loads random 14-bit words and reassembles the serial
// stream; checks the word, MSB-first order, one bit per DIV cycles, the
// total load time 14*DIV (+1 for apply) and that start is ignored while
// busy. Runs with the default DIV of 42 and with DIV = 3.
module tb_cfg_loader;
  import fpca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start_a, sen_a, sdata_a, apply_a, busy_a;
  logic start_b, sen_b, sdata_b, apply_b, busy_b;
  logic [13:0] word;
  cfg_loader dut_a (.clk, .rst_n, .start (start_a), .word, .sen (sen_a), .sdata (sdata_a), .apply (apply_a), .busy (busy_a));
  cfg_loader #(.DIV(3)) dut_b (.clk, .rst_n, .start (start_b), .word, .sen (sen_b), .sdata (sdata_b), .apply (apply_b), .busy (busy_b));
  int checks = 0, failures = 0;

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

  task automatic run(input bit use_b, input int div);
    logic [13:0] w, got;
    int cyc, nbits, last_bit;
    w = 14'($urandom);
    @(negedge clk);
    word = w;
    if (use_b) start_b = 1; else start_a = 1;
    @(negedge clk);
    start_a = 0; start_b = 0;
    word = ~w;                  // changing the input after start must not matter
    got = 0; cyc = 1; nbits = 0; last_bit = 0;
    forever begin
      logic s, d, ap, bz;
      s = use_b ? sen_b : sen_a; d = use_b ? sdata_b : sdata_a;
      ap = use_b ? apply_b : apply_a; bz = use_b ? busy_b : busy_a;
      if (s) begin
        got = {got[12:0], d};
        nbits++;
        check(cyc - last_bit == div, $sformatf("bit spacing %0d", cyc - last_bit));
        last_bit = cyc;
      end
      if (ap) break;
      // a start while busy is ignored
      if (cyc == 5) begin if (use_b) start_b = 1; else start_a = 1; end
      else begin start_a = 0; start_b = 0; end
      @(negedge clk);
      cyc++;
    end
    start_a = 0; start_b = 0;
    check(got == w && nbits == 14, $sformatf("word %h exp %h bits %0d", got, w, nbits));
    check(cyc == 14 * div + 1, $sformatf("load time %0d exp %0d", cyc, 14 * div + 1));
  endtask

  initial begin
    start_a = 0; start_b = 0; word = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) run(0, 42);
    for (int i = 0; i < 50; i++) run(1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
