// tb_actuation_unit: pushes random Cache ID sequences (with long runs) and
// checks fire/target against a model: fire exactly when the last three IDs
// agree and differ from the current configuration (or none is known yet);
// commit makes the target current and restarts the history.
module tb_actuation_unit;
  import fpca_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push, commit, fire, cur_valid;
  logic [3:0] cid, target, cur_id;
  actuation_unit dut (.clk, .rst_n, .push, .cid, .commit, .fire, .target, .cur_id, .cur_valid);
  int checks = 0, failures = 0, fires = 0;
  logic [3:0] h [$];
  logic [3:0] m_cur;
  logic m_cv;

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
    logic [3:0] phase;
    push = 0; commit = 0; cid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_cv = 0; m_cur = 0;
    phase = 4'd3;
    for (int i = 0; i < 4000; i++) begin
      logic efire;
      @(negedge clk);
      efire = (h.size() == 3) && h[0] == h[1] && h[1] == h[2] && (!m_cv || h[0] != m_cur);
      check(fire == efire, $sformatf("fire %0d exp %0d", fire, efire));
      if (efire) check(target == h[2], "target");
      check(cur_valid == m_cv && (!m_cv || cur_id == m_cur), "current ID");
      push = 0; commit = 0;
      if (efire && $urandom_range(0, 1) == 0) begin
        commit = 1;
        fires++;
        m_cur = h[2]; m_cv = 1;
        h.delete();
      end else if ($urandom_range(0, 1) == 0) begin
        if ($urandom_range(0, 7) == 0) phase = 4'($urandom);
        cid = ($urandom_range(0, 9) == 0) ? 4'($urandom) : phase;
        push = 1;
        h.push_back(cid);
        if (h.size() > 3) void'(h.pop_front());
      end
    end
    check(fires > 20, $sformatf("actuations %0d", fires));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
