// tb_cma_coprocessor: loads the three tables through the software port,
// then plays a sequence of interval-end events with BBVs belonging to
// different phases. A small FPCA stand-in answers the reconfiguration
// handshake and reassembles the serial configuration bits. Checks: the
// recognised Cache ID of every interval (RST then Pattern Table), that an
// actuation happens exactly when three consecutive IDs agree and differ
// from the current one, the stall window, the 14 configuration bits sent,
// and the frequency / miss latency / current ID after each actuation.
module tb_cma_coprocessor;
  import fpca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ivl_end;
  logic [8:0] bbv;
  sw_wr_t sw_wr;
  logic reconf_req, flush_done, cfg_sen, cfg_sdata, cfg_apply, reconf_done, cpu_stall, cur_valid;
  logic [5:0] freq_code;
  logic [4:0] miss_lat;
  logic [3:0] cur_id, last_spc, last_cid;
  logic [15:0] reconfig_cnt;

  cma_coprocessor #(.CFG_DIV(2)) dut (
    .clk, .rst_n, .ivl_end, .bbv, .sw_wr, .reconf_req, .flush_done, .cfg_sen, .cfg_sdata,
    .cfg_apply, .reconf_done, .cpu_stall, .freq_code, .miss_lat, .cur_id, .cur_valid,
    .last_spc, .last_cid, .reconfig_cnt
  );

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

  // FPCA stand-in: flush takes 20 cycles, clear 10 cycles
  logic [13:0] got_bits;
  int fl_cnt, clr_cnt;
  logic in_flush, in_clear;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush_done <= 0; reconf_done <= 0; fl_cnt <= 0; clr_cnt <= 0; in_flush <= 0; in_clear <= 0;
      got_bits <= 0;
    end else begin
      reconf_done <= 0;
      if (cfg_sen) got_bits <= {got_bits[12:0], cfg_sdata};
      if (reconf_req && !in_flush && !flush_done) begin in_flush <= 1; fl_cnt <= 0; end
      if (in_flush) begin
        fl_cnt <= fl_cnt + 1;
        if (fl_cnt == 19) begin in_flush <= 0; flush_done <= 1; end
      end
      if (cfg_apply) begin flush_done <= 0; in_clear <= 1; clr_cnt <= 0; end
      if (in_clear) begin
        clr_cnt <= clr_cnt + 1;
        if (clr_cnt == 9) begin in_clear <= 0; reconf_done <= 1; end
      end
    end
  end

  logic [3:0] rst_m [512];
  logic [3:0] pt_m [16];
  cfg_entry_t ct_m [16];

  task automatic sw(input sw_target_e t, input int a, input logic [24:0] d);
    @(negedge clk);
    sw_wr = '{valid: 1'b1, target: t, addr: 9'(a), data: d};
    @(negedge clk);
    sw_wr = '0;
  endtask

  initial begin
    logic [3:0] hist [$];
    logic [3:0] m_cur;
    logic m_cv;
    int n_act;
    logic [8:0] phase_bbv [4];
    ivl_end = 0; bbv = 0; sw_wr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 512; i++) begin rst_m[i] = 4'($urandom_range(0, 5)); sw(SW_RST, i, 25'(rst_m[i])); end
    for (int i = 0; i < 16; i++) begin pt_m[i] = 4'($urandom_range(0, 3)) * 4'd3; sw(SW_PT, i, 25'(pt_m[i])); end
    for (int i = 0; i < 16; i++) begin
      ct_m[i].cfg = make_cfg($urandom_range(1, 4), $urandom_range(0, 3), $urandom_range(0, 2), 0, $urandom_range(1, 4));
      ct_m[i].freq = 6'($urandom_range(10, 42));
      ct_m[i].miss_lat = 5'($urandom_range(5, 20));
      sw(SW_CT, i, ct_m[i]);
    end
    // one BBV per phase, each leading to a different Cache ID
    for (int p = 0; p < 4; p++) begin
      phase_bbv[p] = 9'(p * 100 + 7);
      rst_m[phase_bbv[p]] = 4'(p + 6);
      pt_m[p + 6] = 4'(p * 3 + 1);
      sw(SW_RST, phase_bbv[p], 25'(rst_m[phase_bbv[p]]));
      sw(SW_PT, p + 6, 25'(pt_m[p + 6]));
    end
    m_cv = 0; m_cur = 0; n_act = 0;
    for (int it = 0; it < 300; it++) begin
      logic [8:0] v;
      logic [3:0] ecid;
      logic efire;
      int t;
      // phases: BBVs that stay in one region for a while
      v = phase_bbv[(it / 12) % 4];
      if (it % 7 == 0) v = 9'($urandom);
      ecid = pt_m[rst_m[v]];
      @(negedge clk);
      ivl_end = 1; bbv = v;
      @(negedge clk);
      ivl_end = 0; bbv = 9'($urandom);   // BBV only needed with ivl_end
      repeat (3) @(negedge clk);
      check(last_cid == ecid, $sformatf("interval %0d: cache ID %0d exp %0d", it, last_cid, ecid));
      hist.push_back(ecid);
      if (hist.size() > 3) void'(hist.pop_front());
      efire = hist.size() == 3 && hist[0] == hist[1] && hist[1] == hist[2] && (!m_cv || hist[0] != m_cur);
      check(cpu_stall == efire, $sformatf("stall at decision %0d exp %0d", cpu_stall, efire));
      if (efire) begin
        t = 0;
        while (cpu_stall) begin @(negedge clk); t++; end
        n_act++;
        m_cur = hist[2]; m_cv = 1;
        hist.delete();
        check(got_bits == ct_m[m_cur].cfg, $sformatf("config bits %h exp %h", got_bits, ct_m[m_cur].cfg));
        check(freq_code == ct_m[m_cur].freq && miss_lat == ct_m[m_cur].miss_lat, "frequency and miss latency");
        check(cur_id == m_cur && cur_valid, "current ID");
        check(reconfig_cnt == 16'(n_act), "reconfiguration count");
        // stall covers flush (20), serial load (14 bits x 2 + 1) and clear (10)
        check(t >= 20 + 28 + 10 && t < 80, $sformatf("stall lasted %0d cycles", t));
      end
      repeat ($urandom_range(5, 30)) @(negedge clk);
      check(!cpu_stall, "no stall between intervals");
    end
    check(n_act >= 10, $sformatf("actuations %0d", n_act));
    $display("actuations: %0d", n_act);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
