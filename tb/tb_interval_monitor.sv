// tb_interval_monitor: feeds a synthetic retirement stream (up to 8
// instructions per cycle, basic blocks of random sizes) and checks, for
// each interval, its length in cycles, the 3-D BBV built from the three
// sensor ranges, and the hit/miss counts, against a model in the
// testbench. Uses a short interval of 2000 instructions.
module tb_interval_monitor;
  import fpca_pkg::*;

  localparam int unsigned IV = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] retire_cnt;
  logic bb_valid, hit, miss, ivl_end;
  logic [11:0] bb_size;
  sw_wr_t sw_wr;
  ivl_stats_t stats;

  interval_monitor #(.INTERVAL(IV)) dut (.clk, .rst_n, .retire_cnt, .bb_valid, .bb_size,
                                         .hit, .miss, .sw_wr, .ivl_end, .stats);

  int checks = 0, failures = 0;
  int unsigned lim [6] = '{4, 9, 10, 15, 16, 40};

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  int unsigned m_instr, m_cyc, m_hit, m_miss;
  int unsigned m_s [3];
  ivl_stats_t exp_q [$];

  function automatic logic [2:0] comp_of(int unsigned v);
    if (v > 17'h1ffff) v = 17'h1ffff;
    return 3'(v >> 14);
  endfunction

  initial begin
    int n_ivl;
    retire_cnt = 0; bb_valid = 0; bb_size = 0; hit = 0; miss = 0; sw_wr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      sw_wr = '{valid: 1'b1, target: SW_LIMIT, addr: 9'(i), data: 25'(lim[i])};
    end
    @(negedge clk);
    sw_wr = '0;
    // the cycle counter has run for the 8 clock edges since reset release
    m_instr = 0; m_cyc = 8; m_hit = 0; m_miss = 0; m_s = '{0, 0, 0};
    n_ivl = 0;
    for (int c = 0; c < 40000; c++) begin
      @(negedge clk);
      // check a finished interval
      if (ivl_end) begin
        ivl_stats_t e;
        e = exp_q.pop_front();
        check(stats == e, $sformatf("interval %0d: got bbv %h cyc %0d h %0d m %0d exp bbv %h cyc %0d h %0d m %0d",
                                    n_ivl, stats.bbv, stats.cycles, stats.hits, stats.misses,
                                    e.bbv, e.cycles, e.hits, e.misses));
        n_ivl++;
      end
      // phase changes every 8000 cycles: different block sizes
      retire_cnt = 4'($urandom_range(0, 8));
      bb_valid = ($urandom_range(0, 2) == 0);
      case ((c / 8000) % 3)
        0: bb_size = 12'($urandom_range(4, 12));
        1: bb_size = 12'($urandom_range(10, 30));
        default: bb_size = 12'($urandom_range(1, 60));
      endcase
      hit = ($urandom_range(0, 2) == 0);
      miss = ($urandom_range(0, 9) == 0);
      // model this cycle
      m_cyc++;
      if (hit) m_hit++;
      if (miss) m_miss++;
      for (int s = 0; s < 3; s++)
        if (bb_valid && bb_size >= lim[2*s] && bb_size <= lim[2*s+1]) m_s[s] += bb_size;
      m_instr += retire_cnt;
      if (m_instr >= IV) begin
        ivl_stats_t e;
        e.bbv = {comp_of(m_s[2]), comp_of(m_s[1]), comp_of(m_s[0])};
        e.cycles = 17'(m_cyc);
        e.hits = 16'(m_hit);
        e.misses = 16'(m_miss);
        exp_q.push_back(e);
        m_instr -= IV; m_cyc = 0; m_hit = 0; m_miss = 0; m_s = '{0, 0, 0};
      end
    end
    check(n_ivl > 50, $sformatf("intervals seen %0d", n_ivl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
