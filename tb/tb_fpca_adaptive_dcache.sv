// tb_fpca_adaptive_dcache: end-to-end test of the adaptive data cache at
// its full size and default parameters (32 KB FPCA, 100,000-instruction
// intervals, 100 MHz configuration clock from a 4.2 GHz core clock).
//
// A core stand-in retires one basic block per cycle and issues loads and
// stores back to back; l2_model plays the L2. Software set-up writes the
// six BB range limits ([1,4], [5,8], [9,15]) and the three tables. The
// program runs four phases of five intervals each; each phase has its own
// basic-block sizes (so its own BBV) and its own memory behaviour:
//   phase A: blocks of 5..8 instructions, loads/stores in a 16 KB set
//            -> Cache ID 1: 32 KB 8-way 32 B lines, n = 3
//   phase B: blocks of 9..15, stores streaming over 64 KB
//            -> Cache ID 2: 8 KB 2-way 16 B lines, 256 sets, n = 2
//   phase C: blocks of 1..4, random accesses over 4 KB
//            -> Cache ID 3: cache disabled (uncached)
//   phase A again -> Cache ID 1
// Checks: every load against a reference memory, hit latency against the
// reported n, the Cache ID recognised for each interval, that actuation
// happens after three equal IDs and only then, the frequency / miss
// latency / configuration after each actuation, and the L2 contents after
// each flush. It counts each mechanism (hits, misses, eviction
// write-backs, flush write-backs, actuations, stall cycles, distinct hit
// latencies, uncached accesses) and fails if any of them never happened.
module tb_fpca_adaptive_dcache;
  import fpca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cpu_req_t   cpu_req;
  cpu_resp_t  cpu_resp;
  logic       cpu_req_ready, bb_valid, cpu_stall, l2_req, l2_we, l2_ack, cur_valid, ivl_end;
  logic [3:0] retire_cnt;
  logic [LIMIT_W-1:0] bb_size;
  logic [2:0] hit_lat;
  logic [MLAT_W-1:0] miss_lat;
  sw_wr_t     sw_wr;
  logic [ADDR_W-1:0] l2_addr;
  logic [DATA_W-1:0] l2_wdata, l2_rdata;
  logic [DATA_W/8-1:0] l2_be;
  logic [FREQ_W-1:0] freq_code;
  fpca_cfg_t  cfg;
  logic [CID_W-1:0] cur_id, phase_cid;
  logic [SPC_W-1:0] phase_spc;
  ivl_stats_t ivl_stats;
  logic [15:0] reconfig_cnt;
  int unsigned n_rd, n_wr;

  fpca_adaptive_dcache dut (
    .clk, .rst_n, .cpu_req, .cpu_req_ready, .cpu_resp, .retire_cnt, .bb_valid, .bb_size,
    .cpu_stall, .hit_lat, .miss_lat, .sw_wr, .l2_req, .l2_we, .l2_addr, .l2_wdata, .l2_be,
    .l2_ack, .l2_rdata, .freq_code, .cfg, .cur_id, .cur_valid, .ivl_end, .ivl_stats,
    .phase_spc, .phase_cid, .reconfig_cnt
  );

  l2_model #(.LAT(4)) u_l2 (
    .clk, .rst_n, .req(l2_req), .we(l2_we), .addr(l2_addr), .wdata(l2_wdata), .be(l2_be),
    .ack(l2_ack), .rdata(l2_rdata), .n_rd, .n_wr
  );

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- program phases ----------------------------------------------------
  localparam int N_PH = 4;
  localparam int IVL_PER_PH = 5;
  int phase;             // index into the phase list, advanced at interval ends
  int ph_kind [N_PH] = '{0, 1, 2, 0};
  int n_ivl;
  logic done;

  // Cache ID per phase kind and table contents
  localparam logic [3:0] KIND_CID [3] = '{4'd1, 4'd2, 4'd3};
  cfg_entry_t ct_m [16];

  // ---- reference memory --------------------------------------------------
  logic [DATA_W-1:0] refm [logic [ADDR_W-4:0]];
  logic [ADDR_W-4:0] written [$];

  function automatic logic [DATA_W-1:0] init_word(logic [ADDR_W-1:0] a);
    return {2'b10, a, 2'b01, ~a};
  endfunction
  function automatic logic [DATA_W-1:0] ref_word(logic [ADDR_W-1:0] a);
    if (refm.exists(a[ADDR_W-1:3])) return refm[a[ADDR_W-1:3]];
    return init_word({a[ADDR_W-1:3], 3'b000});
  endfunction
  function automatic logic [DATA_W-1:0] size_mask(logic [1:0] sz);
    return (sz == 2'd3) ? '1 : ((64'd1 << (8 << sz)) - 64'd1);
  endfunction

  // ---- mechanism counters -----------------------------------------------
  int n_hits, n_misses, n_unc, n_evict_wb, n_flush_wb, n_stall_cyc, n_actuations;
  logic [4:0] lat_seen;

  always @(posedge clk) if (rst_n) begin
    if (cpu_stall) n_stall_cyc++;
    if (l2_req && l2_ack && l2_we) begin
      if (cpu_stall)   n_flush_wb++;
      else if (cfg.en) n_evict_wb++;
    end
  end

  task automatic sw(input sw_target_e t, input int a, input logic [24:0] d);
    @(negedge clk);
    sw_wr = '{valid: 1'b1, target: t, addr: 9'(a), data: d};
    @(negedge clk);
    sw_wr = '0;
  endtask

  // ---- core: retirement (one basic block per cycle) ----------------------
  always @(negedge clk) begin
    if (!rst_n || done) begin
      bb_valid   = 1'b0;
      retire_cnt = '0;
      bb_size    = '0;
    end else begin
      int k;
      k = ph_kind[phase];
      case (k)
        0:       retire_cnt = 4'($urandom_range(5, 8));
        1:       retire_cnt = 4'($urandom_range(9, 15));
        default: retire_cnt = 4'($urandom_range(1, 4));
      endcase
      bb_valid = 1'b1;
      bb_size  = LIMIT_W'(retire_cnt);
    end
  end

  // ---- core: memory accesses ---------------------------------------------
  task automatic access(input logic we, input logic [ADDR_W-1:0] a, input logic [1:0] sz,
                        input logic [DATA_W-1:0] wd);
    logic [DATA_W-1:0] exp, m, w;
    int lat;
    logic en_at;
    @(negedge clk);
    while (cpu_stall) @(negedge clk);
    cpu_req = '{valid: 1'b1, we: we, addr: a, size: sz, wdata: wd};
    while (!cpu_req_ready) @(negedge clk);
    en_at = cfg.en;
    @(negedge clk);
    cpu_req.valid = 1'b0;
    lat = 1;
    while (!cpu_resp.valid) begin @(negedge clk); lat++; end
    if (!en_at) n_unc++;
    else if (cpu_resp.hit) begin
      n_hits++;
      check(lat == int'(hit_lat), $sformatf("hit latency %0d, reported n=%0d", lat, hit_lat));
      if (lat <= 4) lat_seen[lat] = 1'b1;
    end else n_misses++;
    if (we) begin
      m = size_mask(sz) << (8 * a[2:0]);
      w = ref_word(a);
      w = (w & ~m) | ((wd << (8 * a[2:0])) & m);
      if (!refm.exists(a[ADDR_W-1:3])) written.push_back(a[ADDR_W-1:3]);
      refm[a[ADDR_W-1:3]] = w;
    end else begin
      exp = (ref_word(a) >> (8 * a[2:0])) & size_mask(sz);
      check(cpu_resp.rdata == exp, $sformatf("load %h got %h exp %h", a, cpu_resp.rdata, exp));
    end
  endtask

  int unsigned stream_ptr;
  initial begin : mem_proc
    logic [1:0] sz;
    logic [ADDR_W-1:0] a;
    cpu_req = '0;
    stream_ptr = 0;
    wait (rst_n);
    wait (n_ivl >= 0 && sw_done);
    while (!done) begin
      sz = 2'($urandom_range(0, 3));
      case (ph_kind[phase])
        0: begin
          a = 30'h0010_0000 + 30'($urandom_range(0, 16383));
          a = a & ~((30'd1 << sz) - 30'd1);
          access($urandom_range(0, 3) == 0, a, sz, {$urandom, $urandom});
        end
        1: begin
          a = 30'h0020_0000 + 30'(stream_ptr % 65536);
          stream_ptr += 8;
          access(1'b1, a, 2'd3, {$urandom, $urandom});
        end
        default: begin
          a = 30'h0030_0000 + 30'($urandom_range(0, 4095));
          a = a & ~((30'd1 << sz) - 30'd1);
          access($urandom_range(0, 1) == 0, a, sz, {$urandom, $urandom});
        end
      endcase
    end
  end

  // ---- interval ends: phase recognition and actuation ---------------------
  logic sw_done;
  logic [3:0] hist [$];
  logic [3:0] m_cur;
  logic m_cv;

  task automatic check_l2_flushed();
    foreach (written[i]) begin
      logic [ADDR_W-1:0] a;
      a = {written[i], 3'b000};
      check(u_l2.peek(a) == ref_word(a), $sformatf("L2 after flush at %h", a));
    end
  endtask

  initial begin
    logic [3:0] ecid;
    logic efire;
    int k, t;
    sw_wr = '0; phase = 0; n_ivl = 0; done = 1'b0; sw_done = 1'b0;
    n_hits = 0; n_misses = 0; n_unc = 0; n_evict_wb = 0; n_flush_wb = 0;
    n_stall_cyc = 0; n_actuations = 0; lat_seen = '0; m_cv = 1'b0; m_cur = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // software set-up; the memory stand-in waits for sw_done
    sw(SW_LIMIT, 0, 25'd1);  sw(SW_LIMIT, 1, 25'd4);
    sw(SW_LIMIT, 2, 25'd5);  sw(SW_LIMIT, 3, 25'd8);
    sw(SW_LIMIT, 4, 25'd9);  sw(SW_LIMIT, 5, 25'd15);
    // RST: SimPoint class = 1 + index of the largest BBV component (0 if none)
    for (int v = 0; v < 512; v++) begin
      int c0, c1, c2, s;
      c0 = v % 8; c1 = (v / 8) % 8; c2 = v / 64;
      s = 0;
      if (c0 > 0 || c1 > 0 || c2 > 0) s = (c1 >= c0 && c1 >= c2) ? 1 : (c2 >= c0) ? 2 : 3;
      sw(SW_RST, v, 25'(s));
    end
    // Pattern Table: class -> Cache ID (class 1 = phase A, 2 = B, 3 = C)
    for (int s = 0; s < 16; s++) sw(SW_PT, s, 25'((s >= 1 && s <= 3) ? s : 0));
    for (int i = 0; i < 16; i++) ct_m[i] = '{cfg: make_cfg(4, 3, 2, 0, 3), freq: 6'd42, miss_lat: 5'd20};
    ct_m[1] = '{cfg: make_cfg(4, 3, 2, 0, 3), freq: 6'd40, miss_lat: 5'd20};
    ct_m[2] = '{cfg: make_cfg(1, 1, 1, 1, 2), freq: 6'd42, miss_lat: 5'd16};
    ct_m[3] = '{cfg: make_cfg(1, 0, 0, 0, 1), freq: 6'd42, miss_lat: 5'd12};
    ct_m[3].cfg.en = 1'b0;
    for (int i = 0; i < 16; i++) sw(SW_CT, i, ct_m[i]);
    sw_done = 1'b1;

    while (n_ivl < N_PH * IVL_PER_PH) begin
      @(posedge clk);
      if (ivl_end) begin
        k = ph_kind[phase];
        n_ivl++;
        check(ivl_stats.cycles > 0 && ivl_stats.cycles < 60000, "interval cycle count");
        check(ivl_stats.hits + ivl_stats.misses > 0 || k == 2, "interval hit/miss counts");
        if (n_ivl % IVL_PER_PH == 0 && phase < N_PH - 1) phase++;
        ecid = KIND_CID[k];
        repeat (3) @(negedge clk);
        check(phase_cid == ecid, $sformatf("interval %0d: Cache ID %0d exp %0d (bbv %h)",
                                           n_ivl, phase_cid, ecid, ivl_stats.bbv));
        hist.push_back(phase_cid);
        if (hist.size() > 3) void'(hist.pop_front());
        efire = hist.size() == 3 && hist[0] == hist[1] && hist[1] == hist[2] &&
                (!m_cv || hist[0] != m_cur);
        check(cpu_stall == efire, $sformatf("interval %0d: stall %0d exp %0d", n_ivl, cpu_stall, efire));
        if (efire) begin
          t = 0;
          while (cpu_stall) begin @(negedge clk); t++; end
          n_actuations++;
          m_cur = hist[2]; m_cv = 1'b1;
          hist.delete();
          check(cfg == ct_m[m_cur].cfg, $sformatf("configuration %h exp %h", cfg, ct_m[m_cur].cfg));
          check(freq_code == ct_m[m_cur].freq && miss_lat == ct_m[m_cur].miss_lat,
                "frequency and miss latency");
          check(cur_id == m_cur && cur_valid, "current Cache ID");
          check(reconfig_cnt == 16'(n_actuations), "reconfiguration count");
          check(t > 14 * 42, $sformatf("stall of %0d cycles covers the serial load", t));
          $display("actuation %0d after interval %0d: Cache ID %0d, stall %0d cycles",
                   n_actuations, n_ivl, m_cur, t);
          check_l2_flushed();
        end
      end
    end
    done = 1'b1;
    repeat (400) @(negedge clk);

    $display("intervals=%0d hits=%0d misses=%0d uncached=%0d evict_wb=%0d flush_wb=%0d",
             n_ivl, n_hits, n_misses, n_unc, n_evict_wb, n_flush_wb);
    $display("actuations=%0d stall_cycles=%0d hit_latencies_seen=%b l2 reads=%0d writes=%0d",
             n_actuations, n_stall_cyc, lat_seen, n_rd, n_wr);
    check(n_hits > 0, "hits happened");
    check(n_misses > 0, "misses happened");
    check(n_evict_wb > 0, "eviction write-backs happened");
    check(n_flush_wb > 0, "flush write-backs happened");
    check(n_actuations == 4, $sformatf("actuations %0d exp 4", n_actuations));
    check(n_stall_cyc > 0, "stalls happened");
    check(lat_seen[2] && lat_seen[3], "hit latency changed between n=2 and n=3");
    check(n_unc > 0, "uncached accesses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
