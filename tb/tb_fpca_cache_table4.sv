// tb_fpca_cache_table4: runs the FPCA data cache through every cache
// organisation that the adaptive system selected for real programs in the
// original evaluation (its table of selected configurations, for the
// performance, energy x time and energy goals) and that the array can hold
// (at least 128 sets). Each is loaded through the serial configuration
// port with its own hit latency, and then checked as in tb_fpca_cache:
//   - every load against a reference memory kept by the testbench,
//   - hit latency n in cycles and hit/miss flags of a repeated access,
//   - a working set of exactly the capacity hits on its second pass, and
//     twice the capacity misses (all lines when direct-mapped),
//   - after each flush the L2 holds every stored byte (write-back),
//   - content is discarded after reconfiguration; 128-cycle invalidation.
// Configurations with fewer than 128 sets in that table cannot be
// expressed by the array and are not run.
module tb_fpca_cache_table4;
  import fpca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cpu_req_t  cpu_req;
  cpu_resp_t cpu_resp;
  logic req_ready;
  logic l2_req, l2_we, l2_ack;
  logic [ADDR_W-1:0] l2_addr;
  logic [DATA_W-1:0] l2_wdata, l2_rdata;
  logic [7:0] l2_be;
  logic reconf_req, flush_done, cfg_sen, cfg_sdata, cfg_apply, reconf_done;
  logic hit_pulse, miss_pulse;
  fpca_cfg_t cfg;
  int unsigned n_rd, n_wr;

  fpca_cache dut (
    .clk, .rst_n, .cpu_req, .req_ready, .cpu_resp,
    .l2_req, .l2_we, .l2_addr, .l2_wdata, .l2_be, .l2_ack, .l2_rdata,
    .reconf_req, .flush_done, .cfg_sen, .cfg_sdata, .cfg_apply, .reconf_done,
    .hit_pulse, .miss_pulse, .cfg
  );

  l2_model #(.LAT(3)) u_l2 (
    .clk, .rst_n, .req (l2_req), .we (l2_we), .addr (l2_addr), .wdata (l2_wdata),
    .be (l2_be), .ack (l2_ack), .rdata (l2_rdata), .n_rd, .n_wr
  );

  int checks = 0, failures = 0;
  int n_hits = 0, n_misses = 0;      // from response flags
  int p_hits = 0, p_misses = 0;      // from hit/miss pulses

  always @(posedge clk) begin
    if (hit_pulse)  p_hits++;
    if (miss_pulse) p_misses++;
  end

  // reference memory, same initial contents as the L2 model
  logic [DATA_W-1:0] refm [logic [ADDR_W-4:0]];
  logic [ADDR_W-4:0] written [$];

  function automatic logic [DATA_W-1:0] ref_word(logic [ADDR_W-1:0] a);
    if (refm.exists(a[ADDR_W-1:3])) return refm[a[ADDR_W-1:3]];
    return {2'b10, a[ADDR_W-1:3], 3'b000, 2'b01, ~{a[ADDR_W-1:3], 3'b000}};
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // One access; returns load data, hit flag and latency in cycles
  task automatic access(input logic we, input logic [ADDR_W-1:0] a, input logic [1:0] sz,
                        input logic [DATA_W-1:0] wd, output logic [DATA_W-1:0] rd,
                        output logic h, output int lat);
    @(negedge clk);
    cpu_req.valid = 1'b1;
    cpu_req.we    = we;
    cpu_req.addr  = a;
    cpu_req.size  = sz;
    cpu_req.wdata = wd;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req.valid = 1'b0;
    lat = 1;
    while (!cpu_resp.valid) begin
      @(negedge clk);
      lat++;
    end
    rd = cpu_resp.rdata;
    h  = cpu_resp.hit;
    if (h) n_hits++;
    else   n_misses++;
  endtask

  function automatic logic [DATA_W-1:0] size_mask(logic [1:0] sz);
    return (sz == 2'd3) ? '1 : ((64'd1 << (8 << sz)) - 64'd1);
  endfunction

  task automatic load_check(input logic [ADDR_W-1:0] a, input logic [1:0] sz,
                            output logic h, output int lat);
    logic [DATA_W-1:0] rd, exp;
    access(1'b0, a, sz, '0, rd, h, lat);
    exp = (ref_word(a) >> (8 * a[2:0])) & size_mask(sz);
    check(rd == exp, $sformatf("load %h size %0d got %h exp %h", a, sz, rd, exp));
  endtask

  task automatic store(input logic [ADDR_W-1:0] a, input logic [1:0] sz, input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] rd, w, m;
    logic h;
    int lat;
    access(1'b1, a, sz, d, rd, h, lat);
    m = size_mask(sz) << (8 * a[2:0]);
    w = ref_word(a);
    w = (w & ~m) | ((d << (8 * a[2:0])) & m);
    if (!refm.exists(a[ADDR_W-1:3])) written.push_back(a[ADDR_W-1:3]);
    refm[a[ADDR_W-1:3]] = w;
  endtask

  // Flush, check L2 against reference, load cfg serially, invalidate
  task automatic reconfigure(input fpca_cfg_t c);
    int t0, tclr;
    logic [CFG_BITS-1:0] bits;
    bits = c;
    @(negedge clk);
    reconf_req = 1'b1;
    while (!flush_done) @(negedge clk);
    reconf_req = 1'b0;
    foreach (written[i])
      check(u_l2.peek({written[i], 3'b000}) == refm[written[i]],
            $sformatf("L2 after flush at %h", {written[i], 3'b000}));
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_sen = 1'b1;
      cfg_sdata = bits[i];
    end
    @(negedge clk);
    cfg_sen = 1'b0;
    cfg_apply = 1'b1;
    t0 = 0;
    @(negedge clk);
    cfg_apply = 1'b0;
    tclr = 1;
    while (!reconf_done) begin
      @(negedge clk);
      tclr++;
    end
    check(cfg == c, "configuration applied");
    check(tclr == ROWS + 1, $sformatf("invalidation took %0d cycles", tclr));
  endtask

  task automatic run_cfg(input fpca_cfg_t c, input int unsigned seed_base);
    int unsigned cap, line, n_lines, h0, m0;
    logic [ADDR_W-1:0] base;
    logic h;
    int lat;
    reconfigure(c);
    cap  = cfg_bytes(c);
    line = 8 << c.line_sel;
    base = ADDR_W'(seed_base) << 16;
    $display("config: %0d KB, %0d-way, %0d B lines, n=%0d, en=%0d",
             cap / 1024, cfg_ways(c), line, c.hit_lat + 1, c.en);
    // content is discarded: first access misses, second hits after n cycles
    load_check(base + 30'h48, 2'd3, h, lat);
    check(!h, "first access after reconfiguration misses");
    load_check(base + 30'h48, 2'd2, h, lat);
    if (c.en) begin
      check(h, "repeated access hits");
      check(lat == int'(c.hit_lat) + 1, $sformatf("hit latency %0d exp %0d", lat, c.hit_lat + 1));
    end else begin
      check(!h, "disabled cache never hits");
    end
    if (!c.en) begin
      for (int i = 0; i < 40; i++) begin
        logic [ADDR_W-1:0] a;
        a = base + ADDR_W'($urandom_range(0, 4095) << 3);
        if (i % 3 == 0) store(a, 2'd3, {$urandom, $urandom});
        else load_check(a, 2'd3, h, lat);
      end
      return;
    end
    // working set of exactly the capacity: second pass hits everywhere
    n_lines = cap / line;
    for (int i = 0; i < int'(n_lines); i++) load_check(base + ADDR_W'(i * line), 2'd3, h, lat);
    h0 = n_hits; m0 = n_misses;
    for (int i = 0; i < int'(n_lines); i++) load_check(base + ADDR_W'(i * line + 8 * (i % (line / 8))), 2'd3, h, lat);
    check(n_hits - h0 == n_lines && n_misses == m0,
          $sformatf("capacity pass: %0d hits %0d misses of %0d", n_hits - h0, n_misses - m0, n_lines));
    // twice the capacity, sequential: misses on the second pass
    for (int i = 0; i < int'(2 * n_lines); i++) load_check(base + ADDR_W'(i * line), 2'd3, h, lat);
    m0 = n_misses;
    for (int i = 0; i < int'(n_lines); i++) load_check(base + ADDR_W'(i * line), 2'd3, h, lat);
    // direct-mapped: every line was replaced; with more ways the
    // round-robin victim pointer lets some survive, but most must miss
    if (c.ways_sel == 0)
      check(n_misses - m0 == n_lines, $sformatf("over-capacity pass misses %0d of %0d", n_misses - m0, n_lines));
    else
      check(n_misses - m0 >= n_lines / 8, $sformatf("over-capacity pass misses %0d of %0d", n_misses - m0, n_lines));
    // random loads and stores of all sizes, conflicting tags included
    for (int i = 0; i < 600; i++) begin
      logic [ADDR_W-1:0] a;
      logic [1:0] sz;
      sz = 2'($urandom_range(0, 3));
      a  = base + ADDR_W'($urandom_range(0, 3 * cap - 1));
      if ($urandom_range(0, 7) == 0) a = a ^ (ADDR_W'($urandom_range(1, 255)) << 18);
      a  = a & ~((ADDR_W'(1) << sz) - 1);
      if ($urandom_range(0, 2) == 0) store(a, sz, {$urandom, $urandom});
      else load_check(a, sz, h, lat);
    end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h;
    int lat;
    fpca_cfg_t c;
    cpu_req = '0;
    reconf_req = 1'b0; cfg_sen = 1'b0; cfg_sdata = 1'b0; cfg_apply = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the reset configuration works after the initial invalidation
    load_check(30'h100, 2'd3, h, lat);
    check(!h, "cold miss after reset");
    store(30'h104, 2'd2, 64'hdead_beef);
    load_check(30'h100, 2'd3, h, lat);
    check(h && lat == 3, $sformatf("reset config hit latency %0d", lat));

    run_cfg(make_cfg(4, 1, 3, 1, 3), 1);                    // ID 158: 32 KB 2-way 64 B, 256 sets, n=3
    run_cfg(make_cfg(4, 2, 3, 0, 3), 2);                    // ID 174: 32 KB 4-way 64 B, 128 sets, n=3
    run_cfg(make_cfg(4, 3, 0, 2, 3), 3);                    // ID 178: 32 KB 8-way 8 B, 512 sets, n=3
    run_cfg(make_cfg(4, 3, 2, 0, 3), 4);                    // ID 186: 32 KB 8-way 32 B, 128 sets, n=3
    run_cfg(make_cfg(2, 2, 0, 2, 3), 5);                    // ID 226: 16 KB 4-way 8 B, 512 sets, n=3
    run_cfg(make_cfg(2, 2, 1, 1, 3), 6);                    // ID 230: 16 KB 4-way 16 B, 256 sets, n=3
    run_cfg(make_cfg(2, 3, 0, 1, 3), 7);                    // ID 242: 16 KB 8-way 8 B, 256 sets, n=3
    run_cfg(make_cfg(2, 3, 1, 0, 3), 8);                    // ID 246: 16 KB 8-way 16 B, 128 sets, n=3
    run_cfg(make_cfg(1, 0, 1, 2, 2), 9);                    // ID 261: 8 KB 1-way 16 B, 512 sets, n=2
    run_cfg(make_cfg(1, 0, 2, 1, 2), 10);                   // ID 265: 8 KB 1-way 32 B, 256 sets, n=2
    run_cfg(make_cfg(1, 0, 3, 0, 2), 11);                   // ID 269: 8 KB 1-way 64 B, 128 sets, n=2
    run_cfg(make_cfg(1, 0, 0, 2, 2), 12);                   // ID 321: 4 KB 1-way 8 B, 512 sets, n=2
    run_cfg(make_cfg(4, 0, 0, 5, 2), 13);                   // ID 129: 32 KB 1-way 8 B, 4096 sets, n=2
    run_cfg(make_cfg(4, 0, 1, 4, 2), 14);                   // ID 133: 32 KB 1-way 16 B, 2048 sets, n=2
    run_cfg(make_cfg(4, 0, 2, 3, 2), 15);                   // ID 137: 32 KB 1-way 32 B, 1024 sets, n=2
    run_cfg(make_cfg(4, 0, 3, 2, 2), 16);                   // ID 141: 32 KB 1-way 64 B, 512 sets, n=2
    run_cfg(make_cfg(4, 1, 2, 2, 3), 17);                   // ID 154: 32 KB 2-way 32 B, 512 sets, n=3
    run_cfg(make_cfg(2, 0, 0, 4, 2), 18);                   // ID 193: 16 KB 1-way 8 B, 2048 sets, n=2
    run_cfg(make_cfg(2, 0, 1, 3, 2), 19);                   // ID 197: 16 KB 1-way 16 B, 1024 sets, n=2
    run_cfg(make_cfg(2, 0, 2, 2, 2), 20);                   // ID 201: 16 KB 1-way 32 B, 512 sets, n=2
    run_cfg(make_cfg(2, 0, 3, 1, 2), 21);                   // ID 205: 16 KB 1-way 64 B, 256 sets, n=2
    run_cfg(make_cfg(2, 1, 0, 3, 3), 22);                   // ID 210: 16 KB 2-way 8 B, 1024 sets, n=3
    run_cfg(make_cfg(2, 1, 1, 2, 3), 23);                   // ID 214: 16 KB 2-way 16 B, 512 sets, n=3
    run_cfg(make_cfg(4, 1, 2, 2, 1), 24);                   // ID 152: 32 KB 2-way 32 B, 512 sets, n=1
    run_cfg(make_cfg(2, 1, 0, 3, 1), 25);                   // ID 208: 16 KB 2-way 8 B, 1024 sets, n=1
    reconfigure(make_cfg(4, 3, 2, 0, 3));  // final flush check
    @(negedge clk);
    check(p_hits == n_hits && p_misses == n_misses,
          $sformatf("hit/miss pulses %0d/%0d vs responses %0d/%0d", p_hits, p_misses, n_hits, n_misses));
    $display("hits=%0d misses=%0d l2 reads=%0d writes=%0d", n_hits, n_misses, n_rd, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
