// fpca_adaptive_dcache: data side of an adaptive processor whose L1 data
// cache is a Field-Programmable Cache Array (FPCA) tuned at run time by the
// Cache Matching Algorithm (CMA).
//
// The FPCA (fpca_cache) serves the core's loads and stores. The interval
// monitor watches the retired instruction stream: per 100,000-instruction
// interval it builds a 3-D Basic Block Vector from three BB sensors and
// counts cycles, hits and misses. After each interval the CMA coprocessor
// recognises the program phase (Representation Space Table -> SimPoint
// class -> Pattern Table -> Cache ID); when three consecutive intervals ask
// for the same configuration and it is not the active one, it stalls the
// core, has the FPCA write back its dirty data, loads the new 14
// configuration bits serially, and reports the new operating frequency and
// latencies. Learning (feature extraction, clustering, choosing the best
// configuration per phase) is software; it fills the tables through sw_wr.
//
// External parts stay outside: the core (cpu_req/cpu_resp, retire_cnt,
// bb_valid/bb_size, cpu_stall, hit_lat/miss_lat), the L2 cache (l2_*) and
// the clock generator (freq_code, in 100 MHz units). Interfaces and timing
// are those of fpca_cache, interval_monitor and cma_coprocessor.
module fpca_adaptive_dcache
  import fpca_pkg::*;
#(
  parameter int unsigned INTERVAL  = 100000,
  parameter int unsigned CFG_DIV   = 42,
  parameter fpca_cfg_t   RESET_CFG = make_cfg(4, 3, 2, 0, 3)
) (
  input  logic                clk,
  input  logic                rst_n,
  // core: memory port
  input  cpu_req_t            cpu_req,
  output logic                cpu_req_ready,
  output cpu_resp_t           cpu_resp,
  // core: retirement
  input  logic [3:0]          retire_cnt,
  input  logic                bb_valid,
  input  logic [LIMIT_W-1:0]  bb_size,
  output logic                cpu_stall,
  output logic [2:0]          hit_lat,
  output logic [MLAT_W-1:0]   miss_lat,
  // software set-up of tables and limits
  input  sw_wr_t              sw_wr,
  // L2
  output logic                l2_req,
  output logic                l2_we,
  output logic [ADDR_W-1:0]   l2_addr,
  output logic [DATA_W-1:0]   l2_wdata,
  output logic [DATA_W/8-1:0] l2_be,
  input  logic                l2_ack,
  input  logic [DATA_W-1:0]   l2_rdata,
  // clock generator
  output logic [FREQ_W-1:0]   freq_code,
  // status
  output fpca_cfg_t           cfg,
  output logic [CID_W-1:0]    cur_id,
  output logic                cur_valid,
  output logic                ivl_end,
  output ivl_stats_t          ivl_stats,
  output logic [SPC_W-1:0]    phase_spc,
  output logic [CID_W-1:0]    phase_cid,
  output logic [15:0]         reconfig_cnt
);

  logic reconf_req, flush_done, cfg_sen, cfg_sdata, cfg_apply, reconf_done;
  logic hit_pulse, miss_pulse;

  fpca_cache #(.RESET_CFG(RESET_CFG)) u_fpca (
    .clk         (clk),
    .rst_n       (rst_n),
    .cpu_req     (cpu_req),
    .req_ready   (cpu_req_ready),
    .cpu_resp    (cpu_resp),
    .l2_req      (l2_req),
    .l2_we       (l2_we),
    .l2_addr     (l2_addr),
    .l2_wdata    (l2_wdata),
    .l2_be       (l2_be),
    .l2_ack      (l2_ack),
    .l2_rdata    (l2_rdata),
    .reconf_req  (reconf_req),
    .flush_done  (flush_done),
    .cfg_sen     (cfg_sen),
    .cfg_sdata   (cfg_sdata),
    .cfg_apply   (cfg_apply),
    .reconf_done (reconf_done),
    .hit_pulse   (hit_pulse),
    .miss_pulse  (miss_pulse),
    .cfg         (cfg)
  );

  interval_monitor #(.INTERVAL(INTERVAL)) u_mon (
    .clk        (clk),
    .rst_n      (rst_n),
    .retire_cnt (cpu_stall ? 4'd0 : retire_cnt),
    .bb_valid   (bb_valid && !cpu_stall),
    .bb_size    (bb_size),
    .hit        (hit_pulse),
    .miss       (miss_pulse),
    .sw_wr      (sw_wr),
    .ivl_end    (ivl_end),
    .stats      (ivl_stats)
  );

  cma_coprocessor #(.CFG_DIV(CFG_DIV)) u_cma (
    .clk          (clk),
    .rst_n        (rst_n),
    .ivl_end      (ivl_end),
    .bbv          (ivl_stats.bbv),
    .sw_wr        (sw_wr),
    .reconf_req   (reconf_req),
    .flush_done   (flush_done),
    .cfg_sen      (cfg_sen),
    .cfg_sdata    (cfg_sdata),
    .cfg_apply    (cfg_apply),
    .reconf_done  (reconf_done),
    .cpu_stall    (cpu_stall),
    .freq_code    (freq_code),
    .miss_lat     (miss_lat),
    .cur_id       (cur_id),
    .cur_valid    (cur_valid),
    .last_spc     (phase_spc),
    .last_cid     (phase_cid),
    .reconfig_cnt (reconfig_cnt)
  );

  assign hit_lat = {1'b0, cfg.hit_lat} + 3'd1;

endmodule
