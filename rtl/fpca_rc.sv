// fpca_rc: reconfigurable comparator (RC) of the FPCA. For each way of the
// active configuration it takes the tag read from the T-D at (stack, way,
// col), and compares it with the address tag bits.
//
// Tags are always stored as addr[29:10] (the longest tag, for 1 KB ways).
// Of those, the low line_sel + sets_sel bits are set-index bits in the
// current configuration: they are masked, so only the real tag bits are
// compared (the fixed tag always, the variable tag/index field as the
// configuration requires). Ways beyond the configured number never hit.
// Combinational; hit_way is the lowest hitting way.
module fpca_rc
  import fpca_pkg::*;
(
  input  fpca_cfg_t                cfg,
  input  logic [ADDR_W-1:0]        addr,
  input  logic [TD_W-1:0]          stack,
  input  logic [2:0]               col,
  input  td_meta_t [N_TD-1:0]      rd_meta,
  output logic [MAX_WAYS-1:0]      way_hit,
  output logic                     hit,
  output logic [2:0]               hit_way
);

  logic [TAG_W-1:0] atag, mask;

  assign atag = addr[ADDR_W-1:TAG_LSB];
  assign mask = ~((TAG_W'(1) << (cfg.line_sel + cfg.sets_sel)) - TAG_W'(1));

  for (genvar w = 0; w < MAX_WAYS; w++) begin : g_way
    td_meta_t m;
    assign m = rd_meta[td_index(cfg, 32'(stack), w, 32'(col))];
    assign way_hit[w] = (w < cfg_ways(cfg)) && cfg.en && m.valid &&
                        (((m.tag ^ atag) & mask) == '0);
  end

  assign hit = |way_hit;

  // lowest hitting way (a legal cache has at most one)
  always_comb begin
    hit_way = '0;
    for (int w = 0; w < MAX_WAYS; w++)
      if (way_hit[w] && hit_way == '0) hit_way = 3'(w);
  end

endmodule
