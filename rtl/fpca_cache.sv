// fpca_cache: the Field-Programmable Cache Array used as a write-back L1
// data cache. Four CCBs (8 T-Ds each, 32 KB in all) are read in parallel
// at the row chosen by the selection logic (SL); the reconfigurable
// comparator (RC) finds the hitting way and the output selection (OE)
// returns the addressed bytes. The organisation (capacity through the
// per-CCB Vcc bits and the number of sets, associativity 1..8, line size
// 8..64 B, hit latency 1..4 cycles) comes from a 14-bit configuration
// register loaded serially, as in the source design.
//
// Access (blocking, one at a time): a request is taken when req_ready is
// high; all T-Ds are read at that edge. For a hit the response comes n
// cycles after the accepting edge (n = cfg.hit_lat + 1; n = 1 means the
// cycle after the request). A miss writes back the victim line if any of
// its words is dirty, refills the line word by word from L2, reads the
// row again and answers as for a hit (resp.hit = 0). Stores write-allocate
// and mark the row dirty. With cfg.en = 0 every access goes to L2
// uncached.
//
// Reconfiguration: reconf_req (taken only between accesses) makes the
// cache write back every dirty row under the old configuration; it then
// raises flush_done and waits. Meanwhile cfg_sen/cfg_sdata shift the new
// 14 bits (MSB first) into a shadow register; cfg_apply makes them active.
// Every row of every powered T-D is then invalidated (128 cycles) and
// reconf_done pulses: the previous content is discarded, as the source
// design requires. After reset the same invalidation runs with RESET_CFG.
//
// L2 port: one 64-bit word per request; l2_req and its fields stay stable
// until l2_ack, which for a read also carries l2_rdata. l2_be gives the
// bytes of an uncached store; line transfers use all eight.
//
// Own choices (the source design does not specify them): replacement uses
// an invalid way first, else a round-robin pointer; a single port instead
// of the two read/write ports assumed in the source's simulations.
module fpca_cache
  import fpca_pkg::*;
#(
  parameter fpca_cfg_t RESET_CFG = make_cfg(4, 3, 2, 0, 3)  // 32 KB 8-way 32 B, n = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // processor side
  input  cpu_req_t            cpu_req,
  output logic                req_ready,
  output cpu_resp_t           cpu_resp,
  // L2 side
  output logic                l2_req,
  output logic                l2_we,
  output logic [ADDR_W-1:0]   l2_addr,
  output logic [DATA_W-1:0]   l2_wdata,
  output logic [DATA_W/8-1:0] l2_be,
  input  logic                l2_ack,
  input  logic [DATA_W-1:0]   l2_rdata,
  // reconfiguration
  input  logic                reconf_req,
  output logic                flush_done,
  input  logic                cfg_sen,
  input  logic                cfg_sdata,
  input  logic                cfg_apply,
  output logic                reconf_done,
  // status
  output logic                hit_pulse,
  output logic                miss_pulse,
  output fpca_cfg_t           cfg
);

  typedef enum logic [3:0] {
    S_CLEAR, S_IDLE, S_LOOK, S_WAIT, S_WB, S_FILL, S_REREAD, S_UNC,
    S_FL_RD, S_FL_MASK, S_FL_SCAN, S_CFG
  } state_e;

  state_e                   state_q;
  fpca_cfg_t                cfg_q;
  logic [CFG_BITS-1:0]      cfg_sr_q;
  cpu_req_t                 req_q;
  logic                     first_q;      // lookup not yet retried after a refill
  logic                     reconf_q;     // current clear sweep ends a reconfiguration
  logic [1:0]               wait_q;
  logic [DATA_W-1:0]        resp_data_q;
  logic [2:0]               vway_q, rr_q, beat_q;
  logic [TAG_W-1:0]         vtag_q;
  logic [MAX_COLS-1:0][DATA_W-1:0] vdata_q;
  logic [ROW_W-1:0]         row_cnt_q;
  logic [N_TD-1:0]          fmask_q;

  assign cfg = cfg_q;

  // ---------------------------------------------------------------- array
  logic                         rd_en;
  logic [ROW_W-1:0]             arr_row;
  logic [N_TD-1:0]              we_meta;
  td_meta_t                     wmeta;
  logic [N_TD-1:0][DATA_W/8-1:0] be;
  logic [DATA_W-1:0]            wdata;
  td_meta_t [N_TD-1:0]          rd_meta;
  logic [N_TD-1:0][DATA_W-1:0]  rd_data;

  for (genvar c = 0; c < N_CCB; c++) begin : g_ccb
    ccb u_ccb (
      .clk     (clk),
      .vcc     (cfg_q.vcc[c]),
      .rd_en   (rd_en),
      .row     (arr_row),
      .we_meta (we_meta[c*TD_PER_CCB +: TD_PER_CCB]),
      .wmeta   (wmeta),
      .be      (be[c*TD_PER_CCB +: TD_PER_CCB]),
      .wdata   (wdata),
      .rd_meta (rd_meta[c*TD_PER_CCB +: TD_PER_CCB]),
      .rd_data (rd_data[c*TD_PER_CCB +: TD_PER_CCB])
    );
  end

  // ------------------------------------------------------ SL / RC / OE
  logic [ADDR_W-1:0] sl_addr;
  logic [ROW_W-1:0]  sl_row;
  logic [TD_W-1:0]   sl_stack;
  logic [2:0]        sl_col;
  logic [MAX_WAYS-1:0] way_hit;
  logic              hit;
  logic [2:0]        hit_way;
  logic [DATA_W-1:0] hit_word, hit_rdata;

  assign sl_addr = (state_q == S_IDLE) ? cpu_req.addr : req_q.addr;

  fpca_sl u_sl (
    .cfg (cfg_q), .addr (sl_addr), .row (sl_row), .stack (sl_stack), .col (sl_col)
  );

  fpca_rc u_rc (
    .cfg (cfg_q), .addr (req_q.addr), .stack (sl_stack), .col (sl_col),
    .rd_meta (rd_meta), .way_hit (way_hit), .hit (hit), .hit_way (hit_way)
  );

  fpca_oe u_oe (
    .cfg (cfg_q), .rd_data (rd_data), .hit_way (hit_way), .stack (sl_stack),
    .col (sl_col), .boff (req_q.addr[2:0]), .size (req_q.size),
    .word (hit_word), .rdata (hit_rdata)
  );

  // ------------------------------------------------------ victim choice
  logic [2:0]  victim;
  logic        victim_dirty;
  logic found;
  td_meta_t vm;
  always_comb begin
    found  = 1'b0;
    vm     = '0;
    victim = 3'(rr_q & 3'(cfg_ways(cfg_q) - 1));
    for (int w = 0; w < MAX_WAYS; w++)
      if (w < cfg_ways(cfg_q) && !found && !rd_meta[td_index(cfg_q, 32'(sl_stack), 32'(w), 32'(0))].valid) begin
        victim = 3'(w);
        found  = 1'b1;
      end
    victim_dirty = 1'b0;
    for (int c = 0; c < MAX_COLS; c++)
      begin
        vm = rd_meta[td_index(cfg_q, 32'(sl_stack), 32'(victim), c)];
        victim_dirty = victim_dirty | ((c < cfg_cols(cfg_q)) & vm.valid & vm.dirty);
      end
  end

  // ------------------------------------------------------ flush scan
  logic [N_TD-1:0] dirty_now;
  logic [TD_W-1:0] fl_td;
  always_comb begin
    for (int u = 0; u < N_TD; u++)
      dirty_now[u] = (u < cfg_tds(cfg_q)) && rd_meta[u].valid && rd_meta[u].dirty;
    fl_td = '0;
    for (int u = N_TD - 1; u >= 0; u--)
      if (fmask_q[u]) fl_td = TD_W'(u);
  end

  // ------------------------------------------------------ datapath control
  logic [2:0]  last_beat;
  logic [ADDR_W-1:0] line_base;
  assign last_beat = 3'(cfg_cols(cfg_q) - 1);
  assign line_base = req_q.addr & ~((ADDR_W'(8) << cfg_q.line_sel) - 1);

  always_comb begin
    rd_en    = 1'b0;
    arr_row  = sl_row;
    we_meta  = '0;
    wmeta    = '0;
    be       = '0;
    wdata    = '0;
    l2_req   = 1'b0;
    l2_we    = 1'b0;
    l2_addr  = '0;
    l2_wdata = '0;
    l2_be    = '1;
    req_ready   = 1'b0;
    flush_done  = 1'b0;
    hit_pulse   = 1'b0;
    miss_pulse  = 1'b0;
    cpu_resp    = '0;

    case (state_q)
      S_CLEAR: begin
        arr_row = row_cnt_q;
        we_meta = '1;               // valid = 0 in every T-D
      end
      S_IDLE: begin
        req_ready = !reconf_req;
        rd_en     = req_ready && cpu_req.valid;
      end
      S_LOOK: begin
        hit_pulse  = first_q && hit;
        miss_pulse = first_q && !hit;
        if (hit) begin
          if (req_q.we) begin
            we_meta[td_index(cfg_q, 32'(sl_stack), 32'(hit_way), 32'(sl_col))] = 1'b1;
            wmeta = '{valid: 1'b1, dirty: 1'b1, tag: req_q.addr[ADDR_W-1:TAG_LSB]};
            be[td_index(cfg_q, 32'(sl_stack), 32'(hit_way), 32'(sl_col))] = store_be(req_q.addr[2:0], req_q.size);
            wdata = req_q.wdata << (8 * req_q.addr[2:0]);
          end
          if (cfg_q.hit_lat == 2'd0) begin
            cpu_resp.valid = 1'b1;
            cpu_resp.hit   = first_q;
            cpu_resp.rdata = req_q.we ? '0 : hit_rdata;
          end
        end
      end
      S_WAIT: begin
        if (wait_q == 2'd0) begin
          cpu_resp.valid = 1'b1;
          cpu_resp.hit   = first_q;
          cpu_resp.rdata = resp_data_q;
        end
      end
      S_WB: begin
        l2_req   = 1'b1;
        l2_we    = 1'b1;
        l2_addr  = row_addr(cfg_q, vtag_q, req_q.addr[3 + cfg_q.line_sel +: ROW_W], 32'(beat_q));
        l2_wdata = vdata_q[beat_q];
      end
      S_FILL: begin
        l2_req  = 1'b1;
        l2_addr = line_base | (ADDR_W'(beat_q) << 3);
        if (l2_ack) begin
          we_meta[td_index(cfg_q, 32'(sl_stack), 32'(vway_q), 32'(beat_q))] = 1'b1;
          be[td_index(cfg_q, 32'(sl_stack), 32'(vway_q), 32'(beat_q))]      = '1;
          wmeta = '{valid: 1'b1, dirty: 1'b0, tag: req_q.addr[ADDR_W-1:TAG_LSB]};
          wdata = l2_rdata;
        end
      end
      S_REREAD: rd_en = 1'b1;
      S_UNC: begin
        l2_req   = 1'b1;
        l2_we    = req_q.we;
        l2_addr  = {req_q.addr[ADDR_W-1:3], 3'b000};
        l2_wdata = req_q.wdata << (8 * req_q.addr[2:0]);
        l2_be    = req_q.we ? store_be(req_q.addr[2:0], req_q.size) : '1;
        if (l2_ack) begin
          cpu_resp.valid = 1'b1;
          cpu_resp.rdata = req_q.we ? '0 : load_extract(l2_rdata, req_q.addr[2:0], req_q.size);
        end
      end
      S_FL_RD: begin
        arr_row = row_cnt_q;
        rd_en   = 1'b1;
      end
      S_FL_SCAN: begin
        if (|fmask_q) begin
          l2_req   = 1'b1;
          l2_we    = 1'b1;
          l2_addr  = row_addr(cfg_q, rd_meta[fl_td].tag, row_cnt_q, 32'(fl_td) & (cfg_cols(cfg_q) - 1));
          l2_wdata = rd_data[fl_td];
        end
      end
      S_CFG: flush_done = 1'b1;
      default: ;
    endcase
  end

  // ------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_CLEAR;
      cfg_q       <= RESET_CFG;
      cfg_sr_q    <= '0;
      req_q       <= '0;
      first_q     <= 1'b0;
      reconf_q    <= 1'b0;
      wait_q      <= '0;
      resp_data_q <= '0;
      vway_q      <= '0;
      rr_q        <= '0;
      beat_q      <= '0;
      vtag_q      <= '0;
      vdata_q     <= '0;
      row_cnt_q   <= '0;
      fmask_q     <= '0;
      reconf_done <= 1'b0;
    end else begin
      reconf_done <= 1'b0;
      if (cfg_sen) cfg_sr_q <= {cfg_sr_q[CFG_BITS-2:0], cfg_sdata};

      case (state_q)
        S_CLEAR: begin
          row_cnt_q <= row_cnt_q + 1'b1;
          if (row_cnt_q == ROW_W'(ROWS - 1)) begin
            state_q     <= S_IDLE;
            reconf_done <= reconf_q;
            reconf_q    <= 1'b0;
          end
        end
        S_IDLE: begin
          if (reconf_req) begin
            state_q   <= S_FL_RD;
            row_cnt_q <= '0;
          end else if (cpu_req.valid) begin
            req_q   <= cpu_req;
            first_q <= 1'b1;
            state_q <= S_LOOK;
          end
        end
        S_LOOK: begin
          if (hit) begin
            resp_data_q <= req_q.we ? '0 : hit_rdata;
            wait_q      <= cfg_q.hit_lat - 2'd1;
            state_q     <= (cfg_q.hit_lat == 2'd0) ? S_IDLE : S_WAIT;
          end else if (!cfg_q.en) begin
            state_q <= S_UNC;
          end else begin
            vway_q <= victim;
            vtag_q <= rd_meta[td_index(cfg_q, 32'(sl_stack), 32'(victim), 32'(0))].tag;
            for (int c = 0; c < MAX_COLS; c++)
              vdata_q[c] <= rd_data[td_index(cfg_q, 32'(sl_stack), 32'(victim), 32'(c))];
            beat_q  <= '0;
            state_q <= victim_dirty ? S_WB : S_FILL;
          end
        end
        S_WAIT: begin
          wait_q <= wait_q - 2'd1;
          if (wait_q == 2'd0) state_q <= S_IDLE;
        end
        S_WB: if (l2_ack) begin
          beat_q <= beat_q + 1'b1;
          if (beat_q == last_beat) begin
            beat_q  <= '0;
            state_q <= S_FILL;
          end
        end
        S_FILL: if (l2_ack) begin
          beat_q <= beat_q + 1'b1;
          if (beat_q == last_beat) begin
            rr_q    <= rr_q + 1'b1;
            state_q <= S_REREAD;
          end
        end
        S_REREAD: begin
          first_q <= 1'b0;
          state_q <= S_LOOK;
        end
        S_UNC: if (l2_ack) state_q <= S_IDLE;
        S_FL_RD: state_q <= S_FL_MASK;
        S_FL_MASK: begin
          fmask_q <= dirty_now;
          state_q <= S_FL_SCAN;
        end
        S_FL_SCAN: begin
          if (fmask_q == '0) begin
            row_cnt_q <= row_cnt_q + 1'b1;
            state_q   <= (row_cnt_q == ROW_W'(ROWS - 1)) ? S_CFG : S_FL_RD;
          end else if (l2_ack) begin
            fmask_q[fl_td] <= 1'b0;
          end
        end
        S_CFG: if (cfg_apply) begin
          cfg_q     <= fpca_cfg_t'(cfg_sr_q);
          row_cnt_q <= '0;
          reconf_q  <= 1'b1;
          state_q   <= S_CLEAR;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ checks
  // L2 request must hold its address until acknowledged
  a_l2_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              l2_req && !l2_ack |=> l2_req && $stable(l2_addr) && $stable(l2_we));
  // Only legal organisations may be loaded
  a_cfg_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                state_q == S_CFG && cfg_apply |-> cfg_legal(fpca_cfg_t'(cfg_sr_q)));

endmodule
