// cma_coprocessor: the hardware coprocessor that runs the Recognition and
// Actuation stages of the Cache Matching Algorithm, next to the
// Representation Space, Pattern and Configuration tables it owns.
//
// Recognition (after every interval, in parallel with execution): the
// 3-D BBV addresses the Representation Space Table, giving the SimPoint
// class; the class addresses the Pattern Table, giving the Cache ID of the
// best configuration for that phase; the ID is pushed into the
// actuation unit's three-entry history. Four cycles after ivl_end.
//
// Actuation (when the last three IDs agree and differ from the active
// one): cpu_stall goes high, the Configuration Table entry is read,
// reconf_req makes the FPCA write back its dirty data, the configuration
// loader shifts the 14 bits in serially and applies them, and when the
// FPCA reports reconf_done the new ID, frequency code and miss latency
// become current and the stall ends. All of this follows the source
// design; the handshake signals and cycle-level order are this
// implementation's.
//
// Tables are loaded through sw_wr (targets SW_RST, SW_PT, SW_CT). An
// ivl_end that arrives while an actuation is in progress is ignored (the
// core is stalled then, so it does not happen in normal use).
module cma_coprocessor
  import fpca_pkg::*;
#(
  parameter int unsigned          CFG_DIV    = 42,
  parameter logic [FREQ_W-1:0]    RESET_FREQ = 6'd42,  // 4.2 GHz
  parameter logic [MLAT_W-1:0]    RESET_MLAT = 5'd20   // 4.6 ns L2 at 4.2 GHz
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ivl_end,
  input  logic [BBV_W-1:0]   bbv,
  input  sw_wr_t             sw_wr,
  // FPCA reconfiguration handshake
  output logic               reconf_req,
  input  logic               flush_done,
  output logic               cfg_sen,
  output logic               cfg_sdata,
  output logic               cfg_apply,
  input  logic               reconf_done,
  // to the core and clock generator
  output logic               cpu_stall,
  output logic [FREQ_W-1:0]  freq_code,
  output logic [MLAT_W-1:0]  miss_lat,
  // status
  output logic [CID_W-1:0]   cur_id,
  output logic               cur_valid,
  output logic [SPC_W-1:0]   last_spc,
  output logic [CID_W-1:0]   last_cid,
  output logic [15:0]        reconfig_cnt
);

  typedef enum logic [2:0] {
    C_IDLE, C_SPC, C_CID, C_DECIDE, C_CT, C_FLUSH, C_LOAD
  } cstate_e;

  cstate_e          state_q;
  logic [SPC_W-1:0] spc;
  logic [CID_W-1:0] cid;
  cfg_entry_t       ct_rdata, entry_q;
  logic             fire, commit, ld_start, ld_busy;
  logic [CID_W-1:0] target;

  rst_table u_rst (
    .clk   (clk),
    .we    (sw_wr.valid && sw_wr.target == SW_RST),
    .waddr (sw_wr.addr),
    .wdata (sw_wr.data[SPC_W-1:0]),
    .re    (state_q == C_IDLE && ivl_end),
    .raddr (bbv),
    .rdata (spc)
  );

  pattern_table u_pt (
    .clk   (clk),
    .we    (sw_wr.valid && sw_wr.target == SW_PT),
    .waddr (sw_wr.addr[SPC_W-1:0]),
    .wdata (sw_wr.data[CID_W-1:0]),
    .re    (state_q == C_SPC),
    .raddr (spc),
    .rdata (cid)
  );

  config_table u_ct (
    .clk   (clk),
    .we    (sw_wr.valid && sw_wr.target == SW_CT),
    .waddr (sw_wr.addr[CID_W-1:0]),
    .wdata (cfg_entry_t'(sw_wr.data)),
    .re    (state_q == C_DECIDE),
    .raddr (target),
    .rdata (ct_rdata)
  );

  actuation_unit u_act (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (state_q == C_CID),
    .cid       (cid),
    .commit    (commit),
    .fire      (fire),
    .target    (target),
    .cur_id    (cur_id),
    .cur_valid (cur_valid)
  );

  cfg_loader #(.DIV(CFG_DIV)) u_ld (
    .clk   (clk),
    .rst_n (rst_n),
    .start (ld_start),
    .word  (entry_q.cfg),
    .sen   (cfg_sen),
    .sdata (cfg_sdata),
    .apply (cfg_apply),
    .busy  (ld_busy)
  );

  assign reconf_req = (state_q == C_CT) || (state_q == C_FLUSH);
  assign ld_start   = (state_q == C_FLUSH) && flush_done && !ld_busy;
  assign commit     = (state_q == C_LOAD) && reconf_done;
  assign cpu_stall  = (state_q == C_DECIDE && fire) || (state_q == C_CT) ||
                      (state_q == C_FLUSH) || (state_q == C_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= C_IDLE;
      entry_q      <= '0;
      freq_code    <= RESET_FREQ;
      miss_lat     <= RESET_MLAT;
      last_spc     <= '0;
      last_cid     <= '0;
      reconfig_cnt <= '0;
    end else begin
      case (state_q)
        C_IDLE:   if (ivl_end) state_q <= C_SPC;
        C_SPC:    begin last_spc <= spc; state_q <= C_CID; end
        C_CID:    begin last_cid <= cid; state_q <= C_DECIDE; end
        C_DECIDE: state_q <= fire ? C_CT : C_IDLE;
        C_CT:     begin entry_q <= ct_rdata; state_q <= C_FLUSH; end
        C_FLUSH:  if (ld_start) state_q <= C_LOAD;
        C_LOAD:   if (reconf_done) begin
          freq_code    <= entry_q.freq;
          miss_lat     <= entry_q.miss_lat;
          reconfig_cnt <= reconfig_cnt + 1'b1;
          state_q      <= C_IDLE;
        end
        default:  state_q <= C_IDLE;
      endcase
    end
  end

endmodule
