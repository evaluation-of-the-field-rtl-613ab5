// interval_monitor: the processor-side sensors of the Cache Matching
// Algorithm. It cuts the retired instruction stream into intervals of
// INTERVAL instructions (100,000 in the source design) and, for each one,
// gathers
//   - the 3-D Basic Block Vector: three BB sensors count the instructions
//     of basic blocks whose sizes fall in three ranges set by six 12-bit
//     limit registers; each component is its sensor's 3 MSBs,
//   - the clock cycles of the interval (17-bit counter),
//   - the L1 data cache hits and misses (16-bit counters).
// The cycle after an interval ends, ivl_end pulses for one cycle and stats
// holds the finished interval's values from then until the next end.
//
// Interval boundary (own choice): a 17-bit retired-instruction counter;
// when adding retire_cnt reaches INTERVAL the interval ends in that cycle
// (its basic block and its hit/miss events still count) and the
// instructions beyond INTERVAL carry into the next interval. Counters
// saturate. Limit registers are written through sw_wr (target SW_LIMIT,
// address 0..5 = lo0, hi0, lo1, hi1, lo2, hi2) and reset to zero.
module interval_monitor
  import fpca_pkg::*;
#(
  parameter int unsigned INTERVAL = 100000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       retire_cnt,
  input  logic             bb_valid,
  input  logic [LIMIT_W-1:0] bb_size,
  input  logic             hit,
  input  logic             miss,
  input  sw_wr_t           sw_wr,
  output logic             ivl_end,
  output ivl_stats_t       stats
);

  localparam int unsigned IW = SENS_W;

  logic [5:0][LIMIT_W-1:0]   lim_q;
  logic [IW-1:0]             icnt_q;
  logic [IW:0]               isum;
  logic [CYC_W-1:0]          cyc_q, cyc_n;
  logic [HM_W-1:0]           hit_q, miss_q, hit_n, miss_n;
  logic [2:0][COMP_W-1:0]    comp;
  logic                      end_now;    // this cycle completes the interval

  assign isum    = {1'b0, icnt_q} + (IW + 1)'(retire_cnt);
  assign end_now = isum >= (IW + 1)'(INTERVAL);

  for (genvar s = 0; s < 3; s++) begin : g_sens
    logic [SENS_W-1:0] cnt_unused;
    bb_sensor u_sens (
      .clk      (clk),
      .rst_n    (rst_n),
      .lo       (lim_q[2*s]),
      .hi       (lim_q[2*s+1]),
      .bb_valid (bb_valid),
      .bb_size  (bb_size),
      .clr      (end_now),
      .count    (cnt_unused),
      .comp     (comp[s])
    );
  end

  always_comb begin
    cyc_n  = (cyc_q == '1) ? cyc_q : cyc_q + 1'b1;
    hit_n  = (hit && hit_q != '1) ? hit_q + 1'b1 : hit_q;
    miss_n = (miss && miss_q != '1) ? miss_q + 1'b1 : miss_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lim_q  <= '0;
      icnt_q <= '0;
      cyc_q  <= '0;
      hit_q  <= '0;
      miss_q <= '0;
      stats  <= '0;
      ivl_end <= 1'b0;
    end else begin
      ivl_end <= end_now;
      if (sw_wr.valid && sw_wr.target == SW_LIMIT && sw_wr.addr < 9'd6)
        lim_q[sw_wr.addr[2:0]] <= sw_wr.data[LIMIT_W-1:0];
      if (end_now) begin
        icnt_q       <= IW'(isum - (IW + 1)'(INTERVAL));
        stats.bbv    <= {comp[2], comp[1], comp[0]};
        stats.cycles <= cyc_n;
        stats.hits   <= hit_n;
        stats.misses <= miss_n;
        cyc_q        <= '0;
        hit_q        <= '0;
        miss_q       <= '0;
      end else begin
        icnt_q <= isum[IW-1:0];
        cyc_q  <= cyc_n;
        hit_q  <= hit_n;
        miss_q <= miss_n;
      end
    end
  end

endmodule
