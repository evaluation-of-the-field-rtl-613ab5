// fpca_pkg: types, sizes and configuration decoding shared by the
// Field-Programmable Cache Array (FPCA) and its Cache Matching Algorithm
// (CMA) control hardware.
//
// The FPCA is built from 4 Configurable Cache Blocks (CCBs) of 8 T-D
// memories each; a T-D holds 128 rows of a 20-bit tag and 8 data bytes
// (these numbers follow the source design). A configuration is 14 bits:
// 4 per-CCB power-on (Vcc) bits and 10 shared bits. The split of the 10
// shared bits (line size, associativity, number of sets, hit latency and
// an enable) is this implementation's own encoding.
//
// Mapping of a configuration onto the T-Ds (own choice, consistent with
// the rule that a cache has at least 128 sets): a line of L bytes takes
// L/8 T-Ds side by side at one row ("columns"); the W ways sit next to
// each other; caches with more than 128 sets stack such groups. T-D
// number u = ((stack * W) + way) * (L/8) + col.
package fpca_pkg;

  localparam int unsigned ADDR_W     = 30;   // byte address width
  localparam int unsigned DATA_W     = 64;   // one T-D row: 8 bytes
  localparam int unsigned TAG_W      = 20;   // stored tag: addr[29:10]
  localparam int unsigned TAG_LSB    = ADDR_W - TAG_W;
  localparam int unsigned ROWS       = 128;  // rows (sets) per T-D
  localparam int unsigned ROW_W      = 7;
  localparam int unsigned TD_PER_CCB = 8;
  localparam int unsigned N_CCB      = 4;
  localparam int unsigned N_TD       = N_CCB * TD_PER_CCB;
  localparam int unsigned TD_W       = $clog2(N_TD);
  localparam int unsigned MAX_WAYS   = 8;
  localparam int unsigned MAX_COLS   = 8;    // 64-byte line / 8 bytes
  localparam int unsigned CFG_BITS   = 14;

  // Cache Matching Algorithm sizes
  localparam int unsigned SENS_W     = 17;   // BB sensor counters
  localparam int unsigned LIMIT_W    = 12;   // BB size range limits
  localparam int unsigned COMP_W     = 3;    // bits per 3-D BBV component
  localparam int unsigned BBV_W      = 3 * COMP_W;
  localparam int unsigned SPC_W      = 4;    // SimPoint class
  localparam int unsigned CID_W      = 4;    // Cache ID
  localparam int unsigned CYC_W      = 17;
  localparam int unsigned HM_W       = 16;
  localparam int unsigned FREQ_W     = 6;    // 100 MHz units
  localparam int unsigned MLAT_W     = 5;    // miss latency in cycles

  typedef struct packed {
    logic [N_CCB-1:0] vcc;       // power-on bit per CCB
    logic             en;        // cache enabled (else every access misses)
    logic [1:0]       hit_lat;   // load-use latency n = hit_lat + 1 cycles
    logic [2:0]       sets_sel;  // sets = 128 << sets_sel
    logic [1:0]       ways_sel;  // ways = 1 << ways_sel
    logic [1:0]       line_sel;  // line = 8 << line_sel bytes
  } fpca_cfg_t;

  // Configuration Table entry: 25 bits, 16 entries = 50 bytes
  typedef struct packed {
    fpca_cfg_t         cfg;
    logic [FREQ_W-1:0] freq;
    logic [MLAT_W-1:0] miss_lat;
  } cfg_entry_t;

  localparam int unsigned ENTRY_W = $bits(cfg_entry_t);

  // Stored per T-D row besides the data
  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
  } td_meta_t;

  localparam int unsigned META_W = $bits(td_meta_t);

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [1:0]        size;   // log2 of bytes: 0..3
    logic [DATA_W-1:0] wdata;  // right-aligned store data
  } cpu_req_t;

  typedef struct packed {
    logic              valid;
    logic              hit;    // access hit on its first lookup
    logic [DATA_W-1:0] rdata;  // right-aligned, zero-extended load data
  } cpu_resp_t;

  // Software write port for the CMA tables and BB range limits
  typedef enum logic [1:0] {
    SW_RST   = 2'd0,   // Representation Space Table, addr = BBV
    SW_PT    = 2'd1,   // Pattern Table, addr = SP class
    SW_CT    = 2'd2,   // Configuration Table, addr = Cache ID
    SW_LIMIT = 2'd3    // addr 0..5 = lo0, hi0, lo1, hi1, lo2, hi2
  } sw_target_e;

  typedef struct packed {
    logic               valid;
    sw_target_e         target;
    logic [BBV_W-1:0]   addr;
    logic [ENTRY_W-1:0] data;
  } sw_wr_t;

  // Statistics of a finished instruction interval
  typedef struct packed {
    logic [BBV_W-1:0] bbv;     // {comp2, comp1, comp0}
    logic [CYC_W-1:0] cycles;
    logic [HM_W-1:0]  hits;
    logic [HM_W-1:0]  misses;
  } ivl_stats_t;

  // ---- configuration decoding ------------------------------------------
  function automatic int unsigned cfg_ways(fpca_cfg_t c);
    return 1 << c.ways_sel;
  endfunction

  function automatic int unsigned cfg_cols(fpca_cfg_t c);
    return 1 << c.line_sel;
  endfunction

  // Number of T-Ds the configuration occupies
  function automatic int unsigned cfg_tds(fpca_cfg_t c);
    return (1 << c.ways_sel) << (c.line_sel + c.sets_sel);
  endfunction

  function automatic int unsigned cfg_bytes(fpca_cfg_t c);
    return cfg_tds(c) * ROWS * 8;
  endfunction

  // Legal: at most 8 ways, the used T-Ds fit in the powered CCBs, which
  // must be the lowest-numbered ones.
  function automatic logic cfg_legal(fpca_cfg_t c);
    int unsigned n_on;
    logic        contiguous;
    n_on = 0;
    contiguous = 1'b1;
    for (int i = 0; i < N_CCB; i++) begin
      if (c.vcc[i]) begin
        if (n_on != i) contiguous = 1'b0;
        n_on++;
      end
    end
    return contiguous && (cfg_tds(c) <= n_on * TD_PER_CCB);
  endfunction

  // T-D number of (stack, way, col)
  function automatic logic [TD_W-1:0] td_index(fpca_cfg_t c, int unsigned stack,
                                               int unsigned way, int unsigned col);
    int unsigned u;
    u = (((stack << c.ways_sel) + way) << c.line_sel) + col;
    return TD_W'(u);
  endfunction

  // Byte address of the row word held in T-D column `col` at `row`, given its tag
  function automatic logic [ADDR_W-1:0] row_addr(fpca_cfg_t c, logic [TAG_W-1:0] tag,
                                                 logic [ROW_W-1:0] row, int unsigned col);
    logic [ADDR_W-1:0] a;
    a = {tag, {TAG_LSB{1'b0}}};
    a = a | (ADDR_W'(row) << (3 + c.line_sel)) | (ADDR_W'(col) << 3);
    return a;
  endfunction

  // Right-aligned, zero-extended bytes of a load of 1 << size bytes at boff
  function automatic logic [DATA_W-1:0] load_extract(logic [DATA_W-1:0] word,
                                                     logic [2:0] boff, logic [1:0] size);
    logic [DATA_W-1:0] r;
    r = word >> (8 * boff);
    case (size)
      2'd0:    r = {56'b0, r[7:0]};
      2'd1:    r = {48'b0, r[15:0]};
      2'd2:    r = {32'b0, r[31:0]};
      default: ;
    endcase
    return r;
  endfunction

  // Byte enables of a store of 1 << size bytes at boff
  function automatic logic [DATA_W/8-1:0] store_be(logic [2:0] boff, logic [1:0] size);
    logic [DATA_W/8-1:0] m;
    m = 8'((16'd1 << (16'd1 << size)) - 16'd1);
    return m << boff;
  endfunction

  function automatic fpca_cfg_t make_cfg(int unsigned n_ccb, int unsigned ways_log2,
                                         int unsigned line_log2, int unsigned sets_log2,
                                         int unsigned lat);
    fpca_cfg_t c;
    c.vcc      = N_CCB'((1 << n_ccb) - 1);
    c.en       = 1'b1;
    c.hit_lat  = 2'(lat - 1);
    c.sets_sel = 3'(sets_log2);
    c.ways_sel = 2'(ways_log2);
    c.line_sel = 2'(line_log2);
    return c;
  endfunction

endpackage
