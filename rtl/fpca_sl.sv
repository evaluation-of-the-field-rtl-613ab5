// fpca_sl: selection logic (SL) of the FPCA. From the byte address and the
// active configuration it picks the index bits: the low 7 set-index bits
// are the row, shared by every T-D of every CCB; the set-index bits above
// them choose the stack of T-D groups; the bits between the byte offset and
// the set index choose the 8-byte column (word) within the line.
//
// Purely combinational. Address layout for line size L = 8 << line_sel and
// S = 128 << sets_sel sets (own formulation of the source design's fixed
// and variable Tag/Index/Block fields):
//   addr[2:0]                        byte in word   (fixed block)
//   addr[3 +: line_sel]              column         (variable index/block)
//   addr[3+line_sel +: 7]            row
//   addr[10+line_sel +: sets_sel]    stack          (variable tag/index)
//   the rest                         tag
module fpca_sl
  import fpca_pkg::*;
(
  input  fpca_cfg_t         cfg,
  input  logic [ADDR_W-1:0] addr,
  output logic [ROW_W-1:0]  row,
  output logic [TD_W-1:0]   stack,
  output logic [2:0]        col
);

  logic [ADDR_W-1:0] set_full;

  always_comb begin
    set_full = addr >> (3 + cfg.line_sel);
    row      = set_full[ROW_W-1:0];
    stack    = TD_W'((set_full >> ROW_W) & ((ADDR_W'(1) << cfg.sets_sel) - ADDR_W'(1)));
    col      = 3'((addr >> 3) & ((ADDR_W'(1) << cfg.line_sel) - ADDR_W'(1)));
  end

endmodule
