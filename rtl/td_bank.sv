// td_bank: one T-D memory of the FPCA, a complete small cache array of
// 128 rows, each holding a 20-bit tag (plus a valid and a dirty bit,
// this implementation's addition for a write-back cache) and 8 data bytes.
//
// Single port, synchronous: when cs is high the row is read and rd_meta /
// rd_data show it after the clock edge; we_meta writes tag/valid/dirty and
// be[i] writes data byte i at the same edge (the read then returns the old
// contents). Contents are not reset; the cache controller invalidates all
// rows after reset and after every reconfiguration.
module td_bank
  import fpca_pkg::*;
#(
  parameter int unsigned ROWS_P = ROWS
) (
  input  logic                       clk,
  input  logic                       cs,
  input  logic [$clog2(ROWS_P)-1:0]  row,
  input  logic                       we_meta,
  input  td_meta_t                   wmeta,
  input  logic [DATA_W/8-1:0]        be,
  input  logic [DATA_W-1:0]          wdata,
  output td_meta_t                   rd_meta,
  output logic [DATA_W-1:0]          rd_data
);

  td_meta_t          meta_q [ROWS_P];
  logic [DATA_W-1:0] data_q [ROWS_P];

  always_ff @(posedge clk) begin
    if (cs) begin
      rd_meta <= meta_q[row];
      rd_data <= data_q[row];
      if (we_meta) meta_q[row] <= wmeta;
      for (int b = 0; b < DATA_W / 8; b++)
        if (be[b]) data_q[row][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

endmodule
