// fpca_oe: output selection (OE) of the FPCA. It selects, among the words
// read from all T-Ds, the one of the hitting way at the addressed stack and
// column (the variable index/block bits), then uses the byte offset (the
// fixed block bits) and the access size to return the requested bytes,
// right-aligned and zero-extended.
//
// Combinational. Sizes 1, 2, 4 and 8 bytes, naturally aligned; load size
// handling and zero extension are this implementation's choice.
module fpca_oe
  import fpca_pkg::*;
(
  input  fpca_cfg_t                  cfg,
  input  logic [N_TD-1:0][DATA_W-1:0] rd_data,
  input  logic [2:0]                 hit_way,
  input  logic [TD_W-1:0]            stack,
  input  logic [2:0]                 col,
  input  logic [2:0]                 boff,
  input  logic [1:0]                 size,
  output logic [DATA_W-1:0]          word,
  output logic [DATA_W-1:0]          rdata
);

  always_comb begin
    word  = rd_data[td_index(cfg, 32'(stack), 32'(hit_way), 32'(col))];
    rdata = load_extract(word, boff, size);
  end

endmodule
