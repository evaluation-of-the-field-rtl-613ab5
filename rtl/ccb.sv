// ccb: Configurable Cache Block, eight T-D memories (8 KB of data) that
// share one row address and are switched as a unit by the CCB's power-on
// configuration bit Vcc, as in the source design.
//
// With vcc high, every T-D whose rd_en is set is read at `row` (result
// one cycle later) and each T-D can be written through its own meta and
// byte enables. With vcc low the T-Ds are not accessed and the outputs
// are clamped to zero, so the rows read as invalid; what the T-Ds held is
// considered lost (the clamp models power gating; how the real block is
// gated is not specified and this is an own choice).
module ccb
  import fpca_pkg::*;
#(
  parameter int unsigned TDS = TD_PER_CCB
) (
  input  logic                         clk,
  input  logic                         vcc,
  input  logic                         rd_en,
  input  logic [ROW_W-1:0]             row,
  input  logic [TDS-1:0]               we_meta,
  input  td_meta_t                     wmeta,
  input  logic [TDS-1:0][DATA_W/8-1:0] be,
  input  logic [DATA_W-1:0]            wdata,
  output td_meta_t [TDS-1:0]           rd_meta,
  output logic [TDS-1:0][DATA_W-1:0]   rd_data
);

  td_meta_t [TDS-1:0]          meta_raw;
  logic [TDS-1:0][DATA_W-1:0]  data_raw;
  logic                        vcc_q;   // power state seen by the outputs

  always_ff @(posedge clk) vcc_q <= vcc;

  for (genvar t = 0; t < TDS; t++) begin : g_td
    logic cs;
    assign cs = vcc && (rd_en || we_meta[t] || (|be[t]));
    td_bank u_td (
      .clk     (clk),
      .cs      (cs),
      .row     (row),
      .we_meta (we_meta[t]),
      .wmeta   (wmeta),
      .be      (vcc ? be[t] : '0),
      .wdata   (wdata),
      .rd_meta (meta_raw[t]),
      .rd_data (data_raw[t])
    );
    assign rd_meta[t] = vcc_q ? meta_raw[t] : '0;
    assign rd_data[t] = vcc_q ? data_raw[t] : '0;
  end

endmodule
