// config_table: Configuration Table of the Cache Matching Algorithm. For
// each of 16 Cache IDs it stores what an actuation loads: the 14 FPCA
// configuration bits (4 Vcc + 10 shared, the hit latency among them), the
// operating frequency code and the miss latency, 25 bits per entry, 50
// bytes in all as in the source design (the field split is this
// implementation's). Written by software before the program runs.
//
// One write port and one synchronous read port (one-cycle latency).
module config_table
  import fpca_pkg::*;
#(
  parameter int unsigned AW = CID_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cfg_entry_t    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output cfg_entry_t    rdata
);

  cfg_entry_t mem_q [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem_q[waddr] <= wdata;
    if (re) rdata <= mem_q[raddr];
  end

endmodule
