// pattern_table: Pattern Table of the Cache Matching Algorithm. For each of
// the 16 SimPoint classes it holds the Cache ID (4 bits) of the cache
// configuration learned as best for that program phase under the
// preferred metric (performance, energy or time-energy): 2^4 x 4 bits, as
// in the source design. Changing the preferred metric means software
// reloading this table; the Representation Space Table stays.
//
// One write port and one synchronous read port (one-cycle latency).
module pattern_table
  import fpca_pkg::*;
#(
  parameter int unsigned AW = SPC_W,
  parameter int unsigned DW = CID_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem_q [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem_q[waddr] <= wdata;
    if (re) rdata <= mem_q[raddr];
  end

endmodule
