// rst_table: Representation Space Table of the Cache Matching Algorithm.
// It maps every 3-D Basic Block Vector (three 3-bit components, 2^9
// entries) to the SimPoint class (4 bits, 16 classes) of the cluster that
// encloses it: 2^9 x 4 bits, as sized in the source design. Software writes
// it after the learning stage; the coprocessor reads it after every
// instruction interval.
//
// One write port and one synchronous read port: rdata shows the entry
// addressed by raddr at the clock edge where re was high (one-cycle
// latency). Contents are not reset.
module rst_table
  import fpca_pkg::*;
#(
  parameter int unsigned AW = BBV_W,
  parameter int unsigned DW = SPC_W
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
