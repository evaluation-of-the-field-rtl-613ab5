// bb_sensor: one Basic Block (BB) sensor of the Cache Matching Algorithm.
// It counts the instructions executed in basic blocks whose size lies in
// the range [lo, hi] held in two 12-bit limit registers (loaded by
// software before the program runs). Three such sensors give the three
// components of the 3-D Basic Block Vector; each component is the three
// most significant bits of the sensor's 17-bit counter, as in the source
// design.
//
// Timing: a block reported with bb_valid is added at the next clock edge.
// `count` and `comp` show the value including the block of the current
// cycle, so an interval end (clr) in the same cycle still includes it;
// clr then restarts the counter at zero. Inclusive limits and saturation
// at 2^17-1 are this implementation's choices.
module bb_sensor
  import fpca_pkg::*;
#(
  parameter int unsigned CNT_W = SENS_W,
  parameter int unsigned LIM_W = LIMIT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LIM_W-1:0] lo,
  input  logic [LIM_W-1:0] hi,
  input  logic             bb_valid,
  input  logic [LIM_W-1:0] bb_size,
  input  logic             clr,
  output logic [CNT_W-1:0] count,
  output logic [COMP_W-1:0] comp
);

  logic [CNT_W-1:0] cnt_q;
  logic [CNT_W:0]   sum;
  logic             in_range;

  always_comb begin
    in_range = bb_valid && (bb_size >= lo) && (bb_size <= hi);
    sum      = {1'b0, cnt_q} + (in_range ? (CNT_W + 1)'(bb_size) : '0);
    count    = sum[CNT_W] ? '1 : sum[CNT_W-1:0];
    comp     = count[CNT_W-1 -: COMP_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt_q <= '0;
    else if (clr) cnt_q <= '0;
    else          cnt_q <= count;
  end

endmodule
