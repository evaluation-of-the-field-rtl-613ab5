// actuation_unit: decides when the Cache Matching Algorithm reconfigures
// the cache. A three-entry FIFO keeps the Cache IDs found for the last
// three instruction intervals and a register keeps the ID of the active
// configuration. An actuation fires when all three IDs are equal and
// differ from the active one, as in the source design.
//
// Timing: push adds cid at the clock edge; fire/target are combinational
// from the FIFO, so they are valid the cycle after the third equal push.
// commit (at the end of the reconfiguration) loads target into the
// current-ID register, marks it valid and empties the FIFO, because the
// recognition process restarts after a reconfiguration. After reset the
// current ID is unknown (cur_valid = 0): the first stable phase always
// fires. These two points are this implementation's choices.
module actuation_unit
  import fpca_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [CID_W-1:0] cid,
  input  logic             commit,
  output logic             fire,
  output logic [CID_W-1:0] target,
  output logic [CID_W-1:0] cur_id,
  output logic             cur_valid
);

  logic [DEPTH-1:0][CID_W-1:0] hist_q;    // [0] is the newest
  logic [DEPTH-1:0]            hvalid_q;

  always_comb begin
    logic same;
    same = &hvalid_q;
    for (int i = 1; i < DEPTH; i++)
      same = same && (hist_q[i] == hist_q[0]);
    target = hist_q[0];
    fire   = same && (!cur_valid || hist_q[0] != cur_id);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q    <= '0;
      hvalid_q  <= '0;
      cur_id    <= '0;
      cur_valid <= 1'b0;
    end else if (commit) begin
      cur_id    <= target;
      cur_valid <= 1'b1;
      hvalid_q  <= '0;
    end else if (push) begin
      hist_q   <= {hist_q[DEPTH-2:0], cid};
      hvalid_q <= {hvalid_q[DEPTH-2:0], 1'b1};
    end
  end

endmodule
