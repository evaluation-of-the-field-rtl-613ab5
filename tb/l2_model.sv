// l2_model: behavioural model of the L2 cache / memory behind the FPCA,
// for simulation only. Word-granular: a request held on req is answered
// with a one-cycle ack LAT cycles later; reads return the stored word,
// writes update the bytes selected by be. Words never written read as a
// fixed function of their address (init_word), so tests can predict them.
// Counts reads and writes for the testbenches.
module l2_model
  import fpca_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req,
  input  logic                we,
  input  logic [ADDR_W-1:0]   addr,
  input  logic [DATA_W-1:0]   wdata,
  input  logic [DATA_W/8-1:0] be,
  output logic                ack,
  output logic [DATA_W-1:0]   rdata,
  output int unsigned         n_rd,
  output int unsigned         n_wr
);

  logic [DATA_W-1:0] mem [logic [ADDR_W-4:0]];
  int unsigned       cnt;

  function automatic logic [DATA_W-1:0] init_word(logic [ADDR_W-1:0] a);
    return {2'b10, a, 2'b01, ~a};
  endfunction

  function automatic logic [DATA_W-1:0] peek(logic [ADDR_W-1:0] a);
    logic [ADDR_W-4:0] w;
    w = a[ADDR_W-1:3];
    if (mem.exists(w)) return mem[w];
    return init_word({a[ADDR_W-1:3], 3'b000});
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= 0;
      ack   <= 1'b0;
      rdata <= '0;
      n_rd  <= 0;
      n_wr  <= 0;
    end else begin
      ack <= 1'b0;
      if (req && !ack) begin
        if (cnt + 1 >= LAT) begin
          logic [DATA_W-1:0] w;
          cnt <= 0;
          ack <= 1'b1;
          w = peek(addr);
          if (we) begin
            for (int b = 0; b < DATA_W / 8; b++)
              if (be[b]) w[8*b +: 8] = wdata[8*b +: 8];
            mem[addr[ADDR_W-1:3]] = w;
            n_wr <= n_wr + 1;
          end else begin
            n_rd <= n_rd + 1;
          end
          rdata <= w;
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end

endmodule
