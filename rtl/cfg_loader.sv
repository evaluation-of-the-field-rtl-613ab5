// cfg_loader: the small circuit that configures the FPCA during an
// actuation. It takes the 14 configuration bits read from the
// Configuration Table and sends them serially, most significant bit
// first, one bit per tick of the configuration clock, then pulses apply.
// The source design assumes a 100 MHz configuration clock, giving 0.14 us
// for 14 bits; here the configuration clock is an enable every DIV core
// cycles (default 42, i.e. a 4.2 GHz core), an own choice.
//
// Timing: start (while not busy) latches word. Bit k (MSB first) is
// presented on sdata with sen high for one core cycle at the end of each
// DIV-cycle period; apply is high for the one cycle after the last bit,
// the last cycle of busy. Load time = BITS * DIV + 1 cycles.
module cfg_loader
  import fpca_pkg::*;
#(
  parameter int unsigned DIV  = 42,
  parameter int unsigned BITS = CFG_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [BITS-1:0] word,
  output logic            sen,
  output logic            sdata,
  output logic            apply,
  output logic            busy
);

  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned BW = $clog2(BITS + 1);

  logic [BITS-1:0] sr_q;
  logic [DW-1:0]   div_q;
  logic [BW-1:0]   left_q;
  logic            tick;

  assign tick  = busy && (left_q != '0) && (div_q == DW'(DIV - 1));
  assign sen   = tick;
  assign sdata = sr_q[BITS-1];
  assign apply = busy && (left_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q   <= '0;
      div_q  <= '0;
      left_q <= '0;
      busy   <= 1'b0;
    end else begin
      if (!busy) begin
        if (start) begin
          sr_q   <= word;
          div_q  <= '0;
          left_q <= BW'(BITS);
          busy   <= 1'b1;
        end
      end else if (left_q == '0) begin
        busy <= 1'b0;
      end else begin
        div_q <= (div_q == DW'(DIV - 1)) ? '0 : div_q + 1'b1;
        if (tick) begin
          sr_q   <= {sr_q[BITS-2:0], 1'b0};
          left_q <= left_q - 1'b1;
        end
      end
    end
  end

endmodule
