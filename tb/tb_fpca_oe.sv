// tb_fpca_oe: checks the output selection: each T-D holds a distinct word,
// and for random configurations, ways, stacks, columns, byte offsets and
// sizes the right word and bytes must come out, zero-extended.
module tb_fpca_oe;
  import fpca_pkg::*;

  fpca_cfg_t cfg;
  logic [N_TD-1:0][DATA_W-1:0] rd_data;
  logic [2:0] hit_way, col, boff;
  logic [TD_W-1:0] stack;
  logic [1:0] size;
  logic [DATA_W-1:0] word, rdata;

  fpca_oe dut (.cfg, .rd_data, .hit_way, .stack, .col, .boff, .size, .word, .rdata);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < N_TD; u++) rd_data[u] = {$urandom, $urandom};
    for (int i = 0; i < 4000; i++) begin
      int wl, ll, sl, u;
      logic [DATA_W-1:0] e;
      wl = $urandom_range(0, 3); ll = $urandom_range(0, 3);
      if (wl + ll > 5) ll = 5 - wl;               // at most 32 T-Ds
      sl = (wl + ll >= 5) ? 0 : $urandom_range(0, 5 - wl - ll);
      cfg = make_cfg(4, wl, ll, sl, 1);
      hit_way = 3'($urandom_range(0, (1 << wl) - 1));
      col = 3'($urandom_range(0, (1 << ll) - 1));
      stack = TD_W'($urandom_range(0, (1 << sl) - 1));
      size = 2'($urandom_range(0, 3));
      boff = 3'($urandom_range(0, 7)) & ~3'((1 << size) - 1);
      #1;
      u = ((int'(stack) * (1 << wl) + int'(hit_way)) * (1 << ll)) + int'(col);
      e = 0;
      for (int b = 0; b < (1 << size); b++) e[8*b +: 8] = rd_data[u][8*(boff + b) +: 8];
      checks++;
      if (word !== rd_data[u] || rdata !== e) begin
        failures++;
        $display("FAIL: u=%0d size=%0d boff=%0d rdata %h exp %h", u, size, boff, rdata, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
