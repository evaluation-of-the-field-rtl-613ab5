// tb_fpca_rc: checks the reconfigurable comparator. For random
// configurations and addresses it places the address tag in a random way
// (or none), fills other ways with tags that differ in a compared bit, and
// checks way_hit/hit/hit_way; it also checks that index bits inside the
// stored tag field are ignored, that ways beyond the configured number
// never hit, and that a disabled cache never hits.
module tb_fpca_rc;
  import fpca_pkg::*;

  fpca_cfg_t cfg;
  logic [ADDR_W-1:0] addr;
  logic [TD_W-1:0] stack;
  logic [2:0] col;
  td_meta_t [N_TD-1:0] rd_meta;
  logic [7:0] way_hit;
  logic hit;
  logic [2:0] hit_way;

  fpca_rc dut (.cfg, .addr, .stack, .col, .rd_meta, .way_hit, .hit, .hit_way);

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int wl, ll, sl, ways, cols, stacks, hw, nbits;
      logic [TAG_W-1:0] atag;
      wl = $urandom_range(0, 3); ll = $urandom_range(0, 3);
      if (wl + ll > 5) ll = 5 - wl;               // at most 32 T-Ds
      sl = $urandom_range(0, 5 - ((wl + ll > 5) ? 5 : wl + ll));
      if (wl + ll + sl > 5) sl = 0;
      cfg = make_cfg(4, wl, ll, sl, 1);
      cfg.en = ($urandom_range(0, 9) != 0);
      ways = 1 << wl; cols = 1 << ll; stacks = 1 << sl;
      addr = ADDR_W'($urandom);
      stack = TD_W'($urandom_range(0, stacks - 1));
      col = 3'($urandom_range(0, cols - 1));
      atag = addr[ADDR_W-1:TAG_LSB];
      nbits = ll + sl;                         // index bits inside the tag field
      for (int u = 0; u < N_TD; u++) rd_meta[u] = '{valid: 1'b1, dirty: 1'b0, tag: ~atag};
      hw = $urandom_range(0, ways);            // == ways: no hit
      for (int w = 0; w < ways; w++) begin
        int u;
        logic [TAG_W-1:0] t;
        u = ((stack * ways + w) * cols) + col;
        t = atag;
        // low index bits may differ freely
        for (int b = 0; b < nbits; b++) t[b] = 1'($urandom);
        if (w != hw) begin
          if ($urandom_range(0, 1) == 0) rd_meta[u].valid = 1'b0;
          else t[$urandom_range(nbits, TAG_W - 1)] ^= 1'b1;
        end
        rd_meta[u].tag = t;
      end
      #1;
      check(hit == (cfg.en && hw < ways), $sformatf("hit cfg w%0d l%0d s%0d hw=%0d", wl, ll, sl, hw));
      if (cfg.en && hw < ways) begin
        check(hit_way == 3'(hw), "hit way");
        check(way_hit == 8'(1 << hw), "one-hot way_hit");
      end
      // a matching tag in a way beyond the configuration never hits
      if (ways < 8) begin
        for (int u = 0; u < N_TD; u++) rd_meta[u].valid = 1'b0;
        #1;
        check(!hit, "no hit with all invalid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
