// tb_srb: exercises the state register bank on its own. Random full 400-bit
// states are written into the active register banks through the lane
// write-back path, then switched out and back in through a state buffer
// model, for three code-blocks in rotation. It checks that every reloaded
// state equals what was stored, that a first-time code-block comes in with
// the reset state, the state buffer addresses, the 251-cycle load/store
// time, and that a finished code-block is flushed (one bitstream per cycle,
// only used coders) instead of stored, with the bytes of the reference
// flush procedure.
module tb_srb;
  import jp2k_pkg::*;
  import mq_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lane_t [5:0]     lanes;
  logic            upd;
  bp_state_t [5:0] st_o, st_i;
  logic sw, sw_load, sw_first, sw_finish, ready, act_v;
  cb_t  sw_cb, act_cb;
  logic        wr_en, rd_en;
  logic [11:0] wr_addr, rd_addr;
  logic [15:0] wr_data, rd_data;
  logic        fl_v;
  cb_t         fl_cb;
  bp_t         fl_bp;
  cp_t         fl_cp;
  bytes4_t     fl_b;

  srb dut (.clk, .rst_n, .lanes_i(lanes), .upd_en_i(upd), .lane_st_o(st_o), .lane_st_i(st_i),
           .sw_i(sw), .sw_load_i(sw_load), .sw_cb_i(sw_cb), .sw_first_i(sw_first),
           .sw_finish_i(sw_finish), .ready_o(ready), .active_valid_o(act_v), .active_cb_o(act_cb),
           .sb_wr_en_o(wr_en), .sb_wr_addr_o(wr_addr), .sb_wr_data_o(wr_data),
           .sb_rd_en_o(rd_en), .sb_rd_addr_o(rd_addr), .sb_rd_data_i(rd_data),
           .fl_valid_o(fl_v), .fl_cb_o(fl_cb), .fl_bp_o(fl_bp), .fl_cp_o(fl_cp), .fl_bytes_o(fl_b));

  // state buffer model
  logic [15:0] sbuf [3264];
  int wr_min = 99999, wr_max = -1;
  always @(posedge clk) begin
    if (wr_en) begin
      sbuf[wr_addr] <= wr_data;
      if (int'(wr_addr) < wr_min) wr_min = wr_addr;
      if (int'(wr_addr) > wr_max) wr_max = wr_addr;
    end
    if (rd_en) rd_data <= sbuf[rd_addr];
  end

  int checks = 0, failures = 0, flushes = 0;
  byte unsigned fl_got[10][3][$];
  bp_state_t expect_st[13][10];

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endfunction

  always @(posedge clk) if (fl_v) begin
    flushes++;
    for (int k = 0; k < 4; k++) if (fl_b.valid[k]) fl_got[fl_bp][fl_cp].push_back(fl_b.data[k]);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_switch(bit load, int cb, bit first, bit finish, output int ls_cycles);
    while (!ready) @(posedge clk);
    @(negedge clk);
    sw = 1; sw_load = load; sw_cb = cb_t'(cb); sw_first = first; sw_finish = finish;
    @(negedge clk);
    sw = 0;
    ls_cycles = 1;
    while (!ready) begin @(negedge clk); ls_cycles++; end
  endtask

  // a random but well-formed coding state (valid context indices, CT 1..12)
  function automatic bp_state_t rnd_state();
    bp_state_t s;
    s = '0;
    for (int c = 0; c < 19; c++) begin s.ctx[c].idx = 6'($urandom % 47); s.ctx[c].mps = 1'($urandom); end
    for (int p = 0; p < 3; p++) begin
      s.coder[p].used  = 1'($urandom % 4 != 0);
      s.coder[p].first = 1'($urandom % 4 == 0);
      s.coder[p].a     = 16'h8000 | 16'($urandom);
      s.coder[p].ct    = 4'(1 + $urandom % 8);
      // as in a running coder, C has at most 27 - CT significant bits
      s.coder[p].c     = 28'($urandom) & ((28'd1 << (27 - s.coder[p].ct)) - 28'd1);
      s.coder[p].b     = 8'($urandom);
      if (s.coder[p].b == 8'hFF) s.coder[p].c[27] = 1'b0;
    end
    return s;
  endfunction

  initial begin
    int cbs[3];
    int n, lsc;
    cbs = '{2, 9, 12};
    lanes = '0; upd = 0; st_i = '0; sw = 0; sw_load = 0; sw_cb = '0; sw_first = 0; sw_finish = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    do_switch(1, cbs[0], 1, 0, lsc);
    // busy for 251 cycles after the switch cycle (250 shifts + read latency)
    chk(lsc == 252, $sformatf("load/store cycles %0d", lsc));
    // 9 stripes: rotate the three code-blocks three times; the last round finishes them
    for (int i = 0; i < 9; i++) begin
      int cb, ncb;
      cb  = cbs[i % 3];
      ncb = cbs[(i + 1) % 3];
      do_switch(i < 8, ncb, i < 2, i >= 7, lsc);
      chk(act_v && act_cb == cb_t'(cb), "active code-block");
      // the active state must be the reset state (first round) or the stored one
      for (int b = 0; b < 10; b++) begin
        lanes[0].bp = bp_t'(b);
        #1;
        chk(st_o[0] == ((i < 3) ? bp_state_init() : expect_st[cb][b]),
            $sformatf("stripe %0d bit-plane %0d state on load", i, b));
      end
      // overwrite every bit-plane with a new random state through the lanes
      for (int g = 0; g < 2; g++) begin
        @(negedge clk);
        upd = 1;
        for (int l = 0; l < 5; l++) begin
          bp_state_t s;
          s = rnd_state();
          lanes[l].valid = 1; lanes[l].cb = cb_t'(cb); lanes[l].bp = bp_t'(g * 5 + l);
          st_i[l] = s;
          expect_st[cb][g * 5 + l] = s;
        end
        @(negedge clk);
        upd = 0; lanes = '0;
      end
      chk(lsc <= 257, "load/store within a stripe");
    end
    // after the final rounds the three code-blocks were flushed: compare
    // the flush bytes of the last code-block with the reference procedure
    begin
      int dummy;
      do_switch(0, 0, 0, 1, dummy);
    end
    repeat (5) @(posedge clk);
    chk(flushes > 0, "no flush");
    for (int b = 0; b < 10; b++) for (int p = 0; p < 3; p++) begin
      mq_ref r;
      coder_t cd;
      r = new();
      cd = expect_st[cbs[2]][b].coder[p];
      r.a = cd.a; r.c = cd.c; r.ct = cd.ct; r.b = cd.b; r.first = cd.first;
      if (cd.used) r.flush();
      chk(fl_got[b][p].size() >= r.out.size(), $sformatf("flush size bp %0d pass %0d", b, p));
      for (int k = 0; k < r.out.size(); k++) begin
        int off;
        off = fl_got[b][p].size() - r.out.size();
        if (off >= 0) chk(fl_got[b][p][off + k] == r.out[k], $sformatf("flush byte bp %0d pass %0d", b, p));
      end
    end
    chk(wr_min >= 2 * 250 && wr_max < 13 * 250, $sformatf("write address range %0d..%0d", wr_min, wr_max));
    $display("flushes=%0d write range %0d..%0d", flushes, wr_min, wr_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
