// tb_csae: runs four code-blocks through the code-block switch arithmetic
// encoder in rotation, three stripes each, as the stripe pipeline does. Each
// stripe keeps its code-block active for 256 cycles of random lanes (up to
// six bit-planes, one or two pairs each) while the state register bank
// stores the previous code-block and loads the next one. The last stripe of
// each code-block is switched out with "finish", so its bitstreams are
// flushed. Every bitstream (code-block, bit-plane, pass) is compared byte for
// byte with a reference MQ encoder; the load/store must finish within the
// 256-cycle stripe time; lanes of a non-active code-block must be held.
module tb_csae;
  import jp2k_pkg::*;
  import mq_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lane_t [5:0]   lanes;
  logic          pop;
  logic          sw, sw_load, sw_first, sw_finish, ready, act_v;
  cb_t           sw_cb, act_cb;
  bytes4_t [5:0] bo;
  cxd_t [5:0]    tag;
  logic          fl_v;
  cb_t           fl_cb;
  bp_t           fl_bp;
  cp_t           fl_cp;
  bytes4_t       fl_b;

  csae dut (.clk, .rst_n, .lanes_i(lanes), .pop_o(pop), .sw_i(sw), .sw_load_i(sw_load),
            .sw_cb_i(sw_cb), .sw_first_i(sw_first), .sw_finish_i(sw_finish), .ready_o(ready),
            .active_valid_o(act_v), .active_cb_o(act_cb), .bytes_o(bo), .tag_o(tag),
            .fl_valid_o(fl_v), .fl_cb_o(fl_cb), .fl_bp_o(fl_bp), .fl_cp_o(fl_cp), .fl_bytes_o(fl_b));

  int checks = 0, failures = 0;
  int held = 0, flushes = 0, max_ls = 0;
  mq_ref rm[13][10][3];
  int    sh_idx[13][10][19];
  bit    sh_mps[13][10][19];
  byte unsigned got[13][10][3][$];

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 400) $display("FAIL: %s", msg); end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect bytes
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 6; l++)
      for (int k = 0; k < 4; k++)
        if (bo[l].valid[k]) got[tag[l].cb][tag[l].cx][tag[l].cp].push_back(bo[l].data[k]);
    if (fl_v) begin
      flushes++;
      for (int k = 0; k < 4; k++)
        if (fl_b.valid[k]) got[fl_cb][fl_bp][fl_cp].push_back(fl_b.data[k]);
    end
  end

  task automatic do_switch(bit load, int cb, bit first, bit finish);
    int n;
    n = 0;
    while (!ready) begin @(posedge clk); n++; end
    @(negedge clk);
    sw = 1; sw_load = load; sw_cb = cb_t'(cb); sw_first = first; sw_finish = finish;
    @(negedge clk);
    sw = 0;
  endtask

  int seq_cb[12];
  bit seq_last[12];

  initial begin
    int cbs[4];
    cbs = '{0, 5, 12, 7};
    for (int i = 0; i < 12; i++) begin seq_cb[i] = cbs[i % 4]; seq_last[i] = i >= 8; end
    foreach (rm[c, b, p]) rm[c][b][p] = new();
    foreach (sh_idx[c, b]) begin sh_idx[c][b] = rm[0][0][0].idx; sh_mps[c][b] = rm[0][0][0].mps; end
    lanes = '0; sw = 0; sw_load = 0; sw_cb = '0; sw_first = 0; sw_finish = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    do_switch(1, seq_cb[0], 1, 0);                 // preload the first code-block
    for (int i = 0; i < 12; i++) begin
      int ls_cycles;
      bit nxt;
      nxt = i + 1 < 12;
      do_switch(nxt, nxt ? seq_cb[i + 1] : 0, nxt ? (i + 1 < 4) : 0, i > 0 ? seq_last[i - 1] : 0);
      chk(act_v && act_cb == cb_t'(seq_cb[i]), "active code-block after switch");
      ls_cycles = -1;
      for (int cyc = 0; cyc < 256; cyc++) begin
        bit used[10];
        int cb;
        cb = seq_cb[i];
        if (ls_cycles < 0 && ready) ls_cycles = cyc;
        foreach (used[b]) used[b] = 0;
        lanes = '0;
        for (int l = 0; l < 6; l++) begin
          int bp;
          bp = $urandom % 10;
          if (!used[bp] && ($urandom % 100) < 75) begin
            lane_t lt;
            int c1, c2;
            used[bp] = 1;
            c1 = $urandom % 19;
            c2 = (($urandom % 2) != 0) ? c1 : $urandom % 19;
            lt.valid = 1; lt.bp = bp_t'(bp); lt.cb = cb_t'(cb);
            lt.cp = cp_t'($urandom % 3); lt.two = 1'($urandom % 4 != 0);
            lt.cx1 = cx_t'(c1); lt.d1 = ($urandom % 100) < 20;
            lt.cx2 = cx_t'(c2); lt.d2 = ($urandom % 100) < 20;
            lanes[l] = lt;
          end
        end
        // now and then offer a lane of another code-block: must be held
        if (cyc % 64 == 63) begin
          lanes[0].valid = 1; lanes[0].cb = cb_t'(seq_cb[(i + 1) % 4]);
        end
        #1;
        if (cyc % 64 == 63) begin
          held++;
          chk(!pop, "lane of another code-block not held");
        end else begin
          chk(pop, "lanes accepted");
          for (int l = 0; l < 6; l++) if (lanes[l].valid) begin
            int b, p;
            b = lanes[l].bp; p = lanes[l].cp;
            rm[cb][b][p].idx = sh_idx[cb][b]; rm[cb][b][p].mps = sh_mps[cb][b];
            rm[cb][b][p].encode(lanes[l].cx1, lanes[l].d1);
            if (lanes[l].two) rm[cb][b][p].encode(lanes[l].cx2, lanes[l].d2);
            sh_idx[cb][b] = rm[cb][b][p].idx; sh_mps[cb][b] = rm[cb][b][p].mps;
          end
        end
        @(negedge clk);
      end
      lanes = '0;
      chk(ls_cycles >= 0 && ls_cycles <= 256, $sformatf("load/store took %0d cycles", ls_cycles));
      if (ls_cycles > max_ls) max_ls = ls_cycles;
    end
    do_switch(0, 0, 0, 1);                          // last code-block out: flush
    do_switch(0, 0, 0, 0);
    while (!ready) @(posedge clk);
    repeat (4) @(posedge clk);
    // the reference terminates every stream that coded something
    for (int c = 0; c < 13; c++) for (int b = 0; b < 10; b++) for (int p = 0; p < 3; p++) begin
      bit used_s;
      used_s = rm[c][b][p].a != 'h8000 || rm[c][b][p].c != 0 || rm[c][b][p].ct != 12 || !rm[c][b][p].first;
      if (used_s) rm[c][b][p].flush();
      chk(got[c][b][p].size() == rm[c][b][p].out.size(),
          $sformatf("stream %0d/%0d/%0d: %0d bytes, expected %0d", c, b, p, got[c][b][p].size(), rm[c][b][p].out.size()));
      for (int k = 0; k < got[c][b][p].size() && k < rm[c][b][p].out.size(); k++)
        chk(got[c][b][p][k] == rm[c][b][p].out[k], $sformatf("stream %0d/%0d/%0d byte %0d", c, b, p, k));
    end
    chk(held > 0, "hold never exercised");
    chk(flushes > 0, "flush never exercised");
    $display("held=%0d flushes=%0d load/store max=%0d cycles", held, flushes, max_ls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
