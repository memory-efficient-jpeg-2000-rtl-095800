// tb_jp2k_top: end-to-end test of the encoder core at its default size
// (one 256 x 256 tile).
//  * DWT side: a pixel source with random stalls feeds the tile; a stripe
//    buffer reader takes every bank the controller hands over (ebc_start),
//    reads all HL, LH and HH words of it and compares them with a
//    real-valued 9/7 reference (within 2.5 units: two fractional bits inside
//    the filter plus the output rounding), then reports done after a random
//    delay, sometimes long enough to hold the DWT. LL leaving on the
//    ll_* port is checked against the same reference. SB-LL is written and
//    read back through its own port.
//  * EBC side, concurrently: CX-D pairs of six code-block stripes (three
//    code-blocks, twice each) are pushed into the bit-plane FIFOs while they
//    are ready; pairs of the next code-block are pushed before the switch so
//    that they are held; each bitstream (code-block, bit-plane, pass) is
//    compared byte for byte with a reference MQ encoder after the last
//    switches flush them.
// Every mechanism is counted and the test fails if one never happens: pixel
// stall, DWT hold, bank swap, SB-LL access, FIFO full, two-pair lane, held
// lane, code-block switch, load/store, flush.
module tb_jp2k_top;
  import jp2k_pkg::*;
  import mq_ref_pkg::*;
  import dwt_ref_pkg::*;
  localparam int W = 256, H = 256;
  localparam int NST = 2 * H / 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, req, pv;
  logic [7:0] prow, pcol;
  logic signed [7:0] p0, p1;
  logic llv;
  logic [6:0] llr, llc;
  logic signed [10:0] llq, sbd;
  logic sbll_wr, ebc_start, ebc_done, sb_rd;
  logic [7:0] sbll_addr, sb_addr;
  logic signed [10:0] sbll_data;
  logic [1:0] sb_band;
  logic [15:0] stage_cnt, hold_cnt;
  logic [9:0][1:0] push_n;
  cxd_t [9:0][1:0] push;
  logic [9:0] fready;
  logic fempty, sw, sw_load, sw_first, sw_finish, sw_ready, act_v, pop, fl_v;
  cb_t sw_cb, act_cb, fl_cb;
  bytes4_t [5:0] bo;
  cxd_t [5:0] tag;
  bp_t fl_bp;
  cp_t fl_cp;
  bytes4_t fl_b;

  jp2k_top dut (.clk, .rst_n, .start_i(start), .busy_o(busy), .pix_req_o(req), .pix_row_o(prow),
    .pix_col_o(pcol), .pix_valid_i(pv), .pix0_i(p0), .pix1_i(p1),
    .ll_valid_o(llv), .ll_row_o(llr), .ll_col_o(llc), .ll_o(llq),
    .sbll_wr_i(sbll_wr), .sbll_addr_i(sbll_addr), .sbll_data_i(sbll_data),
    .ebc_start_o(ebc_start), .ebc_done_i(ebc_done), .sb_rd_i(sb_rd), .sb_band_i(sb_band),
    .sb_addr_i(sb_addr), .sb_data_o(sbd), .stage_cnt_o(stage_cnt), .hold_cnt_o(hold_cnt),
    .push_n_i(push_n), .push_i(push), .fifo_ready_o(fready), .fifo_empty_o(fempty),
    .sw_i(sw), .sw_load_i(sw_load), .sw_cb_i(sw_cb), .sw_first_i(sw_first), .sw_finish_i(sw_finish),
    .sw_ready_o(sw_ready), .active_valid_o(act_v), .active_cb_o(act_cb),
    .pop_o(pop), .bytes_o(bo), .tag_o(tag),
    .fl_valid_o(fl_v), .fl_cb_o(fl_cb), .fl_bp_o(fl_bp), .fl_cp_o(fl_cp), .fl_bytes_o(fl_b));

  int checks = 0, failures = 0;
  int n_stall = 0, n_swap = 0, n_sbll = 0, n_full = 0, n_two = 0, n_held = 0;
  int n_switch = 0, n_ls = 0, n_flush = 0, n_llchk = 0, n_sbchk = 0;
  real maxerr = 0;
  bit dwt_finished = 0, ebc_finished = 0;

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: stages %0d", stage_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DWT side ----------------
  int  img [H][W];
  real rb [4][H/2][W/2];

  assign p0 = 8'(img[prow][pcol]);
  assign p1 = 8'(img[prow + 1][pcol]);
  always @(negedge clk) pv = ($urandom % 8) != 0;

  function automatic void cmp(int band, int r, int c, int v, string what);
    real e;
    e = real'(v) - rb[band][r][c];
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    chk(e <= 2.5, $sformatf("%s band %0d (%0d,%0d): %0d vs %f", what, band, r, c, v, rb[band][r][c]));
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (req && !pv) n_stall++;
    if (llv) begin cmp(0, llr, llc, llq, "LL port"); n_llchk++; end
    if (ebc_start) n_swap++;
  end

  task automatic reference();
    real colL [H/2][W], colH [H/2][W];
    for (int c = 0; c < W; c++) begin
      real x[], lo[], hi[];
      x = new[H];
      for (int r = 0; r < H; r++) x[r] = img[r][c];
      dwt97_1d(x, lo, hi);
      for (int r = 0; r < H / 2; r++) begin colL[r][c] = lo[r]; colH[r][c] = hi[r]; end
    end
    for (int r = 0; r < H / 2; r++) begin
      real x[], lo[], hi[];
      x = new[W];
      for (int c = 0; c < W; c++) x[c] = colL[r][c];
      dwt97_1d(x, lo, hi);
      for (int c = 0; c < W / 2; c++) begin rb[0][r][c] = lo[c]; rb[1][r][c] = hi[c]; end
      for (int c = 0; c < W; c++) x[c] = colH[r][c];
      dwt97_1d(x, lo, hi);
      for (int c = 0; c < W / 2; c++) begin rb[2][r][c] = lo[c]; rb[3][r][c] = hi[c]; end
    end
  endtask

  // stripe buffer reader: one bank per ebc_start
  task automatic reader();
    for (int s = 0; s < NST; s++) begin
      int band, half, delay;
      while (!ebc_start) @(negedge clk);
      @(negedge clk);
      band = s / 2; half = s % 2;
      for (int b = 1; b <= 3; b++)
        for (int a = 0; a < W; a++) begin
          sb_rd = 1; sb_band = 2'(b); sb_addr = 8'(a);
          @(negedge clk);
          sb_rd = 0;
          cmp(b, 4 * band + a / (W / 4), half * (W / 4) + a % (W / 4), int'(sbd), "stripe buffer");
          n_sbchk++;
        end
      delay = (s % 5 == 2) ? 1500 : int'($urandom % 64);
      repeat (delay) @(negedge clk);
      ebc_done = 1;
      @(negedge clk);
      ebc_done = 0;
    end
  endtask

  task automatic dwt_side();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        v = (r * 3 + c * 2) % 200 - 100 + int'($urandom % 21) - 10;
        if (c > W / 3 && r > H / 2) v = 120 - int'($urandom % 8);
        img[r][c] = v;
      end
    reference();
    // SB-LL through its own port, before the tile
    for (int a = 0; a < W; a++) begin
      sbll_wr = 1; sbll_addr = 8'(a); sbll_data = 11'(a * 7 - 900);
      @(negedge clk);
    end
    sbll_wr = 0;
    for (int a = 0; a < W; a++) begin
      sb_rd = 1; sb_band = 2'd0; sb_addr = 8'(a);
      @(negedge clk);
      sb_rd = 0;
      chk(int'(sbd) == a * 7 - 900, $sformatf("SB-LL word %0d", a));
      n_sbll++;
    end
    start = 1;
    @(negedge clk);
    start = 0;
    reader();
    while (busy) @(negedge clk);
    chk(stage_cnt == 16'(NST), $sformatf("%0d stages handed over", stage_cnt));
    dwt_finished = 1;
  endtask

  // ---------------- EBC side ----------------
  mq_ref rm[13][10][3];
  int    sh_idx[13][10][19];
  bit    sh_mps[13][10][19];
  byte unsigned got[13][10][3][$];
  int    pushed_cb = 0;

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 6; l++) begin
      for (int k = 0; k < 4; k++)
        if (bo[l].valid[k]) got[tag[l].cb][tag[l].cx][tag[l].cp].push_back(bo[l].data[k]);
      if (pop && dut.lanes[l].valid && dut.lanes[l].two) n_two++;
    end
    if (!pop && !fempty) n_held++;
    if (fready != '1) n_full++;
    if (!sw_ready) n_ls++;
    if (fl_v) begin
      n_flush++;
      for (int k = 0; k < 4; k++)
        if (fl_b.valid[k]) got[fl_cb][fl_bp][fl_cp].push_back(fl_b.data[k]);
    end
  end

  task automatic do_switch(bit load, int cb, bit first, bit finish);
    while (!sw_ready) @(negedge clk);
    sw = 1; sw_load = load; sw_cb = cb_t'(cb); sw_first = first; sw_finish = finish;
    @(negedge clk);
    sw = 0;
    n_switch++;
  endtask

  // one cycle of pushes for code-block cb; the reference codes them in order
  task automatic push_cycle(int cb, int cyc);
    push_n = '0;
    for (int b = 0; b < 10; b++)
      if (fready[b] && ($urandom % 100) < 85) begin
        int n;
        n = 1 + int'($urandom % 2);
        push_n[b] = 2'(n);
        for (int j = 0; j < n; j++) begin
          cxd_t p;
          int cp;
          cp = ((cyc / 16) + b) % 3;
          p.cb = cb_t'(cb); p.cp = cp_t'(cp); p.cx = cx_t'($urandom % 19); p.d = ($urandom % 100) < 20;
          push[b][j] = p;
          rm[cb][b][cp].idx = sh_idx[cb][b]; rm[cb][b][cp].mps = sh_mps[cb][b];
          rm[cb][b][cp].encode(p.cx, p.d);
          sh_idx[cb][b] = rm[cb][b][cp].idx; sh_mps[cb][b] = rm[cb][b][cp].mps;
        end
      end
    @(negedge clk);
    push_n = '0;
  endtask

  task automatic ebc_side();
    int seq[6];
    seq = '{2, 9, 4, 2, 9, 4};
    foreach (rm[c, b, p]) rm[c][b][p] = new();
    foreach (sh_idx[c, b]) begin sh_idx[c][b] = rm[0][0][0].idx; sh_mps[c][b] = rm[0][0][0].mps; end
    do_switch(1, seq[0], 1, 0);
    do_switch(1, seq[1], 1, 0);
    chk(act_v && act_cb == cb_t'(seq[0]), "first code-block active");
    for (int i = 0; i < 6; i++) begin
      for (int cyc = 0; cyc < 300; cyc++) push_cycle(seq[i], cyc);
      while (!fempty) @(negedge clk);
      if (i < 5) begin
        // the next code-block's pairs wait until it becomes active
        for (int cyc = 0; cyc < 4; cyc++) push_cycle(seq[i + 1], cyc);
        repeat (8) @(negedge clk);
        do_switch(i + 2 < 6, i + 2 < 6 ? seq[i + 2] : 0, i + 2 < 3, i >= 3);
        chk(act_v && act_cb == cb_t'(seq[i + 1]), $sformatf("code-block %0d active", seq[i + 1]));
      end
    end
    do_switch(0, 0, 0, 1);      // last code-block out with flush
    while (!sw_ready) @(negedge clk);
    repeat (8) @(negedge clk);
    for (int c = 0; c < 13; c++) for (int b = 0; b < 10; b++) for (int p = 0; p < 3; p++) begin
      bit used_s;
      used_s = rm[c][b][p].a != 'h8000 || rm[c][b][p].c != 0 || rm[c][b][p].ct != 12 || !rm[c][b][p].first;
      if (used_s) rm[c][b][p].flush();
      chk(got[c][b][p].size() == rm[c][b][p].out.size(),
          $sformatf("stream %0d/%0d/%0d: %0d bytes, expected %0d", c, b, p, got[c][b][p].size(), rm[c][b][p].out.size()));
      for (int k = 0; k < got[c][b][p].size() && k < rm[c][b][p].out.size(); k++)
        chk(got[c][b][p][k] == rm[c][b][p].out[k], $sformatf("stream %0d/%0d/%0d byte %0d", c, b, p, k));
    end
    ebc_finished = 1;
  endtask

  initial begin
    start = 0; sbll_wr = 0; sbll_addr = '0; sbll_data = '0; ebc_done = 0; sb_rd = 0;
    sb_band = '0; sb_addr = '0; push_n = '0; push = '0;
    sw = 0; sw_load = 0; sw_cb = '0; sw_first = 0; sw_finish = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      dwt_side();
      ebc_side();
    join
    chk(n_llchk == H * W / 4, $sformatf("%0d LL coefficients", n_llchk));
    chk(n_sbchk == NST * 3 * W, $sformatf("%0d stripe buffer words", n_sbchk));
    chk(n_stall > 0,  "pixel stall never happened");
    chk(hold_cnt > 0, "DWT hold never happened");
    chk(n_swap == NST, "bank swaps");
    chk(n_sbll > 0,   "SB-LL never accessed");
    chk(n_full > 0,   "FIFO full never happened");
    chk(n_two > 0,    "two-pair lane never happened");
    chk(n_held > 0,   "held lane never happened");
    chk(n_switch > 0, "code-block switch never happened");
    chk(n_ls > 0,     "load/store never happened");
    chk(n_flush > 0,  "flush never happened");
    $display("stall=%0d hold=%0d swaps=%0d sbll=%0d full=%0d two=%0d held=%0d switch=%0d ls=%0d flush=%0d maxerr=%f",
             n_stall, hold_cnt, n_swap, n_sbll, n_full, n_two, n_held, n_switch, n_ls, n_flush, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
