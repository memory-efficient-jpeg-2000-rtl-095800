// tb_ls_dwt: one decomposition level of a random-textured tile (smooth
// gradient plus noise plus a sharp edge) through the 2-D DWT engine, with a
// pixel source that sometimes withholds data (stalls). Every coefficient of
// the four subbands must arrive exactly once and match a real-valued
// separable 9/7 reference (columns first, symmetric extension) within two
// units. Also checks the number of stage pulses (two per band) and that each
// stage delivers W/4 x 4 coefficients of every subband, and that without
// stalls the tile takes the expected number of cycles.
module tb_ls_dwt;
  import dwt_ref_pkg::*;
  localparam int W = 64, H = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, req, pv, cv, stg;
  logic [4:0] prow;
  logic [5:0] pcol;
  logic signed [7:0] p0, p1;
  logic [3:0] crow;
  logic [4:0] ccol;
  logic signed [10:0] ll, hl, lh, hh;

  ls_dwt #(.W(W), .H(H)) dut (.clk, .rst_n, .start_i(start), .hold_i(1'b0), .busy_o(busy),
    .pix_req_o(req), .pix_row_o(prow), .pix_col_o(pcol), .pix_valid_i(pv), .pix0_i(p0), .pix1_i(p1),
    .coef_valid_o(cv), .coef_row_o(crow), .coef_col_o(ccol),
    .ll_o(ll), .hl_o(hl), .lh_o(lh), .hh_o(hh), .stage_o(stg));

  int img [H][W];
  real rb [4][H/2][W/2];   // LL, HL, LH, HH
  int  seen [H/2][W/2];
  int checks = 0, failures = 0, stages = 0, in_stage = 0, stalls = 0;
  bit allow_stall = 1;
  real maxerr = 0;

  assign p0 = 8'(img[prow][pcol]);
  assign p1 = 8'(img[prow + 1][pcol]);
  always @(negedge clk) pv = allow_stall ? (($urandom % 8) != 0) : 1'b1;

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (req && !pv) stalls++;
    if (cv) begin
      int lv[4];
      lv = '{int'(ll), int'(hl), int'(lh), int'(hh)};
      seen[crow][ccol]++;
      in_stage++;
      for (int b = 0; b < 4; b++) begin
        real e;
        e = real'(lv[b]) - rb[b][crow][ccol];
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        chk(e <= 2.0, $sformatf("band %0d (%0d,%0d): %0d vs %f", b, crow, ccol, lv[b], rb[b][crow][ccol]));
      end
    end
    if (stg) begin
      stages++;
      chk(in_stage == 4 * W / 4, $sformatf("stage %0d carried %0d positions", stages, in_stage));
      in_stage = 0;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  task automatic run_tile(int seed, output int cycles);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v;
        v = (r * 3 + c * 2) % 200 - 100 + int'($urandom % 21) - 10;
        if (seed % 2 == 1 && c > W / 3) v = 127 - int'($urandom % 8);
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        img[r][c] = v;
      end
    reference();
    foreach (seen[r, c]) seen[r][c] = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
    repeat (3) @(negedge clk);
    foreach (seen[r, c]) chk(seen[r][c] == 1, $sformatf("position (%0d,%0d) seen %0d times", r, c, seen[r][c]));
  endtask

  initial begin
    int cyc;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_tile(0, cyc);
    run_tile(1, cyc);
    allow_stall = 0;
    run_tile(2, cyc);
    // (H/8 + 1) bands of W columns x 4 cycles, plus 8 flush cycles per output band
    chk(cyc == (H / 8 + 1) * W * 4 + (H / 8) * 8 + 1, $sformatf("tile took %0d cycles", cyc));
    chk(stages == 3 * 2 * (H / 8), $sformatf("%0d stage pulses", stages));
    chk(stalls > 0, "no pixel stall exercised");
    $display("max error %f, stalls %0d, cycles/tile %0d", maxerr, stalls, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
