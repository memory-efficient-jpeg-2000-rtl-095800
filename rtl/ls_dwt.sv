// ls_dwt: one decomposition level of the 2-D 9/7 DWT, column first, with the
// nonoverlapped stripe-based scan of a line-based architecture.
//
// Scan: the tile is cut into bands of 8 rows. Within a band the engine reads
// two vertically adjacent pixels per cycle, four cycles per column (rows 0-1,
// 2-3, 4-5, 6-7), column after column, first over the left span of the tile
// and then over the right span. One column-DWT datapath (dwt97_lift) does
// one lifting step per cycle; the four intrinsic registers of each column
// are kept in the line buffer (temporal buffer), one 4x14-bit word per
// column: read one column ahead, written back one column behind, so a single
// port serves it. Intermediate coefficients come out two per cycle and go to
// the row transform right away; eight registers hold those of the even
// column until its odd neighbour arrives, so no data buffer is needed.
//
// Row transform: two row lifting datapaths, one for the low-pass rows and
// one for the high-pass rows of the band, each taking one step per cycle
// during odd columns. The intrinsic registers of the eight row signals of a
// band are kept in registers and carried from the left span to the right
// span. At the right end two flush steps per row (8 cycles) finish the rows.
//
// Alignment: the 9/7 pipeline delays outputs by two sample pairs, so the
// scan runs one band ahead (the first band only primes the column registers)
// and the left span reaches four columns into the right half. Each span then
// produces exactly 4 rows x W/4 coefficients of every subband: 256 per
// subband for W = 256, one pipeline stage of the stripe schedule. stage_o
// pulses at the end of each span.
//
// Interface: the engine asks for the pixel pair of rows pix_row_o,
// pix_row_o+1 at column pix_col_o (pix_req_o) and waits while pix_valid_i is
// low; hold_i freezes the whole engine. Pixels are signed (level-shifted)
// 8-bit values. Coefficients leave as
// coef_o: one (row, column) position of all four subbands per valid cycle,
// rounded to 11-bit integers with saturation, one cycle after the step.
//
// Follows the source: column-first order, stripe-based scan with 2 pixels
// per cycle, 4 intrinsic registers per column in a 14-bit line buffer,
// 11-bit coefficients, 256 coefficients per subband per stage. This
// design's own choices: the exact scan order, two row datapaths, the word
// formats, and a single decomposition level (level switching is not built).
module ls_dwt #(
  parameter int unsigned W  = 256,   // tile width
  parameter int unsigned H  = 256,   // tile height
  parameter int unsigned CW = 14,    // column word (line buffer word)
  parameter int unsigned RW = 16,    // row word
  parameter int unsigned OW = 11,    // coefficient width
  localparam int unsigned XW = $clog2(W),
  localparam int unsigned YW = $clog2(H)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,      // begin a tile
  input  logic                 hold_i,       // freeze (stripe buffer not yet free)
  output logic                 busy_o,
  // pixel source
  output logic                 pix_req_o,
  output logic [YW-1:0]        pix_row_o,    // even row
  output logic [XW-1:0]        pix_col_o,
  input  logic                 pix_valid_i,
  input  logic signed [7:0]    pix0_i,       // row pix_row_o
  input  logic signed [7:0]    pix1_i,       // row pix_row_o + 1
  // coefficients
  output logic                 coef_valid_o,
  output logic [YW-2:0]        coef_row_o,   // row within the subband
  output logic [XW-2:0]        coef_col_o,   // column within the subband
  output logic signed [OW-1:0] ll_o, hl_o, lh_o, hh_o,
  output logic                 stage_o       // a span finished
);
  localparam int unsigned K   = H / 2;          // column steps with data
  localparam int unsigned NB  = H / 8;          // bands with output
  localparam int unsigned CL  = W / 2 + 4;      // columns of the left span
  localparam int unsigned PW  = W / 2;          // row steps with data
  localparam int unsigned LBW = 4 * CW;

  typedef enum logic [1:0] {S_IDLE, S_COL, S_FLUSH} state_e;
  state_e st;

  logic signed [YW+1:0] band;      // -1 .. NB-1
  logic                 span;      // 0 left, 1 right
  logic [XW-1:0]        col;
  logic [1:0]           slot;
  logic [2:0]           fcnt;
  logic                 wb_pend;
  logic [XW-1:0]        wb_col;

  // column-step index of this cycle: k = 4*band + 2 + slot
  int                   k;
  logic                 k_data, k_proc, stall;
  always_comb begin
    k      = 4 * int'(band) + 2 + int'(slot);
    k_data = (st == S_COL) && k >= 0 && k < int'(K);
    k_proc = (st == S_COL) && k >= 0 && k <= int'(K) + 1;
    stall  = (k_data && !pix_valid_i) || (st != S_IDLE && hold_i);
  end

  assign pix_req_o = k_data;
  assign pix_row_o = YW'(2 * k);
  assign pix_col_o = col;
  assign busy_o    = st != S_IDLE;

  // ---- line buffer (column intrinsic registers) ----
  logic              lb_en, lb_we;
  logic [XW-1:0]     lb_addr;
  logic [LBW-1:0]    lb_wdata, lb_rdata;
  logic signed [CW-1:0] creg [4];
  logic signed [CW-1:0] wb   [4];

  // next column in scan order (for the prefetch)
  logic [XW-1:0] nxt_col;
  always_comb nxt_col = (col == XW'(W - 1)) ? '0 : col + 1'b1;

  always_comb begin
    lb_en = 1'b0; lb_we = 1'b0; lb_addr = col; lb_wdata = '0;
    if (!stall) begin
      if ((st == S_COL && slot == 2'd0 || st == S_FLUSH && fcnt == 3'd0) && wb_pend) begin
        lb_en = 1'b1; lb_we = 1'b1; lb_addr = wb_col;
        lb_wdata = {wb[3], wb[2], wb[1], wb[0]};
      end else if (st == S_COL && slot == 2'd2) begin
        lb_en = 1'b1; lb_addr = nxt_col;
      end
    end
  end

  sp_ram #(.DEPTH(W), .WIDTH(LBW)) u_line_buf (
    .clk, .en(lb_en), .we(lb_we), .addr(lb_addr), .wdata(lb_wdata), .rdata(lb_rdata));

  // ---- column datapath ----
  logic signed [CW-1:0] ce, co, clo, chi;
  logic signed [CW-1:0] cr_o [4];
  logic [5:0]           cpos;
  always_comb begin
    ce   = CW'(pix0_i) <<< 2;   // two fractional bits
    co   = CW'(pix1_i) <<< 2;
    if (!k_data) begin ce = '0; co = '0; end
    cpos = {k == int'(K) + 1, k == int'(K), k == int'(K) - 1, k == 2, k == 1, k == 0};
  end
  dwt97_lift #(.DW(CW)) u_col (.e_i(ce), .o_i(co), .pos_i(cpos), .r_i(creg), .r_o(cr_o),
                               .lo_o(clo), .hi_o(chi));

  // ---- row datapaths ----
  logic signed [CW-1:0] bufl [4], bufh [4];     // even-column intermediates
  logic signed [RW-1:0] rrl [4][4], rrh [4][4]; // row registers [row][reg]
  logic signed [RW-1:0] rl_e, rl_o, rh_e, rh_o, rl_lo, rl_hi, rh_lo, rh_hi;
  logic signed [RW-1:0] rl_ri [4], rh_ri [4], rl_ro [4], rh_ro [4];
  logic [5:0]           rpos;
  logic [1:0]           rsel;
  int                   p;
  logic                 row_step;

  always_comb begin
    rsel     = (st == S_FLUSH) ? fcnt[1:0] : slot;
    p        = (st == S_FLUSH) ? int'(PW) + int'(fcnt[2]) : int'(col) / 2;
    row_step = ((st == S_COL && band >= 0 && col[0]) || st == S_FLUSH) && !stall;
    rpos     = {p == int'(PW) + 1, p == int'(PW), p == int'(PW) - 1, p == 2, p == 1, p == 0};
    rl_e     = RW'(bufl[rsel]);
    rl_o     = RW'(clo);
    rh_e     = RW'(bufh[rsel]);
    rh_o     = RW'(chi);
    for (int r = 0; r < 4; r++) begin
      rl_ri[r] = rrl[rsel][r];
      rh_ri[r] = rrh[rsel][r];
    end
  end

  dwt97_lift #(.DW(RW)) u_row_l (.e_i(rl_e), .o_i(rl_o), .pos_i(rpos), .r_i(rl_ri), .r_o(rl_ro),
                                 .lo_o(rl_lo), .hi_o(rl_hi));
  dwt97_lift #(.DW(RW)) u_row_h (.e_i(rh_e), .o_i(rh_o), .pos_i(rpos), .r_i(rh_ri), .r_o(rh_ro),
                                 .lo_o(rh_lo), .hi_o(rh_hi));

  function automatic logic signed [OW-1:0] to_coef(input logic signed [RW-1:0] v);
    logic signed [RW-1:0] r;
    r = (v + RW'(2)) >>> 2;
    if (r > RW'((1 << (OW - 1)) - 1)) return OW'((1 << (OW - 1)) - 1);
    if (r < -RW'(1 << (OW - 1)))      return OW'(-(1 << (OW - 1)));
    return OW'(r);
  endfunction

  // ---- sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; band <= '0; span <= 1'b0; col <= '0; slot <= '0; fcnt <= '0;
      wb_pend <= 1'b0; wb_col <= '0;
      for (int r = 0; r < 4; r++) begin
        creg[r] <= '0; wb[r] <= '0; bufl[r] <= '0; bufh[r] <= '0;
        for (int q = 0; q < 4; q++) begin rrl[r][q] <= '0; rrh[r][q] <= '0; end
      end
      coef_valid_o <= 1'b0; coef_row_o <= '0; coef_col_o <= '0;
      ll_o <= '0; hl_o <= '0; lh_o <= '0; hh_o <= '0;
      stage_o <= 1'b0;
    end else begin
      coef_valid_o <= 1'b0;
      stage_o      <= 1'b0;
      // row steps and outputs
      if (row_step) begin
        for (int r = 0; r < 4; r++) begin
          rrl[rsel][r] <= rl_ro[r];
          rrh[rsel][r] <= rh_ro[r];
        end
        if (p >= 2) begin
          coef_valid_o <= 1'b1;
          coef_row_o   <= (YW-1)'(4 * int'(band) + int'(rsel));
          coef_col_o   <= (XW-1)'(p - 2);
          ll_o <= to_coef(rl_lo); hl_o <= to_coef(rl_hi);
          lh_o <= to_coef(rh_lo); hh_o <= to_coef(rh_hi);
        end
      end
      case (st)
        S_IDLE: if (start_i) begin
          st <= S_COL; band <= -1; span <= 1'b0; col <= '0; slot <= '0; wb_pend <= 1'b0;
        end
        S_COL: if (!stall) begin
          if (k_proc)
            for (int r = 0; r < 4; r++) creg[r] <= cr_o[r];
          if (!col[0]) begin
            bufl[slot] <= clo;
            bufh[slot] <= chi;
          end
          if (slot == 2'd0 && wb_pend) wb_pend <= 1'b0;
          slot <= slot + 2'd1;
          if (slot == 2'd3) begin
            // end of column: write-back pending, prefetched registers in
            wb      <= cr_o;
            wb_col  <= col;
            wb_pend <= 1'b1;
            for (int r = 0; r < 4; r++) creg[r] <= $signed(lb_rdata[r*CW +: CW]);
            col <= nxt_col;
            if (span == 1'b0 && col == XW'(CL - 1)) begin
              span <= 1'b1;
              if (band >= 0) stage_o <= 1'b1;
            end else if (col == XW'(W - 1)) begin
              span <= 1'b0;
              if (band >= 0) begin
                st   <= S_FLUSH;
                fcnt <= '0;
              end else band <= band + 1'b1;
            end
          end
        end
        S_FLUSH: if (!stall) begin
          if (fcnt == 3'd0) wb_pend <= 1'b0;
          fcnt <= fcnt + 3'd1;
          if (fcnt == 3'd7) begin
            stage_o <= 1'b1;
            if (band == (YW+2)'(NB - 1)) st <= S_IDLE;
            else begin
              st   <= S_COL;
              band <= band + 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
