// jp2k_top: the stripe-pipelined JPEG 2000 encoder core. It joins the
// level-switch DWT (ls_dwt) and the code-block switch EBC back end (sfifo +
// csae) through the ping-pong stripe buffers (stripe_buffer) under the
// stripe pipeline scheduling controller (sps_ctrl).
//
// Data path:
//   pixels -> ls_dwt -> HL/LH/HH stripe buffers (bank sps_ctrl.bank_o)
//          -> [bit-plane coder: GRB + PCF, not part of this core] ->
//   CX-D pairs -> sfifo (10 bit-plane FIFOs, sorting) -> 6 lanes ->
//   csae (state register bank, state buffer, 6 two-symbol MQ coders)
//          -> bitstream bytes, flushed bitstreams.
// A pipeline stage of the DWT writes 4 subband rows x W/4 columns of each of
// HL, LH and HH (3 x 256 coefficients for W = 256, the 768-cycle stage of the
// source) into one bank; the reader of the other bank (the bit-plane coder)
// reports ebc_done_i when it has consumed it. sps_ctrl swaps the banks when
// both sides are done and holds the DWT otherwise.
//
// Interfaces:
//  * pixel source: pix_req_o/row/col, answered by pix_valid_i with the two
//    vertically adjacent pixels (stall by keeping pix_valid_i low).
//  * LL coefficients of the level built here leave on ll_* (valid with
//    coef_valid); they feed the next decomposition level, which this core
//    does not contain, so SB-LL is written through sbll_* instead.
//  * stripe buffer read port (sb_*), for the bit-plane coder; data one cycle
//    after sb_rd_i; ebc_start_o tells it a new bank is ready.
//  * CX-D input (push_*), one or two pairs per bit-plane FIFO per cycle
//    while fifo_ready_o; code-block switch controls (sw_*); outputs are the
//    bytes of each lane with their (code-block, bit-plane, pass) tag and the
//    flush bytes (fl_*), all as in csae.
//
// Follows the source: the buffer organisation (7 x 256 x 11 stripe buffers,
// ping-pong), the stage plan and the EBC organisation. This design's own:
// a single decomposition level, the handshake, the port-level split at the
// bit-plane coder, and the stripe buffer address map row*(W/4)+col.
module jp2k_top
  import jp2k_pkg::*;
#(
  parameter int unsigned W = 256,
  parameter int unsigned H = 256,
  localparam int unsigned XW = $clog2(W),
  localparam int unsigned YW = $clog2(H),
  localparam int unsigned SBD = W,              // 4 rows x W/4 columns
  localparam int unsigned SAW = $clog2(SBD)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // tile control and pixel source
  input  logic                     start_i,
  output logic                     busy_o,
  output logic                     pix_req_o,
  output logic [YW-1:0]            pix_row_o,
  output logic [XW-1:0]            pix_col_o,
  input  logic                     pix_valid_i,
  input  logic signed [7:0]        pix0_i,
  input  logic signed [7:0]        pix1_i,
  // LL coefficients to the next level
  output logic                     ll_valid_o,
  output logic [YW-2:0]            ll_row_o,
  output logic [XW-2:0]            ll_col_o,
  output logic signed [10:0]       ll_o,
  // SB-LL write port (last-level LL)
  input  logic                     sbll_wr_i,
  input  logic [SAW-1:0]           sbll_addr_i,
  input  logic signed [10:0]       sbll_data_i,
  // stripe buffer read side
  output logic                     ebc_start_o,
  input  logic                     ebc_done_i,
  input  logic                     sb_rd_i,
  input  logic [1:0]               sb_band_i,
  input  logic [SAW-1:0]           sb_addr_i,
  output logic signed [10:0]       sb_data_o,
  output logic [15:0]              stage_cnt_o,
  output logic [15:0]              hold_cnt_o,
  // CX-D input
  input  logic [NUM_BP-1:0][1:0]   push_n_i,
  input  cxd_t [NUM_BP-1:0][1:0]   push_i,
  output logic [NUM_BP-1:0]        fifo_ready_o,
  output logic                     fifo_empty_o,
  // code-block switching
  input  logic                     sw_i,
  input  logic                     sw_load_i,
  input  cb_t                      sw_cb_i,
  input  logic                     sw_first_i,
  input  logic                     sw_finish_i,
  output logic                     sw_ready_o,
  output logic                     active_valid_o,
  output cb_t                      active_cb_o,
  // bitstream
  output logic                     pop_o,
  output bytes4_t [NUM_TMC-1:0]    bytes_o,
  output cxd_t    [NUM_TMC-1:0]    tag_o,
  output logic                     fl_valid_o,
  output cb_t                      fl_cb_o,
  output bp_t                      fl_bp_o,
  output cp_t                      fl_cp_o,
  output bytes4_t                  fl_bytes_o
);
  // ---- DWT -> stripe buffers ---------------------------------------------
  logic                 cv, dwt_stage, hold, bank;
  logic [YW-2:0]        crow;
  logic [XW-2:0]        ccol;
  logic signed [10:0]   ll, hl, lh, hh;
  logic [SAW-1:0]       waddr;

  ls_dwt #(.W(W), .H(H)) u_dwt (
    .clk, .rst_n, .start_i, .hold_i(hold), .busy_o,
    .pix_req_o, .pix_row_o, .pix_col_o, .pix_valid_i, .pix0_i, .pix1_i,
    .coef_valid_o(cv), .coef_row_o(crow), .coef_col_o(ccol),
    .ll_o(ll), .hl_o(hl), .lh_o(lh), .hh_o(hh), .stage_o(dwt_stage));

  assign waddr = SAW'({crow[1:0], ccol[XW-3:0]});   // (row%4)*(W/4) + col%(W/4)

  assign ll_valid_o = cv;
  assign ll_row_o   = crow;
  assign ll_col_o   = ccol;
  assign ll_o       = ll;

  sps_ctrl u_sps (
    .clk, .rst_n, .dwt_done_i(dwt_stage), .ebc_done_i, .bank_o(bank),
    .dwt_hold_o(hold), .ebc_start_o, .stage_o(stage_cnt_o), .hold_cnt_o);

  stripe_buffer #(.DEPTH(SBD), .CW(11)) u_sb (
    .clk, .rst_n, .bank_i(bank),
    .wr_i(cv), .wr_addr_i(waddr), .hl_i(hl), .lh_i(lh), .hh_i(hh),
    .ll_wr_i(sbll_wr_i), .ll_addr_i(sbll_addr_i), .ll_i(sbll_data_i),
    .rd_i(sb_rd_i), .rd_band_i(sb_band_i), .rd_addr_i(sb_addr_i), .rd_data_o(sb_data_o));

  // ---- CX-D pairs -> SFIFO -> CSAE --------------------------------------
  lane_t [NUM_TMC-1:0] lanes;

  sfifo #(.NFIFO(NUM_BP), .DEPTH(6), .NUM_LANE(NUM_TMC)) u_sfifo (
    .clk, .rst_n, .push_n_i, .push_i, .ready_o(fifo_ready_o),
    .pop_en_i(pop_o), .lanes_o(lanes), .empty_o(fifo_empty_o));

  csae #(.NUM_LANE(NUM_TMC)) u_csae (
    .clk, .rst_n, .lanes_i(lanes), .pop_o,
    .sw_i, .sw_load_i, .sw_cb_i, .sw_first_i, .sw_finish_i, .ready_o(sw_ready_o),
    .active_valid_o, .active_cb_o, .bytes_o, .tag_o,
    .fl_valid_o, .fl_cb_o, .fl_bp_o, .fl_cp_o, .fl_bytes_o);
endmodule
