// csae: code-block switch arithmetic encoder. Six two-symbol MQ coders
// (tmc) share one state register bank (srb), which holds the coding state of
// the active code-block and swaps code-blocks through a two-port state
// buffer (tp_ram, 3264 x 16 bits: 13 code-blocks x 10 bit-planes x 25
// words). Together they keep the bitstreams of 13 code-blocks open at once
// while only one code-block is coded in any cycle.
//
// Each cycle every valid lane from the sorting FIFO codes one or two pairs
// in its coder; the new state is written back at the clock edge. Lanes are
// accepted (pop_o high) only when every valid lane belongs to the active
// code-block; otherwise the coders wait for the next switch. Output bytes
// of lane l appear on bytes_o[l] in the same cycle, tagged with the
// bitstream (code-block, bit-plane, coding pass) in tag_o[l]; terminating
// bytes of finished code-blocks come out of the flush port.
module csae
  import jp2k_pkg::*;
#(
  parameter int unsigned NUM_LANE = 6,
  parameter int unsigned SB_DEPTH = 3264
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  lane_t   [NUM_LANE-1:0]   lanes_i,
  output logic                     pop_o,
  // code-block switch control (see srb)
  input  logic                     sw_i,
  input  logic                     sw_load_i,
  input  cb_t                      sw_cb_i,
  input  logic                     sw_first_i,
  input  logic                     sw_finish_i,
  output logic                     ready_o,
  output logic                     active_valid_o,
  output cb_t                      active_cb_o,
  // embedded bitstreams
  output bytes4_t [NUM_LANE-1:0]   bytes_o,
  output cxd_t    [NUM_LANE-1:0]   tag_o,     // cb, cp valid; cx field carries bp
  output logic                     fl_valid_o,
  output cb_t                      fl_cb_o,
  output bp_t                      fl_bp_o,
  output cp_t                      fl_cp_o,
  output bytes4_t                  fl_bytes_o
);
  localparam int unsigned SAW = $clog2(SB_DEPTH);

  bp_state_t [NUM_LANE-1:0] st_rd, st_wr;
  bytes4_t   [NUM_LANE-1:0] tmc_bytes;
  logic                     sb_wr_en, sb_rd_en;
  logic [SAW-1:0]           sb_wr_addr, sb_rd_addr;
  logic [15:0]              sb_wr_data, sb_rd_data;

  always_comb begin
    pop_o = active_valid_o;
    for (int l = 0; l < int'(NUM_LANE); l++)
      if (lanes_i[l].valid && lanes_i[l].cb != active_cb_o) pop_o = 1'b0;
  end

  srb #(.NUM_LANE(NUM_LANE), .SB_DEPTH(SB_DEPTH)) u_srb (
    .clk, .rst_n,
    .lanes_i, .upd_en_i(pop_o), .lane_st_o(st_rd), .lane_st_i(st_wr),
    .sw_i, .sw_load_i, .sw_cb_i, .sw_first_i, .sw_finish_i,
    .ready_o, .active_valid_o, .active_cb_o,
    .sb_wr_en_o(sb_wr_en), .sb_wr_addr_o(sb_wr_addr), .sb_wr_data_o(sb_wr_data),
    .sb_rd_en_o(sb_rd_en), .sb_rd_addr_o(sb_rd_addr), .sb_rd_data_i(sb_rd_data),
    .fl_valid_o, .fl_cb_o, .fl_bp_o, .fl_cp_o, .fl_bytes_o
  );

  tp_ram #(.DEPTH(SB_DEPTH), .WIDTH(16)) u_state_buf (
    .clk, .wr_en(sb_wr_en), .wr_addr(sb_wr_addr), .wr_data(sb_wr_data),
    .rd_en(sb_rd_en), .rd_addr(sb_rd_addr), .rd_data(sb_rd_data)
  );

  for (genvar l = 0; l < int'(NUM_LANE); l++) begin : g_tmc
    tmc u_tmc (.lane(lanes_i[l]), .st_i(st_rd[l]), .st_o(st_wr[l]), .bytes_o(tmc_bytes[l]));
    always_comb begin
      bytes_o[l]     = tmc_bytes[l];
      if (!pop_o) bytes_o[l].valid = '0;
      tag_o[l].cb = lanes_i[l].cb;
      tag_o[l].cp = lanes_i[l].cp;
      tag_o[l].cx = cx_t'(lanes_i[l].bp);
      tag_o[l].d  = lanes_i[l].valid & pop_o;
    end
  end

endmodule
