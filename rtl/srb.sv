// srb: state register bank of the code-block switch arithmetic encoder.
//
// It holds the coding state of one code-block (ten register banks RB0..RB9,
// one per magnitude bit-plane, 400 bits each) for the six two-symbol MQ
// coders, and swaps code-blocks without stopping them. Each RB has two
// register sets used in ping-pong: the active set feeds the coders, while the
// shadow set stores the previous code-block to the state buffer and loads the
// next one from it. A switch (sw_i) exchanges the two sets in one cycle.
//
// Load/store: the shadow RBs are 25-word x 16-bit shift registers handled
// one RB at a time (only one RB shifts in any cycle). Each cycle one word is
// shifted out to the state buffer write port and the word read from the
// state buffer is shifted in. Ten RBs take 250 shift cycles plus one cycle of
// read latency, inside the 256 cycles a code-block stripe takes. State buffer
// address = code-block * 250 + bit-plane * 25 + word.
//
// Special cases: a code-block coded for the first time (sw_first_i) is not
// loaded; its RBs shift in the reset state instead. A code-block that is
// finished (sw_finish_i, given for the outgoing one) is not stored; the flush
// circuit terminates its bitstreams instead, one bitstream per cycle, while
// its RB is being shifted. Only bitstreams that coded at least one symbol are
// terminated (this design's choice; with 10 bit-planes at most 28 are
// non-empty in JPEG 2000, since the top bit-plane has only a cleanup pass).
//
// Lane interface: lane_st_o[l] is the active state of bit-plane lanes_i[l].bp,
// and lane_st_i[l] (from the coder of lane l) is written back at the clock
// edge when the lane is valid and upd_en_i is high. Two valid lanes never
// carry the same bit-plane (they come from different FIFOs).
module srb
  import jp2k_pkg::*;
#(
  parameter int unsigned NUM_LANE = 6,
  parameter int unsigned SB_DEPTH = 3264,
  localparam int unsigned SAW     = $clog2(SB_DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // coder lanes
  input  lane_t     [NUM_LANE-1:0]    lanes_i,
  input  logic                        upd_en_i,
  output bp_state_t [NUM_LANE-1:0]    lane_st_o,
  input  bp_state_t [NUM_LANE-1:0]    lane_st_i,
  // code-block switch
  input  logic                        sw_i,
  input  logic                        sw_load_i,    // preload a code-block
  input  cb_t                         sw_cb_i,      // ... this one
  input  logic                        sw_first_i,   // ... coded for the first time
  input  logic                        sw_finish_i,  // outgoing active one is finished
  output logic                        ready_o,      // load/store idle, switch allowed
  output logic                        active_valid_o,
  output cb_t                         active_cb_o,
  // state buffer
  output logic                        sb_wr_en_o,
  output logic [SAW-1:0]              sb_wr_addr_o,
  output logic [15:0]                 sb_wr_data_o,
  output logic                        sb_rd_en_o,
  output logic [SAW-1:0]              sb_rd_addr_o,
  input  logic [15:0]                 sb_rd_data_i,
  // flush output: terminating bytes of one bitstream
  output logic                        fl_valid_o,
  output cb_t                         fl_cb_o,
  output bp_t                         fl_bp_o,
  output cp_t                         fl_cp_o,
  output bytes4_t                     fl_bytes_o
);

  localparam int unsigned LS_CYC = NUM_BP * WORDS_RB;  // 250

  bp_state_t   rb [2][NUM_BP];     // two register sets
  logic        act;                   // index of the active set
  logic        shd;                   // index of the shadow set
  logic [1:0]  set_valid;
  cb_t  [1:0]  set_cb;

  // load/store sequencer
  logic        ls_busy;
  logic [8:0]  ls_k;                  // 0..LS_CYC
  logic        ls_load, ls_first, ls_store, ls_flush;
  cb_t         ls_in_cb, ls_out_cb;

  bp_state_t   init_st;
  assign init_st = bp_state_init();

  assign shd            = ~act;
  assign ready_o        = !ls_busy;
  assign active_valid_o = set_valid[act];
  assign active_cb_o    = set_cb[act];

  // ---- lanes: read the active bank ----
  always_comb
    for (int l = 0; l < int'(NUM_LANE); l++)
      lane_st_o[l] = rb[act][lanes_i[l].bp];

  // shift position of cycle k (k = 1..250 shifts word k-1)
  logic [3:0] sh_rb;
  logic [4:0] sh_w;
  logic       sh_en;
  always_comb begin
    sh_en = ls_busy && ls_k != 9'd0;
    sh_rb = 4'((int'(ls_k) - 1) / int'(WORDS_RB));
    sh_w  = 5'((int'(ls_k) - 1) % int'(WORDS_RB));
  end

  // ---- state buffer ports ----
  logic [3:0] rd_rb;
  logic [4:0] rd_w;
  always_comb begin
    rd_rb        = 4'(int'(ls_k) / int'(WORDS_RB));
    rd_w         = 5'(int'(ls_k) % int'(WORDS_RB));
    sb_rd_en_o   = ls_busy && ls_load && !ls_first && ls_k < 9'(LS_CYC);
    sb_rd_addr_o = SAW'(int'(ls_in_cb) * int'(LS_CYC) + int'(rd_rb) * int'(WORDS_RB) + int'(rd_w));
    sb_wr_en_o   = sh_en && ls_store;
    sb_wr_addr_o = SAW'(int'(ls_out_cb) * int'(LS_CYC) + int'(sh_rb) * int'(WORDS_RB) + int'(sh_w));
    sb_wr_data_o = rb[shd][sh_rb][15:0];
  end

  // word shifted in at this cycle
  logic [15:0] in_word;
  always_comb begin
    in_word = '0;
    if (ls_load) in_word = ls_first ? init_st[16*sh_w +: 16] : sb_rd_data_i;
  end

  // ---- flush circuit ----
  coder_t [NUM_PASS-1:0] fl_cd;
  logic   [1:0]          fl_idx;
  logic                  fl_run;
  bp_t                   fl_bp;

  typedef struct packed {
    logic [1:0]      n;
    logic [2:0][7:0] bytes;
  } flush_t;

  function automatic flush_t mq_flush(input coder_t cd);
    flush_t      r;
    logic [31:0] c, tempc;
    logic [7:0]  b;
    logic        first;
    byteout_t    bo;
    r = '0;
    c     = {4'd0, cd.c};
    b     = cd.b;
    first = cd.first;
    tempc = c + {16'd0, cd.a};
    c     = c | 32'h0000_FFFF;
    if (c >= tempc) c = c - 32'h0000_8000;
    for (int k = 0; k < 2; k++) begin
      c  = c << cd.ct;
      bo = mq_byteout(first, c, b);
      if (bo.emit) begin r.bytes[r.n] = bo.byte_o; r.n = r.n + 2'd1; end
      first = bo.first;
      b = bo.b;
      c = bo.c;
      cd.ct = bo.ct;
    end
    if (b != 8'hFF) begin r.bytes[r.n] = b; r.n = r.n + 2'd1; end
    return r;
  endfunction

  flush_t fl_res;
  always_comb begin
    fl_res     = mq_flush(fl_cd[fl_idx]);
    fl_valid_o = fl_run && fl_cd[fl_idx].used;
    fl_cb_o    = ls_out_cb;
    fl_bp_o    = fl_bp;
    fl_cp_o    = fl_idx;
    fl_bytes_o = '0;
    fl_bytes_o.data[2:0] = fl_res.bytes;
    fl_bytes_o.valid     = (fl_res.n == 2'd3) ? 4'b0111 : (fl_res.n == 2'd2) ? 4'b0011 :
                           (fl_res.n == 2'd1) ? 4'b0001 : 4'b0000;
  end

  // ---- registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2; s++)
        for (int r = 0; r < int'(NUM_BP); r++) rb[s][r] <= bp_state_init();
      act       <= 1'b0;
      set_valid <= '0;
      set_cb    <= '0;
      ls_busy   <= 1'b0;
      ls_k      <= '0;
      ls_load   <= 1'b0;
      ls_first  <= 1'b0;
      ls_store  <= 1'b0;
      ls_flush  <= 1'b0;
      ls_in_cb  <= '0;
      ls_out_cb <= '0;
      fl_cd     <= '0;
      fl_idx    <= '0;
      fl_run    <= 1'b0;
      fl_bp     <= '0;
    end else begin
      // coder write-back into the active set
      if (upd_en_i)
        for (int l = 0; l < int'(NUM_LANE); l++)
          if (lanes_i[l].valid) rb[act][lanes_i[l].bp] <= lane_st_i[l];

      // shadow set: one word per cycle through one RB
      if (sh_en) begin
        rb[shd][sh_rb] <= {in_word, rb[shd][sh_rb][STATE_BITS-1:16]};
        if (sh_w == 5'd0 && ls_flush) begin
          fl_cd  <= rb[shd][sh_rb].coder;
          fl_bp  <= sh_rb;
          fl_idx <= 2'd0;
          fl_run <= 1'b1;
        end
      end
      if (fl_run && !(sh_en && sh_w == 5'd0 && ls_flush)) begin
        if (fl_idx == 2'(NUM_PASS - 1)) fl_run <= 1'b0;
        else fl_idx <= fl_idx + 2'd1;
      end

      if (ls_busy) begin
        if (ls_k == 9'(LS_CYC)) begin
          ls_busy <= 1'b0;
          if (ls_load) set_valid[shd] <= 1'b1;
        end
        ls_k <= ls_k + 9'd1;
      end

      if (sw_i) begin
        act             <= ~act;
        set_valid[act]  <= 1'b0;          // becomes the shadow set
        set_cb[act]     <= sw_cb_i;
        ls_busy   <= sw_load_i || set_valid[act];
        ls_k      <= '0;
        ls_load   <= sw_load_i;
        ls_first  <= sw_first_i;
        ls_in_cb  <= sw_cb_i;
        ls_out_cb <= set_cb[act];
        ls_store  <= set_valid[act] && !sw_finish_i;
        ls_flush  <= set_valid[act] && sw_finish_i;
      end
    end
  end

  a_sw_when_ready: assert property (@(posedge clk) disable iff (!rst_n) sw_i |-> ready_o);
  for (genvar l = 0; l < int'(NUM_LANE); l++) begin : g_chk
    a_lane_cb: assert property (@(posedge clk) disable iff (!rst_n)
      upd_en_i && lanes_i[l].valid |-> set_valid[act] && lanes_i[l].cb == set_cb[act]);
  end

endmodule
