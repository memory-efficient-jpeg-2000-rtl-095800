// jp2k_pkg: types and constants shared by the stripe-pipelined JPEG 2000
// encoder. It holds the MQ-coder probability-state table (the 47-state table
// of the JPEG 2000 standard, Annex C), the context-decision (CX-D) pair
// format passed from the sorting FIFO to the arithmetic encoders, and the
// layout of the 400-bit coding state kept per magnitude bit-plane.
//
// The per-bit-plane state layout is this design's own choice: the source
// only gives its size (399 bits, rounded to 400 = 25 words of 16 bits). It
// holds 19 context states (6-bit index + MPS) and one MQ coder register set
// (A, C, CT, B and two flags) per coding pass, three passes per bit-plane.
package jp2k_pkg;

  // ---- code-block / bit-plane organisation --------------------------------
  localparam int unsigned NUM_BP     = 10;  // magnitude bit-planes
  localparam int unsigned NUM_CB     = 13;  // code-blocks coded concurrently
  localparam int unsigned NUM_TMC    = 6;   // two-symbol MQ coders
  localparam int unsigned NUM_CTX    = 19;  // JPEG 2000 contexts
  localparam int unsigned NUM_PASS   = 3;   // coding passes per bit-plane
  localparam int unsigned WORDS_RB   = 25;  // 16-bit words per register bank
  localparam int unsigned STATE_BITS = 16 * WORDS_RB;  // 400

  typedef logic [3:0] cb_t;   // code-block index 0..12
  typedef logic [3:0] bp_t;   // bit-plane index 0..9
  typedef logic [1:0] cp_t;   // coding pass 0..2
  typedef logic [4:0] cx_t;   // context 0..18

  // One context-decision pair, tagged with the bitstream it belongs to.
  typedef struct packed {
    cb_t cb;
    cp_t cp;
    cx_t cx;
    logic d;
  } cxd_t;

  // One lane from the sorting module to a TMC: up to two pairs of one
  // bit-plane, same code-block and coding pass.
  typedef struct packed {
    logic       valid;
    bp_t        bp;
    cb_t        cb;
    cp_t        cp;
    logic       two;     // 1: both pairs valid, 0: only the first
    cx_t        cx1;
    logic       d1;
    cx_t        cx2;
    logic       d2;
  } lane_t;

  // Probability state of one context.
  typedef struct packed {
    logic [5:0] idx;
    logic       mps;
  } ctx_t;

  // Register set of one MQ coder (one coding pass).
  typedef struct packed {
    logic        used;   // at least one symbol coded since reset
    logic        first;  // no byte emitted yet (B holds the dummy byte)
    logic [15:0] a;
    logic [27:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
  } coder_t;             // 58 bits

  // Full coding state of one magnitude bit-plane (one register bank).
  typedef struct packed {
    logic [STATE_BITS-NUM_CTX*7-NUM_PASS*58-1:0] pad;
    coder_t [NUM_PASS-1:0] coder;
    ctx_t   [NUM_CTX-1:0]  ctx;
  } bp_state_t;

  // Bytes produced by one coder in one cycle (at most two per symbol).
  typedef struct packed {
    logic [3:0]      valid;
    logic [3:0][7:0] data;   // data[0] is emitted first
  } bytes4_t;

  // ---- MQ probability estimation table (JPEG 2000 Annex C) ----------------
  typedef struct packed {
    logic [15:0] qe;
    logic [5:0]  nmps;
    logic [5:0]  nlps;
    logic        sw;
  } qe_entry_t;

  function automatic qe_entry_t qe_lookup(input logic [5:0] i);
    case (i)
      6'd0 : return '{16'h5601,  6'd1,  6'd1, 1'b1};
      6'd1 : return '{16'h3401,  6'd2,  6'd6, 1'b0};
      6'd2 : return '{16'h1801,  6'd3,  6'd9, 1'b0};
      6'd3 : return '{16'h0AC1,  6'd4, 6'd12, 1'b0};
      6'd4 : return '{16'h0521,  6'd5, 6'd29, 1'b0};
      6'd5 : return '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : return '{16'h5601,  6'd7,  6'd6, 1'b1};
      6'd7 : return '{16'h5401,  6'd8, 6'd14, 1'b0};
      6'd8 : return '{16'h4801,  6'd9, 6'd14, 1'b0};
      6'd9 : return '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: return '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: return '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: return '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: return '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: return '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: return '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: return '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: return '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: return '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: return '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: return '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: return '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: return '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: return '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: return '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: return '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: return '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: return '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: return '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: return '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: return '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: return '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: return '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: return '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: return '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: return '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: return '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: return '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: return '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: return '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: return '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: return '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: return '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: return '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: return '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: return '{16'h0001, 6'd45, 6'd43, 1'b0};
      default: return '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
  endfunction

  // Initial coding state of a bit-plane for a code-block coded for the first
  // time: all contexts at state 0 except the uniform (18, state 46), run
  // (17, state 3) and first zero-coding (0, state 4) contexts; every coder
  // at A=0x8000, C=0, CT=12.
  function automatic bp_state_t bp_state_init();
    bp_state_t s;
    s = '0;
    for (int i = 0; i < int'(NUM_CTX); i++) s.ctx[i] = '{6'd0, 1'b0};
    s.ctx[0]  = '{6'd4,  1'b0};
    s.ctx[17] = '{6'd3,  1'b0};
    s.ctx[18] = '{6'd46, 1'b0};
    for (int p = 0; p < int'(NUM_PASS); p++)
      s.coder[p] = '{1'b0, 1'b1, 16'h8000, 28'd0, 4'd12, 8'd0};
    return s;
  endfunction


  // ---- MQ coder byte output (JPEG 2000 BYTEOUT with bit stuffing) ---------
  // Works on a 32-bit copy of C. Emits the previous byte B unless it is the
  // dummy byte that precedes the stream (first).
  typedef struct packed {
    logic        first;
    logic [31:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
    logic        emit;
    logic [7:0]  byte_o;
  } byteout_t;

  function automatic byteout_t mq_byteout(input logic first, input logic [31:0] c,
                                          input logic [7:0] b);
    byteout_t r;
    logic [7:0] bn;
    r.first  = 1'b0;
    r.emit   = !first;
    r.byte_o = b;
    r.c = c; r.b = b; r.ct = 4'd8;
    if (b == 8'hFF) begin
      r.b  = c[27:20];
      r.c  = c & 32'h000F_FFFF;
      r.ct = 4'd7;
    end else if (!c[27]) begin
      r.b  = c[26:19];
      r.c  = c & 32'h0007_FFFF;
      r.ct = 4'd8;
    end else begin
      bn       = b + 8'd1;
      r.byte_o = bn;
      if (bn == 8'hFF) begin
        r.b  = c[27:20] & 8'h7F;
        r.c  = c & 32'h000F_FFFF;
        r.ct = 4'd7;
      end else begin
        r.b  = c[26:19];
        r.c  = c & 32'h0007_FFFF;
        r.ct = 4'd8;
      end
    end
    return r;
  endfunction

  // Code-register update after one symbol: add the increment to C, then
  // shift C left by the renormalisation amount ra, emitting a byte each time
  // CT runs out. At most two bytes are emitted per symbol (ra <= 15, and a
  // 0xFF byte is never followed by another 0xFF).
  typedef struct packed {
    coder_t          cd;
    logic [1:0]      n;
    logic [1:0][7:0] bytes;
  } code_upd_t;

  function automatic code_upd_t mq_code_update(input coder_t cd, input logic [15:0] inc,
                                               input logic [3:0] ra);
    code_upd_t r;
    logic [31:0] c;
    logic [3:0]  ct, rem, s;
    byteout_t    bo;
    r.n = 2'd0; r.bytes = '0;
    r.cd = cd;
    c   = {4'd0, cd.c} + {16'd0, inc};
    ct  = cd.ct;
    rem = ra;
    for (int k = 0; k < 2; k++) begin
      s   = (rem < ct) ? rem : ct;
      c   = c << s;
      ct  = ct - s;
      rem = rem - s;
      if (ct == 4'd0) begin
        bo = mq_byteout(r.cd.first, c, r.cd.b);
        if (bo.emit) begin
          r.bytes[r.n[0]] = bo.byte_o;
          r.n = r.n + 2'd1;
        end
        r.cd.first = bo.first;
        r.cd.b     = bo.b;
        c  = bo.c;
        ct = bo.ct;
      end
    end
    c = c << rem;
    ct = ct - rem;
    r.cd.c  = c[27:0];
    r.cd.ct = ct;
    return r;
  endfunction

endpackage
