// tmc: two-symbol MQ coder. Codes up to two context-decision pairs of one
// bitstream (one bit-plane, one coding pass) in a single cycle.
//
// The datapath is a two-symbol interval update followed by a two-symbol code
// update, with no pipeline register between them, as in the source design.
// The interval update is two one-symbol MQ interval updates in series: each
// looks up Qe for its context, picks the MPS or LPS sub-interval, computes
// the renormalisation amount RA (leading zeros of the new A) and the value
// added to C (Qe or 0), and advances the context's probability state. The
// second symbol sees the first symbol's context update when both use the same
// context. The code update then applies, per symbol, the C increment and the
// RA-bit left shift with byte output and bit stuffing; each symbol can emit
// at most two bytes, so a cycle produces up to four bytes (BO0..BO3).
//
// The block is purely combinational: the state register bank (srb) supplies
// the current coding state of the bit-plane and stores the updated one at
// the clock edge. The gate-level retiming of the code update (moving the
// second C update in parallel with the first byte output) is a timing
// optimisation that does not change the function; here the function is
// written directly and left to synthesis.
//
// Interface: lane (pairs, pass, count), st_i (bit-plane state), st_o
// (updated state, equal to st_i when the lane is not valid), bytes_o
// (emitted bytes, valid bits thermometer-coded from bit 0).
module tmc
  import jp2k_pkg::*;
(
  input  lane_t     lane,
  input  bp_state_t st_i,
  output bp_state_t st_o,
  output bytes4_t   bytes_o
);

  // Result of the interval update of one symbol.
  typedef struct packed {
    logic [15:0] a;
    ctx_t        ctx;
    logic [15:0] inc;  // added to C
    logic [3:0]  ra;   // renormalisation shift
  } iv_t;

  function automatic logic [3:0] lzc16(input logic [15:0] v);
    logic [3:0] n;
    n = 4'd0;
    for (int i = 15; i >= 0; i--) begin
      if (v[i]) break;
      n = n + 4'd1;
    end
    return n;
  endfunction

  function automatic iv_t interval_update(input logic [15:0] a, input ctx_t cx, input logic d);
    iv_t       r;
    qe_entry_t q;
    logic [15:0] am;
    q     = qe_lookup(cx.idx);
    am    = a - q.qe;
    r.ctx = cx;
    r.inc = 16'd0;
    if (d == cx.mps) begin
      if (!am[15]) begin
        // MPS with renormalisation (conditional exchange when A < Qe)
        if (am < q.qe) r.a = q.qe;
        else begin r.a = am; r.inc = q.qe; end
        r.ctx.idx = q.nmps;
      end else begin
        r.a   = am;
        r.inc = q.qe;
      end
    end else begin
      if (am < q.qe) begin r.a = am; r.inc = q.qe; end
      else r.a = q.qe;
      if (q.sw) r.ctx.mps = ~cx.mps;
      r.ctx.idx = q.nlps;
    end
    r.ra = lzc16(r.a);
    r.a  = r.a << r.ra;
    return r;
  endfunction

  iv_t       iv1, iv2;
  code_upd_t cu1, cu2;
  coder_t    cd0;
  ctx_t      cx2_state;

  always_comb begin
    st_o    = st_i;
    bytes_o = '0;
    cd0     = st_i.coder[lane.cp];
    // ---- two-symbol interval update ----
    iv1 = interval_update(cd0.a, st_i.ctx[lane.cx1], lane.d1);
    cx2_state = (lane.cx2 == lane.cx1) ? iv1.ctx : st_i.ctx[lane.cx2];
    iv2 = interval_update(iv1.a, cx2_state, lane.d2);
    // ---- two-symbol code update ----
    cu1 = mq_code_update(cd0, iv1.inc, iv1.ra);
    cu2 = mq_code_update(cu1.cd, iv2.inc, iv2.ra);
    if (lane.valid) begin
      st_o.ctx[lane.cx1] = iv1.ctx;
      if (lane.two) begin
        st_o.ctx[lane.cx2] = iv2.ctx;
        st_o.coder[lane.cp]      = cu2.cd;
        st_o.coder[lane.cp].a    = iv2.a;
        st_o.coder[lane.cp].used = 1'b1;
        // pack the bytes of both symbols in emission order
        case (cu1.n)
          2'd0: begin
            bytes_o.data[1:0]  = cu2.bytes;
            bytes_o.valid[1:0] = (cu2.n == 2'd2) ? 2'b11 : (cu2.n == 2'd1) ? 2'b01 : 2'b00;
          end
          2'd1: begin
            bytes_o.data[0]    = cu1.bytes[0];
            bytes_o.data[2:1]  = cu2.bytes;
            bytes_o.valid[2:0] = (cu2.n == 2'd2) ? 3'b111 : (cu2.n == 2'd1) ? 3'b011 : 3'b001;
          end
          default: begin
            bytes_o.data[1:0]  = cu1.bytes;
            bytes_o.data[3:2]  = cu2.bytes;
            bytes_o.valid      = (cu2.n == 2'd2) ? 4'b1111 : (cu2.n == 2'd1) ? 4'b0111 : 4'b0011;
          end
        endcase
      end else begin
        st_o.coder[lane.cp]      = cu1.cd;
        st_o.coder[lane.cp].a    = iv1.a;
        st_o.coder[lane.cp].used = 1'b1;
        bytes_o.data[1:0]  = cu1.bytes;
        bytes_o.valid[1:0] = (cu1.n == 2'd2) ? 2'b11 : (cu1.n == 2'd1) ? 2'b01 : 2'b00;
      end
    end
  end

endmodule
