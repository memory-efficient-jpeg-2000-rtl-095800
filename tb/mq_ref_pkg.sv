// mq_ref_pkg: bit-serial reference model of the JPEG 2000 MQ encoder for
// testbenches. It follows the textbook flow (one renormalisation shift per
// loop iteration, BYTEOUT whenever CT reaches zero, FLUSH with SETBITS) and
// shares only the probability table with the design.
package mq_ref_pkg;
  import jp2k_pkg::*;

  class mq_ref;
    int unsigned a, c, ct, b;
    bit first;
    int          idx[19];
    bit          mps[19];
    byte unsigned out[$];

    function new();
      reset();
    endfunction

    function void reset();
      a = 'h8000; c = 0; ct = 12; b = 0; first = 1;
      foreach (idx[i]) begin idx[i] = 0; mps[i] = 0; end
      idx[0] = 4; idx[17] = 3; idx[18] = 46;
      out.delete();
    endfunction

    function void put(int unsigned v);
      if (!first) out.push_back(byte'(v));
      first = 0;
    endfunction

    function void byteout();
      if (b == 'hFF) begin
        put(b); b = c >> 20; c &= 'hFFFFF; ct = 7;
      end else if (c < 'h8000000) begin
        put(b); b = c >> 19; c &= 'h7FFFF; ct = 8;
      end else begin
        b = b + 1;
        if (b == 'hFF) begin
          c &= 'h7FFFFFF; put(b); b = c >> 20; c &= 'hFFFFF; ct = 7;
        end else begin
          put(b); b = (c >> 19) & 'hFF; c &= 'h7FFFF; ct = 8;
        end
      end
    endfunction

    function void renorm();
      do begin
        a = (a << 1) & 'hFFFF; c = c << 1; ct = ct - 1;
        if (ct == 0) byteout();
      end while ((a & 'h8000) == 0);
    endfunction

    function void encode(int cx, bit d);
      qe_entry_t q;
      int unsigned qe;
      q  = qe_lookup(6'(idx[cx]));
      qe = q.qe;
      if (d == mps[cx]) begin
        a = a - qe;
        if ((a & 'h8000) == 0) begin
          if (a < qe) a = qe; else c = c + qe;
          idx[cx] = q.nmps;
          renorm();
        end else c = c + qe;
      end else begin
        a = a - qe;
        if (a < qe) c = c + qe; else a = qe;
        if (q.sw) mps[cx] = !mps[cx];
        idx[cx] = q.nlps;
        renorm();
      end
    endfunction

    function void flush();
      int unsigned tempc;
      tempc = c + a;
      c = c | 'hFFFF;
      if (c >= tempc) c = c - 'h8000;
      c = c << ct; byteout();
      c = c << ct; byteout();
      if (b != 'hFF) put(b);
    endfunction
  endclass
endpackage
