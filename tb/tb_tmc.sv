// tb_tmc: drives the two-symbol MQ coder with random context-decision pairs
// (skewed so that long MPS runs and frequent LPS both occur), holds the
// bit-plane state in a register like the state register bank does, and
// compares every emitted byte and the final A/C/CT/B of each coding pass
// with the bit-serial reference encoder.
module tb_tmc;
  import jp2k_pkg::*;
  import mq_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  lane_t     lane;
  bp_state_t st, st_n;
  bytes4_t   bo;
  int checks = 0, failures = 0;
  int two_cnt = 0, four_byte = 0;

  tmc dut (.lane(lane), .st_i(st), .st_o(st_n), .bytes_o(bo));

  mq_ref ref_m[3];
  byte unsigned got[3][$];
  int sh_idx[19];
  bit sh_mps[19];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic rnd_d(int cx, int bias);
    return (($urandom % 100) < bias) ? 1'b1 : 1'b0;
  endfunction

  initial begin
    int cp, cx1, cx2, bias;
    bit d1, d2, two;
    for (int p = 0; p < 3; p++) ref_m[p] = new();
    sh_idx = ref_m[0].idx; sh_mps = ref_m[0].mps;
    st = bp_state_init();
    lane = '0;
    for (int n = 0; n < 6000; n++) begin
      cp   = $urandom % 3;
      two  = ($urandom % 4) != 0;
      bias = (n / 500) % 2 == 0 ? 3 : 45;
      cx1  = $urandom % 19;
      cx2  = (($urandom % 3) == 0) ? cx1 : ($urandom % 19);
      d1   = rnd_d(cx1, bias);
      d2   = rnd_d(cx2, bias);
      lane.valid = 1; lane.two = two; lane.cp = cp_t'(cp);
      lane.cx1 = cx_t'(cx1); lane.d1 = d1; lane.cx2 = cx_t'(cx2); lane.d2 = d2;
      lane.bp = '0; lane.cb = '0;
      #1;
      // the three passes of a bit-plane share one context set
      ref_m[cp].idx = sh_idx; ref_m[cp].mps = sh_mps;
      ref_m[cp].encode(cx1, d1);
      if (two) begin ref_m[cp].encode(cx2, d2); two_cnt++; end
      sh_idx = ref_m[cp].idx; sh_mps = ref_m[cp].mps;
      for (int k = 0; k < 4; k++) if (bo.valid[k]) got[cp].push_back(bo.data[k]);
      if (bo.valid == 4'hF) four_byte++;
      @(posedge clk);
      st = st_n;
      // state compare every cycle
      checks++;
      if (st.coder[cp].a != 16'(ref_m[cp].a) || st.coder[cp].c != 28'(ref_m[cp].c) ||
          st.coder[cp].ct != 4'(ref_m[cp].ct) || st.coder[cp].b != 8'(ref_m[cp].b)) begin
        failures++;
        if (failures < 5)
          $display("state mismatch n=%0d cp=%0d A %h/%h C %h/%h CT %0d/%0d B %h/%h", n, cp,
                   st.coder[cp].a, ref_m[cp].a, st.coder[cp].c, ref_m[cp].c,
                   st.coder[cp].ct, ref_m[cp].ct, st.coder[cp].b, ref_m[cp].b);
      end
      checks++;
      if (st.ctx[cx1].idx != 6'(ref_m[cp].idx[cx1]) || st.ctx[cx1].mps != ref_m[cp].mps[cx1]) begin
        failures++;
        if (failures < 5) $display("context %0d mismatch n=%0d", cx1, n);
      end
    end
    // byte streams
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (got[p].size() != ref_m[p].out.size()) begin
        failures++;
        $display("pass %0d: %0d bytes, expected %0d", p, got[p].size(), ref_m[p].out.size());
      end
      for (int i = 0; i < got[p].size() && i < ref_m[p].out.size(); i++) begin
        checks++;
        if (got[p][i] != ref_m[p].out[i]) begin
          failures++;
          if (failures < 10) $display("pass %0d byte %0d: %h expected %h", p, i, got[p][i], ref_m[p].out[i]);
        end
      end
    end
    checks++;
    if (two_cnt == 0) failures++;
    $display("two-symbol cycles %0d, four-byte cycles %0d, bytes %0d/%0d/%0d", two_cnt, four_byte,
             got[0].size(), got[1].size(), got[2].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
