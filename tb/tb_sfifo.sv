// tb_sfifo: random producer (respecting ready) and random pop enable against
// a queue model of the ten FIFOs. Every cycle it recomputes the expected lane
// assignment (fullest first, lower bit-plane on ties), the pairs on each lane
// and the one/two-pair decision, and checks that a FIFO that cannot accept
// data is always being served unless all six lanes are busy.
module tb_sfifo;
  import jp2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [9:0][1:0] push_n;
  cxd_t [9:0][1:0] push_d;
  logic [9:0]      ready;
  logic            pop_en;
  lane_t [5:0]     lanes;
  logic            empty;
  int checks = 0, failures = 0;
  int full_seen = 0, all_busy = 0, two_seen = 0;

  sfifo dut (.clk, .rst_n, .push_n_i(push_n), .push_i(push_d), .ready_o(ready),
             .pop_en_i(pop_en), .lanes_o(lanes), .empty_o(empty));

  cxd_t mq[10][$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endfunction

  initial begin
    push_n = '0; push_d = '0; pop_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int rate;
      rate = (cyc / 1000) % 2 == 0 ? 90 : 30;
      @(negedge clk);
      pop_en = ($urandom % 100) < 85;
      for (int i = 0; i < 10; i++) begin
        push_n[i] = 0;
        if (ready[i] && ($urandom % 100) < rate) push_n[i] = 2'($urandom % 3);
        for (int k = 0; k < 2; k++) begin
          push_d[i][k].cb = cb_t'($urandom % 2);
          push_d[i][k].cp = cp_t'($urandom % 2);
          push_d[i][k].cx = cx_t'($urandom % 19);
          push_d[i][k].d  = 1'($urandom);
        end
      end
      #1;
      // expected selection
      begin
        int rk[10];
        int nvalid;
        nvalid = 0;
        for (int i = 0; i < 10; i++) begin
          rk[i] = 0;
          for (int j = 0; j < 10; j++)
            if (j != i && (mq[j].size() > mq[i].size() || (mq[j].size() == mq[i].size() && j < i))) rk[i]++;
        end
        for (int i = 0; i < 10; i++) begin
          chk(ready[i] == (mq[i].size() <= 4), "ready");
          if (mq[i].size() > 0 && rk[i] < 6) begin
            bit two;
            nvalid++;
            two = mq[i].size() >= 2 && mq[i][0].cb == mq[i][1].cb && mq[i][0].cp == mq[i][1].cp;
            chk(lanes[rk[i]].valid && lanes[rk[i]].bp == bp_t'(i), $sformatf("lane %0d sel", rk[i]));
            chk(lanes[rk[i]].cx1 == mq[i][0].cx && lanes[rk[i]].d1 == mq[i][0].d &&
                lanes[rk[i]].cb == mq[i][0].cb && lanes[rk[i]].cp == mq[i][0].cp, "head pair");
            chk(lanes[rk[i]].two == two, "two flag");
            if (two) chk(lanes[rk[i]].cx2 == mq[i][1].cx && lanes[rk[i]].d2 == mq[i][1].d, "second pair");
          end
        end
        for (int l = nvalid; l < 6; l++) chk(!lanes[l].valid, "idle lane");
        if (nvalid == 6) all_busy++;
        for (int i = 0; i < 10; i++)
          if (!ready[i]) begin
            full_seen++;
            chk(rk[i] < 6 || nvalid == 6, "unserved full FIFO");
          end
      end
      // update model
      @(posedge clk);
      for (int l = 0; l < 6; l++)
        if (lanes[l].valid && pop_en) begin
          void'(mq[lanes[l].bp].pop_front());
          if (lanes[l].two) begin void'(mq[lanes[l].bp].pop_front()); two_seen++; end
        end
      for (int i = 0; i < 10; i++)
        for (int k = 0; k < int'(push_n[i]); k++) mq[i].push_back(push_d[i][k]);
    end
    chk(full_seen > 0, "never full");
    chk(all_busy > 0, "never all lanes busy");
    chk(two_seen > 0, "never two pairs");
    $display("full=%0d all_busy=%0d two=%0d", full_seen, all_busy, two_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
