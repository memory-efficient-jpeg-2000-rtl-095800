// tb_sps_ctrl: the stage handshake of the stripe pipeline. DWT and EBC
// report the end of their stage after random times, in either order and
// sometimes in the same cycle. A model predicts when the banks swap: one
// cycle after both have reported, with ebc_start, the new bank and the stage
// number; hold must be high exactly while the DWT has finished and waits;
// the hold counter must count those waiting cycles.
module tb_sps_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dd, ed, bank, hold, est;
  logic [15:0] stage, hcnt;

  sps_ctrl dut (.clk, .rst_n, .dwt_done_i(dd), .ebc_done_i(ed), .bank_o(bank), .dwt_hold_o(hold),
    .ebc_start_o(est), .stage_o(stage), .hold_cnt_o(hcnt));

  int checks = 0, failures = 0;
  bit m_dd = 0, m_ei = 1, m_bank = 0, m_est = 0;
  int m_stage = 0, m_h = 0, holds = 0;

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated at each rising edge
  always @(posedge clk) if (rst_n) begin
    bit d, e;
    chk(hold == m_dd, "hold");
    chk(bank == m_bank && est == m_est && stage == 16'(m_stage) && hcnt == 16'(m_h), "bank/start/stage/count");
    d = m_dd || dd; e = m_ei || ed;
    if (m_dd && !e) m_h++;
    if (hold) holds++;
    m_est = 0;
    if (d && e) begin m_bank = !m_bank; m_est = 1; m_stage++; m_dd = 0; m_ei = 0; end
    else begin m_dd = d; m_ei = e; end
  end

  initial begin
    dd = 0; ed = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      int td, te;
      // the DWT stage and the EBC stage take random times
      td = 1 + int'($urandom % 40); te = (s == 0) ? 0 : 1 + int'($urandom % 40);
      if (s % 7 == 3) te = td;
      fork
        begin repeat (td) @(negedge clk); dd = 1; @(negedge clk); dd = 0; end
        begin if (te > 0) begin repeat (te) @(negedge clk); ed = 1; @(negedge clk); ed = 0; end end
      join
      @(negedge clk);
      while (stage != 16'(s + 1)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    chk(holds > 0, "hold never happened");
    $display("stages %0d hold cycles %0d", stage, hcnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
