// tb_stripe_buffer: ping-pong behaviour of the stripe buffers. For several
// stages the test writes a full stage of random HL/LH/HH words into the
// DWT bank while reading the previous stage from the other bank in the same
// cycles, then swaps the banks. Every word read must be the one written a
// stage earlier. SB-LL is written and read back separately.
module tb_stripe_buffer;
  localparam int D = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bank, wr, llwr, rd;
  logic [7:0] waddr, lladdr, raddr;
  logic signed [10:0] hl, lh, hh, ll, rdata;
  logic [1:0] band;

  stripe_buffer #(.DEPTH(D), .CW(11)) dut (.clk, .rst_n, .bank_i(bank), .wr_i(wr), .wr_addr_i(waddr),
    .hl_i(hl), .lh_i(lh), .hh_i(hh), .ll_wr_i(llwr), .ll_addr_i(lladdr), .ll_i(ll),
    .rd_i(rd), .rd_band_i(band), .rd_addr_i(raddr), .rd_data_o(rdata));

  int checks = 0, failures = 0;
  int mem [2][4][D];   // model: bank, band (1..3), address
  int llm [D];

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bank = 0; wr = 0; llwr = 0; rd = 0; waddr = '0; lladdr = '0; raddr = '0;
    hl = '0; lh = '0; hh = '0; ll = '0; band = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 6; s++) begin
      // one stage: D write cycles, each also reading one word of the other bank
      for (int k = 0; k < 3 * D; k++) begin
        int a, b, exp;
        bit do_wr;
        do_wr = k < D;
        if (do_wr) begin
          wr = 1; waddr = 8'(k);
          hl = 11'($urandom); lh = 11'($urandom); hh = 11'($urandom);
          mem[bank][1][k] = int'(hl); mem[bank][2][k] = int'(lh); mem[bank][3][k] = int'(hh);
        end else wr = 0;
        b = 1 + k % 3; a = (k * 7) % D;
        rd = s > 0; band = 2'(b); raddr = 8'(a);
        exp = mem[!bank][b][a];
        @(negedge clk);
        wr = 0; rd = 0;
        if (s > 0) chk(int'(rdata) == exp, $sformatf("stage %0d band %0d addr %0d: %0d vs %0d", s, b, a, rdata, exp));
      end
      bank = ~bank;
    end
    for (int a = 0; a < D; a++) begin
      llwr = 1; lladdr = 8'(a); ll = 11'($urandom); llm[a] = int'(ll);
      @(negedge clk);
    end
    llwr = 0;
    for (int a = D - 1; a >= 0; a--) begin
      rd = 1; band = 2'd0; raddr = 8'(a);
      @(negedge clk);
      rd = 0;
      chk(int'(rdata) == llm[a], $sformatf("SB-LL %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
