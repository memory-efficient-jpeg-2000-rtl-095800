// tb_sp_ram: random single-port accesses to a 1972 x 14 line buffer
// (the size of the three-level line buffer); a read returns the word one
// cycle later and keeps it while the port is idle or writing.
module tb_sp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        en = 0, we = 0;
  logic [10:0] addr = 0;
  logic [13:0] wdata = 0, rdata;
  sp_ram #(.DEPTH(1972), .WIDTH(14)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  logic [13:0] model [1972];
  bit          known [1972];
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [13:0] exp_q;
    bit          exp_v;
    exp_v = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin failures++; if (failures < 5) $display("FAIL %0d", i); end
      end
      en = ($urandom % 4) != 0; we = ($urandom % 2) != 0;
      addr = 11'($urandom % 1972); wdata = 14'($urandom);
      if (en && !we) begin exp_v = known[addr]; exp_q = model[addr]; end
      @(posedge clk);
      if (en && we) begin model[addr] = wdata; known[addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
