// tb_tp_ram: fills the 3264 x 16 state buffer through the write port while
// reading back through the read port (one-cycle read latency, read-before-
// write on the same address), against an array model.
module tb_tp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        wr_en = 0, rd_en = 0;
  logic [11:0] wr_addr = 0, rd_addr = 0;
  logic [15:0] wr_data = 0, rd_data;
  tp_ram dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);
  logic [15:0] model [3264];
  bit          known [3264];
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [15:0] exp_q;
    bit          exp_v;
    exp_v = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rd_data !== exp_q) begin failures++; if (failures < 5) $display("FAIL %0d", i); end
      end
      wr_en = ($urandom % 2) != 0; wr_addr = 12'($urandom % 3264); wr_data = 16'($urandom);
      rd_en = ($urandom % 2) != 0; rd_addr = (i % 3 == 0) ? wr_addr : 12'($urandom % 3264);
      exp_v = rd_en && known[rd_addr];
      exp_q = model[rd_addr];
      @(posedge clk);
      if (wr_en) begin model[wr_addr] = wr_data; known[wr_addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
