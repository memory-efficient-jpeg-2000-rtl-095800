// tp_ram: two-port SRAM (one write port, one read port, one clock) with a
// registered read: data for the address presented with rd_en appears on
// rd_data the next cycle. Used as the coder state buffer (3264 x 16 bits by
// default). A read and a write of the same address in one cycle return the
// old word. The contents are not initialised: a word is read only after it
// has been written. The size and the need for two ports follow the
// architecture; the same-address read behaviour is this design's choice.
module tp_ram #(
  parameter int unsigned DEPTH = 3264,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  a_wr_range: assert property (@(posedge clk) wr_en |-> int'(wr_addr) < int'(DEPTH));
  a_rd_range: assert property (@(posedge clk) rd_en |-> int'(rd_addr) < int'(DEPTH));
endmodule
