// sp_ram: single-port SRAM with a registered read. One access per cycle:
// en with we writes wdata to addr; en without we reads addr, and the word
// appears on rdata the next cycle. Used for the line buffer of the DWT and
// the stripe buffers. The contents are not initialised: a word is read only
// after it has been written. Single-port memories throughout follow the
// architecture; keeping rdata when nothing is read is this design's choice.
module sp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 14,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  a_range: assert property (@(posedge clk) en |-> int'(addr) < int'(DEPTH));
endmodule
