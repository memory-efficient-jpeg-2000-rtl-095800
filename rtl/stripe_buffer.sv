// stripe_buffer: the seven stripe buffers between the DWT and the EBC.
//
// SB-HL, SB-LH and SB-HH each come as a pair (0 and 1) used in ping-pong:
// while the DWT writes one stage of coefficients into the buffers of bank
// `bank_i`, the EBC reads the previous stage from the other bank. SB-LL is a
// single buffer that the DWT writes only while it produces the last level
// and the EBC reads only while it codes the LL code-blocks; the schedule
// keeps the two apart (a simultaneous access is flagged by an assertion).
// Each buffer is a DEPTH x CW single-port SRAM (256 x 11 by default): one
// stage holds 4 rows x 64 columns of one subband.
//
// Write side: wr_i writes hl/lh/hh at wr_addr_i into bank `bank_i`;
// ll_wr_i writes SB-LL. Read side: rd_i with rd_band_i (0 LL, 1 HL, 2 LH,
// 3 HH) and rd_addr_i reads the other bank (or SB-LL); data on rd_data_o
// one cycle later.
module stripe_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned CW    = 11,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bank_i,
  // DWT side
  input  logic                 wr_i,
  input  logic [AW-1:0]        wr_addr_i,
  input  logic signed [CW-1:0] hl_i, lh_i, hh_i,
  input  logic                 ll_wr_i,
  input  logic [AW-1:0]        ll_addr_i,
  input  logic signed [CW-1:0] ll_i,
  // EBC side
  input  logic                 rd_i,
  input  logic [1:0]           rd_band_i,
  input  logic [AW-1:0]        rd_addr_i,
  output logic signed [CW-1:0] rd_data_o
);
  // index: 0 HL0, 1 HL1, 2 LH0, 3 LH1, 4 HH0, 5 HH1, 6 LL
  logic          en [7];
  logic          we [7];
  logic [AW-1:0] ad [7];
  logic [CW-1:0] wd [7];
  logic [CW-1:0] rd [7];
  logic [2:0]    rsel_q;

  always_comb begin
    for (int b = 0; b < 3; b++)
      for (int s = 0; s < 2; s++) begin
        automatic logic wr_here = wr_i && (bank_i == s[0]);
        automatic logic rd_here = rd_i && rd_band_i == 2'(b + 1) && (bank_i != s[0]);
        en[2*b+s] = wr_here || rd_here;
        we[2*b+s] = wr_here;
        ad[2*b+s] = wr_here ? wr_addr_i : rd_addr_i;
        wd[2*b+s] = (b == 0) ? hl_i : (b == 1) ? lh_i : hh_i;
      end
    en[6] = ll_wr_i || (rd_i && rd_band_i == 2'd0);
    we[6] = ll_wr_i;
    ad[6] = ll_wr_i ? ll_addr_i : rd_addr_i;
    wd[6] = ll_i;
  end

  for (genvar i = 0; i < 7; i++) begin : g_sb
    sp_ram #(.DEPTH(DEPTH), .WIDTH(CW)) u_sb (
      .clk, .en(en[i]), .we(we[i]), .addr(ad[i]), .wdata(wd[i]), .rdata(rd[i]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rsel_q <= '0;
    else if (rd_i) rsel_q <= (rd_band_i == 2'd0) ? 3'd6 : 3'(2 * (int'(rd_band_i) - 1) + int'(!bank_i));

  assign rd_data_o = rd[rsel_q];

  a_ll_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ll_wr_i && rd_i && rd_band_i == 2'd0));
endmodule
