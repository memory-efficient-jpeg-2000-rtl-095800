// sps_ctrl: stripe pipeline scheduling controller. The DWT and the EBC run
// as a two-stage pipeline over the stripe buffers: in each pipeline stage
// the DWT fills one bank while the EBC codes the other. A stage ends when
// both sides are done (dwt_done_i and ebc_done_i pulses, in any order);
// the banks then swap and the EBC is told to start on the bank just
// written (ebc_start_o, with the stage number). While the DWT has finished
// and the EBC has not, dwt_hold_o holds the DWT so that it cannot overwrite
// a bank still being read; hold_cnt_o counts those cycles.
//
// The source gives the schedule and the stage length (768 or 1024 cycles,
// the number of coefficients the EBC codes); the handshake is this
// design's own. After reset bank 0 is the DWT's and the EBC is idle.
module sps_ctrl #(
  parameter int unsigned SW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dwt_done_i,
  input  logic          ebc_done_i,
  output logic          bank_o,       // bank written by the DWT
  output logic          dwt_hold_o,
  output logic          ebc_start_o,
  output logic [SW-1:0] stage_o,      // stages handed to the EBC
  output logic [SW-1:0] hold_cnt_o
);
  logic dwt_done, ebc_idle;
  logic dwt_d, ebc_i;

  assign dwt_d = dwt_done || dwt_done_i;
  assign ebc_i = ebc_idle || ebc_done_i;
  assign dwt_hold_o = dwt_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dwt_done <= 1'b0; ebc_idle <= 1'b1; bank_o <= 1'b0;
      ebc_start_o <= 1'b0; stage_o <= '0; hold_cnt_o <= '0;
    end else begin
      ebc_start_o <= 1'b0;
      if (dwt_done && !ebc_i) hold_cnt_o <= hold_cnt_o + 1'b1;
      if (dwt_d && ebc_i) begin
        bank_o      <= ~bank_o;
        ebc_start_o <= 1'b1;
        stage_o     <= stage_o + 1'b1;
        dwt_done    <= 1'b0;
        ebc_idle    <= 1'b0;
      end else begin
        dwt_done <= dwt_d;
        ebc_idle <= ebc_i;
      end
    end
  end

  a_no_double_stage: assert property (@(posedge clk) disable iff (!rst_n)
    dwt_done_i |-> !dwt_done);
endmodule
