// sfifo: sorting first-in-first-out between the parallel context formation
// and the six two-symbol MQ coders.
//
// Ten FIFOs of DEPTH registers each, FIFO i holding the context-decision
// pairs of magnitude bit-plane i. Every cycle a sorting stage ranks the FIFOs
// by occupancy and hands the NUM_LANE fullest non-empty ones to the lanes,
// lane 0 getting the fullest (ties go to the lower bit-plane). Because any
// FIFO can reach any coder, a FIFO can only fill up while all coders are
// busy. Each lane takes two pairs from its FIFO when the two head entries
// belong to the same bitstream (code-block and coding pass), otherwise one.
//
// The FIFOs are shift registers (entry 0 is the head). The ranking is done by
// counting, for each FIFO, how many others are fuller; this gives the same
// selection as a merging network and is this design's own realisation.
//
// Interface: push_n_i[i] (0..2) pairs push_i[i][0..] enter FIFO i; ready_o[i]
// is high while FIFO i has room for two more pairs; the producer must not
// push into a FIFO whose ready is low (asserted). lanes_o is combinational
// from the FIFO registers; the pops happen at the clock edge when pop_en_i
// is high. Pairs pushed in a cycle can be issued from the next cycle on.
module sfifo
  import jp2k_pkg::*;
#(
  parameter int unsigned NFIFO    = 10,
  parameter int unsigned DEPTH    = 6,
  parameter int unsigned NUM_LANE = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NFIFO-1:0][1:0]  push_n_i,
  input  cxd_t [NFIFO-1:0][1:0]  push_i,
  output logic [NFIFO-1:0]       ready_o,
  input  logic                   pop_en_i,
  output lane_t [NUM_LANE-1:0]   lanes_o,
  output logic                   empty_o
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  cxd_t [NFIFO-1:0][DEPTH-1:0] q;
  logic [NFIFO-1:0][CW-1:0]    cnt;
  logic [NFIFO-1:0][1:0]       pop_n;
  logic [NFIFO-1:0][3:0]       rank;

  // ---- sorting: rank FIFOs by occupancy ----
  always_comb begin
    for (int i = 0; i < int'(NFIFO); i++) begin
      rank[i] = '0;
      for (int j = 0; j < int'(NFIFO); j++)
        if (j != i && (cnt[j] > cnt[i] || (cnt[j] == cnt[i] && j < i)))
          rank[i] = rank[i] + 4'd1;
    end
  end

  always_comb begin
    lanes_o = '0;
    pop_n   = '0;
    for (int i = 0; i < int'(NFIFO); i++) begin
      if (cnt[i] != '0 && rank[i] < 4'(NUM_LANE)) begin
        for (int l = 0; l < int'(NUM_LANE); l++) begin
          if (rank[i] == 4'(l)) begin
            lanes_o[l].valid = 1'b1;
            lanes_o[l].bp    = bp_t'(i);
            lanes_o[l].cb    = q[i][0].cb;
            lanes_o[l].cp    = q[i][0].cp;
            lanes_o[l].cx1   = q[i][0].cx;
            lanes_o[l].d1    = q[i][0].d;
            lanes_o[l].two   = (cnt[i] >= CW'(2)) && q[i][1].cb == q[i][0].cb &&
                               q[i][1].cp == q[i][0].cp;
            lanes_o[l].cx2   = q[i][1].cx;
            lanes_o[l].d2    = q[i][1].d;
          end
        end
        if (pop_en_i)
          pop_n[i] = ((cnt[i] >= CW'(2)) && q[i][1].cb == q[i][0].cb &&
                      q[i][1].cp == q[i][0].cp) ? 2'd2 : 2'd1;
      end
    end
  end

  always_comb begin
    empty_o = 1'b1;
    for (int i = 0; i < int'(NFIFO); i++) begin
      ready_o[i] = cnt[i] <= CW'(DEPTH - 2);
      if (cnt[i] != '0) empty_o = 1'b0;
    end
  end

  // ---- FIFO registers: pop from the head, append pushes behind ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      q   <= '0;
    end else begin
      for (int i = 0; i < int'(NFIFO); i++) begin
        automatic cxd_t [DEPTH-1:0] nq = q[i];
        automatic int unsigned      nc = int'(cnt[i]) - int'(pop_n[i]);
        for (int e = 0; e < int'(DEPTH); e++)
          nq[e] = (e + int'(pop_n[i]) < int'(DEPTH)) ? q[i][e + int'(pop_n[i])] : '0;
        for (int k = 0; k < 2; k++)
          if (k < int'(push_n_i[i]) && nc < DEPTH) begin
            nq[nc] = push_i[i][k];
            nc = nc + 1;
          end
        q[i]   <= nq;
        cnt[i] <= CW'(nc);
      end
    end
  end

  // A producer must respect ready; one extra pair would be lost.
  for (genvar i = 0; i < int'(NFIFO); i++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      push_n_i[i] != 2'd0 |-> ready_o[i]);
    a_push_max: assert property (@(posedge clk) disable iff (!rst_n) push_n_i[i] <= 2'd2);
  end

endmodule
