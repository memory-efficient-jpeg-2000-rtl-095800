// dwt97_lift: one step of the 1-D 9/7 lifting wavelet transform, with its
// four intrinsic registers passed in and out so that one datapath can be
// shared by many signals (the columns of a tile, or the rows of a stripe)
// whose registers live in a line buffer or a register file.
//
// Each step takes one new sample pair (x[2k], x[2k+1]) and returns one pair
// of coefficients (low[k-2], high[k-2]): the four lifting stages
// (alpha, beta, gamma, delta) each keep one partial sum from the previous
// step, which is what the four intrinsic registers hold. A signal of 2K
// samples takes K input steps plus two flush steps (no input) and yields
// its K low/high pairs from step 2 to step K+1. Symmetric extension at both
// ends is folded into the steps: at the first and last positions the
// neighbour that lies outside the signal is replaced by its mirror image,
// which doubles the corresponding lifting coefficient. The caller marks the
// step position with the pos_i flags.
//
// Arithmetic: two's complement words of DW bits (the caller chooses the binary point);
// lifting coefficients and the scaling factors (1/K for low, K for high) in
// Q12, products rounded to nearest. The coefficient values are those of the
// JPEG 2000 irreversible 9/7 filter; the word lengths are this design's own
// choice (the line buffer word is 14 bits, as in the source design).
// Purely combinational.
module dwt97_lift #(
  parameter int unsigned DW = 14
) (
  input  logic signed [DW-1:0] e_i,      // x[2k]
  input  logic signed [DW-1:0] o_i,      // x[2k+1]
  input  logic        [5:0]    pos_i,    // {k==K+1, k==K, k==K-1, k==2, k==1, k==0}
  input  logic signed [DW-1:0] r_i [4],  // intrinsic registers before the step
  output logic signed [DW-1:0] r_o [4],  // ... after the step
  output logic signed [DW-1:0] lo_o,     // low[k-2]  (times 1/K)
  output logic signed [DW-1:0] hi_o      // high[k-2] (times K)
);
  localparam logic signed [15:0] C_A  = -16'sd6497;   // alpha = -1.586134342
  localparam logic signed [15:0] C_B  = -16'sd217;    // beta  = -0.052980118
  localparam logic signed [15:0] C_G  = 16'sd3616;     // gamma =  0.882911076
  localparam logic signed [15:0] C_D  = 16'sd1817;     // delta =  0.443506852
  localparam logic signed [15:0] C_IK = 16'sd3330;     // 1/K   =  0.812893066
  localparam logic signed [15:0] C_K  = 16'sd5039;     // K     =  1.230174105

  localparam logic signed [15:0] C_A2 = 16'(2 * C_A);
  localparam logic signed [15:0] C_B2 = 16'(2 * C_B);
  localparam logic signed [15:0] C_G2 = 16'(2 * C_G);
  localparam logic signed [15:0] C_D2 = 16'(2 * C_D);

  function automatic logic signed [DW-1:0] mulq(input logic signed [DW-1:0] x,
                                                input logic signed [15:0] c);
    logic signed [DW+15:0] p;
    p = (DW+16)'(x) * (DW+16)'(c);
    p = p + (DW+16)'(2048);
    return DW'(p >>> 12);
  endfunction

  logic f0, f1, f2, fl, fk, fk1;
  assign {fk1, fk, fl, f2, f1, f0} = pos_i;

  logic signed [DW-1:0] d1, s1, d2, s2;

  always_comb begin
    // stage 1 (alpha): d1[k-1] = x[2k-1] + a(x[2k-2] + x[2k])
    d1      = fk ? r_i[0] : r_i[0] + mulq(e_i, C_A);
    r_o[0]  = o_i + mulq(e_i, fl ? C_A2 : C_A);
    // stage 2 (beta): s1[k-1] = x[2k-2] + b(d1[k-2] + d1[k-1])
    s1      = r_i[1] + mulq(d1, f1 ? C_B2 : C_B);
    r_o[1]  = f0 ? e_i : e_i + mulq(d1, C_B);
    // stage 3 (gamma): d2[k-2] = d1[k-2] + g(s1[k-2] + s1[k-1])
    d2      = fk1 ? r_i[2] : r_i[2] + mulq(s1, C_G);
    r_o[2]  = d1 + mulq(s1, fk ? C_G2 : C_G);
    // stage 4 (delta): s2[k-2] = s1[k-2] + d(d2[k-3] + d2[k-2])
    s2      = r_i[3] + mulq(d2, f2 ? C_D2 : C_D);
    r_o[3]  = f1 ? s1 : s1 + mulq(d2, C_D);
    // scaling
    lo_o    = mulq(s2, C_IK);
    hi_o    = mulq(d2, C_K);
  end
endmodule
