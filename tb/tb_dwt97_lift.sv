// tb_dwt97_lift: transforms random signals of several even lengths (pixel
// values -128..127, two fractional bits) one step at a time, keeping the
// four intrinsic registers in the testbench, and compares each low/high
// output with the real-valued 9/7 reference (symmetric extension at both
// ends) within one unit. Also checks that outputs appear exactly two steps
// after their input pair and that the signal needs exactly two flush steps.
module tb_dwt97_lift;
  import dwt_ref_pkg::*;
  logic signed [13:0] e, o, lo, hi;
  logic        [5:0]  pos;
  logic signed [13:0] r_i [4];
  logic signed [13:0] r_o [4];
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  dwt97_lift #(.DW(14)) dut (.e_i(e), .o_i(o), .pos_i(pos), .r_i(r_i), .r_o(r_o), .lo_o(lo), .hi_o(hi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens[5];
    lens = '{6, 8, 16, 64, 256};
    for (int t = 0; t < 40; t++) begin
      int n, kk;
      real x[], rl[], rh[];
      int  xi[];
      n  = lens[t % 5];
      kk = n / 2;
      x  = new[n];
      xi = new[n];
      for (int i = 0; i < n; i++) begin
        // smooth ramps, edges and noise
        case (t % 3)
          0: xi[i] = int'($urandom % 256) - 128;
          1: xi[i] = (i * 7) % 256 - 128;
          default: xi[i] = (i < n / 2) ? 120 : -120;
        endcase
        x[i] = xi[i];
      end
      dwt97_1d(x, rl, rh);
      for (int r = 0; r < 4; r++) r_i[r] = 14'(($urandom % 100) - 50);  // stale contents
      for (int k = 0; k < kk + 2; k++) begin
        e   = (k < kk) ? 14'(xi[2 * k] * 4) : 14'(($urandom % 64));
        o   = (k < kk) ? 14'(xi[2 * k + 1] * 4) : 14'(($urandom % 64));
        pos = {k == kk + 1, k == kk, k == kk - 1, k == 2, k == 1, k == 0};
        #1;
        if (k >= 2) begin
          real el, eh;
          el = real'(lo) / 4.0 - rl[k - 2];
          eh = real'(hi) / 4.0 - rh[k - 2];
          if (el < 0) el = -el;
          if (eh < 0) eh = -eh;
          if (el > maxerr) maxerr = el;
          if (eh > maxerr) maxerr = eh;
          checks += 2;
          if (el > 1.0 || eh > 1.0) begin
            failures++;
            if (failures < 10)
              $display("n=%0d k=%0d lo %f/%f hi %f/%f", n, k - 2, real'(lo) / 4.0, rl[k - 2], real'(hi) / 4.0, rh[k - 2]);
          end
        end
        r_i = r_o;
        #1;
      end
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
