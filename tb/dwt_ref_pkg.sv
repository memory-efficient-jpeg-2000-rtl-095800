// dwt_ref_pkg: real-valued reference of the 9/7 analysis transform with
// whole-sample symmetric extension, for testbenches. The signal is mirrored
// well beyond both ends, the four lifting steps run over the extended
// signal, and the scaled low/high coefficients of the original range are
// returned.
package dwt_ref_pkg;
  localparam real A = -1.586134342059924;
  localparam real B = -0.052980118572961;
  localparam real G = 0.882911075530934;
  localparam real D = 0.443506852043971;
  localparam real K = 1.230174104914001;

  // x: 2K samples; lo/hi: K coefficients each
  function automatic void dwt97_1d(input real x[], output real lo[], output real hi[]);
    int n, E;
    real y[];
    n = x.size();
    E = 8;
    y = new[n + 2 * E];
    for (int i = 0; i < n + 2 * E; i++) begin
      int j;
      j = i - E;
      if (j < 0) j = -j;
      if (j >= n) j = 2 * (n - 1) - j;
      y[i] = x[j];
    end
    // offsets keep the parity of the original indices (E is even)
    for (int i = 1; i < n + 2 * E - 1; i += 2) y[i] = y[i] + A * (y[i - 1] + y[i + 1]);
    for (int i = 2; i < n + 2 * E - 1; i += 2) y[i] = y[i] + B * (y[i - 1] + y[i + 1]);
    for (int i = 3; i < n + 2 * E - 1; i += 2) y[i] = y[i] + G * (y[i - 1] + y[i + 1]);
    for (int i = 4; i < n + 2 * E - 1; i += 2) y[i] = y[i] + D * (y[i - 1] + y[i + 1]);
    lo = new[n / 2];
    hi = new[n / 2];
    for (int k = 0; k < n / 2; k++) begin
      lo[k] = y[E + 2 * k] / K;
      hi[k] = y[E + 2 * k + 1] * K;
    end
  endfunction
endpackage
