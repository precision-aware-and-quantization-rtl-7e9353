// dwt_ref_pkg: real-valued reference model of the 9/7 DWT for the testbenches.
//
// It uses the ordinary (unflipped) lifting form with the JPEG 2000 9/7 lifting
// coefficients alpha, beta, gamma, delta and the scale zeta = 1.149604398, so it
// is independent of the flipped fixed-point datapath under test. Lines are
// extended by whole-sample symmetry (x[-i] = x[i], x[N-1+i] = x[N-1-i]),
// folded as often as needed. The 2-D model performs, for every level, a row
// pass and then a column pass over the top-left (LL) quadrant, storing low-pass
// results in the first half and high-pass results in the second half.
package dwt_ref_pkg;

  localparam real A = -1.586134342;
  localparam real B = -0.052980118;
  localparam real G =  0.882911075;
  localparam real D =  0.443506852;
  localparam real Z =  1.149604398;

  typedef real real_q[$];

  // Whole-sample symmetric index folding into 0..n-1.
  function automatic int fold(int i, int n);
    int j = i;
    if (n == 1) return 0;
    while (j < 0 || j > n - 1) begin
      if (j < 0) j = -j;
      if (j > n - 1) j = 2 * (n - 1) - j;
    end
    return j;
  endfunction

  // One-dimensional transform of x (even length): lo[m], hi[m], m < n/2.
  function automatic void line(input real_q x, output real_q lo, output real_q hi);
    int n = x.size();
    int m = 8;
    real e[];
    e = new[n + 2 * m];
    for (int j = 0; j < n + 2 * m; j++) e[j] = x[fold(j - m, n)];
    for (int j = 1; j < n + 2 * m - 1; j += 2) e[j] += A * (e[j-1] + e[j+1]);
    for (int j = 2; j < n + 2 * m - 1; j += 2) e[j] += B * (e[j-1] + e[j+1]);
    for (int j = 1; j < n + 2 * m - 1; j += 2) e[j] += G * (e[j-1] + e[j+1]);
    for (int j = 2; j < n + 2 * m - 1; j += 2) e[j] += D * (e[j-1] + e[j+1]);
    lo = {};
    hi = {};
    for (int k = 0; k < n / 2; k++) begin
      lo.push_back(Z * e[m + 2 * k]);
      hi.push_back(e[m + 2 * k + 1] / Z);
    end
  endfunction

  // In-place multi-level 2-D transform of an n x n image stored row-major.
  function automatic void image2d(ref real img[], input int n, input int levels);
    real_q x, lo, hi;
    int len = n;
    for (int l = 0; l < levels; l++) begin
      for (int r = 0; r < len; r++) begin          // rows
        x = {};
        for (int c = 0; c < len; c++) x.push_back(img[r * n + c]);
        line(x, lo, hi);
        for (int k = 0; k < len / 2; k++) begin
          img[r * n + k]           = lo[k];
          img[r * n + len / 2 + k] = hi[k];
        end
      end
      for (int c = 0; c < len; c++) begin          // columns
        x = {};
        for (int r = 0; r < len; r++) x.push_back(img[r * n + c]);
        line(x, lo, hi);
        for (int k = 0; k < len / 2; k++) begin
          img[k * n + c]             = lo[k];
          img[(len / 2 + k) * n + c] = hi[k];
        end
      end
      len = len / 2;
    end
  endfunction

endpackage
