// dasb_ref_pkg: double-precision reference of the beamformer for the
// testbenches. It computes, independently of the RTL, what the output
// stream should be: periodic Hamming window, DFT scaled by 1/N, steering
// weight times pre-emphasis coefficient per bin (divided by the 1.08
// overlap gain), sum of the channels, inverse DFT, real part, 50%
// overlap-add. All values are in units of full scale (1.0 = 32768 LSB).
package dasb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef real rvec_t[];

  // Reference output for nframes frames; frame f ends at input sample
  // n - 1 + hop*f where n is the frame length. Output sample j belongs to
  // frame j / hop.
  function automatic rvec_t reference(input rvec_t x1, input rvec_t x2,
                                      input int n, input int nframes,
                                      input real d1, input real d2,
                                      input real g1, input real g2,
                                      input real pre);
    rvec_t  y;
    real    w[], cr[2][], ci[2][], xr[], xi[], sr[], si[], yt[], prev[];
    real    cs[], sn[];
    real    norm, g, tau, om, wr, wi, pr, pim, ar, ai;
    int     hop, kk, idx;
    hop = n / 2;
    y = new[nframes * hop];
    w = new[n]; xr = new[n]; xi = new[n]; sr = new[n]; si = new[n];
    yt = new[n]; prev = new[hop]; cs = new[n]; sn = new[n];
    cr[0] = new[n]; cr[1] = new[n]; ci[0] = new[n]; ci[1] = new[n];
    for (int i = 0; i < n; i++) begin
      w[i]  = 0.54 - 0.46 * $cos(2.0 * PI * i / n);
      cs[i] = $cos(2.0 * PI * i / n);
      sn[i] = $sin(2.0 * PI * i / n);
    end
    foreach (prev[i]) prev[i] = 0.0;
    norm = g1 * g1 + g2 * g2;
    for (int c = 0; c < 2; c++) begin
      g   = ((c == 0) ? g1 : g2) / norm;
      tau = (c == 0) ? d1 : d2;
      for (int k = 0; k < n; k++) begin
        kk  = (k <= n / 2) ? k : k - n;
        om  = 2.0 * PI * kk / n;
        wr  = g * $cos(om * tau);  wi  = g * $sin(om * tau);
        pr  = 1.0 - pre * $cos(om); pim = pre * $sin(om);
        cr[c][k] = (wr * pr - wi * pim) / 1.08;
        ci[c][k] = (k == n / 2) ? 0.0 : (wr * pim + wi * pr) / 1.08;
      end
    end
    for (int f = 0; f < nframes; f++) begin
      foreach (sr[k]) begin sr[k] = 0.0; si[k] = 0.0; end
      for (int c = 0; c < 2; c++) begin
        // forward DFT / n of the windowed frame
        for (int k = 0; k < n; k++) begin
          xr[k] = 0.0; xi[k] = 0.0;
          for (int i = 0; i < n; i++) begin
            idx = (k * i) % n;
            ar = ((c == 0) ? x1[f * hop + i] : x2[f * hop + i]) * w[i];
            xr[k] += ar * cs[idx];
            xi[k] -= ar * sn[idx];
          end
          xr[k] /= n; xi[k] /= n;
          sr[k] += xr[k] * cr[c][k] - xi[k] * ci[c][k];
          si[k] += xr[k] * ci[c][k] + xi[k] * cr[c][k];
        end
      end
      // inverse DFT, real part
      for (int i = 0; i < n; i++) begin
        ar = 0.0;
        for (int k = 0; k < n; k++) begin
          idx = (k * i) % n;
          ar += sr[k] * cs[idx] - si[k] * sn[idx];
        end
        yt[i] = ar;
      end
      for (int i = 0; i < hop; i++) begin
        y[f * hop + i] = yt[i] + prev[i];
        prev[i] = yt[hop + i];
      end
    end
    return y;
  endfunction

endpackage
