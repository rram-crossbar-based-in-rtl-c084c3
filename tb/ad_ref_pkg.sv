// ad_ref_pkg: reference model of the anisotropic-diffusion engine for the
// top-level testbenches, written from the algorithm rather than the RTL.
//
// Image in: 8-bit pixels, quantized to floor(p/16). Per iteration every
// pixel sees the levels of its origin and four neighbours at the start of the
// iteration (border neighbours replaced by the origin). The cell state, a
// level with 8 fraction bits, is set to the origin level in the first
// iteration and then, for N, S, W, E in that order, moved by the flux
// f(neighbour - origin) of ad_pkg and saturated to [0, 15] levels. The level
// read back at the end of the iteration is the rounded state. Counters
// record how often each kind of update happened.
package ad_ref_pkg;
  import ad_pkg::*;

  class ad_ref;
    int n, m, kappa, sshift;
    int q[];
    int x[];
    int n_pos, n_neg, n_zero, n_border, n_sat;

    function new(int n_, int m_, int kappa_ = 4, int sshift_ = 3);
      n = n_; m = m_; kappa = kappa_; sshift = sshift_;
      q = new[n * m];
      x = new[n * m];
      n_pos = 0; n_neg = 0; n_zero = 0; n_border = 0; n_sat = 0;
    endfunction

    function void run(int img[], int iters);
      int s[];
      for (int k = 0; k < n * m; k++) q[k] = img[k] >> 4;
      for (int it = 0; it < iters; it++) begin
        s = q;
        for (int i = 0; i < n; i++) begin
          for (int j = 0; j < m; j++) begin
            int o, idx, nx;
            int nb [4];
            idx = i * m + j;
            o = s[idx];
            if (it == 0) x[idx] = o << STATE_FRAC;
            nb[0] = (i > 0)     ? s[idx - m] : o;
            nb[1] = (i < n - 1) ? s[idx + m] : o;
            nb[2] = (j > 0)     ? s[idx - 1] : o;
            nb[3] = (j < m - 1) ? s[idx + 1] : o;
            if (i == 0 || j == 0 || i == n - 1 || j == m - 1) n_border++;
            for (int k = 0; k < 4; k++) begin
              int d;
              d = nb[k] - o;
              if (d > 0) n_pos++; else if (d < 0) n_neg++; else n_zero++;
              nx = x[idx] + flux(d, kappa, sshift);
              if (nx < 0 || nx > int'(STATE_MAX)) n_sat++;
              if (nx < 0) nx = 0;
              if (nx > int'(STATE_MAX)) nx = int'(STATE_MAX);
              x[idx] = nx;
            end
          end
        end
        for (int k = 0; k < n * m; k++) q[k] = int'(state_level(state_t'(x[k])));
      end
    endfunction
  endclass

endpackage
