// dwt_ref_pkg -- reference model for the DWT testbenches.
//
// Computes one analysis level directly from its definition, without any of
// the data reordering or time sharing of the hardware:
//   v_n = sum_m h_m x_{2n-m},   u_n = sum_m g_m x_{2n-m},
//   g_m = (-1)^(M-1-m) h_{M-1-m},
// with x_k = 0 outside the given samples, each sum shifted right by 7
// (coefficient fraction bits, truncating) and wrapped to 16 bits. The
// coefficients are round(h*128) of the Daubechies taps, computed here from
// the real-valued taps.
package dwt_ref_pkg;

  function automatic real daub_real(int m_taps, int m);
    real h4 [4] = '{0.48296291314453, 0.83651630373781, 0.22414386804201, -0.12940952255126};
    real h6 [6] = '{0.33267055295008, 0.80689150931109, 0.45987750211849,
                    -0.13501102001025, -0.08544127388203, 0.03522629188571};
    if (m_taps == 4) return h4[m];
    return h6[m];
  endfunction

  // round(h * 128) to the nearest integer
  function automatic int qcoef(int m_taps, int m);
    real v;
    v = daub_real(m_taps, m) * 128.0;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int wrap16(longint v);
    logic signed [15:0] w;
    w = v[15:0];
    return int'(w);
  endfunction

  // One level: n_out outputs of each band from samples x.
  function automatic void dwt_step(input int m_taps, input int x [$], input int n_out,
                                   output int lo [$], output int hi [$]);
    longint sl, sh;
    int     xv;
    lo = {};
    hi = {};
    for (int n = 0; n < n_out; n++) begin
      sl = 0;
      sh = 0;
      for (int m = 0; m < m_taps; m++) begin
        int k;
        k  = 2 * n - m;
        xv = (k >= 0 && k < x.size()) ? x[k] : 0;
        sl += longint'(qcoef(m_taps, m)) * xv;
        sh += longint'((((m_taps - 1 - m) % 2) == 1 ? -1 : 1) * qcoef(m_taps, m_taps - 1 - m)) * xv;
      end
      lo.push_back(wrap16(sl >>> 7));
      hi.push_back(wrap16(sh >>> 7));
    end
  endfunction

endpackage
