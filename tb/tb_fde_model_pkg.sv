// tb_fde_model_pkg: reference arithmetic of the equalizer for the testbenches,
// written from the equations (LS with table inverse, one-tap EQ, LMS) and the
// number formats, plus real-valued DFT helpers and a small random source.
package tb_fde_model_pkg;

  function automatic longint m_rsh(longint v, int sh);
    if (sh == 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  function automatic longint m_sat(longint v, int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // 1/sb table of the divider-free LS method
  function automatic longint m_inv_entry(longint sb);
    longint v;
    if (sb == 0) return 8191;
    v = 65535 / sb;
    return (v > 8191) ? 8191 : v;
  endfunction

  // leading-one decomposition of the 14-bit scalar: scalar ~ sb * 2^dn
  function automatic void m_decompose(longint scalar, output longint sb, output longint dn);
    longint p;
    p = -1;
    for (int i = 13; i >= 0; i--)
      if (p < 0 && scalar[i]) p = i;
    if (p >= 3) begin dn = p - 3; sb = scalar >> dn; end
    else        begin dn = 0;     sb = scalar;       end
  endfunction

  // LS coefficient from the sum S of six training spectra and U (x4)
  function automatic void m_ls_coef(longint s_re, longint s_im, longint u_re, longint u_im,
                                    output longint w_re, output longint w_im);
    longint a_re, a_im, q_re, q_im, p_re, p_im, pw, scalar, sb, dn, inv;
    a_re = m_sat(m_rsh(s_re, 1), 19);   a_im = m_sat(m_rsh(s_im, 1), 19);
    q_re = m_sat(m_rsh(s_re, 4), 13);   q_im = m_sat(m_rsh(s_im, 4), 13);
    p_re = a_re * u_re + a_im * u_im;   // conj(S) * U
    p_im = a_re * u_im - a_im * u_re;
    pw = q_re * q_re + q_im * q_im;
    scalar = pw >> 12;
    if (scalar > 16383) scalar = 16383;
    m_decompose(scalar, sb, dn);
    inv = m_inv_entry(sb);
    p_re = m_sat(m_rsh(p_re, 12), 11);
    p_im = m_sat(m_rsh(p_im, 12), 11);
    w_re = m_sat(m_rsh(6 * p_re * inv, int'(dn) + 6), 15);
    w_im = m_sat(m_rsh(6 * p_im * inv, int'(dn) + 6), 15);
  endfunction

  // one-tap equalizer Y = W * R (13-bit, 5 fractional bits)
  function automatic void m_eq(longint w_re, longint w_im, longint r_re, longint r_im,
                               output longint y_re, output longint y_im);
    y_re = m_sat(m_rsh(w_re * r_re - w_im * r_im, 14), 13);
    y_im = m_sat(m_rsh(w_re * r_im + w_im * r_re, 14), 13);
  endfunction

  // 10-bit LMS copy of R
  function automatic longint m_rl(longint r);
    return m_sat(m_rsh(r, 4), 10);
  endfunction

  // LMS: W <- W + (conj(RL) * E) >> 7
  function automatic void m_lms(longint w_re, longint w_im, longint rl_re, longint rl_im,
                                longint e_re, longint e_im,
                                output longint n_re, output longint n_im);
    n_re = m_sat(w_re + m_rsh(rl_re * e_re + rl_im * e_im, 7), 15);
    n_im = m_sat(w_im + m_rsh(rl_re * e_im - rl_im * e_re, 7), 15);
  endfunction

  // ---- training sequence u512 and its spectrum ---------------------------
  localparam logic [127:0] A128 = 128'hC059950CC0596AF33FA66AF3C0596AF3;
  localparam logic [127:0] B128 = 128'h30A965FC30A99A03CF569A0330A99A03;

  // chip n of u512 = [a, ~b, ~a, ~b] as +1/-1
  function automatic int u512_chip(int n);
    logic bit_v;
    int i;
    i = n % 128;
    case (n / 128)
      0: bit_v = A128[127 - i];
      1: bit_v = !B128[127 - i];
      2: bit_v = !A128[127 - i];
      default: bit_v = !B128[127 - i];
    endcase
    return bit_v ? 1 : -1;
  endfunction

  // forward DFT X_k = sum x_n e^{-j2pi kn/N} (sgn = -1) or inverse kernel (+1)
  function automatic void dft(input real xr [], input real xi [], input int sgn,
                              output real yr [], output real yi []);
    int n;
    real cs [], sn [];
    n = xr.size();
    yr = new[n]; yi = new[n]; cs = new[n]; sn = new[n];
    for (int i = 0; i < n; i++) begin
      cs[i] = $cos(2.0 * 3.14159265358979323846 * i / n);
      sn[i] = sgn * $sin(2.0 * 3.14159265358979323846 * i / n);
    end
    for (int k = 0; k < n; k++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int m = 0; m < n; m++) begin
        int idx;
        idx = (k * m) % n;
        ar += xr[m] * cs[idx] - xi[m] * sn[idx];
        ai += xr[m] * sn[idx] + xi[m] * cs[idx];
      end
      yr[k] = ar; yi[k] = ai;
    end
  endfunction

  function automatic longint rnd(real x);
    return longint'($floor(x + 0.5));
  endfunction

  // uniform in [-1, 1)
  function automatic real urand_pm1();
    return ($urandom() / 4294967296.0) * 2.0 - 1.0;
  endfunction

  // approximately Gaussian (sum of 12 uniforms), unit variance
  function automatic real grand();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += $urandom() / 4294967296.0;
    return s - 6.0;
  endfunction

endpackage
