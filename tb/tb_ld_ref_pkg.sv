// tb_ld_ref_pkg -- real-arithmetic reference of the log-domain controller
// and of the servomotor plant, shared by the closed-loop testbenches.
//
// ref_control(e, r) returns +-exp(max_i ln(fs_i |c_i|) - ln(max_i fs_i)) for
// an error e >= 0 and a non-positive rate -r (r >= 0), with triangular
// memberships (W = 1 for the error, 50 for the rate), firing strength = min
// and the 5x5 rule table with singletons 0, +-50, +-100, +-150.
// ref_control_corr adds the approximate correction factor.
package tb_ld_ref_pkg;

  int cons [5][5] = '{
    '{-150, -150, -100,  -50,    0},
    '{-150, -100,  -50,    0,   50},
    '{-100,  -50,    0,   50,  100},
    '{ -50,    0,   50,  100,  150},
    '{   0,   50,  100,  150,  150}
  };

  function automatic real mu(real x, int k, real w);
    real lo, hi, c;
    c  = (k - 2) * w;
    lo = c - w;
    hi = c + w;
    if (k == 0) return (x <= c) ? 1.0 : (x >= hi) ? 0.0 : (hi - x) / w;
    if (k == 4) return (x >= c) ? 1.0 : (x <= lo) ? 0.0 : (x - lo) / w;
    if (x <= lo || x >= hi) return 0.0;
    return (x < c) ? (x - lo) / w : (hi - x) / w;
  endfunction

  function automatic real ref_control(real e, real r);
    real me [5], mr [5];
    real d1, f1, fs, d;
    logic neg1;
    d1 = -1e9; f1 = 0.0; neg1 = 0;
    for (int k = 0; k < 5; k++) begin
      me[k] = mu(e, k, 1.0);
      mr[k] = mu(-r, k, 50.0);
    end
    for (int j = 0; j < 5; j++)
      for (int i = 0; i < 5; i++) begin
        fs = (me[i] < mr[j]) ? me[i] : mr[j];
        if (fs > f1) f1 = fs;
        if (fs > 0.0 && cons[j][i] != 0) begin
          d = $ln(fs * ((cons[j][i] < 0) ? -cons[j][i] : cons[j][i]));
          if (d > d1) begin d1 = d; neg1 = cons[j][i] < 0; end
        end
      end
    if (d1 < -1e8) return 0.0;
    return neg1 ? -$exp(d1 - $ln(f1)) : $exp(d1 - $ln(f1));
  endfunction

  // The same controller with the approximate correction factor:
  // ln u = (D1 + exp(D2 - D1)) - (exp(A1 - A2) - A1), with D_i = ln|c_i| +
  // ln fs_i and A_i = -ln fs_i. As in the stored tables, a zero membership
  // counts as A = 65535/4096 and a zero consequent as ln|c| = -8.
  function automatic real ref_control_corr(real e, real r);
    real me [5], mr [5];
    real d1, d2, a1, a2, fs, av, lc, dv, lo;
    logic neg1;
    d1 = -1e9; d2 = -1e9; a1 = 1e9; a2 = 1e9; neg1 = 0;
    for (int k = 0; k < 5; k++) begin
      me[k] = mu(e, k, 1.0);
      mr[k] = mu(-r, k, 50.0);
    end
    for (int j = 0; j < 5; j++)
      for (int i = 0; i < 5; i++) begin
        fs = (me[i] < mr[j]) ? me[i] : mr[j];
        av = (fs > 0.0) ? -$ln(fs) : 65535.0 / 4096.0;
        if (av > 65535.0 / 4096.0) av = 65535.0 / 4096.0;
        lc = (cons[j][i] == 0) ? -8.0 : $ln((cons[j][i] < 0) ? -cons[j][i] : cons[j][i]);
        dv = lc - av;
        if (dv > d1) begin d2 = d1; d1 = dv; neg1 = cons[j][i] < 0; end
        else if (dv > d2) d2 = dv;
        if (av < a1) begin a2 = a1; a1 = av; end
        else if (av < a2) a2 = av;
      end
    lo = (d1 + $exp(d2 - d1)) - ($exp(a1 - a2) - a1);
    if (lo < -8.0) return 0.0;
    return neg1 ? -$exp(lo) : $exp(lo);
  endfunction

  // One controller evaluation from a signed error and signed rate
  // (prev - new) * 100, folded and quantised onto the 2.8 / 6.4 grids.
  function automatic real ref_loop_control(real e, real rate, bit corr = 1'b0);
    real ea, ra, u;
    logic m;
    m  = e < 0.0;
    ea = m ? -e : e;
    ra = m ? -rate : rate;
    if (ra < 0.0) ra = 0.0;
    ea = $floor(ea * 256.0) / 256.0;
    ra = $floor(ra * 16.0) / 16.0;
    if (ea > 1023.0 / 256.0) ea = 1023.0 / 256.0;
    if (ra > 1023.0 / 16.0)  ra = 1023.0 / 16.0;
    u = corr ? ref_control_corr(ea, ra) : ref_control(ea, ra);
    return m ? -u : u;
  endfunction

endpackage
