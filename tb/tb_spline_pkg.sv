// tb_spline_pkg: calibration data and reference spline for the testbenches.
//
// VDD_CAL holds the measured minimum supply voltages of the reference chip
// at 50 MHz, every 10 C from -40 C to 80 C (13 points). natural_spline()
// fits a natural cubic spline through them and returns, per section k, the
// coefficients of Vopt = p3*x^3 + p2*x^2 + p1*x + p0 with x = T - (-40 + 10k):
//   M_0 = M_12 = 0, M_(i-1) + 4 M_i + M_(i+1) = 6 (y_(i+1) - 2 y_i + y_(i-1)) / h^2
//   p0 = y_i, p1 = (y_(i+1) - y_i)/h - h (2 M_i + M_(i+1))/6,
//   p2 = M_i / 2, p3 = (M_(i+1) - M_i) / (6 h).
package tb_spline_pkg;

  localparam int NPT = 13;
  localparam real H  = 10.0;

  typedef real coef_tab_t [12][4];

  function automatic real vdd_cal(input int i);
    real t [NPT] = '{0.54, 0.53, 0.53, 0.52, 0.51, 0.50, 0.49,
                      0.48, 0.48, 0.47, 0.46, 0.45, 0.44};
    return t[i];
  endfunction

  function automatic coef_tab_t natural_spline();
    coef_tab_t c;
    real y [NPT];
    real m [NPT];
    real cp [NPT];
    real dp [NPT];
    real rhs, den;
    for (int i = 0; i < NPT; i++) y[i] = vdd_cal(i);
    // Thomas algorithm on the inner points 1..11
    cp[0] = 0.0; dp[0] = 0.0;
    for (int i = 1; i < NPT - 1; i++) begin
      rhs   = 6.0 * (y[i+1] - 2.0 * y[i] + y[i-1]) / (H * H);
      den   = 4.0 - cp[i-1];
      cp[i] = 1.0 / den;
      dp[i] = (rhs - dp[i-1]) / den;
    end
    m[0] = 0.0; m[NPT-1] = 0.0;
    for (int i = NPT - 2; i >= 1; i--) m[i] = dp[i] - cp[i] * m[i+1];
    for (int k = 0; k < NPT - 1; k++) begin
      c[k][0] = y[k];
      c[k][1] = (y[k+1] - y[k]) / H - H * (2.0 * m[k] + m[k+1]) / 6.0;
      c[k][2] = m[k] / 2.0;
      c[k][3] = (m[k+1] - m[k]) / (6.0 * H);
    end
    return c;
  endfunction

endpackage
