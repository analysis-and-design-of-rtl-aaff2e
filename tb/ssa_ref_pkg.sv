// ssa_ref_pkg: reference model of the SSA-PID control law for the testbenches.
//
// Written from the control equations with plain integer arithmetic, apart
// from the RTL: error = vref - vo; the channel state from |e(n)|, |e(n-1)|,
// the sign change and the threshold; gains K + {0, DK1, DK, DK*|e|/peak};
// d1 += (Ki+Kd)e1(n) - 2Kd e1(n-1) + Kd e1(n-2); d4 += Kp(e4(n) - e4(n-1));
// dn = clamp((d1 + d4) / 2**FRAC, 0, 2**DPWM_W - 1) with each accumulator
// limited to +-2**(DPWM_W+FRAC).
package ssa_ref_pkg;

  // 0 steady, 1 transition, 2 rising, 3 falling
  function automatic int state_ref(int e, int e_prev, int vthr);
    int m, mp;
    bit s, sp;
    m  = (e < 0) ? -e : e;
    mp = (e_prev < 0) ? -e_prev : e_prev;
    s  = (e < 0);
    sp = (e_prev < 0);
    if (m < vthr) return 0;
    if (s != sp)  return 1;
    if (mp > m)   return 3;
    return 2;
  endfunction

  function automatic int gain_ref(int k, int dk, int dk1, bit scale, int st,
                                  int m, int peak, int gmax);
    int adj, g, dkm;
    dkm = (dk < 0) ? -dk : dk;
    case (st)
      0: adj = 0;
      1: adj = dk1;
      2: adj = dk;
      default: begin
        if (!scale) adj = dk;
        else begin
          if (peak == 0 || peak <= m) adj = dkm;
          else adj = (dkm * m) / peak;
          if (dk < 0) adj = -adj;
        end
      end
    endcase
    g = k + adj;
    if (g < 0) g = 0;
    if (g > gmax) g = gmax;
    return g;
  endfunction

  class ssa_model;
    int kp, ki, kd, dkp, dkp1, dki, dki1, dkd, vthr1, vthr4;
    int adc_w, res_w, dpwm_w, frac, gmax;
    int e1[3];
    int e4[2];
    int peak1, peak4;
    longint d1, d4;
    int st1, st4;

    function new(int kp, int ki, int kd, int dkp, int dkp1, int dki, int dki1,
                 int dkd, int vthr1, int vthr4,
                 int adc_w = 8, int res_w = 6, int dpwm_w = 10, int frac = 3, int gain_w = 10);
      this.kp = kp; this.ki = ki; this.kd = kd; this.dkp = dkp; this.dkp1 = dkp1;
      this.dki = dki; this.dki1 = dki1; this.dkd = dkd;
      this.vthr1 = vthr1; this.vthr4 = vthr4;
      this.adc_w = adc_w; this.res_w = res_w; this.dpwm_w = dpwm_w; this.frac = frac;
      this.gmax = (1 << gain_w) - 1;
      reset();
    endfunction

    function void reset();
      e1 = '{0, 0, 0}; e4 = '{0, 0};
      peak1 = 0; peak4 = 0; d1 = 0; d4 = 0; st1 = 0; st4 = 0;
    endfunction

    function longint clamp_acc(longint v);
      longint lim;
      lim = longint'(1) << (dpwm_w + frac);
      if (v > lim) return lim;
      if (v < -lim) return -lim;
      return v;
    endfunction

    // one ID-channel sample (Clk1)
    function void sample1(int vo, int vref);
      int m, g_i, g_d;
      e1[2] = e1[1]; e1[1] = e1[0]; e1[0] = vref - vo;
      m = (e1[0] < 0) ? -e1[0] : e1[0];
      st1 = state_ref(e1[0], e1[1], vthr1);
      g_i = gain_ref(ki, dki, dki1, 1'b1, st1, m, peak1, gmax);
      g_d = gain_ref(kd, dkd, dkd, 1'b0, st1, m, peak1, gmax);
      if (st1 == 2) peak1 = m;
      d1 = clamp_acc(d1 + longint'(g_i + g_d) * e1[0] - longint'(2 * g_d) * e1[1]
                     + longint'(g_d) * e1[2]);
    endfunction

    // one P-channel sample (Clk4)
    function void sample4(int vo, int vref);
      int m, g_p, sh;
      sh = adc_w - res_w;
      e4[1] = e4[0]; e4[0] = (vref >> sh) - (vo >> sh);
      m = (e4[0] < 0) ? -e4[0] : e4[0];
      st4 = state_ref(e4[0], e4[1], vthr4);
      g_p = gain_ref(kp, dkp, dkp1, 1'b1, st4, m, peak4, gmax);
      if (st4 == 2) peak4 = m;
      d4 = clamp_acc(d4 + longint'(g_p) * (e4[0] - e4[1]));
    endfunction

    function int dn();
      longint t;
      t = (d1 + d4) >>> frac;
      if (t < 0) return 0;
      if (t > (1 << dpwm_w) - 1) return (1 << dpwm_w) - 1;
      return int'(t);
    endfunction
  endclass

endpackage
