// Reference model of one CHB simulation step for the testbenches, written
// with 64-bit integer arithmetic independently of the RTL datapath. Values are
// Q16.16 (value * 65536). Equations (explicit Euler, previous-step state):
//   rectifier : vr = max(vg) - min(vg); idc' = max(0, idc + k_lt*(vr - vdc))
//               input current +idc on the highest phase, -idc on the lowest
//   H-bridge  : vout = s*vdc; vdc' = vdc + k_c*(idc - s*iph)
//   motor     : vph = sum of its cells' vout; vn = (sum vph - sum emf)/3
//               im' = im + k_lm*(vph - vn - emf)
// Products are truncated toward minus infinity (arithmetic shift by 16) and
// every result saturates to the signed 32-bit range.
package chb_ref_pkg;

  localparam int NPH = 3, NCPP = 2, NC = 6, NREC = 44;

  function automatic longint sat(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  function automatic longint mulq(input longint a, input longint b);
    return sat((a * b) >>> 16);
  endfunction

  typedef struct {
    longint idc [NC];
    longint vdc [NC];
    longint im  [NPH];
    longint steps;
  } ref_state_t;

  typedef struct {
    longint vg  [3];
    longint emf [NPH];
    int     sw  [NC];     // -1, 0, +1
    longint k_lt, k_lm, k_c;
  } ref_in_t;

  function automatic void ref_reset(ref ref_state_t s, input longint vdc0 = 0);
    for (int c = 0; c < NC; c++) begin s.idc[c] = 0; s.vdc[c] = vdc0; end
    for (int p = 0; p < NPH; p++) s.im[p] = 0;
    s.steps = 0;
  endfunction

  // one step; rec receives the output record of the step
  function automatic void ref_step(ref ref_state_t s, input ref_in_t in,
                                   ref longint rec [NREC]);
    longint vmax, vmin, vr, idc_n [NC], vdc_n [NC], vout [NC], ig [NC][3];
    longint vph [NPH], sv, se, vn, iph, il;
    int hi, lo;
    hi = 0; lo = 0;
    vmax = in.vg[0]; vmin = in.vg[0];
    for (int p = 1; p < 3; p++) begin
      if (in.vg[p] > vmax) begin vmax = in.vg[p]; hi = p; end
      if (in.vg[p] < vmin) begin vmin = in.vg[p]; lo = p; end
    end
    vr = sat(vmax - vmin);
    for (int c = 0; c < NC; c++) begin
      idc_n[c] = sat(s.idc[c] + mulq(in.k_lt, sat(vr - s.vdc[c])));
      if (idc_n[c] < 0) idc_n[c] = 0;
      for (int p = 0; p < 3; p++) ig[c][p] = 0;
      if (hi != lo) begin ig[c][hi] = s.idc[c]; ig[c][lo] = -s.idc[c]; end
      iph = s.im[c / NCPP];
      vout[c] = in.sw[c] * s.vdc[c];
      il = in.sw[c] * iph;
      vdc_n[c] = sat(s.vdc[c] + mulq(in.k_c, sat(s.idc[c] - il)));
    end
    sv = 0; se = 0;
    for (int p = 0; p < NPH; p++) begin
      vph[p] = sat(vout[NCPP*p] + vout[NCPP*p+1]);
      sv = sat(sv + vph[p]);
      se = sat(se + in.emf[p]);
    end
    vn = mulq(64'sd21845, sat(sv - se));
    for (int p = 0; p < NPH; p++)
      s.im[p] = sat(s.im[p] + mulq(in.k_lm, sat(sat(vph[p] - vn) - in.emf[p])));
    for (int c = 0; c < NC; c++) begin s.idc[c] = idc_n[c]; s.vdc[c] = vdc_n[c]; end
    s.steps++;
    rec[0] = s.steps;
    for (int p = 0; p < NPH; p++) begin rec[1+p] = s.im[p]; rec[4+p] = vph[p]; end
    rec[7] = sat(vph[0] - vph[1]);
    for (int c = 0; c < NC; c++) begin
      rec[8+6*c+0] = s.vdc[c];
      rec[8+6*c+1] = vout[c];
      rec[8+6*c+2] = s.idc[c];
      rec[8+6*c+3] = ig[c][0];
      rec[8+6*c+4] = ig[c][1];
      rec[8+6*c+5] = ig[c][2];
    end
  endfunction

endpackage
