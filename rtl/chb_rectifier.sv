// Three-phase diode rectifier of one CHB cell, fed through the leakage
// inductance of its transformer secondary: one explicit-Euler step in Q16.16.
//
// With ideal diodes the phase with the highest voltage conducts into the
// positive rail and the one with the lowest into the negative rail, so the
// bridge applies vrect = max(vg) - min(vg) to the DC side through two leakage
// inductances in series. The DC current is advanced by
//     idc_next = max(0, idc + k_lt * (vrect - vdc)),  k_lt = dt / (2 L_t),
// and clamped at zero because the diodes block reverse current. The secondary
// phase currents of this step are +idc for the highest phase, -idc for the
// lowest and 0 for the third; that conduction pattern produces the unbalanced
// input currents a cell with a single-phase load draws. Ties go to the lower
// phase index. Purely combinational; the solver registers the results. The
// rectifier is named by the design; these equations are this design's own,
// the simplest model of such a bridge.
module chb_rectifier
  import hil_pkg::*;
(
  input  q_t       vg [3],
  input  q_t       vdc,
  input  q_t       idc,
  input  q_t       k_lt,
  output q_t       idc_next,
  output q_t       ig [3]
);

  logic [1:0] hi, lo;
  q_t vrect, inc, sum;

  always_comb begin
    hi = 2'd0;
    lo = 2'd0;
    for (int p = 1; p < 3; p++) begin
      if (vg[p] > vg[hi]) hi = 2'(p);
      if (vg[p] < vg[lo]) lo = 2'(p);
    end
    vrect = q_sub(vg[hi], vg[lo]);
    inc   = q_mul(k_lt, q_sub(vrect, vdc));
    sum   = q_add(idc, inc);
    idc_next = (sum < 0) ? '0 : sum;
    for (int p = 0; p < 3; p++) begin
      if (hi == lo)             ig[p] = '0;       // all phases equal: no conduction
      else if (2'(p) == hi)     ig[p] = idc;
      else if (2'(p) == lo)     ig[p] = q_neg(idc);
      else                      ig[p] = '0;
    end
  end

endmodule
