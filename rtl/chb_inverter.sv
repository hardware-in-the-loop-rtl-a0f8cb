// Single-phase H-bridge of one CHB cell with its DC-link capacitor: one
// explicit-Euler step in Q16.16.
//
// The two-level H-bridge connects +vdc, 0 or -vdc to the cell output for the
// switching state sw = +1, 0, -1, and draws sw * iph from the DC link, where
// iph is the phase current flowing through the series-connected cells. The
// capacitor voltage is advanced by
//     vdc_next = vdc + k_c * (idc - sw * iph),  k_c = dt / C,
// with idc the rectifier current into the link. The switching state 2'b10 is
// not a valid state and is treated as 0. Purely combinational; the solver
// registers the results. The ideal-switch equations are this design's own.
module chb_inverter
  import hil_pkg::*;
(
  input  sw_t sw,
  input  q_t  vdc,
  input  q_t  idc,
  input  q_t  iph,
  input  q_t  k_c,
  output q_t  vout,
  output q_t  vdc_next
);

  q_t iload;

  always_comb begin
    unique case (sw)
      2'sb01: begin vout = vdc;        iload = iph;        end
      2'sb11: begin vout = q_neg(vdc); iload = q_neg(iph); end
      default: begin vout = '0;        iload = '0;         end
    endcase
    vdc_next = q_add(vdc, q_mul(k_c, q_sub(idc, iload)));
  end

endmodule
