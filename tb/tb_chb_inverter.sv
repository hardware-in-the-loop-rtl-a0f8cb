// Testbench of chb_inverter: every switching state with random DC-link
// voltages and currents, compared with the reference H-bridge equations.
module tb_chb_inverter;
  import hil_pkg::*;
  import chb_ref_pkg::*;

  sw_t sw;
  q_t vdc, idc, iph, k_c, vout, vdc_next;
  int checks = 0, failures = 0;

  chb_inverter dut (.sw, .vdc, .idc, .iph, .k_c, .vout, .vdc_next);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, e_vout, e_vdc;
    for (int t = 0; t < 3000; t++) begin
      s   = (t % 3) - 1;
      sw  = sw_t'(s);
      vdc = q_t'($urandom_range(2000 * 65536));
      idc = q_t'($urandom_range(300 * 65536));
      iph = q_t'($signed($urandom_range(400 * 65536)) - 200 * 65536);
      k_c = (t % 13 == 0) ? q_t'($urandom_range(65536)) : 32'sd66;
      #1;
      e_vout = s * longint'(vdc);
      e_vdc  = sat(longint'(vdc) + mulq(longint'(k_c), sat(longint'(idc) - s * longint'(iph))));
      checks += 2;
      if (longint'(vout) != e_vout) begin
        failures++;
        $display("FAIL vout s=%0d %0d exp %0d", s, vout, e_vout);
      end
      if (longint'(vdc_next) != e_vdc) begin
        failures++;
        $display("FAIL vdc_next s=%0d %0d exp %0d", s, vdc_next, e_vdc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
