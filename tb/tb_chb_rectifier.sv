// Testbench of chb_rectifier: random and corner-case voltages and currents
// compared with the reference model's rectifier equations; also checks that
// the diode clamp (DC current never below zero) and all three conduction
// patterns occur.
module tb_chb_rectifier;
  import hil_pkg::*;
  import chb_ref_pkg::*;

  q_t vg [3];
  q_t vdc, idc, k_lt, idc_next;
  q_t ig [3];
  int checks = 0, failures = 0, n_clamp = 0;
  int hi_seen [3] = '{0, 0, 0};

  chb_rectifier dut (.vg, .vdc, .idc, .k_lt, .idc_next, .ig);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e_idc, vmax, vmin, vr, e_ig [3];
    int hi, lo;
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < 3; p++)
        vg[p] = q_t'($signed($urandom_range(2000 * 65536)) - 1000 * 65536);
      if (t % 7 == 0) vg[2] = vg[0];                      // ties
      vdc  = q_t'($urandom_range(2000 * 65536));
      idc  = (t % 5 == 0) ? '0 : q_t'($urandom_range(200 * 65536));
      k_lt = (t % 11 == 0) ? q_t'($urandom_range(65536)) : 32'sd328;
      #1;
      hi = 0; lo = 0; vmax = vg[0]; vmin = vg[0];
      for (int p = 1; p < 3; p++) begin
        if (longint'(vg[p]) > vmax) begin vmax = vg[p]; hi = p; end
        if (longint'(vg[p]) < vmin) begin vmin = vg[p]; lo = p; end
      end
      vr = sat(vmax - vmin);
      e_idc = sat(longint'(idc) + mulq(longint'(k_lt), sat(vr - longint'(vdc))));
      if (e_idc < 0) begin e_idc = 0; n_clamp++; end
      for (int p = 0; p < 3; p++) e_ig[p] = 0;
      if (hi != lo) begin e_ig[hi] = idc; e_ig[lo] = -longint'(idc); hi_seen[hi]++; end
      checks++;
      if (longint'(idc_next) != e_idc) begin
        failures++;
        $display("FAIL idc_next %0d exp %0d", idc_next, e_idc);
      end
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (longint'(ig[p]) != e_ig[p]) begin
          failures++;
          $display("FAIL ig[%0d] %0d exp %0d", p, ig[p], e_ig[p]);
        end
      end
    end
    checks++;
    if (n_clamp == 0 || hi_seen[0] == 0 || hi_seen[1] == 0 || hi_seen[2] == 0) begin
      failures++;
      $display("FAIL coverage clamp=%0d hi=%0d/%0d/%0d", n_clamp, hi_seen[0], hi_seen[1], hi_seen[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
