// Testbench of chb_solver: runs 400 steps with sinusoidal grid and EMF
// voltages and random switching states, compares the whole output record after
// every step with the reference model, checks the 11-cycle step latency and
// that `clear` restores the initial state.
module tb_chb_solver;
  import hil_pkg::*;
  import chb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go = 1'b0, clear = 1'b0, busy, done;
  chb_in_t inp;
  q_t rec [REC_WORDS];
  int checks = 0, failures = 0;

  chb_solver dut (.clk, .rst_n, .go, .clear, .inp, .busy, .done, .rec);

  // latency in cycles from the cycle with go high to the cycle with done high
  longint cyc = 0, t_go = 0;
  int lat = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (go) t_go <= cyc;
    if (done) lat <= int'(cyc - t_go);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    ref_state_t rs;
    ref_in_t ri;
    longint erec [NREC];
    real th;
    inp = '0;
    ref_reset(rs, 64'sd98304000);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      th = 2.0 * 3.14159265 * n / 60.0;
      for (int p = 0; p < 3; p++) begin
        ri.vg[p]  = longint'($rtoi(898.0 * $sin(th - 2.094395 * p) * 65536.0));
        ri.emf[p] = longint'($rtoi(1800.0 * $sin(0.7 * th - 2.094395 * p) * 65536.0));
        inp.vg[p]  = q_t'(ri.vg[p]);
        inp.emf[p] = q_t'(ri.emf[p]);
      end
      for (int c = 0; c < 6; c++) begin
        ri.sw[c] = int'($urandom_range(2)) - 1;
        inp.sw[c] = sw_t'(ri.sw[c]);
      end
      ri.k_lt = 3280; ri.k_lm = 6550; ri.k_c = 660;   // 10x default gains: faster dynamics
      inp.k_lt = 32'sd3280; inp.k_lm = 32'sd6550; inp.k_c = 32'sd660;
      ref_step(rs, ri, erec);
      go <= 1'b1;
      @(posedge clk);
      go <= 1'b0;
      while (!done) @(posedge clk);
      @(posedge clk);
      check(lat == 11, $sformatf("step %0d latency %0d, expected 11", n, lat));
      for (int k = 0; k < NREC; k++)
        check(longint'(rec[k]) == erec[k],
              $sformatf("step %0d rec[%0d] = %0d, expected %0d", n, k, rec[k], erec[k]));
    end
    check(rs.vdc[0] != 64'sd98304000, "DC link voltage moved");
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    @(posedge clk);
    check(rec[0] == 0 && rec[REC_CELL] == 32'sd98304000 && rec[REC_IM] == 0, "clear resets state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
