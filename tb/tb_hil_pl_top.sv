// End-to-end testbench of hil_pl_top at its default parameters.
//
// The testbench plays the processor software: it programs the timer and the
// model over the configuration port, and for every step waits for irq, reads
// the whole output record from the block RAM over the data port, compares it
// with the reference model, writes the next inputs and acknowledges. The
// inputs are a 50 Hz three-phase grid (1.1 kV line-to-line secondary), a 50 Hz
// motor EMF (2.3 kV line-to-line) and switching states from a phase-shifted
// 3 kHz carrier comparison of a sinusoidal reference, computed here, with the
// default time step of 3 us. The run covers NSTEP steps in three phases:
//   1. timer period 5 us: every start finds the previous step acknowledged;
//   2. default 3 us period: the software is slower than the timer, so starts
//      wait in RDY for the acknowledge;
//   3. the software stalls for several periods now and then: starts are missed.
// It also reads the BRAM while the model archives (arbitration contention) and
// makes one access to an unmapped address (decode error). Every mechanism is
// counted and must occur: immediate runs, RDY waits, missed starts, contention,
// decode error, the diode clamp of a rectifier, all 2N+1 = 5 phase-voltage
// levels and all 4N+1 = 9 line-voltage levels.
module tb_hil_pl_top;
  import hil_pkg::*;
  import chb_ref_pkg::*;

  localparam int NSTEP = 6800;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t creq, dreq;
  axil_rsp_t crsp, drsp;
  logic irq, start;
  model_state_e model_state;
  int checks = 0, failures = 0;

  hil_pl_top dut (.clk, .rst_n, .s_axi_cfg_req(creq), .s_axi_cfg_rsp(crsp),
                  .s_axi_dat_req(dreq), .s_axi_dat_rsp(drsp), .irq, .start, .model_state);
  axil_tb_master u_cfg (.clk, .req(creq), .rsp(crsp));
  axil_tb_master u_dat (.clk, .req(dreq), .rsp(drsp));

  // mechanism counters
  int n_run_now = 0, n_rdy = 0, n_missed = 0, n_contend = 0, n_decerr = 0, n_clamp = 0;
  bit vph_lvl [5], vuv_lvl [9];
  model_state_e st_q = ST_IDL;

  always @(posedge clk) begin
    st_q <= model_state;
    if (rst_n && st_q == ST_IDL && model_state == ST_RUN) n_run_now++;
    if (rst_n && st_q == ST_IDL && model_state == ST_RDY) n_rdy++;
    // model archiving and processor reading the BRAM in the same cycle
    if (rst_n && dut.model_arc_req.awvalid && dreq.arvalid) n_contend++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cw(input logic [31:0] a, input logic [31:0] d);
    logic [1:0] r;
    u_cfg.write(a, d, r);
    check(r == RESP_OKAY, $sformatf("config write %h", a));
  endtask
  task automatic cr(input logic [31:0] a, output logic [31:0] d);
    logic [1:0] r;
    u_cfg.read(a, d, r);
  endtask

  ref_state_t rs;
  ref_in_t ri;
  longint erec [NREC];
  localparam real DT = 3.0e-6, PI = 3.14159265358979;

  function automatic real triwave(input real x);   // triangle in [-1, 1], period 1
    real f;
    f = x - $floor(x);
    return (f < 0.5) ? 4.0 * f - 1.0 : 3.0 - 4.0 * f;
  endfunction

  // inputs of step n: written to the model and kept for the reference
  task automatic load_inputs(input int n);
    real t, ref_v, car;
    logic [31:0] swword;
    t = n * DT;
    swword = '0;
    for (int p = 0; p < 3; p++) begin
      ri.vg[p]  = longint'($rtoi(898.0 * $sin(2.0 * PI * 50.0 * t - 2.0 * PI * p / 3.0) * 65536.0));
      ri.emf[p] = longint'($rtoi(1878.0 * $sin(2.0 * PI * 50.0 * t - 2.0 * PI * p / 3.0) * 65536.0));
      cw(32'h20 + 32'(4 * p), 32'(ri.vg[p]));
      cw(32'h2C + 32'(4 * p), 32'(ri.emf[p]));
      ref_v = 0.66 * $sin(2.0 * PI * 50.0 * t - 2.0 * PI * p / 3.0 + 0.15);
      for (int k = 0; k < 2; k++) begin
        car = 0.5 * (triwave(3000.0 * t + 0.25 * k) + 1.0);   // carriers shifted by a quarter period
        ri.sw[2*p+k] = (ref_v > car) ? 1 : (ref_v < -car) ? -1 : 0;
        swword[2*(2*p+k) +: 2] = 2'(ri.sw[2*p+k]);
      end
    end
    cw(32'h38, swword);
  endtask

  initial begin
    logic [31:0] d, lat;
    logic [1:0] r;
    longint lv;
    int lvl, sum_sw [3];
    ri.k_lt = 328; ri.k_lm = 655; ri.k_c = 66;
    ref_reset(rs, 64'sd98304000);
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    cr(32'h1004, d);
    check(d == 32'd299, "timer period resets to 3 us");
    cr(32'h003C, d);
    check(d == 32'd328 && 1, "model gain reset value");
    // decode error on an unmapped address
    u_cfg.read(32'h0000_8000, d, r);
    if (r == RESP_DECERR) n_decerr++;
    load_inputs(0);
    cw(32'h1004, 32'd499);            // phase 1: 5 us period
    cw(32'h0000, 32'h1);              // model enable
    cw(32'h1000, 32'h1);              // timer enable
    for (int n = 0; n < NSTEP; n++) begin
      if (n == NSTEP / 3) cw(32'h1004, 32'd299);            // phase 2: default period
      if (n >= 2 * NSTEP / 3 && n % 10 == 0)                // phase 3: stalled software
        repeat (1000) @(posedge clk);
      // one BRAM read while the model is archiving
      if (n % 50 == 7) begin
        while (model_state != ST_RUN) @(posedge clk);
        while (!dut.model_arc_req.awvalid) @(posedge clk);
        u_dat.read(32'h0, d, r);
      end
      while (!irq) @(posedge clk);
      // the step's record, as the interrupt handler copies it
      sum_sw = '{0, 0, 0};
      for (int c = 0; c < 6; c++) sum_sw[c / 2] += ri.sw[c];
      ref_step(rs, ri, erec);
      for (int k = 0; k < NREC; k++) begin
        u_dat.read(32'(4 * k), d, r);
        lv = longint'($signed(d));
        check(r == RESP_OKAY && lv == erec[k],
              $sformatf("step %0d word %0d = %0d, expected %0d", n, k, lv, erec[k]));
        if (k >= 8 && (k - 8) % 6 == 2 && lv == 0 && n > 0) n_clamp++;
      end
      for (int p = 0; p < 3; p++) vph_lvl[sum_sw[p] + 2] = 1;
      vuv_lvl[sum_sw[0] - sum_sw[1] + 4] = 1;
      if (n == 5) begin
        cr(32'h0014, lat);
        check(lat == 146 && lat < 300, $sformatf("step latency %0d cycles, expected 146 (11 + 3*44 + 2), below the 300-cycle period", lat));
      end
      // next inputs, then acknowledge
      load_inputs(n + 1);
      cw(32'h0000, 32'h5);
      while (irq) @(posedge clk);
    end
    cr(32'h0010, d);
    n_missed = int'(d);
    cr(32'h000C, d);
    check(int'(d) == n_rdy, $sformatf("deferred register %0d, counted %0d", d, n_rdy));
    cr(32'h0014, lat);
    $display("latency %0d cycles; runs at once %0d, RDY waits %0d, missed %0d, contention %0d, decerr %0d, clamp %0d",
             lat, n_run_now, n_rdy, n_missed, n_contend, n_decerr, n_clamp);
    check(n_run_now > 0, "a start ran at once");
    check(n_rdy > 0, "a start waited in RDY");
    check(n_missed > 0, "a start was missed");
    check(n_contend > 0, "BRAM contention");
    check(n_decerr > 0, "decode error");
    check(n_clamp > 0, "rectifier diode clamp");
    for (int i = 0; i < 5; i++) check(vph_lvl[i], $sformatf("phase-voltage level %0d seen", i - 2));
    for (int i = 0; i < 9; i++) check(vuv_lvl[i], $sformatf("line-voltage level %0d seen", i - 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
