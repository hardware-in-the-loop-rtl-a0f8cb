// Testbench of chb_model: configures the model over AXI4-Lite, drives the
// timer start by hand and lets the model archive into a testbench memory slave
// with wait states. For every step it checks the archived record and the
// record registers against the reference model, and it takes the step
// handshake through all its paths: a start that runs at once, a start that
// waits in RDY for the acknowledge, a start dropped during RUN, and a state
// clear. It also checks the latency register against the measured
// start-to-IRQ time.
module tb_chb_model;
  import hil_pkg::*;
  import chb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t sreq, mreq;
  axil_rsp_t srsp, mrsp;
  logic start = 1'b0, irq;
  model_state_e state;
  int checks = 0, failures = 0;

  chb_model #(.ARCH_BASE_RESET(32'h100)) dut (.clk, .rst_n, .s_axi_req(sreq), .s_axi_rsp(srsp),
                 .m_axi_req(mreq), .m_axi_rsp(mrsp), .start, .irq, .state);
  axil_tb_master u_bfm (.clk, .req(sreq), .rsp(srsp));
  axil_tb_slave #(.WORDS(256), .STALL(1)) u_mem (.clk, .req(mreq), .rsp(mrsp));

  longint cyc = 0, t_start = 0, t_irq = 0;
  logic irq_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    irq_q <= irq;
    if (start && state != ST_RUN) t_start <= cyc;
    if (irq && !irq_q) t_irq <= cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [1:0] r;
    u_bfm.write(a, d, r);
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    logic [1:0] r;
    u_bfm.read(a, d, r);
  endtask

  task automatic pulse_start();
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
  endtask

  ref_state_t rs;
  ref_in_t ri;
  longint erec [NREC];

  // new inputs for step n, written to the model and to the reference
  task automatic load_inputs(input int n);
    logic [31:0] swword;
    real th;
    th = 2.0 * 3.14159265 * n / 40.0;
    for (int p = 0; p < 3; p++) begin
      ri.vg[p]  = longint'($rtoi(898.0 * $sin(th - 2.094395 * p) * 65536.0));
      ri.emf[p] = longint'($rtoi(1800.0 * $sin(th - 2.094395 * p) * 65536.0));
      wr(32'h20 + 32'(4 * p), 32'(ri.vg[p]));
      wr(32'h2C + 32'(4 * p), 32'(ri.emf[p]));
    end
    swword = '0;
    for (int c = 0; c < 6; c++) begin
      ri.sw[c] = int'($urandom_range(2)) - 1;
      swword[2*c +: 2] = 2'(ri.sw[c]);
    end
    wr(32'h38, swword);
  endtask

  task automatic check_record(input int n);
    logic [31:0] d;
    ref_step(rs, ri, erec);
    for (int k = 0; k < NREC; k++)
      check(longint'($signed(u_mem.mem[64 + k])) == erec[k],
            $sformatf("step %0d archived word %0d = %0d, expected %0d", n, k, $signed(u_mem.mem[64 + k]), erec[k]));
    for (int k = 0; k < NREC; k += 7) begin
      rd(32'h100 + 32'(4 * k), d);
      check(longint'($signed(d)) == erec[k], $sformatf("record register %0d", k));
    end
  endtask

  initial begin
    logic [31:0] d;
    int deferred_exp = 0, missed_exp = 0;
    ref_reset(rs, 64'sd98304000);
    ri.k_lt = 3280; ri.k_lm = 6550; ri.k_c = 660;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    rd(32'h3C, d);
    check(d == 32'd328, "k_lt reset value");
    wr(32'h3C, 32'd3280); wr(32'h40, 32'd6550); wr(32'h44, 32'd660);
    load_inputs(0);
    wr(32'h00, 32'h1);                 // enable
    for (int n = 0; n < 60; n++) begin
      pulse_start();
      if (n % 3 == 1) begin             // timer start arrives during the step: dropped
        repeat (3) @(posedge clk);
        check(state == ST_RUN, "running");
        pulse_start();
        missed_exp++;
      end
      while (!irq) @(posedge clk);
      @(posedge clk);
      check(state == ST_IDL, "IDL after step");
      check(t_irq - t_start > 3 * 44, "latency covers the archive");
      rd(32'h14, d);
      check(longint'(d) == t_irq - t_start, $sformatf("latency register %0d, measured %0d", d, t_irq - t_start));
      check_record(n);
      if (n % 4 == 3) begin             // next start comes before the acknowledge
        pulse_start();
        repeat (2) @(posedge clk);
        check(state == ST_RDY, "waiting in RDY");
        deferred_exp++;
        load_inputs(n + 1);
        wr(32'h00, 32'h5);              // acknowledge: the waiting step runs
        while (irq) @(posedge clk);
        while (!irq) @(posedge clk);    // wait for it to finish
        @(posedge clk);
        n++;
        check_record(n);
      end
      load_inputs(n + 1);
      wr(32'h00, 32'h5);                // acknowledge
      @(posedge clk);
      check(!irq, "acknowledge clears irq");
    end
    rd(32'h0C, d);
    check(d == 32'(deferred_exp), $sformatf("deferred count %0d exp %0d", d, deferred_exp));
    rd(32'h10, d);
    check(d == 32'(missed_exp), $sformatf("missed count %0d exp %0d", d, missed_exp));
    rd(32'h04, d);
    check(d[1:0] == 2'(ST_IDL), "status state");
    wr(32'h00, 32'h3);                  // clear state, stay enabled
    rd(32'h100 + 4 * 8, d);
    check(d == 32'd98304000, "clear resets the DC link to 1500 V");
    rd(32'h08, d);
    check(d == 0, "clear resets the step count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
