// Testbench of chb_ctrl: drives start, ack and step_done directly and checks
// the IDL/RUN/RDY sequence, the go pulses, the IRQ level and the counters of
// deferred and missed starts against a scripted expectation.
module tb_chb_ctrl;
  import hil_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic enable = 1'b0, start = 1'b0, ack = 1'b0, step_done = 1'b0;
  logic go, irq;
  model_state_e state;
  logic [31:0] deferred, missed;
  int checks = 0, failures = 0, n_go = 0;

  chb_ctrl dut (.clk, .rst_n, .enable, .start, .ack, .step_done, .go, .irq, .state,
                .deferred, .missed);

  always @(posedge clk) if (go) n_go++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s irq %b)", what, state.name(), irq); end
  endtask

  // 0: start, 1: ack, 2: step_done
  task automatic pulse(input int which);
    start     <= (which == 0);
    ack       <= (which == 1);
    step_done <= (which == 2);
    @(posedge clk);
    start     <= 1'b0;
    ack       <= 1'b0;
    step_done <= 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(state == ST_IDL && !irq, "reset: IDL, no irq");
    pulse(0);
    check(state == ST_IDL && n_go == 0, "disabled: start ignored");
    enable <= 1'b1;
    pulse(0);
    check(state == ST_RUN && n_go == 1, "first start runs (ack considered received)");
    pulse(0);
    check(missed == 1 && state == ST_RUN, "start during RUN is missed");
    pulse(2);
    check(state == ST_IDL && irq, "done: IDL with irq");
    pulse(0);
    check(state == ST_RDY && n_go == 1 && deferred == 1, "start before ack: RDY");
    check(irq, "irq still pending in RDY");
    pulse(0);
    check(missed == 2 && state == ST_RDY, "second start in RDY is missed");
    pulse(1);
    check(state == ST_RUN && n_go == 2 && !irq, "ack in RDY runs the waiting step");
    pulse(2);
    check(state == ST_IDL && irq, "second step done");
    pulse(1);
    check(state == ST_IDL && !irq, "ack in IDL clears irq");
    pulse(0);
    check(state == ST_RUN && n_go == 3 && deferred == 1, "acked start runs at once");
    pulse(2);
    // start and ack in the same cycle: runs
    start <= 1'b1; ack <= 1'b1;
    @(posedge clk);
    start <= 1'b0; ack <= 1'b0;
    @(posedge clk); #1;
    check(state == ST_RUN && n_go == 4, "start with simultaneous ack runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
