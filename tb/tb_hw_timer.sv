// Testbench of hw_timer: programs the period over AXI4-Lite, checks that the
// start pulse comes every L+1 cycles, that the count and pulse counter read
// back, that a changed period takes effect and that disabling stops pulses.
module tb_hw_timer;
  import hil_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic start;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint last_start = -1, interval = 0;
  int n_start = 0;

  hw_timer dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp), .start);
  axil_tb_master u_bfm (.clk, .req, .rsp);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) begin
      if (last_start >= 0) interval = cyc - last_start;
      last_start = cyc;
      n_start++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    u_bfm.read(32'h4, d, r);
    check(d == 32'd299, "period reset value");
    repeat (50) @(posedge clk);
    check(n_start == 0, "no start while disabled");
    u_bfm.write(32'h4, 32'd9, r);
    check(r == RESP_OKAY, "write okay");
    u_bfm.write(32'h0, 32'd1, r);
    repeat (100) @(posedge clk);
    check(n_start >= 8, "pulses run");
    check(interval == 10, $sformatf("period 9 gives 10-cycle interval, got %0d", interval));
    u_bfm.read(32'hC, d, r);
    check(d == 32'(n_start), $sformatf("start counter %0d vs %0d", d, n_start));
    u_bfm.read(32'h8, d, r);
    check(d <= 32'd9, "count in range");
    // default period, as used by the design: 300-cycle interval
    u_bfm.write(32'h4, 32'd299, r);
    repeat (1000) @(posedge clk);
    check(interval == 300, $sformatf("period 299 gives 300 cycles, got %0d", interval));
    u_bfm.write(32'h4, 32'd24, r);
    repeat (200) @(posedge clk);
    check(interval == 25, $sformatf("period 24 gives 25 cycles, got %0d", interval));
    u_bfm.write(32'h0, 32'd0, r);
    repeat (5) @(posedge clk);
    n_start = 0;
    repeat (100) @(posedge clk);
    check(n_start == 0, "disable stops pulses");
    u_bfm.read(32'h0, d, r);
    check(d == 32'd0, "ctrl reads back 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
