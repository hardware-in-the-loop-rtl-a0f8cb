// Testbench of axil_bram: random word and byte-strobe writes and reads through
// AXI4-Lite, compared with a testbench shadow memory; checks the one-cycle
// read latency of the synchronous RAM and address wrap-around.
module tb_axil_bram;
  import hil_pkg::*;

  localparam int W = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [31:0] shadow [W];
  bit written [W];
  int checks = 0, failures = 0;

  axil_bram dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp));
  axil_tb_master u_bfm (.clk, .req, .rsp);

  // arready to rvalid delay
  longint cyc = 0, t_ar = 0;
  int rlat = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (req.arvalid && rsp.arready) t_ar <= cyc;
    if (rsp.rvalid && req.rready) rlat <= int'(cyc - t_ar);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, a;
    logic [3:0] st;
    logic [1:0] r;
    int idx;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < W; i++) written[i] = 0;
    for (int t = 0; t < 2000; t++) begin
      idx = $urandom_range(W - 1);
      a = 32'(idx * 4);
      if (t % 3 != 2) begin
        d  = $urandom;
        st = (t % 5 == 0) ? 4'($urandom_range(15)) : 4'hF;
        if (!written[idx]) st = 4'hF;
        u_bfm.write(a, d, r, st);
        check(r == RESP_OKAY, "bresp");
        for (int b = 0; b < 4; b++) if (st[b]) shadow[idx][8*b +: 8] = d[8*b +: 8];
        written[idx] = 1;
      end else if (written[idx]) begin
        u_bfm.read(a | ((t % 7 == 0) ? 32'(W * 4) : 32'd0), d, r);   // wrap-around alias
        check(d == shadow[idx], $sformatf("read %0d: %h expected %h", idx, d, shadow[idx]));
        #1;
        check(rlat == 1, $sformatf("read latency %0d", rlat));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
