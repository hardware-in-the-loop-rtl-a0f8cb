// Testbench of axi_interconnect_1: random writes and reads from one master,
// with parallel read traffic, to two testbench memory slaves (one with wait
// states); checks that each access lands in the slave its address selects,
// that data read back match, and that an address outside both windows gets a
// DECERR response without reaching a slave.
module tb_axi_interconnect_1;
  import hil_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req, m0_req, m1_req;
  axil_rsp_t rsp, m0_rsp, m1_rsp;
  logic [31:0] shadow [2][64];
  int checks = 0, failures = 0;

  axi_interconnect_1 dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp),
                          .m0_axi_req(m0_req), .m0_axi_rsp(m0_rsp),
                          .m1_axi_req(m1_req), .m1_axi_rsp(m1_rsp));
  axil_tb_master u_bfm (.clk, .req, .rsp);
  axil_tb_slave #(.WORDS(64), .STALL(0)) u_s0 (.clk, .req(m0_req), .rsp(m0_rsp));
  axil_tb_slave #(.WORDS(64), .STALL(3)) u_s1 (.clk, .req(m1_req), .rsp(m1_rsp));

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
    logic [1:0] r;
    int s, w, n0, n1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 64; i++) begin shadow[0][i] = '0; shadow[1][i] = '0; end
    for (int t = 0; t < 600; t++) begin
      s = $urandom_range(1);
      w = $urandom_range(63);
      a = 32'(s * 32'h1000 + w * 4);
      if ($urandom_range(1)) begin
        d = $urandom;
        n0 = u_s0.n_writes; n1 = u_s1.n_writes;
        u_bfm.write(a, d, r);
        shadow[s][w] = d;
        check(r == RESP_OKAY, "write okay");
        @(posedge clk);
        check(s == 0 ? (u_s0.n_writes == n0 + 1 && u_s1.n_writes == n1)
                     : (u_s1.n_writes == n1 + 1 && u_s0.n_writes == n0), "write routed to one slave");
      end else begin
        u_bfm.read(a, d, r);
        check(r == RESP_OKAY && d == shadow[s][w], $sformatf("read slave %0d word %0d", s, w));
      end
    end
    // parallel read while writing
    fork
      u_bfm.write(32'h1008, 32'hCAFE_0001, r);
      u_bfm.read(32'h0004, d, r);
    join
    check(d == shadow[0][1], "parallel read");
    shadow[1][2] = 32'hCAFE_0001;
    u_bfm.read(32'h1008, d, r);
    check(d == 32'hCAFE_0001, "parallel write landed");
    // decode error
    n0 = u_s0.n_writes; n1 = u_s1.n_writes;
    u_bfm.write(32'h0000_4000, 32'h1, r);
    check(r == RESP_DECERR, "write decode error");
    u_bfm.read(32'h8000_0000, d, r);
    check(r == RESP_DECERR, "read decode error");
    check(u_s0.n_writes == n0 && u_s1.n_writes == n1, "no slave saw the bad write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
