// Testbench of axi_interconnect_2: two masters write and read disjoint halves
// of a shared testbench memory slave at the same time; checks data integrity,
// that both masters are served, that contention (both requesting in the same
// cycle) happens and that neither master is starved.
module tb_axi_interconnect_2;
  import hil_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req0, req1, mreq;
  axil_rsp_t rsp0, rsp1, mrsp;
  int checks = 0, failures = 0;
  int n_contend = 0;

  axi_interconnect_2 dut (.clk, .rst_n, .s0_axi_req(req0), .s0_axi_rsp(rsp0),
                          .s1_axi_req(req1), .s1_axi_rsp(rsp1), .m_axi_req(mreq), .m_axi_rsp(mrsp));
  axil_tb_master u_m0 (.clk, .req(req0), .rsp(rsp0));
  axil_tb_master u_m1 (.clk, .req(req1), .rsp(rsp1));
  axil_tb_slave #(.WORDS(128), .STALL(1)) u_s (.clk, .req(mreq), .rsp(mrsp));

  // contention: both masters hold a write or read request in the same cycle,
  // so one of them waits for the other's transaction
  always @(posedge clk) begin
    if (rst_n && ((req0.awvalid && req1.awvalid) || (req0.arvalid && req1.arvalid)))
      n_contend++;
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

  // master m writes word m*64+i with a tag, then reads everything back
  task automatic run_master(input int m);
    logic [31:0] d;
    logic [1:0] r;
    for (int i = 0; i < 64; i++) begin
      if (m == 0) u_m0.write(32'((m * 64 + i) * 4), 32'h1000_0000 * (m + 1) + 32'(i), r);
      else        u_m1.write(32'((m * 64 + i) * 4), 32'h1000_0000 * (m + 1) + 32'(i), r);
      check(r == RESP_OKAY, "bresp");
    end
    for (int i = 0; i < 64; i++) begin
      if (m == 0) u_m0.read(32'((m * 64 + i) * 4), d, r);
      else        u_m1.read(32'((m * 64 + i) * 4), d, r);
      check(d == 32'h1000_0000 * (m + 1) + 32'(i), $sformatf("master %0d word %0d read %h", m, i, d));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fork
      run_master(0);
      run_master(1);
    join
    check(u_s.n_writes == 128 && u_s.n_reads == 128, "slave served all accesses");
    check(n_contend > 10, $sformatf("write contention seen %0d times", n_contend));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
