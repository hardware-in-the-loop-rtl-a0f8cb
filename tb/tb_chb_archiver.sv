// Testbench of chb_archiver: archives random records into a testbench memory
// slave, first always ready (checks the 3-cycles-per-word rate), then with
// random wait states, and checks every stored word and its address.
module tb_chb_archiver;
  import hil_pkg::*;

  localparam int N = REC_WORDS;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go = 1'b0, busy, done;
  logic [31:0] base, errors;
  q_t words [N];
  axil_req_t req0, req1;
  axil_rsp_t rsp0, rsp1;
  logic busy1, done1;
  logic [31:0] errors1;
  int checks = 0, failures = 0;

  chb_archiver dut (.clk, .rst_n, .go, .base, .words, .busy, .done, .errors,
                                   .m_axi_req(req0), .m_axi_rsp(rsp0));
  axil_tb_slave #(.WORDS(256), .STALL(0)) u_fast (.clk, .req(req0), .rsp(rsp0));
  // second instance against a slave with wait states
  chb_archiver dut1 (.clk, .rst_n, .go, .base, .words, .busy(busy1), .done(done1),
                                    .errors(errors1), .m_axi_req(req1), .m_axi_rsp(rsp1));
  axil_tb_slave #(.WORDS(256), .STALL(2)) u_slow (.clk, .req(req1), .rsp(rsp1));

  longint cyc = 0, t_go = 0;
  int lat = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (go) t_go <= cyc;
    if (done) lat <= int'(cyc - t_go);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = '0;
    for (int i = 0; i < N; i++) words[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 4; r++) begin
      base = 32'(r * 256);        // word offset r*64 in the 256-word slaves
      for (int i = 0; i < N; i++) words[i] = q_t'($urandom);
      @(posedge clk);
      go <= 1'b1;
      @(posedge clk);
      go <= 1'b0;
      while (!(done === 1'b1)) @(posedge clk);
      @(posedge clk);
      check(lat == 3 * N + 1, $sformatf("archive of %0d words took %0d cycles, expected %0d", N, lat, 3 * N + 1));
      while (busy1) @(posedge clk);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        check(u_fast.mem[(r * 64 + i) % 256] == words[i], $sformatf("fast slave word %0d", i));
        check(u_slow.mem[(r * 64 + i) % 256] == words[i], $sformatf("slow slave word %0d", i));
      end
      check(u_fast.last_waddr == base + 32'(4 * (N - 1)), "last address");
    end
    check(u_fast.n_writes == 4 * N && u_slow.n_writes == 4 * N, "write counts");
    check(errors == 0 && errors1 == 0, "no error responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
