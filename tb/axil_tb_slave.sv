// Testbench AXI4-Lite memory slave with random wait states. Holds WORDS
// 32-bit words (word address = byte address bits [..:2], wrapping), counts the
// writes and reads it served, and records the last write address and data.
// With STALL = 0 it is always ready and answers in the next cycle.
module axil_tb_slave
  import hil_pkg::*;
#(
  parameter int unsigned WORDS = 256,
  parameter int unsigned STALL = 0   // 0: never stall, else stall 1 in STALL+1 cycles at random
) (
  input  logic      clk,
  input  axil_req_t req,
  output axil_rsp_t rsp
);

  logic [31:0] mem [WORDS];
  int unsigned n_writes = 0, n_reads = 0;
  logic [31:0] last_waddr = '0, last_wdata = '0;
  logic stall_w, stall_r;

  initial begin
    rsp = AXIL_RSP_IDLE;
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    stall_w = (STALL != 0) && ($urandom_range(STALL) == 0);
    stall_r = (STALL != 0) && ($urandom_range(STALL) == 0);
    // write
    if (rsp.bvalid && req.bready) rsp.bvalid <= 1'b0;
    rsp.awready <= 1'b0;
    rsp.wready  <= 1'b0;
    if (req.awvalid && req.wvalid && !rsp.bvalid && !rsp.awready && !stall_w) begin
      rsp.awready <= 1'b1;
      rsp.wready  <= 1'b1;
      mem[(req.awaddr >> 2) % WORDS] <= req.wdata;
      last_waddr <= req.awaddr;
      last_wdata <= req.wdata;
      n_writes   <= n_writes + 1;
    end
    if (rsp.awready) begin
      rsp.bvalid <= 1'b1;
      rsp.bresp  <= RESP_OKAY;
    end
    // read
    if (rsp.rvalid && req.rready) rsp.rvalid <= 1'b0;
    rsp.arready <= 1'b0;
    if (req.arvalid && !rsp.rvalid && !rsp.arready && !stall_r) begin
      rsp.arready <= 1'b1;
      rsp.rdata   <= mem[(req.araddr >> 2) % WORDS];
      rsp.rresp   <= RESP_OKAY;
      n_reads     <= n_reads + 1;
    end
    if (rsp.arready) rsp.rvalid <= 1'b1;
  end

endmodule
