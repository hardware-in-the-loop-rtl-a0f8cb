// Block RAM with an AXI4-Lite slave port: the buffer through which the CHB
// model hands the data of its last simulation step to the processor.
//
// WORDS x 32-bit words, word address = byte address bits [AW+1:2]; higher
// address bits are ignored, so the array repeats through the address space. A
// write is accepted when AW and W are both valid, with byte strobes honoured,
// and answered with OKAY one cycle later. A read is accepted when no read
// response is pending; the array is read synchronously and the data appear
// with rvalid one cycle after the address handshake. One write and one read
// may be in progress at once. The size is this design's own choice.
module axil_bram
  import hil_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic        bvalid_q, rvalid_q;
  logic [31:0] rdata_q;
  logic        wr_ok, rd_ok;
  logic [AW-1:0] waddr, raddr;

  assign wr_ok = s_axi_req.awvalid && s_axi_req.wvalid && !bvalid_q;
  assign rd_ok = s_axi_req.arvalid && !rvalid_q;
  assign waddr = s_axi_req.awaddr[AW+1:2];
  assign raddr = s_axi_req.araddr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_ok) begin
      for (int b = 0; b < 4; b++)
        if (s_axi_req.wstrb[b]) mem[waddr][8*b +: 8] <= s_axi_req.wdata[8*b +: 8];
    end
    if (rd_ok) rdata_q <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
    end else begin
      if (wr_ok) bvalid_q <= 1'b1;
      else if (s_axi_req.bready) bvalid_q <= 1'b0;
      if (rd_ok) rvalid_q <= 1'b1;
      else if (s_axi_req.rready) rvalid_q <= 1'b0;
    end
  end

  always_comb begin
    s_axi_rsp         = AXIL_RSP_IDLE;
    s_axi_rsp.awready = wr_ok;
    s_axi_rsp.wready  = wr_ok;
    s_axi_rsp.bvalid  = bvalid_q;
    s_axi_rsp.bresp   = RESP_OKAY;
    s_axi_rsp.arready = rd_ok;
    s_axi_rsp.rvalid  = rvalid_q;
    s_axi_rsp.rdata   = rdata_q;
    s_axi_rsp.rresp   = RESP_OKAY;
  end

endmodule
