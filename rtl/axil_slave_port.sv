// AXI4-Lite slave front end for register files.
//
// Turns the five AXI4-Lite channels into a simple register access: a write
// strobe with address, data and byte strobes, and a read strobe with an
// address whose data the register file returns combinationally in the same
// cycle. One write and one read are handled at a time. A write is accepted
// when AW and W are both valid (both ready in that cycle); the B response
// follows one cycle later and is held until bready. A read is accepted when
// arvalid is high and no R response is pending; rdata is registered and held
// until rready. Responses are always OKAY. The register file itself belongs to
// the user; this front end is this design's own.
module axil_slave_port
  import hil_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_axi_req,
  output axil_rsp_t         s_axi_rsp,
  // register side
  output logic              wr_en,
  output logic [AXI_AW-1:0] wr_addr,
  output logic [AXI_DW-1:0] wr_data,
  output logic [3:0]        wr_strb,
  output logic              rd_en,
  output logic [AXI_AW-1:0] rd_addr,
  input  logic [AXI_DW-1:0] rd_data
);

  logic bvalid_q, rvalid_q;
  logic [AXI_DW-1:0] rdata_q;
  logic aw_ok, ar_ok;

  assign aw_ok = s_axi_req.awvalid && s_axi_req.wvalid && !bvalid_q;
  assign ar_ok = s_axi_req.arvalid && !rvalid_q;

  assign wr_en   = aw_ok;
  assign wr_addr = s_axi_req.awaddr;
  assign wr_data = s_axi_req.wdata;
  assign wr_strb = s_axi_req.wstrb;
  assign rd_en   = ar_ok;
  assign rd_addr = s_axi_req.araddr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (aw_ok) bvalid_q <= 1'b1;
      else if (s_axi_req.bready) bvalid_q <= 1'b0;
      if (ar_ok) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (s_axi_req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    s_axi_rsp         = AXIL_RSP_IDLE;
    s_axi_rsp.awready = aw_ok;
    s_axi_rsp.wready  = aw_ok;
    s_axi_rsp.bvalid  = bvalid_q;
    s_axi_rsp.bresp   = RESP_OKAY;
    s_axi_rsp.arready = ar_ok;
    s_axi_rsp.rvalid  = rvalid_q;
    s_axi_rsp.rdata   = rdata_q;
    s_axi_rsp.rresp   = RESP_OKAY;
  end

  // AXI rules: a response is held until the master takes it.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rsp.bvalid && !s_axi_req.bready |=> s_axi_rsp.bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rsp.rvalid && !s_axi_req.rready |=> s_axi_rsp.rvalid && $stable(s_axi_rsp.rdata));

endmodule
