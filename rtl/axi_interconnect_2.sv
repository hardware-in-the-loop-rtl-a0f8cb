// AXI4-Lite interconnect with two masters and one slave (arbiter).
//
// Lets the CHB model (master 0, archiving its step data) and the processor
// (master 1, fetching the data) share the block RAM. Writes and reads are
// arbitrated independently. A master asks for the write path with AW and W
// both valid, and for the read path with AR valid. When both ask in the same
// cycle the one that was not granted last time wins (round robin). The grant
// is decided in one cycle and held until the response handshake, during which
// the other master's requests wait (its ready signals stay low). The
// connectivity follows the design; the arbitration scheme is this design's own.
module axi_interconnect_2
  import hil_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s0_axi_req,
  output axil_rsp_t s0_axi_rsp,
  input  axil_req_t s1_axi_req,
  output axil_rsp_t s1_axi_rsp,
  output axil_req_t m_axi_req,
  input  axil_rsp_t m_axi_rsp
);

  typedef enum logic [1:0] {G_IDLE, G_FWD, G_RESP} gstate_e;

  gstate_e wst, rst_q;
  logic    wgnt, rgnt;        // granted master
  logic    wlast, rlast;      // last granted master (round robin)
  logic    aw_pend, w_pend;
  logic    wreq [2], rreq [2];

  axil_req_t s_req [2];
  axil_rsp_t s_rsp [2];
  assign s_req[0]   = s0_axi_req;
  assign s_req[1]   = s1_axi_req;
  assign s0_axi_rsp = s_rsp[0];
  assign s1_axi_rsp = s_rsp[1];

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      wreq[i] = s_req[i].awvalid && s_req[i].wvalid;
      rreq[i] = s_req[i].arvalid;
    end
  end

  // round robin: the master after the last granted one has priority
  function automatic logic pick(input logic last, input logic r0, input logic r1);
    if (r0 && r1) return !last;
    return r1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst     <= G_IDLE;
      rst_q   <= G_IDLE;
      wgnt    <= 1'b0;
      rgnt    <= 1'b0;
      wlast   <= 1'b1;
      rlast   <= 1'b1;
      aw_pend <= 1'b0;
      w_pend  <= 1'b0;
    end else begin
      unique case (wst)
        G_IDLE: if (wreq[0] || wreq[1]) begin
          wgnt    <= pick(wlast, wreq[0], wreq[1]);
          wlast   <= pick(wlast, wreq[0], wreq[1]);
          aw_pend <= 1'b1;
          w_pend  <= 1'b1;
          wst     <= G_FWD;
        end
        G_FWD: begin
          if (m_axi_rsp.awready) aw_pend <= 1'b0;
          if (m_axi_rsp.wready)  w_pend  <= 1'b0;
          if ((!aw_pend || m_axi_rsp.awready) && (!w_pend || m_axi_rsp.wready))
            wst <= G_RESP;
        end
        G_RESP: if (m_axi_rsp.bvalid && s_req[wgnt].bready) wst <= G_IDLE;
        default: wst <= G_IDLE;
      endcase

      unique case (rst_q)
        G_IDLE: if (rreq[0] || rreq[1]) begin
          rgnt  <= pick(rlast, rreq[0], rreq[1]);
          rlast <= pick(rlast, rreq[0], rreq[1]);
          rst_q <= G_FWD;
        end
        G_FWD:  if (m_axi_rsp.arready) rst_q <= G_RESP;
        G_RESP: if (m_axi_rsp.rvalid && s_req[rgnt].rready) rst_q <= G_IDLE;
        default: rst_q <= G_IDLE;
      endcase
    end
  end

  always_comb begin
    m_axi_req = AXIL_REQ_IDLE;
    for (int i = 0; i < 2; i++) s_rsp[i] = AXIL_RSP_IDLE;

    m_axi_req.awaddr = s_req[wgnt].awaddr;
    m_axi_req.wdata  = s_req[wgnt].wdata;
    m_axi_req.wstrb  = s_req[wgnt].wstrb;
    m_axi_req.araddr = s_req[rgnt].araddr;

    unique case (wst)
      G_FWD: begin
        m_axi_req.awvalid     = s_req[wgnt].awvalid && aw_pend;
        m_axi_req.wvalid      = s_req[wgnt].wvalid && w_pend;
        s_rsp[wgnt].awready   = m_axi_rsp.awready && aw_pend;
        s_rsp[wgnt].wready    = m_axi_rsp.wready && w_pend;
      end
      G_RESP: begin
        m_axi_req.bready      = s_req[wgnt].bready;
        s_rsp[wgnt].bvalid    = m_axi_rsp.bvalid;
        s_rsp[wgnt].bresp     = m_axi_rsp.bresp;
      end
      default: ;
    endcase

    unique case (rst_q)
      G_FWD: begin
        m_axi_req.arvalid   = s_req[rgnt].arvalid;
        s_rsp[rgnt].arready = m_axi_rsp.arready;
      end
      G_RESP: begin
        m_axi_req.rready    = s_req[rgnt].rready;
        s_rsp[rgnt].rvalid  = m_axi_rsp.rvalid;
        s_rsp[rgnt].rdata   = m_axi_rsp.rdata;
        s_rsp[rgnt].rresp   = m_axi_rsp.rresp;
      end
      default: ;
    endcase
  end

  // only the granted master may see a write response
  a_one_bvalid: assert property (@(posedge clk) disable iff (!rst_n)
    !(s_rsp[0].bvalid && s_rsp[1].bvalid));

endmodule
