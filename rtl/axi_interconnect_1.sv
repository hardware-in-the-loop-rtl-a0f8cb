// AXI4-Lite interconnect with one master and two slaves (address decode).
//
// Connects the processor's configuration port to the CHB model registers
// (slave 0, 0x0000 - 0x0FFF) and to the hardware timer (slave 1,
// 0x1000 - 0x1FFF). With the default WIN_LOG2 = 12 the slave is chosen by
// address bit 12; any address with a bit set above bit 12 gets a DECERR
// response without reaching a slave. Writes and reads are routed
// independently, one transaction each at a time:
//   write: accepted for routing when AW and W are both valid; AW and W are then
//          passed to the selected slave, and its B response is passed back.
//   read : the AR address picks the slave, AR is passed on and R is passed back.
// Each channel adds one cycle of latency at the start of a transaction. The
// connectivity follows the design; the address map and the single-transaction
// routing are this design's own.
module axi_interconnect_1
  import hil_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 12
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp,
  output axil_req_t m0_axi_req,
  input  axil_rsp_t m0_axi_rsp,
  output axil_req_t m1_axi_req,
  input  axil_rsp_t m1_axi_rsp
);

  typedef enum logic [2:0] {X_IDLE, X_FWD, X_RESP, X_ERR, X_ERESP} xstate_e;

  xstate_e wst, rst_q;
  logic    wsel, rsel;
  logic    aw_pend, w_pend;

  function automatic logic dec_err(input logic [AXI_AW-1:0] a);
    return (a >> (WIN_LOG2 + 1)) != '0;
  endfunction

  axil_req_t m_req [2];
  axil_rsp_t m_rsp [2];
  assign m0_axi_req = m_req[0];
  assign m1_axi_req = m_req[1];
  assign m_rsp[0]   = m0_axi_rsp;
  assign m_rsp[1]   = m1_axi_rsp;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst     <= X_IDLE;
      rst_q   <= X_IDLE;
      wsel    <= 1'b0;
      rsel    <= 1'b0;
      aw_pend <= 1'b0;
      w_pend  <= 1'b0;
    end else begin
      unique case (wst)
        X_IDLE: if (s_axi_req.awvalid && s_axi_req.wvalid) begin
          wsel    <= s_axi_req.awaddr[WIN_LOG2];
          aw_pend <= 1'b1;
          w_pend  <= 1'b1;
          wst     <= dec_err(s_axi_req.awaddr) ? X_ERR : X_FWD;
        end
        X_FWD: begin
          if (m_rsp[wsel].awready) aw_pend <= 1'b0;
          if (m_rsp[wsel].wready)  w_pend  <= 1'b0;
          if ((!aw_pend || m_rsp[wsel].awready) && (!w_pend || m_rsp[wsel].wready))
            wst <= X_RESP;
        end
        X_RESP:  if (m_rsp[wsel].bvalid && s_axi_req.bready) wst <= X_IDLE;
        X_ERR:   wst <= X_ERESP;
        X_ERESP: if (s_axi_req.bready) wst <= X_IDLE;
        default: wst <= X_IDLE;
      endcase

      unique case (rst_q)
        X_IDLE: if (s_axi_req.arvalid) begin
          rsel  <= s_axi_req.araddr[WIN_LOG2];
          rst_q <= dec_err(s_axi_req.araddr) ? X_ERR : X_FWD;
        end
        X_FWD:   if (m_rsp[rsel].arready) rst_q <= X_RESP;
        X_RESP:  if (m_rsp[rsel].rvalid && s_axi_req.rready) rst_q <= X_IDLE;
        X_ERR:   rst_q <= X_ERESP;
        X_ERESP: if (s_axi_req.rready) rst_q <= X_IDLE;
        default: rst_q <= X_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- routing
  always_comb begin
    s_axi_rsp = AXIL_RSP_IDLE;
    for (int i = 0; i < 2; i++) begin
      m_req[i]        = AXIL_REQ_IDLE;
      m_req[i].awaddr = s_axi_req.awaddr;
      m_req[i].wdata  = s_axi_req.wdata;
      m_req[i].wstrb  = s_axi_req.wstrb;
      m_req[i].araddr = s_axi_req.araddr;
    end
    // write channels
    unique case (wst)
      X_FWD: begin
        m_req[wsel].awvalid = s_axi_req.awvalid && aw_pend;
        m_req[wsel].wvalid  = s_axi_req.wvalid && w_pend;
        s_axi_rsp.awready   = m_rsp[wsel].awready && aw_pend;
        s_axi_rsp.wready    = m_rsp[wsel].wready && w_pend;
      end
      X_RESP: begin
        m_req[wsel].bready = s_axi_req.bready;
        s_axi_rsp.bvalid   = m_rsp[wsel].bvalid;
        s_axi_rsp.bresp    = m_rsp[wsel].bresp;
      end
      X_ERR: begin
        s_axi_rsp.awready = 1'b1;
        s_axi_rsp.wready  = 1'b1;
      end
      X_ERESP: begin
        s_axi_rsp.bvalid = 1'b1;
        s_axi_rsp.bresp  = RESP_DECERR;
      end
      default: ;
    endcase
    // read channels
    unique case (rst_q)
      X_FWD: begin
        m_req[rsel].arvalid = s_axi_req.arvalid;
        s_axi_rsp.arready   = m_rsp[rsel].arready;
      end
      X_RESP: begin
        m_req[rsel].rready = s_axi_req.rready;
        s_axi_rsp.rvalid   = m_rsp[rsel].rvalid;
        s_axi_rsp.rdata    = m_rsp[rsel].rdata;
        s_axi_rsp.rresp    = m_rsp[rsel].rresp;
      end
      X_ERR:   s_axi_rsp.arready = 1'b1;
      X_ERESP: begin
        s_axi_rsp.rvalid = 1'b1;
        s_axi_rsp.rresp  = RESP_DECERR;
      end
      default: ;
    endcase
  end

  // AXI rule: a valid request is held until it is accepted.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_req.awvalid && !s_axi_rsp.awready |=> s_axi_req.awvalid);

endmodule
