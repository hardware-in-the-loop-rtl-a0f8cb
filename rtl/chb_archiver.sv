// AXI4-Lite write master that archives the output record of a simulation step
// into the block RAM.
//
// On `go` it writes words[0] .. words[N_WORDS-1] to consecutive 32-bit
// locations starting at byte address `base`, one single-beat write at a time:
// AW and W are raised together, each dropped when its handshake has happened,
// and the next word starts after the B response. `done` pulses for one cycle
// after the last response, so an archive of N words takes at least 3*N cycles
// when the slave is always ready (address/data cycle, response cycle, next
// word). Non-OKAY responses are counted in `errors` and do not stop the
// archive. `words` and `base` must stay stable while `busy`. Archiving the
// step's data through AXI belongs to the design; the single-beat AXI4-Lite
// protocol and the error counter are this design's own choices.
module chb_archiver
  import hil_pkg::*;
#(
  parameter int unsigned N_WORDS = REC_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  input  logic [31:0] base,
  input  q_t          words [N_WORDS],
  output logic        busy,
  output logic        done,
  output logic [31:0] errors,
  output axil_req_t   m_axi_req,
  input  axil_rsp_t   m_axi_rsp
);

  localparam int unsigned IW = $clog2(N_WORDS + 1);

  typedef enum logic [1:0] {A_IDLE, A_ADDR, A_RESP} astate_e;
  astate_e        st;
  logic [IW-1:0]  idx;
  logic           aw_pend, w_pend;
  q_t             cur_word;

  always_comb begin
    cur_word = '0;
    for (int i = 0; i < N_WORDS; i++)
      if (idx == IW'(i)) cur_word = words[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= A_IDLE;
      idx     <= '0;
      aw_pend <= 1'b0;
      w_pend  <= 1'b0;
      done    <= 1'b0;
      errors  <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        A_IDLE: if (go) begin
          st      <= A_ADDR;
          idx     <= '0;
          aw_pend <= 1'b1;
          w_pend  <= 1'b1;
        end
        A_ADDR: begin
          if (m_axi_rsp.awready) aw_pend <= 1'b0;
          if (m_axi_rsp.wready)  w_pend  <= 1'b0;
          if ((!aw_pend || m_axi_rsp.awready) && (!w_pend || m_axi_rsp.wready))
            st <= A_RESP;
        end
        A_RESP: if (m_axi_rsp.bvalid) begin
          if (m_axi_rsp.bresp != RESP_OKAY) errors <= errors + 32'd1;
          if (idx == IW'(N_WORDS - 1)) begin
            st   <= A_IDLE;
            done <= 1'b1;
          end else begin
            idx     <= idx + 1'b1;
            st      <= A_ADDR;
            aw_pend <= 1'b1;
            w_pend  <= 1'b1;
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign busy = (st != A_IDLE);

  always_comb begin
    m_axi_req         = AXIL_REQ_IDLE;
    m_axi_req.awaddr  = base + {{(32 - IW - 2){1'b0}}, idx, 2'b00};
    m_axi_req.awvalid = (st == A_ADDR) && aw_pend;
    m_axi_req.wdata   = cur_word;
    m_axi_req.wstrb   = 4'hF;
    m_axi_req.wvalid  = (st == A_ADDR) && w_pend;
    m_axi_req.bready  = (st == A_RESP);
  end

  // AXI rule: a raised address or data valid stays up until accepted.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_req.awvalid && !m_axi_rsp.awready |=> m_axi_req.awvalid && $stable(m_axi_req.awaddr));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_req.wvalid && !m_axi_rsp.wready |=> m_axi_req.wvalid && $stable(m_axi_req.wdata));

endmodule
