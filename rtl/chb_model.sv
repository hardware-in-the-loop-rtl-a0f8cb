// CHB model IP: the cellular H-bridge simulator together with its processor
// interface, its step handshake and the archiving of each step's data.
//
// A timer `start` is turned into a simulation step by the step controller
// (chb_ctrl): the solver (chb_solver) advances the electrical state by one time
// step, then the archiver (chb_archiver) writes the step's output record into
// the block RAM through the AXI4-Lite master port, and only then `irq` is
// raised. Software copies the data, writes new inputs and acknowledges by
// writing CTRL bit 2; the acknowledge clears `irq` and lets the next start (or
// an already waiting one) run. Step latency, from the launching start to irq:
// solver (11 cycles) + archive (3 cycles per word with an idle BRAM, 44 words)
// + 2 = 146 cycles, well inside the 300-cycle (3 us) timer period.
//
// Register map of the AXI4-Lite slave port (byte addresses, 32-bit registers):
//   0x00 CTRL     bit0 enable (rw); bit1 clear state, bit2 acknowledge (write 1)
//   0x04 STATUS   [1:0] state IDL=0 RUN=1 RDY=2, [2] irq, [3] solver busy,
//                 [4] archiver busy                                        (ro)
//   0x08 STEPS    finished steps            0x0C DEFERRED starts that waited
//   0x10 MISSED   starts dropped            0x14 LATENCY of the last step
//   0x18 ARCH_BASE BRAM byte address of the record (rw)
//   0x1C ARCH_ERR write responses that were not OKAY
//   0x20..0x28 grid voltages a,b,c   0x2C..0x34 motor EMF U,V,W (Q16.16, rw)
//   0x38 SW       switching states, 2 bits per cell, cell c at bits 2c+1:2c
//   0x3C K_LT, 0x40 K_LM, 0x44 K_C   tunable gains (Q16.16, rw)
//   0x100 + 4k    output record word k (ro)
// That reset, control, status, inputs and outputs are reachable over AXI, and
// that the data go to the BRAM before the IRQ, follows the design; the map,
// the counters and the gain reset values (dt = 3 us, 300 uH, 3 mF) are this
// design's own. Inputs may only be written while no step runs.
module chb_model
  import hil_pkg::*;
#(
  parameter logic [31:0] ARCH_BASE_RESET = 32'h0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    s_axi_req,
  output axil_rsp_t    s_axi_rsp,
  output axil_req_t    m_axi_req,
  input  axil_rsp_t    m_axi_rsp,
  input  logic         start,
  output logic         irq,
  output model_state_e state
);

  logic              wr_en, rd_en;
  logic [AXI_AW-1:0] wr_addr, rd_addr;
  logic [AXI_DW-1:0] wr_data;
  logic [AXI_DW-1:0] rd_data;
  logic [3:0]        wr_strb;

  axil_slave_port u_port (
    .clk, .rst_n, .s_axi_req, .s_axi_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  // ---------------------------------------------------------------- registers
  logic        enable, ack, clear;
  logic [31:0] arch_base, latency, lat_cnt;
  chb_in_t     inp;
  logic        go, sol_done, sol_busy, arc_done, arc_busy;
  logic [31:0] deferred, missed, arc_err;
  q_t          rec [REC_WORDS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable    <= 1'b0;
      ack       <= 1'b0;
      clear     <= 1'b0;
      arch_base <= ARCH_BASE_RESET;
      inp.vg    <= '0;
      inp.emf   <= '0;
      inp.sw    <= '0;
      inp.k_lt  <= K_LT_RESET;
      inp.k_lm  <= K_LM_RESET;
      inp.k_c   <= K_C_RESET;
    end else begin
      ack   <= 1'b0;
      clear <= 1'b0;
      if (wr_en && wr_strb == 4'hF && wr_addr[11:8] == 4'h0) begin
        unique case (wr_addr[7:2])
          6'h00: begin
            enable <= wr_data[0];
            clear  <= wr_data[1];
            ack    <= wr_data[2];
          end
          6'h06: arch_base   <= wr_data;
          6'h08: inp.vg[0]   <= q_t'(wr_data);
          6'h09: inp.vg[1]   <= q_t'(wr_data);
          6'h0A: inp.vg[2]   <= q_t'(wr_data);
          6'h0B: inp.emf[0]  <= q_t'(wr_data);
          6'h0C: inp.emf[1]  <= q_t'(wr_data);
          6'h0D: inp.emf[2]  <= q_t'(wr_data);
          6'h0E: inp.sw      <= wr_data[2*N_CELLS-1:0];
          6'h0F: inp.k_lt    <= q_t'(wr_data);
          6'h10: inp.k_lm    <= q_t'(wr_data);
          6'h11: inp.k_c     <= q_t'(wr_data);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr[11:8] == 4'h1) begin
      for (int k = 0; k < REC_WORDS; k++)
        if (rd_addr[7:2] == 6'(k)) rd_data = rec[k];
    end else if (rd_addr[11:8] == 4'h0) begin
      unique case (rd_addr[7:2])
        6'h00: rd_data = {31'd0, enable};
        6'h01: rd_data = {27'd0, arc_busy, sol_busy, irq, state};
        6'h02: rd_data = rec[REC_STEP];
        6'h03: rd_data = deferred;
        6'h04: rd_data = missed;
        6'h05: rd_data = latency;
        6'h06: rd_data = arch_base;
        6'h07: rd_data = arc_err;
        6'h08: rd_data = inp.vg[0];
        6'h09: rd_data = inp.vg[1];
        6'h0A: rd_data = inp.vg[2];
        6'h0B: rd_data = inp.emf[0];
        6'h0C: rd_data = inp.emf[1];
        6'h0D: rd_data = inp.emf[2];
        6'h0E: rd_data = {{(32 - 2*N_CELLS){1'b0}}, inp.sw};
        6'h0F: rd_data = inp.k_lt;
        6'h10: rd_data = inp.k_lm;
        6'h11: rd_data = inp.k_c;
        default: rd_data = '0;
      endcase
    end
  end

  // ---------------------------------------------------------------- datapath
  chb_ctrl u_ctrl (
    .clk, .rst_n, .enable, .start, .ack, .step_done(arc_done),
    .go, .irq, .state, .deferred, .missed
  );

  chb_solver u_solver (
    .clk, .rst_n, .go, .clear, .inp, .busy(sol_busy), .done(sol_done), .rec
  );

  chb_archiver #(.N_WORDS(REC_WORDS)) u_arch (
    .clk, .rst_n, .go(sol_done), .base(arch_base), .words(rec),
    .busy(arc_busy), .done(arc_done), .errors(arc_err), .m_axi_req, .m_axi_rsp
  );

  // step latency: cycles from the cycle in which the step was launched (timer
  // start or acknowledge accepted) to the first cycle with irq high
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lat_cnt <= '0;
      latency <= '0;
    end else if (go) begin
      lat_cnt <= 32'd1;
    end else if (arc_done) begin
      latency <= lat_cnt + 32'd2;
    end else if (state == ST_RUN) begin
      lat_cnt <= lat_cnt + 32'd1;
    end
  end

endmodule
