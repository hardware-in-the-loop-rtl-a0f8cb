// Programmable-logic part of a hardware-in-the-loop (HIL) simulator of a
// cellular H-bridge (CHB) medium-voltage inverter on a Zynq-7000 class device.
//
// The simulated converter is computed here in fixed point, one time step per
// timer period, while the processor exchanges its inputs and outputs with a
// host over the network. Blocks and connections:
//
//   s_axi_cfg (processor) -> axi_interconnect_1 -> chb_model registers  (0x0000)
//                                               -> hw_timer registers   (0x1000)
//   hw_timer.start -> chb_model
//   chb_model AXI master --\
//   s_axi_dat (processor) --> axi_interconnect_2 -> axil_bram           (0x0000)
//   chb_model.irq -> irq (to the processor's interrupt controller)
//
// One cycle of operation: the timer's start launches a step; the model
// computes it, copies its output record into the BRAM and raises irq; the
// processor reads the record from the BRAM over s_axi_dat, writes the next
// inputs over s_axi_cfg and acknowledges; the next start (or a start that
// arrived before the acknowledge and left the model waiting in RDY) runs the
// next step. The processor, its interrupt controller and everything off chip
// lie outside this module; both processor AXI4-Lite master ports appear as
// slave ports here. The partitioning and the connections follow the design;
// the address maps are this design's own.
module hil_pl_top
  import hil_pkg::*;
#(
  parameter int unsigned BRAM_WORDS         = 1024,
  parameter logic [31:0] TIMER_PERIOD_RESET = 32'd299
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    s_axi_cfg_req,
  output axil_rsp_t    s_axi_cfg_rsp,
  input  axil_req_t    s_axi_dat_req,
  output axil_rsp_t    s_axi_dat_rsp,
  output logic         irq,
  output logic         start,
  output model_state_e model_state
);

  axil_req_t model_cfg_req, timer_req, model_arc_req, bram_req;
  axil_rsp_t model_cfg_rsp, timer_rsp, model_arc_rsp, bram_rsp;

  axi_interconnect_1 u_ic1 (
    .clk, .rst_n,
    .s_axi_req (s_axi_cfg_req), .s_axi_rsp (s_axi_cfg_rsp),
    .m0_axi_req(model_cfg_req), .m0_axi_rsp(model_cfg_rsp),
    .m1_axi_req(timer_req),     .m1_axi_rsp(timer_rsp)
  );

  hw_timer #(.PERIOD_RESET(TIMER_PERIOD_RESET)) u_timer (
    .clk, .rst_n, .s_axi_req(timer_req), .s_axi_rsp(timer_rsp), .start
  );

  chb_model u_model (
    .clk, .rst_n,
    .s_axi_req(model_cfg_req), .s_axi_rsp(model_cfg_rsp),
    .m_axi_req(model_arc_req), .m_axi_rsp(model_arc_rsp),
    .start, .irq, .state(model_state)
  );

  axi_interconnect_2 u_ic2 (
    .clk, .rst_n,
    .s0_axi_req(model_arc_req), .s0_axi_rsp(model_arc_rsp),
    .s1_axi_req(s_axi_dat_req), .s1_axi_rsp(s_axi_dat_rsp),
    .m_axi_req (bram_req),      .m_axi_rsp (bram_rsp)
  );

  axil_bram #(.WORDS(BRAM_WORDS)) u_bram (
    .clk, .rst_n, .s_axi_req(bram_req), .s_axi_rsp(bram_rsp)
  );

endmodule
