// Step controller of the CHB model: the IDL / RUN / RDY handshake between the
// hardware timer, the model and the system software.
//
// After a step finishes (`step_done`) the controller is IDL and holds `irq`
// high until software acknowledges. A timer `start` in IDL launches a new step
// (pulse on `go`, state RUN) only if the acknowledge of the previous step has
// already arrived; otherwise the start is remembered and the state is RDY, and
// the acknowledge then launches the step at once. Starts that arrive while a
// step runs, or while one is already waiting in RDY, are dropped and counted in
// `missed`; starts that had to wait in RDY are counted in `deferred`. The
// states and their order follow the design's timing diagram; the counters, the
// level-type IRQ and the reset state (IDL, acknowledge considered received) are
// this design's own. `enable` low blocks new steps. All outputs are registered
// except `state`, which is the state register itself.
module chb_ctrl
  import hil_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         start,
  input  logic         ack,
  input  logic         step_done,
  output logic         go,
  output logic         irq,
  output model_state_e state,
  output logic [31:0]  deferred,
  output logic [31:0]  missed
);

  logic acked;  // acknowledge of the previous step received

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDL;
      acked    <= 1'b1;
      irq      <= 1'b0;
      go       <= 1'b0;
      deferred <= '0;
      missed   <= '0;
    end else begin
      go <= 1'b0;
      unique case (state)
        ST_IDL: begin
          if (ack) begin
            acked <= 1'b1;
            irq   <= 1'b0;
          end
          if (start && enable) begin
            if (acked || ack) begin
              state <= ST_RUN;
              go    <= 1'b1;
              acked <= 1'b0;
            end else begin
              state    <= ST_RDY;
              deferred <= deferred + 32'd1;
            end
          end
        end
        ST_RUN: begin
          if (start) missed <= missed + 32'd1;
          if (step_done) begin
            state <= ST_IDL;
            irq   <= 1'b1;
          end
        end
        ST_RDY: begin
          if (ack && enable) begin
            state <= ST_RUN;
            go    <= 1'b1;
            irq   <= 1'b0;
          end else if (ack) begin
            state <= ST_IDL;
            acked <= 1'b1;
            irq   <= 1'b0;
          end
          if (start) missed <= missed + 32'd1;
        end
        default: state <= ST_IDL;
      endcase
    end
  end

  // A step only completes while it runs.
  a_done_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    step_done |-> state == ST_RUN);

endmodule
