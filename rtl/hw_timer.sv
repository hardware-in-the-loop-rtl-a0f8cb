// Hardware timer that paces the hardware-in-the-loop simulation.
//
// A counter runs 0, 1, ..., L and wraps to 0; at every wrap from L to 0 it
// emits a one-cycle `start` pulse that launches one simulation step of the CHB
// model, so the step period is L+1 clock cycles (3 us for the reset value
// L = 299 at a 10 ns clock). The period must exceed the model's step latency.
// Software configures the timer over AXI4-Lite:
//   0x0 CTRL   bit0 enable (counter held at 0 while disabled)   read/write
//   0x4 PERIOD L                                                read/write
//   0x8 COUNT  current count                                    read only
//   0xC STARTS number of start pulses issued since reset        read only
// Counting from 0 to L with the pulse at the wrap follows the timing diagram of
// the design; the register map and the disabled reset state are this design's
// own. A new PERIOD takes effect at once; a count already above it wraps at
// the next cycle.
module hw_timer
  import hil_pkg::*;
#(
  parameter logic [31:0] PERIOD_RESET = 32'd299
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp,
  output logic      start
);

  logic              wr_en, rd_en;
  logic [AXI_AW-1:0] wr_addr, rd_addr;
  logic [AXI_DW-1:0] wr_data, rd_data;
  logic [3:0]        wr_strb;

  axil_slave_port u_port (
    .clk, .rst_n, .s_axi_req, .s_axi_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  logic        enable;
  logic [31:0] period, count, starts;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable <= 1'b0;
      period <= PERIOD_RESET;
      count  <= '0;
      starts <= '0;
      start  <= 1'b0;
    end else begin
      start <= 1'b0;
      if (!enable) begin
        count <= '0;
      end else if (count >= period) begin
        count  <= '0;
        start  <= 1'b1;
        starts <= starts + 32'd1;
      end else begin
        count <= count + 32'd1;
      end
      if (wr_en && wr_strb == 4'hF) begin
        case (wr_addr[3:2])
          2'd0: enable <= wr_data[0];
          2'd1: period <= wr_data;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (rd_addr[3:2])
      2'd0:    rd_data = {31'd0, enable};
      2'd1:    rd_data = period;
      2'd2:    rd_data = count;
      default: rd_data = starts;
    endcase
  end

endmodule
