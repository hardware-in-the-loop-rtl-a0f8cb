// Testbench AXI4-Lite master: blocking write and read tasks, called
// hierarchically (u_bfm.write(...)). Each task drives its own channels, so one
// write and one read may run in parallel from different processes. Valid is
// held until ready, as the protocol requires; bready/rready are always high
// while a response is awaited.
module axil_tb_master
  import hil_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = AXIL_REQ_IDLE;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output logic [1:0] resp, input logic [3:0] strb = 4'hF);
    logic aw_done, w_done;
    aw_done = 1'b0;
    w_done  = 1'b0;
    @(posedge clk);
    req.awaddr  <= addr;
    req.awvalid <= 1'b1;
    req.wdata   <= data;
    req.wstrb   <= strb;
    req.wvalid  <= 1'b1;
    req.bready  <= 1'b1;
    do begin
      @(posedge clk);
      if (rsp.awready) begin aw_done = 1'b1; req.awvalid <= 1'b0; end
      if (rsp.wready)  begin w_done  = 1'b1; req.wvalid  <= 1'b0; end
    end while (!(aw_done && w_done));
    while (!rsp.bvalid) @(posedge clk);
    resp = rsp.bresp;
    req.bready <= 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    @(posedge clk);
    req.araddr  <= addr;
    req.arvalid <= 1'b1;
    req.rready  <= 1'b1;
    do @(posedge clk); while (!rsp.arready);
    req.arvalid <= 1'b0;
    while (!rsp.rvalid) @(posedge clk);
    data = rsp.rdata;
    resp = rsp.rresp;
    req.rready <= 1'b0;
  endtask

endmodule
