// axil_bfm: AXI4-Lite master model for the testbenches; it stands in for the processor.
//
// Tasks write(addr, data, resp) and read(addr, data, resp) each run one single-beat
// transaction. Signals change at the falling clock edge and handshakes complete at the rising
// edge; ready signals are sampled one time unit after the falling edge, once they have settled. `write_strb` writes with byte strobes.
module axil_bfm
  import axil_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write_strb(input logic [31:0] addr, input logic [31:0] data,
                            input logic [3:0] strb, output axil_resp_e resp);
    logic aw_done, w_done, aw_hs, w_hs;
    @(negedge clk);
    req.awvalid = 1'b1; req.awaddr = addr;
    req.wvalid  = 1'b1; req.wdata  = data; req.wstrb = strb;
    aw_done = 1'b0; w_done = 1'b0;
    while (!(aw_done && w_done)) begin
      #1;  // let the slave's ready settle
      aw_hs = req.awvalid && rsp.awready;
      w_hs  = req.wvalid && rsp.wready;
      @(posedge clk);
      @(negedge clk);
      if (aw_hs) begin aw_done = 1'b1; req.awvalid = 1'b0; end
      if (w_hs)  begin w_done  = 1'b1; req.wvalid  = 1'b0; end
    end
    req.bready = 1'b1;
    while (!rsp.bvalid) @(negedge clk);
    resp = rsp.bresp;
    @(posedge clk);
    @(negedge clk);
    req.bready = 1'b0;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data, output axil_resp_e resp);
    write_strb(addr, data, 4'hF, resp);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data, output axil_resp_e resp);
    logic hs;
    @(negedge clk);
    req.arvalid = 1'b1; req.araddr = addr;
    hs = 1'b0;
    while (!hs) begin
      #1;
      hs = rsp.arready;
      @(posedge clk);
      @(negedge clk);
    end
    req.arvalid = 1'b0;
    req.rready  = 1'b1;
    while (!rsp.rvalid) @(negedge clk);
    data = rsp.rdata;
    resp = rsp.rresp;
    @(posedge clk);
    @(negedge clk);
    req.rready = 1'b0;
  endtask

endmodule
