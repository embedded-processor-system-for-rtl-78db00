// axil_reg_port: AXI4-Lite slave front end for a register file or a memory.
//
// Turns single-beat AXI4-Lite transactions into a simple register port. A write is accepted
// when its address and data are both valid and no write response is pending: AWREADY and WREADY
// rise together for that clock, wr_en pulses with the address, data and strobes, and BVALID
// follows in the next clock and stays until BREADY. A read is accepted when ARVALID is high and
// no read is in flight: rd_en pulses with the address, the register side returns rd_data in the
// next clock, and RVALID holds it until RREADY. Responses are always OKAY. One write and one
// read may be in progress at the same time.
//
// Address and data arrive as full 32-bit values; ADDR_W low bits are passed on (a byte offset).
// Assertions check the AXI rule that a valid signal, once raised, stays up with stable payload
// until its ready.
module axil_reg_port
  import axil_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_axi_req,
  output axil_rsp_t         s_axi_rsp,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic [3:0]        wr_strb,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [31:0]       rd_data
);

  logic        bvalid_q;
  logic        rd_wait_q;   // rd_en was issued last clock, data arrives now
  logic        rvalid_q;
  logic [31:0] rdata_q;

  assign wr_en   = s_axi_req.awvalid && s_axi_req.wvalid && !bvalid_q;
  assign wr_addr = s_axi_req.awaddr[ADDR_W-1:0];
  assign wr_data = s_axi_req.wdata;
  assign wr_strb = s_axi_req.wstrb;

  assign rd_en   = s_axi_req.arvalid && !rd_wait_q && !rvalid_q;
  assign rd_addr = s_axi_req.araddr[ADDR_W-1:0];

  always_comb begin
    s_axi_rsp         = '0;
    s_axi_rsp.awready = wr_en;
    s_axi_rsp.wready  = wr_en;
    s_axi_rsp.bvalid  = bvalid_q;
    s_axi_rsp.bresp   = RESP_OKAY;
    s_axi_rsp.arready = rd_en;
    s_axi_rsp.rvalid  = rvalid_q;
    s_axi_rsp.rdata   = rdata_q;
    s_axi_rsp.rresp   = RESP_OKAY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q  <= 1'b0;
      rd_wait_q <= 1'b0;
      rvalid_q  <= 1'b0;
      rdata_q   <= '0;
    end else begin
      if (wr_en)                         bvalid_q <= 1'b1;
      else if (s_axi_req.bready)         bvalid_q <= 1'b0;
      rd_wait_q <= rd_en;
      if (rd_wait_q) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (s_axi_req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  // AXI handshake rules seen from the slave: a raised valid must wait for its ready.
  logic        aw_pend_q, ar_pend_q;
  logic [31:0] awaddr_q, araddr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_pend_q <= 1'b0;
      ar_pend_q <= 1'b0;
      awaddr_q  <= '0;
      araddr_q  <= '0;
    end else begin
      aw_pend_q <= s_axi_req.awvalid && !wr_en;
      ar_pend_q <= s_axi_req.arvalid && !rd_en;
      awaddr_q  <= s_axi_req.awaddr;
      araddr_q  <= s_axi_req.araddr;
      if (aw_pend_q)
        assert (s_axi_req.awvalid && s_axi_req.awaddr == awaddr_q)
          else $error("AXI: AWVALID dropped or AWADDR changed before AWREADY");
      if (ar_pend_q)
        assert (s_axi_req.arvalid && s_axi_req.araddr == araddr_q)
          else $error("AXI: ARVALID dropped or ARADDR changed before ARREADY");
    end
  end

endmodule
