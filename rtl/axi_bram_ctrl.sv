// axi_bram_ctrl: AXI4-Lite controller of the 64 KB block RAM.
//
// Maps 32-bit reads and writes in its 64 KB window onto the two ports of the block RAM: writes
// go out on port A (byte strobes become byte write enables), reads on port B, whose data comes
// back in the next clock and is returned on the R channel. The window offset is divided by four
// to give the word address. Using one port per direction is this design's choice; both ports
// of the RAM are wired to the controller in the system.
module axi_bram_ctrl
  import axil_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_axi_req,
  output axil_rsp_t   s_axi_rsp,
  output bram_port_t  bram_a,
  output bram_port_t  bram_b,
  input  logic [31:0] bram_b_dout
);

  logic        wr_en, rd_en;
  logic [15:0] wr_addr, rd_addr;
  logic [31:0] wr_data;
  logic [3:0]  wr_strb;

  axil_reg_port #(.ADDR_W(16)) u_axi (
    .clk, .rst_n, .s_axi_req, .s_axi_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data(bram_b_dout)
  );

  always_comb begin
    bram_a      = '0;
    bram_a.en   = wr_en;
    bram_a.we   = wr_en ? wr_strb : 4'b0;
    bram_a.addr = wr_addr[BRAM_AW+1:2];
    bram_a.din  = wr_data;
    bram_b      = '0;
    bram_b.en   = rd_en;
    bram_b.addr = rd_addr[BRAM_AW+1:2];
  end

endmodule
