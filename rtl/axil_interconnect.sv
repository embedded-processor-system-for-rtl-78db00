// axil_interconnect: one-master, N-slave AXI4-Lite interconnect with address decoding.
//
// Connects the processor's master port to the peripherals. A transaction is taken from the
// master, its address is compared with the 64 KB window of each slave (base addresses from
// axil_pkg), and it is replayed on the selected slave port; the slave's response is then handed
// back to the master. Only one transaction is in flight at a time; when a read and a write are
// offered in the same clock the read goes first. An address outside every window is answered
// by the interconnect itself with DECERR (read data 0). Every transaction costs a few clocks of
// latency (accept, forward, response, return), which is this design's choice: only the routing
// by address is the system's.
module axil_interconnect
  import axil_pkg::*;
#(
  parameter int unsigned N_SLAVES = axil_pkg::SYS_N_SLAVES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  axil_req_t                s_req,
  output axil_rsp_t                s_rsp,
  output axil_req_t [N_SLAVES-1:0] m_req,
  input  axil_rsp_t [N_SLAVES-1:0] m_rsp
);

  typedef enum logic [2:0] {
    IDLE, RD_ADDR, RD_DATA, RD_RESP, WR_REQ, WR_WAIT, WR_RESP
  } state_e;

  state_e                      state_q;
  logic [$clog2(N_SLAVES)-1:0] sel_q;
  logic [AXIL_AW-1:0]          addr_q;
  logic [AXIL_DW-1:0]          data_q;
  logic [3:0]                  strb_q;
  axil_resp_e                  resp_q;
  logic                        aw_done_q, w_done_q;

  // address decoding
  function automatic logic [N_SLAVES:0] decode(logic [AXIL_AW-1:0] addr);
    logic [N_SLAVES:0] hit;   // bit N_SLAVES: no slave
    hit = '0;
    for (int i = 0; i < N_SLAVES; i++)
      if ((addr & WINDOW_MASK) == SLAVE_BASE[i]) hit[i] = 1'b1;
    if (hit[N_SLAVES-1:0] == '0) hit[N_SLAVES] = 1'b1;
    return hit;
  endfunction

  function automatic logic [$clog2(N_SLAVES)-1:0] index_of(logic [N_SLAVES:0] hit);
    logic [$clog2(N_SLAVES)-1:0] idx;
    idx = '0;
    for (int i = 0; i < N_SLAVES; i++)
      if (hit[i]) idx = ($clog2(N_SLAVES))'(i);
    return idx;
  endfunction

  logic              take_rd, take_wr;
  logic [N_SLAVES:0] hit;

  assign take_rd = (state_q == IDLE) && s_req.arvalid;
  assign take_wr = (state_q == IDLE) && !s_req.arvalid && s_req.awvalid && s_req.wvalid;
  assign hit     = decode(take_rd ? s_req.araddr : s_req.awaddr);

  // master side
  always_comb begin
    s_rsp         = '0;
    s_rsp.arready = take_rd;
    s_rsp.awready = take_wr;
    s_rsp.wready  = take_wr;
    s_rsp.rvalid  = (state_q == RD_RESP);
    s_rsp.rdata   = data_q;
    s_rsp.rresp   = resp_q;
    s_rsp.bvalid  = (state_q == WR_RESP);
    s_rsp.bresp   = resp_q;
  end

  // slave side
  always_comb begin
    for (int i = 0; i < N_SLAVES; i++) begin
      m_req[i]        = '0;
      m_req[i].araddr = addr_q;
      m_req[i].awaddr = addr_q;
      m_req[i].wdata  = data_q;
      m_req[i].wstrb  = strb_q;
    end
    case (state_q)
      RD_ADDR: m_req[sel_q].arvalid = 1'b1;
      RD_DATA: m_req[sel_q].rready  = 1'b1;
      WR_REQ: begin
        m_req[sel_q].awvalid = !aw_done_q;
        m_req[sel_q].wvalid  = !w_done_q;
      end
      WR_WAIT: m_req[sel_q].bready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= IDLE;
      sel_q     <= '0;
      addr_q    <= '0;
      data_q    <= '0;
      strb_q    <= '0;
      resp_q    <= RESP_OKAY;
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
    end else begin
      case (state_q)
        IDLE: begin
          aw_done_q <= 1'b0;
          w_done_q  <= 1'b0;
          sel_q     <= index_of(hit);
          if (take_rd) begin
            addr_q <= s_req.araddr;
            data_q <= '0;
            resp_q <= RESP_DECERR;
            state_q <= hit[N_SLAVES] ? RD_RESP : RD_ADDR;
          end else if (take_wr) begin
            addr_q <= s_req.awaddr;
            data_q <= s_req.wdata;
            strb_q <= s_req.wstrb;
            resp_q <= RESP_DECERR;
            state_q <= hit[N_SLAVES] ? WR_RESP : WR_REQ;
          end
        end
        RD_ADDR: if (m_rsp[sel_q].arready) state_q <= RD_DATA;
        RD_DATA: if (m_rsp[sel_q].rvalid) begin
          data_q  <= m_rsp[sel_q].rdata;
          resp_q  <= m_rsp[sel_q].rresp;
          state_q <= RD_RESP;
        end
        RD_RESP: if (s_req.rready) state_q <= IDLE;
        WR_REQ: begin
          if (m_rsp[sel_q].awready) aw_done_q <= 1'b1;
          if (m_rsp[sel_q].wready)  w_done_q  <= 1'b1;
          if ((aw_done_q || m_rsp[sel_q].awready) && (w_done_q || m_rsp[sel_q].wready))
            state_q <= WR_WAIT;
        end
        WR_WAIT: if (m_rsp[sel_q].bvalid) begin
          resp_q  <= m_rsp[sel_q].bresp;
          state_q <= WR_RESP;
        end
        WR_RESP: if (s_req.bready) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
