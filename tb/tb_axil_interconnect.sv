// tb_axil_interconnect: self-checking test of the address-decoding interconnect.
//
// Six slave models with random ready delays (address and data accepted in separate clocks) each
// keep a small memory. The test writes to and reads from every window of the address map and
// checks that each transaction reaches only the slave of its window, that read data and
// responses come back unchanged (a slave answers SLVERR at offset 0xFFFC to check response
// forwarding), and that addresses outside every window get DECERR without reaching any slave.
module tb_axil_interconnect;
  import axil_pkg::*;

  localparam int NS = SYS_N_SLAVES;
  logic      clk = 1'b0, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  axil_req_t [NS-1:0] m_req;
  axil_rsp_t [NS-1:0] m_rsp;
  int        checks = 0, failures = 0;
  int        wr_hits[NS], rd_hits[NS];

  always #5 clk = ~clk;

  axil_bfm          bfm (.clk, .req, .rsp);
  axil_interconnect #(.N_SLAVES(NS)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .m_req, .m_rsp);

  // slave models
  for (genvar s = 0; s < NS; s++) begin : g_slv
    logic [31:0] mem [16];
    logic        aw_got, w_got;
    logic [31:0] aw_addr, w_data;
    int          b_delay, r_delay;
    logic [31:0] r_addr;
    logic        r_pend;
    initial begin
      m_rsp[s] = '0; aw_got = 0; w_got = 0; r_pend = 0; b_delay = 0; r_delay = 0;
      foreach (mem[i]) mem[i] = {s[7:0], 20'h0, i[3:0]};
    end
    always @(posedge clk) begin
      // write address/data acceptance
      if (m_req[s].awvalid && m_rsp[s].awready) begin aw_got <= 1; aw_addr <= m_req[s].awaddr; wr_hits[s]++; end
      if (m_req[s].wvalid && m_rsp[s].wready)   begin w_got <= 1;  w_data <= m_req[s].wdata; end
      m_rsp[s].awready <= !aw_got && !(m_req[s].awvalid && m_rsp[s].awready) && ($urandom_range(0, 2) == 0);
      m_rsp[s].wready  <= !w_got && !(m_req[s].wvalid && m_rsp[s].wready) && ($urandom_range(0, 2) == 0);
      if (aw_got && w_got && !m_rsp[s].bvalid) begin
        if (b_delay == 0) begin
          mem[aw_addr[5:2]] <= w_data;
          m_rsp[s].bvalid <= 1;
          m_rsp[s].bresp  <= (aw_addr[15:0] == 16'hFFFC) ? RESP_SLVERR : RESP_OKAY;
          b_delay <= $urandom_range(0, 3);
        end else b_delay <= b_delay - 1;
      end
      if (m_rsp[s].bvalid && m_req[s].bready) begin
        m_rsp[s].bvalid <= 0; aw_got <= 0; w_got <= 0;
      end
      // reads
      if (m_req[s].arvalid && m_rsp[s].arready) begin r_pend <= 1; r_addr <= m_req[s].araddr; rd_hits[s]++; end
      m_rsp[s].arready <= !r_pend && !(m_req[s].arvalid && m_rsp[s].arready) && !m_rsp[s].rvalid && ($urandom_range(0, 2) == 0);
      if (r_pend && !m_rsp[s].rvalid) begin
        if (r_delay == 0) begin
          m_rsp[s].rvalid <= 1;
          m_rsp[s].rdata  <= mem[r_addr[5:2]];
          m_rsp[s].rresp  <= (r_addr[15:0] == 16'hFFFC) ? RESP_SLVERR : RESP_OKAY;
          r_delay <= $urandom_range(0, 3);
        end else r_delay <= r_delay - 1;
      end
      if (m_rsp[s].rvalid && m_req[s].rready) begin m_rsp[s].rvalid <= 0; r_pend <= 0; end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  axil_resp_e  r;
  logic [31:0] d;
  int          before_w[NS], before_r[NS];

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < NS; s++) begin
        logic [31:0] a, v;
        a = SLAVE_BASE[s] + 32'(4 * $urandom_range(0, 15));
        v = $urandom;
        before_w = wr_hits;
        bfm.write(a, v, r);
        check(r == RESP_OKAY, $sformatf("write OKAY at %h", a));
        for (int k = 0; k < NS; k++)
          check(wr_hits[k] - before_w[k] == (k == s), $sformatf("write at %h reached slave %0d", a, k));
        before_r = rd_hits;
        bfm.read(a, d, r);
        check(r == RESP_OKAY && d == v, $sformatf("read back %h at %h expected %h", d, a, v));
        for (int k = 0; k < NS; k++)
          check(rd_hits[k] - before_r[k] == (k == s), $sformatf("read at %h reached slave %0d", a, k));
      end
    end
    // slave error responses are forwarded
    bfm.read(SLAVE_BASE[2] + 32'hFFFC, d, r);
    check(r == RESP_SLVERR, "SLVERR forwarded on read");
    bfm.write(SLAVE_BASE[4] + 32'hFFFC, 32'h1, r);
    check(r == RESP_SLVERR, "SLVERR forwarded on write");
    // unmapped addresses
    before_w = wr_hits; before_r = rd_hits;
    bfm.read(32'h4122_0000, d, r);
    check(r == RESP_DECERR && d == 0, "DECERR on unmapped read");
    bfm.write(32'h4284_0000, 32'h5, r);
    check(r == RESP_DECERR, "DECERR on unmapped write");
    bfm.read(32'h0000_0000, d, r);
    check(r == RESP_DECERR, "DECERR at address 0");
    check(wr_hits == before_w && rd_hits == before_r, "unmapped accesses reach no slave");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
