// tb_axi_bram_ctrl: self-checking test of the BRAM controller together with the 64 KB RAM.
//
// Writes words over AXI4-Lite across the whole 64 KB window (first, last and random words, some
// with partial byte strobes), reads them back and compares with a reference array; checks that
// writes use port A and reads port B, and that every response is OKAY.
module tb_axi_bram_ctrl;
  import axil_pkg::*;

  logic        clk = 1'b0, rst_n;
  axil_req_t   req;
  axil_rsp_t   rsp;
  bram_port_t  bram_a, bram_b;
  logic [31:0] bram_b_dout, a_dout;
  logic [31:0] model [int];
  int          checks = 0, failures = 0, a_writes = 0, b_reads = 0, a_reads = 0, b_writes = 0;

  always #5 clk = ~clk;

  axil_bfm      bfm  (.clk, .req, .rsp);
  axi_bram_ctrl dut  (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp), .bram_a, .bram_b, .bram_b_dout);
  bram_tdp      bram (.clk, .a(bram_a), .a_dout, .b(bram_b), .b_dout(bram_b_dout));

  always @(posedge clk) begin
    if (bram_a.en && bram_a.we != 0) a_writes++;
    if (bram_a.en && bram_a.we == 0) a_reads++;
    if (bram_b.en && bram_b.we == 0) b_reads++;
    if (bram_b.en && bram_b.we != 0) b_writes++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned addrs[$];
  axil_resp_e  r;
  logic [31:0] d;

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    addrs = '{32'h4000_0000, 32'h4000_FFFC, 32'h4000_0004, 32'h4000_8000};
    repeat (40) addrs.push_back(32'h4000_0000 | ($urandom_range(0, 16383) << 2));
    foreach (addrs[i]) begin
      logic [31:0] v;
      v = $urandom;
      bfm.write(addrs[i], v, r);
      check(r == RESP_OKAY, "write OKAY");
      model[addrs[i] & 32'hFFFF] = v;
    end
    // partial write of the second byte of the first word
    bfm.write_strb(32'h4000_0000, 32'h0000_AB00, 4'b0010, r);
    model[0][15:8] = 8'hAB;
    foreach (addrs[i]) begin
      bfm.read(addrs[i], d, r);
      check(r == RESP_OKAY, "read OKAY");
      check(d == model[addrs[i] & 32'hFFFF],
            $sformatf("read %h at %h expected %h", d, addrs[i], model[addrs[i] & 32'hFFFF]));
    end
    check(a_writes == addrs.size() + 1 && a_reads == 0, "writes go through port A");
    check(b_reads == addrs.size() && b_writes == 0, "reads go through port B");
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
