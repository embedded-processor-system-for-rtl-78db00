// tb_bram_tdp: self-checking test of the dual-port block RAM at its full 64 KB size.
//
// Writes random words through both ports (with random byte enables) into a reference array,
// reads them back through both ports and checks the one-clock read latency, read-first
// behaviour and that the top and bottom words of the 16384-word array are distinct locations.
module tb_bram_tdp;
  import axil_pkg::*;

  localparam int DEPTH = 16384;
  logic        clk = 1'b0;
  bram_port_t  a, b;
  logic [31:0] a_dout, b_dout;
  logic [31:0] model [int];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_tdp #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] we);
    for (int i = 0; i < 4; i++) if (we[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  initial begin
    a = '0; b = '0;
    // initialise the words used, through port A, all bytes
    for (int i = 0; i < 64; i++) begin
      int unsigned addr;
      addr = (i < 32) ? i : DEPTH - 64 + i;
      @(negedge clk);
      a.en = 1; a.we = 4'hF; a.addr = BRAM_AW'(addr); a.din = $urandom;
      model[addr] = a.din;
    end
    @(negedge clk); a = '0;
    // random traffic on both ports (distinct addresses in one clock)
    for (int n = 0; n < 2000; n++) begin
      int unsigned aa, ba;
      logic [31:0] exp_a, exp_b;
      aa = $urandom_range(0, 63);
      ba = $urandom_range(0, 63);
      aa = (aa < 32) ? aa : DEPTH - 64 + aa;
      ba = (ba < 32) ? ba : DEPTH - 64 + ba;
      if (ba == aa) ba = (ba == 0) ? 1 : 0;
      @(negedge clk);
      a.en = 1; a.addr = BRAM_AW'(aa); a.we = $urandom; a.din = $urandom;
      b.en = 1; b.addr = BRAM_AW'(ba); b.we = $urandom; b.din = $urandom;
      exp_a = model[aa]; exp_b = model[ba];   // read first: old contents
      model[aa] = merge(model[aa], a.din, a.we);
      model[ba] = merge(model[ba], b.din, b.we);
      @(negedge clk);
      a.en = 0; b.en = 0;
      check(a_dout == exp_a, $sformatf("port A read %h expected %h", a_dout, exp_a));
      check(b_dout == exp_b, $sformatf("port B read %h expected %h", b_dout, exp_b));
    end
    // dout holds while the port is idle
    @(negedge clk);
    a.en = 1; a.we = 0; a.addr = 5;
    @(negedge clk);
    a.en = 0; a.addr = 6;
    repeat (3) @(negedge clk);
    check(a_dout == model[5], "dout holds when en is low");
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
