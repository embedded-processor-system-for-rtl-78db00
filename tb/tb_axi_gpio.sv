// tb_axi_gpio: self-checking test of the two-channel GPIO.
//
// With both channels as inputs (reset state) reads random pin values on channel 1 and channel 2
// (the A0 and A1 acquisition of the PWM application), checks the tristate reset value, then
// turns half of channel 2 into outputs and checks the driven pins, the read-back mix of pins and
// output register, and byte-strobed writes.
module tb_axi_gpio;
  import axil_pkg::*;

  logic        clk = 1'b0, rst_n;
  axil_req_t   req;
  axil_rsp_t   rsp;
  logic [31:0] gpio_io_i, gpio_io_o, gpio_io_t, gpio2_io_i, gpio2_io_o, gpio2_io_t;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  axil_bfm bfm (.clk, .req, .rsp);
  axi_gpio #(.WIDTH(32)) dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp),
    .gpio_io_i, .gpio_io_o, .gpio_io_t, .gpio2_io_i, .gpio2_io_o, .gpio2_io_t);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [31:0] BASE = 32'h4121_0000;
  axil_resp_e  r;
  logic [31:0] d;

  initial begin
    gpio_io_i = '0; gpio2_io_i = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(gpio_io_t == '1 && gpio2_io_t == '1, "all pins are inputs after reset");
    bfm.read(BASE + 4, d, r); check(d == '1, "TRI reads all ones");
    for (int i = 0; i < 20; i++) begin
      logic [31:0] v1, v2;
      v1 = $urandom; v2 = $urandom;
      gpio_io_i = v1; gpio2_io_i = v2;
      repeat (3) @(negedge clk);   // two synchroniser flops
      bfm.read(BASE + 0, d, r); check(d == v1 && r == RESP_OKAY, $sformatf("channel 1 read %h expected %h", d, v1));
      bfm.read(BASE + 8, d, r); check(d == v2 && r == RESP_OKAY, $sformatf("channel 2 read %h expected %h", d, v2));
    end
    // outputs on the low half of channel 2
    bfm.write(BASE + 32'hC, 32'hFFFF_0000, r);
    bfm.write(BASE + 8, 32'h1234_5678, r);
    check(gpio2_io_t == 32'hFFFF_0000, "TRI2 written");
    check(gpio2_io_o == 32'h1234_5678, "DATA2 drives the output register");
    gpio2_io_i = 32'hABCD_0000;
    repeat (3) @(negedge clk);
    bfm.read(BASE + 8, d, r); check(d == 32'hABCD_5678, $sformatf("mixed read %h", d));
    bfm.write_strb(BASE + 8, 32'h0000_9900, 4'b0010, r);
    check(gpio2_io_o == 32'h1234_9978, "byte strobe on DATA2");
    check(gpio_io_o == 32'h0 && gpio_io_t == '1, "channel 1 untouched");
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
