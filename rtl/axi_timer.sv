// axi_timer: one AXI timer with two 32-bit counters and a PWM output.
//
// The timer is programmed over AXI4-Lite. Counter 0 and counter 1 each run from their load
// register (LR0, LR1) under their control/status register (CR0, CR1); each emits a one-clock
// pulse on generateout0/generateout1 at the end of its count interval. With PWM enabled in both
// control registers, pwm0 rises after each pulse of counter 0 and falls after the pulse of
// counter 1, which is restarted by counter 0: the period is the interval of counter 0 and the
// high time the interval of counter 1. With the set-up value 0x214 (PWM, auto reload, generate
// enabled, up count) the period is 2^32-LR0 clocks and the high time 2^32-LR1 clocks. LR values
// written during a period apply from the next period on. The interrupt output follows the T0INT
// flags of the two counters, each gated by its ENIT bit.
//
// Structure: AXI interface, timer registers with interrupt control, two counters, PWM stage.
// Apart from clk and rst_n, ports carry the names of the timer core. freeze halts both counters;
// capturetrig0/1 are the capture inputs used in capture mode. Register read data comes back two
// clocks after ARVALID.
module axi_timer
  import axil_pkg::*;
  import timer_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp,
  input  logic      capturetrig0,
  input  logic      capturetrig1,
  input  logic      freeze,
  output logic      generateout0,
  output logic      generateout1,
  output logic      pwm0,
  output logic      interrupt
);

  logic             wr_en, rd_en;
  logic [4:0]       wr_addr, rd_addr;
  logic [31:0]      wr_data, rd_data;
  logic [3:0]       wr_strb;
  tcsr_t            csr0, csr1;
  logic             en0, en1, pwm_mode;
  logic [WIDTH-1:0] lr0, lr1, count0, count1;
  logic             expire0, expire1, capture0, capture1;

  axil_reg_port #(.ADDR_W(5)) u_axi (
    .clk, .rst_n, .s_axi_req, .s_axi_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  timer_regs #(.WIDTH(WIDTH)) u_regs (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data,
    .csr0, .csr1, .en0, .en1, .lr0, .lr1, .pwm_mode,
    .count0, .count1, .expire0, .expire1, .capture0, .capture1,
    .interrupt
  );

  timer_counter #(.WIDTH(WIDTH)) u_cnt0 (
    .clk, .rst_n, .csr(csr0), .en(en0), .lr(lr0), .freeze,
    .capturetrig(capturetrig0), .restart(1'b0), .oneshot(1'b0),
    .count(count0), .expire(expire0), .capture(capture0), .generateout(generateout0)
  );

  // in PWM mode counter 1 measures the high time from each expiry of counter 0
  timer_counter #(.WIDTH(WIDTH)) u_cnt1 (
    .clk, .rst_n, .csr(csr1), .en(en1), .lr(lr1), .freeze,
    .capturetrig(capturetrig1), .restart(pwm_mode && expire0), .oneshot(pwm_mode),
    .count(count1), .expire(expire1), .capture(capture1), .generateout(generateout1)
  );

  pwm_gen u_pwm (
    .clk, .rst_n, .enable(pwm_mode), .gen0(generateout0), .gen1(generateout1), .pwm(pwm0)
  );

endmodule
