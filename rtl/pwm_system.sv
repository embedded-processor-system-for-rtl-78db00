// pwm_system: programmable-logic part of the four-channel controllable PWM processor system.
//
// A processor drives this system through one AXI4-Lite master port (gp0_req/gp0_rsp). It reads
// the wanted periods (array A0) from GPIO channel 1 and the wanted high times (array A1) from
// GPIO channel 2, copies A0[i] into LR0 and A1[i] into LR1 of timer i, writes 0x214 to both
// control registers of every timer and enables the counters. Each timer then produces a PWM
// train whose period is set by counter 0 and whose high time is set by counter 1; new LR values
// written during a period are used from the next one, so period and width can change pulse by
// pulse on all four channels at once.
//
// Contents: the interconnect (one master, six slaves), the block RAM controller with its 64 KB
// dual-port RAM, the two-channel GPIO, four timers and the reset generator, which turns the
// processor's reset (rst_n) into the interconnect and peripheral resets. Address map:
//   0x4000_0000  block RAM (64 KB)        0x4121_0000  GPIO
//   0x4280_0000  timer 0 (pwm0)           0x4281_0000  timer 1 (pwm0_c1)
//   0x4282_0000  timer 2 (pwm0_c2)        0x4283_0000  timer 3 (pwm0_c3)
// The capture and freeze inputs of the timers are unused in this system and tied low; the
// generate pulses and interrupts of the timers are brought out for observation. The processor
// itself is outside this module.
module pwm_system
  import axil_pkg::*;
#(
  parameter int unsigned N_TIMERS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t           gp0_req,
  output axil_rsp_t           gp0_rsp,
  input  logic [31:0]         gpio_io_i,
  output logic [31:0]         gpio_io_o,
  output logic [31:0]         gpio_io_t,
  input  logic [31:0]         gpio2_io_i,
  output logic [31:0]         gpio2_io_o,
  output logic [31:0]         gpio2_io_t,
  output logic                pwm0,
  output logic                pwm0_c1,
  output logic                pwm0_c2,
  output logic                pwm0_c3,
  output logic [N_TIMERS-1:0] generateout0,
  output logic [N_TIMERS-1:0] generateout1,
  output logic [N_TIMERS-1:0] interrupt
);

  logic interconnect_aresetn, peripheral_aresetn;

  proc_sys_reset u_rst (
    .slowest_sync_clk(clk), .ext_reset_in(rst_n), .aux_reset_in(1'b1),
    .mb_debug_sys_rst(1'b0), .dcm_locked(1'b1),
    .mb_reset(), .bus_struct_reset(), .peripheral_reset(),
    .interconnect_aresetn, .peripheral_aresetn
  );

  axil_req_t [SYS_N_SLAVES-1:0] m_req;
  axil_rsp_t [SYS_N_SLAVES-1:0] m_rsp;

  axil_interconnect #(.N_SLAVES(SYS_N_SLAVES)) u_periph (
    .clk, .rst_n(interconnect_aresetn), .s_req(gp0_req), .s_rsp(gp0_rsp), .m_req, .m_rsp
  );

  bram_port_t  bram_a, bram_b;
  logic [31:0] bram_b_dout;

  axi_bram_ctrl u_bram_ctrl (
    .clk, .rst_n(peripheral_aresetn),
    .s_axi_req(m_req[SLV_BRAM]), .s_axi_rsp(m_rsp[SLV_BRAM]),
    .bram_a, .bram_b, .bram_b_dout
  );

  bram_tdp u_bram (
    .clk, .a(bram_a), .a_dout(), .b(bram_b), .b_dout(bram_b_dout)
  );

  axi_gpio #(.WIDTH(32)) u_gpio (
    .clk, .rst_n(peripheral_aresetn),
    .s_axi_req(m_req[SLV_GPIO]), .s_axi_rsp(m_rsp[SLV_GPIO]),
    .gpio_io_i, .gpio_io_o, .gpio_io_t, .gpio2_io_i, .gpio2_io_o, .gpio2_io_t
  );

  logic [N_TIMERS-1:0] pwm;

  for (genvar t = 0; t < N_TIMERS; t++) begin : g_timer
    axi_timer u_timer (
      .clk, .rst_n(peripheral_aresetn),
      .s_axi_req(m_req[SLV_TIMER0 + t]), .s_axi_rsp(m_rsp[SLV_TIMER0 + t]),
      .capturetrig0(1'b0), .capturetrig1(1'b0), .freeze(1'b0),
      .generateout0(generateout0[t]), .generateout1(generateout1[t]),
      .pwm0(pwm[t]), .interrupt(interrupt[t])
    );
  end

  assign {pwm0_c3, pwm0_c2, pwm0_c1, pwm0} = pwm;

endmodule
