// proc_sys_reset: reset generator of the processor system's fabric.
//
// Any of the reset sources (ext_reset_in or aux_reset_in low, mb_debug_sys_rst high, dcm_locked
// low) asserts all outputs at once, without waiting for a clock. After the last source is
// released, the release passes a two-flop synchroniser and the outputs stay asserted for another
// HOLD_CYCLES clocks, then all deassert together in one clock edge. Outputs: active-high
// mb_reset, bus_struct_reset and peripheral_reset, active-low interconnect_aresetn and
// peripheral_aresetn. The system names this block and its ports; the polarities, the
// synchroniser and the hold time are this design's choices.
module proc_sys_reset #(
  parameter int unsigned HOLD_CYCLES = 16
) (
  input  logic slowest_sync_clk,
  input  logic ext_reset_in,
  input  logic aux_reset_in,
  input  logic mb_debug_sys_rst,
  input  logic dcm_locked,
  output logic mb_reset,
  output logic bus_struct_reset,
  output logic peripheral_reset,
  output logic interconnect_aresetn,
  output logic peripheral_aresetn
);

  localparam int unsigned CW = $clog2(HOLD_CYCLES + 1);

  logic          any_rst_n;
  logic [1:0]    sync_q;
  logic [CW-1:0] hold_q;
  logic          rst_q;

  assign any_rst_n = ext_reset_in && aux_reset_in && !mb_debug_sys_rst && dcm_locked;

  always_ff @(posedge slowest_sync_clk or negedge any_rst_n) begin
    if (!any_rst_n) begin
      sync_q <= '0;
      hold_q <= '0;
      rst_q  <= 1'b1;
    end else begin
      sync_q <= {sync_q[0], 1'b1};
      if (sync_q[1]) begin
        if (hold_q == CW'(HOLD_CYCLES)) rst_q  <= 1'b0;
        else                            hold_q <= hold_q + 1'b1;
      end
    end
  end

  assign mb_reset             = rst_q;
  assign bus_struct_reset     = rst_q;
  assign peripheral_reset     = rst_q;
  assign interconnect_aresetn = !rst_q;
  assign peripheral_aresetn   = !rst_q;

endmodule
