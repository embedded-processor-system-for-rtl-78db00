// tb_proc_sys_reset: self-checking test of the reset generator.
//
// Checks that each reset source asserts all outputs at once without a clock edge, that the
// outputs are released exactly 2+HOLD_CYCLES+1 clocks after the last source goes away, and the
// polarity of every output.
module tb_proc_sys_reset;
  localparam int HOLD = 16;
  logic clk = 1'b0;
  logic ext_reset_in, aux_reset_in, mb_debug_sys_rst, dcm_locked;
  logic mb_reset, bus_struct_reset, peripheral_reset, interconnect_aresetn, peripheral_aresetn;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  proc_sys_reset #(.HOLD_CYCLES(HOLD)) dut (.slowest_sync_clk(clk), .*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_asserted();
    return mb_reset && bus_struct_reset && peripheral_reset && !interconnect_aresetn && !peripheral_aresetn;
  endfunction
  function automatic bit all_released();
    return !mb_reset && !bus_struct_reset && !peripheral_reset && interconnect_aresetn && peripheral_aresetn;
  endfunction

  // clocks from release of the sources to release of the outputs
  task automatic measure(output int n);
    n = 0;
    while (!all_released() && n < 100) begin @(negedge clk); n++; end
  endtask

  int n;

  initial begin
    ext_reset_in = 0; aux_reset_in = 1; mb_debug_sys_rst = 0; dcm_locked = 1;
    #3;
    check(all_asserted(), "asserted during external reset");
    repeat (3) @(negedge clk);
    ext_reset_in = 1;
    measure(n);
    check(n == HOLD + 3, $sformatf("release after %0d clocks, expected %0d", n, HOLD + 3));
    repeat (5) @(negedge clk);
    check(all_released(), "stays released");
    // each source asserts asynchronously
    #2 aux_reset_in = 0; #1 check(all_asserted(), "aux_reset_in asserts");
    @(negedge clk); aux_reset_in = 1; measure(n); check(n == HOLD + 3, "release after aux reset");
    #2 mb_debug_sys_rst = 1; #1 check(all_asserted(), "mb_debug_sys_rst asserts");
    @(negedge clk); mb_debug_sys_rst = 0; measure(n); check(n == HOLD + 3, "release after debug reset");
    #2 dcm_locked = 0; #1 check(all_asserted(), "loss of lock asserts");
    @(negedge clk); dcm_locked = 1; measure(n); check(n == HOLD + 3, "release after lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
