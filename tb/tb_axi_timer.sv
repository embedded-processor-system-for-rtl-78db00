// tb_axi_timer: self-checking test of one AXI timer through its AXI4-Lite port.
//
// Programs the timer as the PWM application does (LR0, LR1, 0x214 into both control registers,
// then enable counter 0 and counter 1) and measures pwm0: period 2^32-LR0 and high time
// 2^32-LR1 clocks in up-count mode, LR0+1 and LR1+1 in down-count mode. Changes LR0/LR1 once per
// period and checks that every following pulse takes the new values (pulse-by-pulse control).
// Also checks one generateout pulse of each counter per period, the interrupt with ENIT and its
// clearing, freeze, and a capture of the counter into LR0.
module tb_axi_timer;
  import axil_pkg::*;
  import timer_pkg::*;

  logic      clk = 1'b0, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  logic      capturetrig0 = 1'b0, capturetrig1 = 1'b0, freeze = 1'b0;
  logic      generateout0, generateout1, pwm0, interrupt;
  int        checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  axil_bfm  bfm (.clk, .req, .rsp);
  axi_timer #(.WIDTH(32)) dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp),
    .capturetrig0, .capturetrig1, .freeze, .generateout0, .generateout1, .pwm0, .interrupt);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // pwm edge log
  int   rise_t[$], fall_t[$], g0_t[$], g1_t[$];
  logic pwm_q = 1'b0;
  always @(negedge clk) begin
    if (pwm0 && !pwm_q) rise_t.push_back(cyc);
    if (!pwm0 && pwm_q) fall_t.push_back(cyc);
    if (generateout0) g0_t.push_back(cyc);
    if (generateout1) g1_t.push_back(cyc);
    pwm_q <= pwm0;
  end

  axil_resp_e r;
  logic [31:0] d;

  task automatic wr(input logic [4:0] ofs, input logic [31:0] v);
    bfm.write({27'h0, ofs}, v, r);
    check(r == RESP_OKAY, "write response OKAY");
  endtask

  // wait for n more rising edges of pwm0
  task automatic wait_rises(int n);
    int target = rise_t.size() + n;
    while (rise_t.size() < target) @(negedge clk);
  endtask

  // check the pulses that started at rise index first..last-1 (period measured to the next rise)
  task automatic check_pulses(int first, int last, int period, int high, string tag);
    for (int i = first; i < last; i++) begin
      int h = -1;
      foreach (fall_t[j]) if (fall_t[j] > rise_t[i] && h < 0) h = fall_t[j] - rise_t[i];
      check(rise_t[i+1] - rise_t[i] == period,
            $sformatf("%s: period %0d expected %0d", tag, rise_t[i+1] - rise_t[i], period));
      check(h == high, $sformatf("%s: high %0d expected %0d", tag, h, high));
    end
  endtask

  int n0, periods[5], highs[5];

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // up count, as programmed by the application: CR = 0x214
    wr(OFS_CR0, 0); wr(OFS_CR1, 0);
    wr(OFS_LR0, -32'sd120); wr(OFS_LR1, -32'sd45);
    wr(OFS_CR0, CSR_PWM_SETUP); wr(OFS_CR1, CSR_PWM_SETUP);
    wr(OFS_CR0, CSR_PWM_SETUP | 32'h80); wr(OFS_CR1, CSR_PWM_SETUP | 32'h80);
    wait_rises(5);
    check_pulses(rise_t.size() - 4, rise_t.size() - 1, 120, 45, "up 120/45");
    n0 = g0_t.size();
    wait_rises(2);
    check(g0_t.size() - n0 == 2, "one generateout0 per period");
    check(g1_t.size() >= 2, "generateout1 pulses");

    // pulse-by-pulse: new LR values in every period
    periods = '{150, 90, 200, 70, 130};
    highs   = '{20, 60, 190, 10, 100};
    wait_rises(1);
    n0 = rise_t.size();
    for (int k = 0; k < 5; k++) begin
      wr(OFS_LR0, 32'(-periods[k])); wr(OFS_LR1, 32'(-highs[k]));
      wait_rises(1);
    end
    wait_rises(1);
    // the values written after rise n0-1+k show from rise n0+k on
    for (int k = 0; k < 5; k++)
      check_pulses(n0 + k, n0 + k + 1, periods[k], highs[k], $sformatf("pulse %0d", k));

    // down count: CR = 0x216 gives period LR0+1, high LR1+1
    wr(OFS_CR0, 32'h216); wr(OFS_CR1, 32'h216);
    wr(OFS_LR0, 99); wr(OFS_LR1, 29);
    wr(OFS_CR0, 32'h296); wr(OFS_CR1, 32'h296);
    wait_rises(5);
    check_pulses(rise_t.size() - 4, rise_t.size() - 1, 100, 30, "down 99/29");

    // interrupt of counter 0
    wr(OFS_CR0, 32'h396);   // clear T0INT, keep running
    check(!interrupt, "no interrupt while ENIT=0");
    wr(OFS_CR0, 32'h3D6);   // ENIT
    wait_rises(1);
    repeat (2) @(negedge clk);
    check(interrupt, "interrupt after expiry with ENIT=1");
    bfm.read(32'h0, d, r);
    check(d[CSR_TINT], "T0INT reads 1");
    wr(OFS_CR0, 32'h1D6 | 32'h200);
    check(!interrupt || g0_t[$] >= cyc - 3, "interrupt cleared by writing 1 to T0INT");

    // freeze halts the counters
    @(negedge clk); freeze = 1'b1;
    bfm.read(32'h8, d, r);
    repeat (20) @(negedge clk);
    begin
      logic [31:0] d2;
      bfm.read(32'h8, d2, r);
      check(d2 == d, "freeze holds counter 0");
    end
    @(negedge clk); freeze = 1'b0;
    repeat (5) @(negedge clk);
    begin
      logic [31:0] d2;
      bfm.read(32'h8, d2, r);
      check(d2 != d, "counter 0 runs after freeze");
    end

    // capture: counter 0 free-running up, capture on capturetrig0
    wr(OFS_CR0, 32'h100); wr(OFS_CR1, 0);
    wr(OFS_LR0, 0);
    wr(OFS_CR0, 32'h099);   // ENT, ARHT, CAPT, MDT
    repeat (50) @(negedge clk);
    capturetrig0 = 1'b1;
    @(negedge clk);
    capturetrig0 = 1'b0;
    bfm.read({27'h0, OFS_LR0}, d, r);
    check(d > 40 && d < 80, $sformatf("capture stored counter value %0d in LR0", d));
    bfm.read({27'h0, OFS_CR0}, d, r);
    check(d[CSR_TINT], "capture sets T0INT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
