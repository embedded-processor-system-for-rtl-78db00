// tb_timer_counter: self-checking test of one timer counter.
//
// Checks the count interval in down mode (LR+1 clocks) and up mode (2^32-LR clocks), the
// one-clock generate pulse one clock after each expiry and its gating by GENT, hold after one
// interval when ARHT=0, a new LR taking effect at the next reload, LOAD, freeze, restart with
// oneshot (PWM high-time use) and capture on a rising trigger edge only. Expected values are
// computed from the interval formulas, not read from the counter.
module tb_timer_counter;
  import timer_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  tcsr_t       csr;
  logic        en, freeze, capturetrig, restart, oneshot;
  logic [31:0] lr, count;
  logic        expire, capture, generateout;
  int          checks = 0, failures = 0;
  int          cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  timer_counter #(.WIDTH(32)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // record expiry and generate-pulse cycles, sampled mid-cycle
  int exp_t[$], gen_t[$], cap_t[$];
  always @(negedge clk) begin
    if (expire)      exp_t.push_back(cyc);
    if (generateout) gen_t.push_back(cyc);
    if (capture)     cap_t.push_back(cyc);
  end

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic clear_logs();
    exp_t.delete(); gen_t.delete(); cap_t.delete();
  endtask

  task automatic stop();
    en = 1'b0; restart = 1'b0; oneshot = 1'b0; idle(2); clear_logs();
  endtask

  initial begin
    csr = '0; en = 0; freeze = 0; capturetrig = 0; restart = 0; oneshot = 0; lr = '0;
    rst_n = 1'b0;
    idle(3);
    rst_n = 1'b1;
    idle(2);

    // 1. down count, auto reload: interval LR+1
    csr = '0; csr.udt = 1; csr.arht = 1; csr.gent = 1; lr = 32'd5;
    en = 1'b1;
    idle(40);
    check(exp_t.size() >= 5, "down: expiries seen");
    for (int i = 1; i < exp_t.size(); i++)
      check(exp_t[i] - exp_t[i-1] == 6, $sformatf("down: interval %0d", exp_t[i] - exp_t[i-1]));
    check(gen_t.size() == exp_t.size() || gen_t.size() == exp_t.size() - 1, "down: one pulse per expiry");
    for (int i = 0; i < gen_t.size(); i++)
      check(gen_t[i] == exp_t[i] + 1, "down: generateout one clock after expiry");
    // a new LR applies from the next reload
    clear_logs();
    lr = 32'd9;
    idle(40);
    for (int i = 2; i < exp_t.size(); i++)
      check(exp_t[i] - exp_t[i-1] == 10, $sformatf("down: new LR interval %0d", exp_t[i] - exp_t[i-1]));
    stop();

    // 2. up count, interval 2^32-LR
    csr = '0; csr.udt = 0; csr.arht = 1; csr.gent = 1; lr = 32'hFFFF_FFF9;   // 7 clocks
    en = 1'b1;
    idle(40);
    check(exp_t.size() >= 5, "up: expiries seen");
    for (int i = 1; i < exp_t.size(); i++)
      check(exp_t[i] - exp_t[i-1] == 7, $sformatf("up: interval %0d", exp_t[i] - exp_t[i-1]));
    stop();

    // 3. GENT=0: expiry without a generate pulse
    csr = '0; csr.udt = 1; csr.arht = 1; csr.gent = 0; lr = 32'd3;
    en = 1'b1;
    idle(20);
    check(exp_t.size() >= 3 && gen_t.size() == 0, "gent=0 suppresses generateout");
    stop();

    // 4. hold (ARHT=0): one expiry only, counter stays at its end value
    csr = '0; csr.udt = 1; csr.arht = 0; csr.gent = 1; lr = 32'd4;
    en = 1'b1;
    idle(30);
    check(exp_t.size() == 1, $sformatf("hold: %0d expiries", exp_t.size()));
    check(count == 32'd0, "hold: counter stays at 0");
    stop();

    // 5. LOAD keeps the counter at LR
    csr = '0; csr.udt = 1; csr.arht = 1; csr.gent = 1; csr.load = 1; lr = 32'd77;
    en = 1'b1;
    idle(10);
    check(count == 32'd77 && exp_t.size() == 0, "load holds the LR value");
    csr.load = 0;
    idle(5);
    check(count == 32'd72, $sformatf("counting after load released: %0d", count));
    // 6. freeze
    freeze = 1'b1;
    idle(10);
    check(count == 32'd72, "freeze halts the counter");
    freeze = 1'b0;
    idle(2);
    check(count == 32'd70, "counting after freeze");
    stop();

    // 7. restart + oneshot: one interval per restart
    csr = '0; csr.udt = 1; csr.arht = 1; csr.gent = 1; lr = 32'd6; oneshot = 1'b1;
    en = 1'b1;
    idle(20);
    clear_logs();
    restart = 1'b1; idle(1); restart = 1'b0;
    idle(30);
    check(exp_t.size() == 1, $sformatf("oneshot: %0d expiries after restart", exp_t.size()));
    if (exp_t.size() > 0) check(exp_t[0] == cyc - 30 + 6, "oneshot: interval LR+1 after restart");
    stop();

    // 8. capture on a rising edge of capturetrig only
    csr = '0; csr.mdt = 1; csr.capt = 1; csr.arht = 1; lr = 32'd0;
    en = 1'b1;
    idle(5);
    capturetrig = 1'b1;
    idle(6);
    capturetrig = 1'b0;
    idle(4);
    capturetrig = 1'b1;
    idle(1);
    capturetrig = 1'b0;
    idle(3);
    check(cap_t.size() == 2, $sformatf("capture: %0d events for two rising edges", cap_t.size()));
    check(exp_t.size() == 0, "capture mode: no generate expiry");
    csr.capt = 1'b0;
    capturetrig = 1'b1; idle(2); capturetrig = 1'b0; idle(2);
    check(cap_t.size() == 2, "capture disabled by CAPT=0");
    stop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
