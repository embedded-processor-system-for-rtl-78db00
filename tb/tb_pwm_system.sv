// tb_pwm_system: end-to-end test of the four-channel PWM system at its default size.
//
// A bus-functional model takes the place of the processor and runs the PWM application:
// clear the control registers of the four timers, acquire A0[i] and A1[i] from GPIO channels 1
// and 2 in four read cycles (one per timer), load them into LR0/LR1 of timer i, write 0x214 to
// every control register and enable counter 0, then counter 1, of every timer. An external
// source drives the GPIO pins with the wanted intervals N encoded as 2^32-N, the value that
// gives an N-clock interval in up-count mode.
//
// Channel pwm0 then runs the five consecutive pulses of the published measurement (high times
// 2860, 162, 576, 2286, 4116 us; periods 5146, 4278, 3436, 2448, 4692 us; 20 ms in all) with a
// 100 MHz clock assumed, so one microsecond is 100 clocks: after each rising edge of pwm0 the
// program acquires the next pair from the GPIO and writes it into timer 0, and each pulse is
// checked to the clock. Channels pwm0_c1..c3 run a first data set and, part way through, a
// second one (a new data set introduced while running); their pulses are checked against the
// set in force. The test also writes and reads the block RAM, gets DECERR from an unmapped
// address and takes one timer interrupt. Each mechanism is counted and must occur.
module tb_pwm_system;
  import axil_pkg::*;
  import timer_pkg::*;

  localparam int CLK_PER_US = 100;   // assumed 100 MHz fabric clock

  logic        clk = 1'b0, rst_n;
  axil_req_t   gp0_req;
  axil_rsp_t   gp0_rsp;
  logic [31:0] gpio_io_i, gpio_io_o, gpio_io_t, gpio2_io_i, gpio2_io_o, gpio2_io_t;
  logic        pwm0, pwm0_c1, pwm0_c2, pwm0_c3;
  logic [3:0]  generateout0, generateout1, interrupt;
  longint      cyc = 0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  axil_bfm   ps  (.clk, .req(gp0_req), .rsp(gp0_rsp));
  pwm_system dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // ---------------------------------------------------------------- edge log per channel
  logic [3:0] pwm_v, pwm_q = '0;
  assign pwm_v = {pwm0_c3, pwm0_c2, pwm0_c1, pwm0};
  longint rise_t[4][$], fall_t[4][$];
  always @(negedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (pwm_v[c] && !pwm_q[c]) rise_t[c].push_back(cyc);
      if (!pwm_v[c] && pwm_q[c]) fall_t[c].push_back(cyc);
    end
    pwm_q <= pwm_v;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_gpio_reads = 0, n_lr_updates = 0, n_bram = 0, n_decerr = 0, n_irq = 0, n_newset = 0;

  axil_resp_e r;
  logic [31:0] d;

  function automatic logic [31:0] timer_base(int t);
    return SLAVE_BASE[SLV_TIMER0 + t];
  endfunction

  task automatic wr(input logic [31:0] a, input logic [31:0] v);
    ps.write(a, v, r);
    check(r == RESP_OKAY, $sformatf("write OKAY at %h", a));
  endtask

  // one read cycle of the acquisition: the source puts (period, high) on the pins,
  // the program reads channel 1 and channel 2
  task automatic acquire(input int period, input int high, output logic [31:0] a0, output logic [31:0] a1);
    @(negedge clk);
    gpio_io_i  = 32'(-period);
    gpio2_io_i = 32'(-high);
    repeat (3) @(negedge clk);
    ps.read(SLAVE_BASE[SLV_GPIO] + 32'h0, a0, r); check(r == RESP_OKAY, "GPIO read");
    ps.read(SLAVE_BASE[SLV_GPIO] + 32'h8, a1, r); check(r == RESP_OKAY, "GPIO2 read");
    check(a0 == 32'(-period) && a1 == 32'(-high), "acquired data equals the pins");
    n_gpio_reads += 2;
  endtask

  task automatic wait_rise(int c);
    int n = rise_t[c].size();
    while (rise_t[c].size() == n) @(negedge clk);
  endtask

  // pulse that starts at rise index i of channel c
  function automatic void pulse_of(int c, int i, output longint period, output longint high);
    period = rise_t[c][i+1] - rise_t[c][i];
    high = -1;
    foreach (fall_t[c][j]) if (high < 0 && fall_t[c][j] > rise_t[c][i]) high = fall_t[c][j] - rise_t[c][i];
  endfunction

  // Table of the five consecutive pulses on pwm0 (microseconds)
  int t3_high[5]   = '{2860, 162, 576, 2286, 4116};
  int t3_period[5] = '{5146, 4278, 3436, 2448, 4692};
  // channels 1..3, two data sets (clocks)
  int set_p[2][3] = '{'{30000, 45000, 60000}, '{25000, 50000, 35000}};
  int set_h[2][3] = '{'{10000, 30000, 15000}, '{20000, 5000, 17500}};

  logic [31:0] A0[4], A1[4];
  longint      t_switch_lo, t_switch_hi;
  int          first_rise0;

  initial begin
    gpio_io_i = '0; gpio2_io_i = '0;
    rst_n = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (25) @(negedge clk);   // reset generator hold time

    // boot memory
    for (int i = 0; i < 8; i++) wr(SLAVE_BASE[SLV_BRAM] + 32'(i * 4), 32'hC0DE_0000 + 32'(i));
    wr(SLAVE_BASE[SLV_BRAM] + 32'hFFFC, 32'h5A5A_A5A5);
    for (int i = 0; i < 8; i++) begin
      ps.read(SLAVE_BASE[SLV_BRAM] + 32'(i * 4), d, r);
      check(d == 32'hC0DE_0000 + 32'(i), "BRAM read back");
      n_bram++;
    end
    ps.read(SLAVE_BASE[SLV_BRAM] + 32'hFFFC, d, r);
    check(d == 32'h5A5A_A5A5, "BRAM last word");
    // unmapped address
    ps.read(32'h4290_0000, d, r);
    check(r == RESP_DECERR, "DECERR outside the address map");
    if (r == RESP_DECERR) n_decerr++;

    // the PWM application
    for (int t = 0; t < 4; t++) begin
      wr(timer_base(t) + OFS_CR0, 0);
      wr(timer_base(t) + OFS_CR1, 0);
    end
    acquire(t3_period[0] * CLK_PER_US, t3_high[0] * CLK_PER_US, A0[0], A1[0]);
    for (int t = 1; t < 4; t++) acquire(set_p[0][t-1], set_h[0][t-1], A0[t], A1[t]);
    for (int t = 0; t < 4; t++) wr(timer_base(t) + OFS_LR0, A0[t]);
    for (int t = 0; t < 4; t++) wr(timer_base(t) + OFS_LR1, A1[t]);
    for (int t = 0; t < 4; t++) begin
      wr(timer_base(t) + OFS_CR0, CSR_PWM_SETUP);
      wr(timer_base(t) + OFS_CR1, CSR_PWM_SETUP);
    end
    for (int t = 0; t < 4; t++) wr(timer_base(t) + OFS_CR0, CSR_PWM_SETUP | (32'd1 << CSR_ENT));
    for (int t = 0; t < 4; t++) wr(timer_base(t) + OFS_CR1, CSR_PWM_SETUP | (32'd1 << CSR_ENT));

    // pulse-by-pulse control of pwm0
    wait_rise(0);
    first_rise0 = rise_t[0].size() - 1;
    for (int k = 1; k < 5; k++) begin
      acquire(t3_period[k] * CLK_PER_US, t3_high[k] * CLK_PER_US, A0[0], A1[0]);
      wr(timer_base(0) + OFS_LR0, A0[0]);
      wr(timer_base(0) + OFS_LR1, A1[0]);
      n_lr_updates++;
      if (k == 2) begin
        // a new data set for the other three channels
        t_switch_lo = cyc;
        for (int t = 1; t < 4; t++) begin
          acquire(set_p[1][t-1], set_h[1][t-1], A0[t], A1[t]);
          wr(timer_base(t) + OFS_LR0, A0[t]);
          wr(timer_base(t) + OFS_LR1, A1[t]);
        end
        t_switch_hi = cyc;
        n_newset++;
      end
      wait_rise(0);
    end
    wait_rise(0);

    // the five pulses of pwm0, to the clock
    for (int k = 0; k < 5; k++) begin
      longint p, h;
      pulse_of(0, first_rise0 + k, p, h);
      check(p == longint'(t3_period[k] * CLK_PER_US),
            $sformatf("pwm0 pulse %0d: period %0d clocks, expected %0d", k + 1, p, t3_period[k] * CLK_PER_US));
      check(h == longint'(t3_high[k] * CLK_PER_US),
            $sformatf("pwm0 pulse %0d: high %0d clocks, expected %0d", k + 1, h, t3_high[k] * CLK_PER_US));
    end
    check(rise_t[0][first_rise0 + 5] - rise_t[0][first_rise0] == 64'd2_000_000, "five periods make 20 ms");

    // channels 1..3: pulses wholly before the switch use set 0, pulses starting one old period
    // after it use set 1
    for (int c = 1; c < 4; c++) begin
      int n_old = 0, n_new = 0;
      for (int i = 0; i + 1 < rise_t[c].size(); i++) begin
        longint p, h;
        pulse_of(c, i, p, h);
        if (rise_t[c][i+1] < t_switch_lo) begin
          check(p == set_p[0][c-1] && h == set_h[0][c-1],
                $sformatf("channel %0d set 1 pulse: %0d/%0d", c, h, p));
          n_old++;
        end else if (rise_t[c][i] > t_switch_hi + set_p[0][c-1] && h >= 0) begin
          check(p == set_p[1][c-1] && h == set_h[1][c-1],
                $sformatf("channel %0d set 2 pulse: %0d/%0d", c, h, p));
          n_new++;
        end
      end
      check(n_old >= 3 && n_new >= 3, $sformatf("channel %0d: %0d old and %0d new pulses checked", c, n_old, n_new));
    end

    // one interrupt: enable it on timer 2, counter 0
    wr(timer_base(2) + OFS_CR0, CSR_PWM_SETUP | (32'd1 << CSR_ENT) | (32'd1 << CSR_TINT) | (32'd1 << CSR_ENIT));
    wait (interrupt[2]);
    n_irq++;
    ps.read(timer_base(2) + OFS_CR0, d, r);
    check(d[CSR_TINT], "T0INT of timer 2 set");
    wr(timer_base(2) + OFS_CR0, CSR_PWM_SETUP | (32'd1 << CSR_ENT) | (32'd1 << CSR_TINT));
    check(!interrupt[2], "interrupt cleared");

    // every mechanism happened
    for (int c = 0; c < 4; c++)
      check(rise_t[c].size() >= 5, $sformatf("channel %0d produced %0d pulses", c, rise_t[c].size()));
    check(n_gpio_reads >= 16, "GPIO acquisitions");
    check(n_lr_updates == 4, "pulse-by-pulse updates of pwm0");
    check(n_newset == 1, "new data set introduced");
    check(n_bram >= 8, "BRAM accesses");
    check(n_decerr == 1, "decode error");
    check(n_irq == 1, "interrupt");
    $display("mechanisms: pwm pulses %0d/%0d/%0d/%0d, GPIO reads %0d, LR updates %0d, new sets %0d, BRAM reads %0d, DECERR %0d, interrupts %0d",
             rise_t[0].size(), rise_t[1].size(), rise_t[2].size(), rise_t[3].size(),
             n_gpio_reads, n_lr_updates, n_newset, n_bram, n_decerr, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
