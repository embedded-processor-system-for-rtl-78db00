// tb_timer_regs: self-checking test of the timer register file and interrupt control.
//
// Writes and reads back CR0/LR0/CR1/LR1 (with byte strobes and the masked bits), reads the
// counter values, checks the decoded control bits, ENALL enabling both counters, PWM-mode
// decoding, setting of T0INT on expiry and capture, write-one-to-clear, the interrupt output
// gated by ENIT, and the capture-into-LR rule with hold.
module tb_timer_regs;
  import timer_pkg::*;

  logic        clk = 1'b0, rst_n;
  logic        wr_en, rd_en;
  logic [4:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;
  tcsr_t       csr0, csr1;
  logic        en0, en1, pwm_mode, interrupt;
  logic [31:0] lr0, lr1, count0, count1;
  logic        expire0, expire1, capture0, capture1;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  timer_regs #(.WIDTH(32)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = a; wr_data = d; wr_strb = s;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = a;
    @(negedge clk);
    rd_en = 1'b0;
    d = rd_data;
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1'b1; @(negedge clk); sig = 1'b0;
  endtask

  logic [31:0] d;

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0; wr_strb = 0;
    count0 = 32'h1234_5678; count1 = 32'h9ABC_DEF0;
    expire0 = 0; expire1 = 0; capture0 = 0; capture1 = 0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    rd(OFS_CR0, d); check(d == 0, "CR0 resets to 0");
    wr(OFS_LR0, 32'hDEAD_BEEF); rd(OFS_LR0, d); check(d == 32'hDEAD_BEEF && lr0 == 32'hDEAD_BEEF, "LR0 write/read");
    wr(OFS_LR1, 32'h0102_0304); rd(OFS_LR1, d); check(d == 32'h0102_0304 && lr1 == 32'h0102_0304, "LR1 write/read");
    wr(OFS_LR1, 32'hAAAA_AAAA, 4'b0010); rd(OFS_LR1, d); check(d == 32'h0102_AA04, "LR1 byte strobe");
    rd(OFS_CNT0, d); check(d == 32'h1234_5678, "counter 0 read");
    rd(OFS_CNT1, d); check(d == 32'h9ABC_DEF0, "counter 1 read");
    rd(5'h0C, d); check(d == 0, "unused offset reads 0");

    // the PWM set-up value of the system
    wr(OFS_CR0, CSR_PWM_SETUP); wr(OFS_CR1, CSR_PWM_SETUP);
    rd(OFS_CR0, d); check(d == 32'h214, "CR0 = 0x214");
    check(csr0.pwm && csr0.arht && csr0.gent && !csr0.udt && !csr0.mdt && !csr0.ent, "0x214 decodes to PWM, ARHT, GENT");
    check(pwm_mode, "PWM mode with 0x214 in both CRs");
    check(!en0 && !en1, "counters not yet enabled");
    wr(OFS_CR0, 32'h294); check(en0 && !en1, "ENT of CR0 enables counter 0 only");
    wr(OFS_CR1, 32'h294); check(en0 && en1, "ENT of CR1 enables counter 1");
    wr(OFS_CR1, 32'h215); check(!pwm_mode, "MDT in CR1 leaves PWM mode");
    wr(OFS_CR0, 32'h0); wr(OFS_CR1, 32'h0);
    wr(OFS_CR0, 32'h400); check(en0 && en1, "ENALL enables both counters");
    rd(OFS_CR0, d); check(d == 32'h400, "ENALL reads back");
    wr(OFS_CR0, 32'hFFFF_F9FF); rd(OFS_CR0, d); check(d == 32'h0000_00FF, "reserved, CASC and T0INT bits read 0");
    wr(OFS_CR0, 32'h0);

    // interrupt flags
    pulse(expire0);
    rd(OFS_CR0, d); check(d[CSR_TINT], "T0INT set by expiry of counter 0");
    check(!interrupt, "no interrupt while ENIT=0");
    wr(OFS_CR0, 32'h040); check(interrupt, "interrupt with ENIT=1");
    wr(OFS_CR0, 32'h140); rd(OFS_CR0, d); check(!d[CSR_TINT] && d[CSR_ENIT], "write 1 clears T0INT");
    check(!interrupt, "interrupt cleared");
    wr(OFS_CR1, 32'h040); pulse(expire1); check(interrupt, "interrupt from counter 1");
    wr(OFS_CR1, 32'h040); check(interrupt, "writing 0 to T0INT keeps it");
    wr(OFS_CR1, 32'h140); check(!interrupt, "counter 1 flag cleared");

    // capture into LR
    wr(OFS_CR0, 32'h019);  // MDT, CAPT, ARHT
    count0 = 32'h0000_1111; pulse(capture0); check(lr0 == 32'h1111, "capture loads LR0");
    count0 = 32'h0000_2222; pulse(capture0); check(lr0 == 32'h2222, "ARHT=1: capture overwrites LR0");
    wr(OFS_CR0, 32'h109);  // MDT, CAPT, hold; clear the flag
    count0 = 32'h0000_3333; pulse(capture0); check(lr0 == 32'h3333, "hold: first capture taken");
    count0 = 32'h0000_4444; pulse(capture0); check(lr0 == 32'h3333, "hold: capture dropped while T0INT set");
    wr(OFS_CR0, 32'h109);
    pulse(capture0); check(lr0 == 32'h4444, "hold: capture taken after T0INT cleared");

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
