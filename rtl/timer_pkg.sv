// timer_pkg: register layout of the AXI timer.
//
// Each timer has two counters; each counter has a control/status register (CR0, CR1) and a
// load register (LR0, LR1). The bit positions of the control/status register are those of the
// timer documentation (MDT 0 ... ENALL 10, CASC 11); the byte offsets of the registers follow
// the common layout of this timer (CR at +0x00, LR at +0x04, counter value at +0x08, counter 1
// block at +0x10). CASC (cascade) is listed but not implemented: it reads as 0.
package timer_pkg;

  localparam int unsigned CSR_MDT   = 0;   // 0 generate, 1 capture
  localparam int unsigned CSR_UDT   = 1;   // 0 up count, 1 down count
  localparam int unsigned CSR_GENT  = 2;   // enable external generate signal
  localparam int unsigned CSR_CAPT  = 3;   // enable external capture trigger
  localparam int unsigned CSR_ARHT  = 4;   // 1 auto reload, 0 hold
  localparam int unsigned CSR_LOAD  = 5;   // load counter from LR while set
  localparam int unsigned CSR_ENIT  = 6;   // enable interrupt
  localparam int unsigned CSR_ENT   = 7;   // enable counter
  localparam int unsigned CSR_TINT  = 8;   // interrupt flag, write 1 to clear
  localparam int unsigned CSR_PWM   = 9;   // enable PWM
  localparam int unsigned CSR_ENALL = 10;  // enable both counters
  localparam int unsigned CSR_CASC  = 11;  // cascade, not implemented

  // Writable bits of a control/status register (TINT is write-one-to-clear, CASC absent).
  localparam logic [31:0] CSR_RW_MASK = 32'h0000_06FF;

  // Value the PWM program writes to both control registers: PWM, ARHT, GENT (up count).
  localparam logic [31:0] CSR_PWM_SETUP = 32'h0000_0214;

  // Byte offsets inside the 64 KB window of a timer.
  localparam logic [4:0] OFS_CR0  = 5'h00;
  localparam logic [4:0] OFS_LR0  = 5'h04;
  localparam logic [4:0] OFS_CNT0 = 5'h08;
  localparam logic [4:0] OFS_CR1  = 5'h10;
  localparam logic [4:0] OFS_LR1  = 5'h14;
  localparam logic [4:0] OFS_CNT1 = 5'h18;

  // Decoded control bits of one counter.
  typedef struct packed {
    logic pwm;
    logic enall;
    logic ent;
    logic enit;
    logic load;
    logic arht;
    logic capt;
    logic gent;
    logic udt;
    logic mdt;
  } tcsr_t;

  function automatic tcsr_t decode_csr(logic [31:0] r);
    tcsr_t c;
    c.pwm   = r[CSR_PWM];
    c.enall = r[CSR_ENALL];
    c.ent   = r[CSR_ENT];
    c.enit  = r[CSR_ENIT];
    c.load  = r[CSR_LOAD];
    c.arht  = r[CSR_ARHT];
    c.capt  = r[CSR_CAPT];
    c.gent  = r[CSR_GENT];
    c.udt   = r[CSR_UDT];
    c.mdt   = r[CSR_MDT];
    return c;
  endfunction

endpackage
