// timer_regs: register file and interrupt control of one AXI timer.
//
// Holds the two control/status registers CR0, CR1 and the two load registers LR0, LR1, and
// decodes them for the counters. Register access is a simple write port (wr_en with byte strobes,
// applied at the clock edge) and a read port whose data appears in the clock after rd_en.
// Byte offsets: CR0 0x00, LR0 0x04, counter 0 0x08 (read only), CR1 0x10, LR1 0x14, counter 1
// 0x18 (read only); other offsets read 0.
//
// Interrupt control: the flag T0INT (bit 8) of a counter is set when that counter expires in
// generate mode or captures in capture mode, and is cleared by writing 1 to it; the interrupt
// output is high while any flag is set whose ENIT bit is set. A capture copies the counter value
// into its LR, except that with ARHT=0 (hold) a capture is dropped while the flag is still set.
// ENALL in either control register enables both counters.
//
// PWM mode is on when both control registers have PWM and GENT set and MDT clear. Then counter 1
// restarts at every expiry of counter 0 and stops after its own expiry, so pwm0 rises with the
// generate pulse of counter 0 and falls one counter-1 interval later.
//
// Bit positions follow the timer's register diagram; the offsets, the clearing rule and the
// capture hold rule are taken from the usual behaviour of this timer, since the description of
// the system does not give them.
module timer_regs
  import timer_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // register access
  input  logic             wr_en,
  input  logic [4:0]       wr_addr,
  input  logic [31:0]      wr_data,
  input  logic [3:0]       wr_strb,
  input  logic             rd_en,
  input  logic [4:0]       rd_addr,
  output logic [31:0]      rd_data,
  // to the counters
  output tcsr_t            csr0,
  output tcsr_t            csr1,
  output logic             en0,
  output logic             en1,
  output logic [WIDTH-1:0] lr0,
  output logic [WIDTH-1:0] lr1,
  output logic             pwm_mode,
  // from the counters
  input  logic [WIDTH-1:0] count0,
  input  logic [WIDTH-1:0] count1,
  input  logic             expire0,
  input  logic             expire1,
  input  logic             capture0,
  input  logic             capture1,
  output logic             interrupt
);

  logic [31:0] cr0_q, cr1_q;   // writable bits only, TINT kept apart
  logic        tint0, tint1;
  logic [31:0] wmask;

  always_comb begin
    for (int b = 0; b < 4; b++) wmask[8*b +: 8] = {8{wr_strb[b]}};
  end

  assign csr0 = decode_csr(cr0_q);
  assign csr1 = decode_csr(cr1_q);
  assign en0  = csr0.ent || csr0.enall || csr1.enall;
  assign en1  = csr1.ent || csr0.enall || csr1.enall;

  assign pwm_mode  = csr0.pwm && csr1.pwm && csr0.gent && csr1.gent && !csr0.mdt && !csr1.mdt;
  assign interrupt = (tint0 && csr0.enit) || (tint1 && csr1.enit);

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] data, logic [31:0] m);
    return (old & ~m) | (data & m);
  endfunction

  // the write data seen through the byte strobes, for write-one-to-clear bits
  logic [31:0] wbits;
  assign wbits = wr_data & wmask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr0_q <= '0;
      cr1_q <= '0;
      lr0   <= '0;
      lr1   <= '0;
      tint0 <= 1'b0;
      tint1 <= 1'b0;
    end else begin
      if (wr_en) begin
        case (wr_addr)
          OFS_CR0: cr0_q <= merge(cr0_q, wr_data, wmask & CSR_RW_MASK);
          OFS_CR1: cr1_q <= merge(cr1_q, wr_data, wmask & CSR_RW_MASK);
          OFS_LR0: lr0   <= WIDTH'(merge(32'(lr0), wr_data, wmask));
          OFS_LR1: lr1   <= WIDTH'(merge(32'(lr1), wr_data, wmask));
          default: ;
        endcase
      end
      // captured values go to the load registers (after a bus write of the same clock)
      if (capture0 && (csr0.arht || !tint0)) lr0 <= count0;
      if (capture1 && (csr1.arht || !tint1)) lr1 <= count1;
      // interrupt flags: an event in the same clock as a clearing write wins
      if (expire0 || capture0)                          tint0 <= 1'b1;
      else if (wr_en && wr_addr == OFS_CR0 && wbits[CSR_TINT]) tint0 <= 1'b0;
      if (expire1 || capture1)                          tint1 <= 1'b1;
      else if (wr_en && wr_addr == OFS_CR1 && wbits[CSR_TINT]) tint1 <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else if (rd_en) begin
      case (rd_addr)
        OFS_CR0:  rd_data <= cr0_q | (32'(tint0) << CSR_TINT);
        OFS_LR0:  rd_data <= 32'(lr0);
        OFS_CNT0: rd_data <= 32'(count0);
        OFS_CR1:  rd_data <= cr1_q | (32'(tint1) << CSR_TINT);
        OFS_LR1:  rd_data <= 32'(lr1);
        OFS_CNT1: rd_data <= 32'(count1);
        default:  rd_data <= '0;
      endcase
    end
  end

endmodule
