// timer_counter: one 32-bit counter of the AXI timer (counter 0 or counter 1).
//
// In generate mode (MDT=0) the counter starts from its load register LR and counts up (UDT=0)
// towards all ones or down (UDT=1) towards zero. The clock in which it reaches that end value is
// the expiry: `expire` is high for that clock and, when GENT is set, `generateout` pulses for one
// clock in the following clock. After an expiry the counter reloads LR and goes on (ARHT=1) or
// stops and holds (ARHT=0, or `oneshot`). So one count interval lasts 2^WIDTH-LR clocks when
// counting up and LR+1 clocks when counting down; an LR value written during an interval is used
// from the next reload on, which is what allows the interval to change pulse by pulse.
//
// The counter loads LR and starts on a rising edge of `en`, while LOAD is set (it then stays at
// LR) and on `restart` (used by PWM mode to restart counter 1 at each expiry of counter 0).
// `freeze` halts counting. In capture mode (MDT=1) the counter runs freely and wraps, and a rising
// edge of `capturetrig` with CAPT set raises `capture` for one clock; the register block stores
// `count` into LR then.
//
// The enable, reload and capture rules follow the timer's register description; the interval
// offsets (no extra clocks), the start on the enable edge and the freeze behaviour are this
// design's own choices.
module timer_counter
  import timer_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  tcsr_t            csr,
  input  logic             en,
  input  logic [WIDTH-1:0] lr,
  input  logic             freeze,
  input  logic             capturetrig,
  input  logic             restart,
  input  logic             oneshot,
  output logic [WIDTH-1:0] count,
  output logic             expire,
  output logic             capture,
  output logic             generateout
);

  logic             en_q;
  logic             armed;     // counting in generate mode (cleared when holding)
  logic             trig_q;
  logic [WIDTH-1:0] end_value;
  logic             counting;

  assign end_value = csr.udt ? '0 : '1;
  assign counting  = en && en_q && armed && !freeze && !csr.load;  // not in the start clock
  assign expire    = counting && !csr.mdt && (count == end_value);
  assign capture   = en && csr.mdt && csr.capt && capturetrig && !trig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count       <= '0;
      en_q        <= 1'b0;
      armed       <= 1'b0;
      trig_q      <= 1'b0;
      generateout <= 1'b0;
    end else begin
      en_q        <= en;
      trig_q      <= capturetrig;
      generateout <= expire && csr.gent;
      if (csr.load || (en && !en_q) || restart) begin
        count <= lr;
        armed <= 1'b1;
      end else if (counting) begin
        if (expire) begin
          if (csr.arht && !oneshot) count <= lr;
          else                      armed <= 1'b0;
        end else if (csr.udt) begin
          count <= count - 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
