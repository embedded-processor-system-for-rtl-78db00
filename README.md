# Four-channel PWM generator with per-pulse control of period and width

Most PWM generators fix the period and let software vary only the duty cycle. This system
controls both the period and the high time of every pulse, on four channels at once. Each channel
is a general-purpose timer with two 32-bit counters. Counter 0 measures the period and counter 1
the high time. A processor reads the wanted values from a two-channel GPIO port and writes them
into the counters' load registers. Because a counter reloads its load register at the end of each
interval, a value written during one pulse shapes the next pulse. Period and width can therefore
change pulse by pulse, in response to an external control word.

The original system is a Zynq-7000 device: two Cortex-A9 cores in the processing system, and the
peripherals below in the programmable logic. This RTL covers the programmable-logic part.
The processor is outside it, and its AXI master port is a port of the top module `pwm_system`.

```
                 gp0_req/gp0_rsp (AXI4-Lite from the processor)
                              |
                     axil_interconnect  (1 master, 6 slaves, address decode)
      +-----------+-----------+-----------+-----------+-----------+
      |           |           |           |           |           |
 axi_bram_ctrl axi_timer 0 axi_timer 1 axi_timer 2 axi_timer 3  axi_gpio
      |  A   B    pwm0       pwm0_c1     pwm0_c2     pwm0_c3    ch1 (A0) ch2 (A1)
   bram_tdp (64 KB)
 proc_sys_reset: processor reset -> interconnect and peripheral resets
```

| Address window (64 KB each) | Slave | Output |
|---|---|---|
| 0x4000_0000 - 0x4000_FFFF | block RAM controller (boot memory) | |
| 0x4280_0000 - 0x4280_FFFF | timer 0 | pwm0 |
| 0x4281_0000 - 0x4281_FFFF | timer 1 | pwm0_c1 |
| 0x4282_0000 - 0x4282_FFFF | timer 2 | pwm0_c2 |
| 0x4283_0000 - 0x4283_FFFF | timer 3 | pwm0_c3 |
| 0x4121_0000 - 0x4121_FFFF | GPIO | |

Any other address gets a DECERR response from the interconnect.

## How one channel makes a pulse

A timer (`axi_timer`) holds an AXI4-Lite register interface (`axil_reg_port`), a register file
with interrupt control (`timer_regs`), two counters (`timer_counter`) and the PWM stage
(`pwm_gen`).

**Counter.** A counter starts from its load register LR. It counts up towards 0xFFFF_FFFF
(UDT=0) or down towards 0 (UDT=1). The clock in which it reaches that end value is its *expiry*.
After an expiry it reloads LR and continues (ARHT=1), or stops (ARHT=0). With GENT=1 the counter
emits a one-clock pulse on `generateoutN` in the clock after each expiry. One interval therefore
lasts:

* up count: 2^32 - LR clocks;
* down count: LR + 1 clocks.

The processor loads a channel with the wanted interval N as LR = 2^32 - N. The control value
0x214 selects up count.

**PWM mode.** PWM mode is on when PWM and GENT are set and MDT is clear in both control
registers. In this mode:

1. Counter 0 runs continuously and sets the period.
2. At every expiry of counter 0, counter 1 reloads LR1 and starts. When it expires, it stops
   and waits for the next expiry of counter 0.
3. `pwm0` goes high in the clock after a `generateout0` pulse and low in the clock after a
   `generateout1` pulse.

```
clock            ...|E0 |   |   |...|E1 |   |...|E0 |
counter 0 expiry     ^                           ^          E0: reload LR0, restart counter 1
generateout0          _|~|_____________________________|~|_
counter 1 expiry                      ^                     E1: counter 1 stops
generateout1          ___________________|~|_______________
pwm0                  ___|~~~~~~~~~~~~~~~~~~|______________|~~
                         <- interval 1 ---->
                         <------------- interval 0 ------------>
```

So, with CR = 0x214, the period is 2^32 - LR0 clocks and the high time is 2^32 - LR1 clocks.
The pulse train starts with the first expiry of counter 0 after the counters are enabled. If both
generate pulses arrive in the same clock, the set wins, so a high time equal to the period gives a
constant high level. A high time longer than the period also gives a constant high level.

**Pulse-by-pulse update.** A new LR0 or LR1 written during a pulse takes effect at the next expiry
of counter 0, which is the start of the next pulse. To shape pulse k+1, the processor waits for the
rising edge of pulse k (or the counter-0 interrupt), then writes the next pair. The interval gives
it plenty of time: an AXI write through the interconnect takes about 10 clocks. LR0 and LR1 are
two separate writes, so keep both inside one period. If an expiry falls between the two writes,
that one pulse gets the new period with the old width.

**Starting.** Setting ENT (or ENALL) loads LR into the counter and starts it. Because of that, the
first interval is as long as all the later ones. LOAD=1 holds the counter at LR for as long as it
is set. The `freeze` input halts both counters.

**Capture mode** (MDT=1) is not used by the PWM application but is implemented. The counter
runs freely. A rising edge of `capturetrigN` with CAPT=1 copies the count into LR and sets
T0INT. With ARHT=0, further captures are dropped until T0INT is cleared.

## Timer registers

Byte offsets in a timer's window: CR0 0x00, LR0 0x04, counter 0 0x08 (read only),
CR1 0x10, LR1 0x14, counter 1 0x18 (read only).

| Bit | Name | Meaning |
|---|---|---|
| 0 | MDT | 0 generate, 1 capture |
| 1 | UDT | 0 up count, 1 down count |
| 2 | GENT | enable the generateout pulse |
| 3 | CAPT | enable the capture trigger input |
| 4 | ARHT | 1 auto reload, 0 hold after one interval / one capture |
| 5 | LOAD | hold the counter at LR |
| 6 | ENIT | enable the interrupt |
| 7 | ENT | enable the counter (a rising edge loads LR and starts) |
| 8 | T0INT | set by expiry or capture; write 1 to clear |
| 9 | PWM | enable PWM (needed in both CRs) |
| 10 | ENALL | set in either CR: both counters enabled |
| 11 | CASC | not implemented, reads 0 |

`interrupt` is high while a T0INT flag is set whose ENIT is set.

## Programming sequence

This is what the application on the processor does, and what `tb/tb_pwm_system.sv` does in its
place:

1. Write 0 to CR0 and CR1 of the four timers.
2. Do four GPIO read cycles. In cycle i, read channel 1 (offset 0x0) as A0[i], the period word of
   timer i, and channel 2 (offset 0x8) as A1[i], its high-time word.
3. Write A0[i] to LR0 and A1[i] to LR1 of timer i.
4. Write 0x214 to all eight control registers.
5. Set ENT (0x294) in CR0 of every timer, then in CR1.
6. From then on, write new A0/A1 values at any time to change the following pulses.

The GPIO (`axi_gpio`) has, per channel, a data register and a tristate register. TRI resets to
all ones, so every pin starts as an input. Registers: DATA 0x0, TRI 0x4, DATA2 0x8, TRI2 0xC.
Pins pass through a two-flop synchroniser, so a pin change is visible to a read issued three
clocks later.

## The other blocks

* `axil_interconnect` handles one transaction at a time. A read offered in the same clock as a
  write goes first. Each transaction is latched, replayed on the selected slave, and its
  response returned. Expect about 6 to 8 clocks per access.
* `axi_bram_ctrl` writes through RAM port A and reads through port B. `bram_tdp` is a 16384 x
  32-bit true dual-port RAM with byte enables and one-clock, read-first reads. It is not
  initialised.
* `proc_sys_reset` asserts all resets at once from any source: `ext_reset_in` or `aux_reset_in`
  low, `mb_debug_sys_rst` high, or `dcm_locked` low. It releases them 2 + HOLD_CYCLES + 1 clocks
  after the last source goes away. The top feeds it the processor reset `rst_n`. The timers and
  the GPIO can be accessed about 20 clocks after `rst_n` rises.
* `axil_reg_port` is the shared AXI4-Lite slave front end. It checks with assertions that a
  raised AWVALID or ARVALID stays up, with a stable address, until it is accepted.
* Shared types are in `axil_pkg`: the bus structs `axil_req_t`/`axil_rsp_t`, the RAM port
  `bram_port_t` and the address map. `timer_pkg` holds the register layout.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/axil_bfm.sv` is the AXI4-Lite master model that replaces the
processor. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/axil_pkg.sv rtl/timer_pkg.sv tb/tb_pwm_system.sv --top-module tb_pwm_system
./obj_dir/Vtb_pwm_system
```

`tb_pwm_system` runs the whole system at its default size and takes about 2 seconds. It runs the
programming sequence, then reproduces a published five-pulse measurement on pwm0 at an assumed
100 MHz clock. The five high times and periods, in microseconds, are 2860/5146, 162/4278,
576/3436, 2286/2448 and 4116/4692, which add up to 20 ms. Each pulse is checked to the clock.
Meanwhile channels 1 to 3 switch from one data set to another, and the test also covers the boot
RAM, a DECERR and a timer interrupt. It counts each of these events and fails if one never
happens.

The other testbenches are `tb_axi_timer`, `tb_timer_counter`, `tb_timer_regs`, `tb_pwm_gen`,
`tb_axil_interconnect`, `tb_axi_bram_ctrl`, `tb_bram_tdp`, `tb_axi_gpio` and `tb_proc_sys_reset`.
Together they cover both count directions, hold, LOAD, freeze, capture, interrupt flags, byte
strobes, slave error forwarding and reset timing.

## What is taken from the original system and what is not

These parts follow the original description:

* the block set and the address map;
* the four output names;
* the two counters per timer, with load and control/status registers;
* the control-register bit positions and the value 0x214;
* the rule that counter 0 sets the period and counter 1 the high time, with pwm0 set by
  generateout0 and cleared by generateout1;
* the two GPIO channels carrying A0 and A1;
* the 32-bit counters;
* the 64 KB two-port RAM;
* the programming sequence.

These are choices of this implementation, because the original does not give them:

* **Clock frequency.** None is given. The quoted period range of 15 ns to 60 s implies a clock
  period of roughly 14 to 15 ns (2^32 clocks is about 60 s). The end-to-end test uses 100 MHz,
  where 32 bits reach 42.9 s.
* **Exact interval length.** This RTL uses 2^32 - LR clocks up and LR + 1 clocks down, with no
  extra clocks. A vendor timer core of this kind adds a fixed offset of about two clocks, so LR
  values taken from such a system would be off by that offset here.
* **Register offsets and GPIO layout.** These follow the usual layout of those peripheral cores.
* **Start on the enable edge.** The enable edge loads LR. The original sequence enables the
  counters without a LOAD step.
* **Behaviour of the lightly described bits.** This covers ENALL (enables both counters), the
  T0INT clearing rule, the capture hold rule, and `freeze`.
* **Behaviour of the glue blocks.** The interconnect policy (one transaction at a time, reads
  first, DECERR) and the reset generator (polarities, hold time) are this design's own.
* **Port-set differences.** The interconnect has the six address-mapped slave ports; the
  original block diagram draws seven master ports. CASC (cascade mode) is named in the register
  diagram but not described, so it is not implemented. Timer clock and reset ports are called
  `clk`/`rst_n` rather than `s_axi_aclk`/`s_axi_aresetn`. The bus is a single-beat AXI4-Lite
  subset carried in structs.
* **Unconnected timer inputs.** `capturetrig0/1` and `freeze` are not connected in the original
  system and are tied low in the top. `generateout0/1` and `interrupt` are brought out for
  observation.

Not included: the processor system (CPU cores, caches, DDR3 controller and memory, fixed I/O),
the C application that runs on it, and the on-chip logic analyzer used to observe the signals.
