# VDD-hopping controller

A processor running a frame-based real-time task, such as a video codec,
usually finishes each frame well before its deadline and then idles. Power
goes as f·VDD², so it is cheaper to run the whole frame slowly at a low supply
voltage than to run it fast and then wait. *VDD-hopping* does this with an
unmodified, off-the-shelf processor and only **two** operating points:

| point | clock | supply |
|-------|-------|--------|
| fast  | fmax (200 MHz on the reference system)   | VDDmax = 2.0 V |
| slow  | fmax/2 (100 MHz)                          | VDDmin = 1.2 V |

The speed decision is made in software, timeslot by timeslot. The task is cut
into timeslots with known worst-case execution times (WCETs). Before each
timeslot the software checks whether that timeslot can run at half speed and
still leave room for the rest at full speed in the worst case. The hardware
then only has to switch the supply rail and the clock on request, keep the
processor halted while they change, and give the software a clock to read.
This repository holds that hardware: a small controller chip
(`vdd_hopping_lsi`) that sits on the processor's I/O bus.

With these two points and the typical load of the reference MPEG4 codec
(about half the worst case), the processor spent 8 % of its time at fmax,
86 % at fmax/2 and 6 % asleep. The processor then averaged 0.21 W. Running
continuously at 200 MHz and 2.0 V it draws 0.8 W.

## What the controller contains

```
                 bus (cs, we, addr, wdata, rdata)
                        |
        +---------------+-----------------------------------------------+
        | addr_decoder x8  ->  register strobes (Dec ps, Dec cfs, ...)   |
        |                                                                |
        |  PS  --> power_switch_ctrl --gates--> power_switch_model --> VDD line
        |          (2 request flops, 2 turn-off timers)   (2 pMOS switches)
        |  CFS --> clock_freq_selector <-- clk_2fmax                     |
        |          (flop, hold-back timer, sync, /2 /4, glitch-free mux) --> clk_out
        |  TIME    current_time_timer (free-running, loadable)           |
        |  WAKE    wakeup_timer  --> int_req / <-- int_ack               |
        +----------------------------------------------------------------+
```

| file | role |
|------|------|
| `rtl/hop_pkg.sv` | register map, widths, gate/clock types, 66-cycle overlap constant |
| `rtl/vdd_hopping_lsi.sv` | top: decoders, timer-setting registers, read-back, the blocks below |
| `rtl/power_switch_ctrl.sv` | gate request flops and make-before-break turn-off timers |
| `rtl/power_switch_model.sv` | **behavioural model** of the two power switches and the VDD line |
| `rtl/clock_freq_selector.sv` | fmax / fmax/2 generation and switching from the 2·fmax clock |
| `rtl/current_time_timer.sv` | time base read by the software |
| `rtl/wakeup_timer.sv` | wakes the sleeping processor with an interrupt |
| `rtl/prog_timer.sv` | the programmable one-shot timer used four times |
| `rtl/addr_decoder.sv` | the configurable address decoder |

Everything except `power_switch_model` is synthesizable. In the real chip the
switches are two comb-shaped pMOS transistors with a gate width of
270,000 µm each. That width keeps the drop across a switch below 0.05 V at
the processor's 0.13 A load at 1.2 V. The model only reports which rail the
VDD line is on (in mV), with flags for the overlap and cut-off states. It
does not model the slow rise and fall of the line: under 100 µs rising and
under 200 µs falling with 30 µF of decoupling.

## A hop, step by step

This is the part that needs care. Two hazards drive the design:

* **The VDD line must never float.** If both switches are off, even briefly,
  the decoupling capacitance discharges into the processor. The line sags
  below VDDmin and the processor can hang. A short period with *both*
  switches on is harmless: the decoupling capacitance absorbs the
  rail-to-rail current. The reference boards used a 2 µs overlap.
* **The processor must not execute while f or VDD changes.** Nor may it ever
  run at fmax while the line is still at VDDmin.

The controller handles these as follows.

1. **Make before break.** Software writes both gate levels in one write to
   `PS`. A switch asked to turn **on** does so at that clock edge. A switch
   asked to turn **off** waits for its own programmable timer (`TOV_MAX`,
   `TOV_MIN`; reset value 66 cycles = 2 µs at 33 MHz). A single write
   therefore overlaps the two switches for exactly the programmed time, in
   either direction. A new "on" request for a switch whose turn-off is still
   pending cancels the turn-off.
2. **Clock hold-back.** A write to `CFS` does not change the clock at once.
   The new choice waits `TCFS` controller cycles, enough for the processor to
   reach its sleep instruction. It is then synchronised into the 2·fmax
   domain by two flip-flops. It takes effect only at the edge where the fmax
   and fmax/2 clocks fall together. The registered output therefore never
   shows a pulse shorter than half an fmax period.
3. **Sleep and wake.** Software starts `WAKE` with the transition time and
   executes its sleep instruction. When the timer expires, `int_req` rises
   and stays high until `int_ack`. The processor wakes at the new operating
   point.

Order matters when going **up**. Raise VDD first, then program `TCFS` with the
VDD rise time (the testbenches use 100 µs = 3,300 cycles at full scale) before
writing `CFS=0`. Going **down**, write the clock first with a short `TCFS`,
then the gates: VDDmax is released only after the overlap, by which time the
clock is already at fmax/2. The controller does not enforce this order. It
is a software rule, and the end-to-end testbench checks that it holds.

The power-on state is fixed by the system reset. The VDDmax gate flop is
cleared (switch on), the VDDmin gate flop is set (switch off), and the clock
is fmax.

## The software loop the hardware serves

Timeslot *i* has a worst case `T_W(i)` at fmax. `T_R(i)` is the sum of the
worst cases of the timeslots after it, `T_SF` is the frame period and `T_TD`
the time one transition costs. Before timeslot *i* the software reads `TIME`
to get the time used so far, `T_ACC`, and computes

    T_TAR = T_SF − T_ACC − T_TD − T_R(i)

It runs timeslot *i* at fmax/2 if `2·T_W(i)` fits in `T_TAR` (plus `T_TD`
when this means a change), otherwise at fmax. Reserving `T_TD` and `T_R(i)`
guarantees that the rest of the frame can still finish at fmax in the worst
case, so no deadline is missed. Once the frame is done early, the processor
sleeps on `WAKE` until the next frame. The clock choices are limited to
fmax/j with integer j, so the processor clock stays an integer multiple of
the bus clock. This design uses only j = 1 and 2.

`tb/hopping_cpu_model.sv` implements exactly this loop on top of the bus, and
is the best place to see how the registers are meant to be used.

## Register map

Byte offsets from `BASE_ADDR` (default `16'h0100`), one 32-bit word each.
Writes take effect at the clock edge where `cs && we`. Reads are
combinational while `cs && !we`.

| offset | name | access | contents |
|--------|------|--------|----------|
| 0x00 | PS | W/R | bit0 = VDDmax gate level, bit1 = VDDmin gate level (0 = switch on). Reset `2'b10` |
| 0x04 | CFS | W/R | bit0: 0 = fmax, 1 = fmax/2. Reset 0 |
| 0x08 | TOV_MAX | W/R | turn-off delay of the VDDmax switch, cycles. Reset 66 |
| 0x0C | TOV_MIN | W/R | turn-off delay of the VDDmin switch, cycles. Reset 66 |
| 0x10 | TCFS | W/R | clock hold-back after a CFS write, cycles. Reset 33 |
| 0x14 | TIME | W/R | current time in controller cycles. A write loads it |
| 0x18 | WAKE | W: start / R: cycles left | wake-up timer |
| 0x1C | STAT | R | bit0 int_req, bit1 wake busy, bit2 clock change pending, bit3 switch turn-off pending, bit4/bit5 VDDmax/VDDmin gate levels now driven, bit8 clock choice in effect |

Timer delays are exact. An action driven by a timer happens `max(N, 1)`
controller cycles after the edge that wrote `N`.

## Clocks, widths and defaults

* `clk`: controller clock, 33 MHz on the reference system. All timers count
  it. 32-bit timers cover about 130 s, far more than a 200 ms frame
  (6.6 million cycles).
* `clk_2fmax`: external clock at 2·fmax (400 MHz for a 200 MHz processor).
  `clk_out` is this clock divided by 2 or by 4.
* `system_reset`: asynchronous, active high, for both domains.
* Top parameters: `ADDR_W = 16`, `BASE_ADDR = 16'h0100`,
  `TOV_RESET = 66`, `TCFS_RESET = 33`.

## How far to trust it, and where it departs from the original chip

Taken from the published design:

* the two-rail, two-frequency scheme and its voltages and frequencies;
* the two gate flops with their reset/set to VDDmax;
* programmable timers at the switch gates to set the overlap;
* a decoder producing the register strobes;
* a clock frequency selector built from a data flop, a timer, two further
  flops, a divider from a 2·fmax clock and a multiplexer;
* a current-time timer;
* a wake-up timer with interrupt request and acknowledge;
* the 2 µs overlap;
* the 33 MHz controller clock.

This design's own choices, where the original gives no detail:

* the bus protocol, the register map, and the data and address widths. The
  original chip was reached from the processor through a VME bus interface
  chip, which is not part of this RTL;
* how the gate timers create the overlap (make before break with a delayed
  turn-off);
* the start/cancel behaviour and exact cycle counts of the timers;
* a free-running, loadable current-time counter without a prescaler;
* a level-held interrupt request cleared by the acknowledge;
* the synchroniser and the switching point in the clock selector;
* the `TCFS` reset value;
* one address decoder per register. The original describes its decoder only
  for the power switches;
* the flops in the schematic may be clocked by the decoder strobe itself.
  Here every flop is clocked by `clk`, with the strobe as an enable.

Not modelled:

* the analog behaviour of the switches and the VDD line;
* the processor and its own frequency control register. The controller's
  clock selector is meant for processors that lack one;
* the bus interface chip and the processor board.

## Simulating

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. List `rtl/hop_pkg.sv` first. For
example, with Verilator 5:

    verilator --binary --timing --assert rtl/hop_pkg.sv rtl/prog_timer.sv \
        rtl/power_switch_ctrl.sv tb/tb_power_switch_ctrl.sv \
        --top-module tb_power_switch_ctrl -Mdir obj && obj/Vtb_power_switch_ctrl

    verilator --binary --timing --assert rtl/hop_pkg.sv \
        $(ls rtl/*.sv | grep -v hop_pkg) tb/hopping_cpu_model.sv \
        tb/tb_vdd_hopping_lsi.sv --top-module tb_vdd_hopping_lsi -Mdir obj_top \
        && obj_top/Vtb_vdd_hopping_lsi

* `tb_vdd_hopping_lsi`: the whole controller at its default parameters,
  with the processor model running four 22-timeslot frames (three typical,
  one worst case). The frame is scaled down by 20 (330,000 cycles); this
  takes about 15 s. It checks every deadline and the supply and clock after
  each hop. It checks that VDD is never cut off, that the clock never runs
  at fmax on VDDmin, and that every hop overlaps the switches for exactly 66
  cycles. It also counts that each mechanism occurred: hop down, hop up,
  overlap, clock hold-back, wake-up interrupt, end-of-frame sleep, and
  timeslots at both speeds. It prints the share of time spent at fmax, at
  fmax/2 and asleep, and the average workload these imply. It checks that
  this workload matches the work it issued.
* `tb_mpeg4_sync_frame`: the same at full scale. Two 200 ms frames (6.6
  million controller cycles each), 200 µs transitions, worst cases summing
  to 6.56 million cycles. Takes about 2.5 minutes.
* `tb_clock_freq_selector` runs the controller clock at 1/13 of 2·fmax, so
  that the clock switch is tried at every divider phase. It checks every
  output pulse width.

The processor model's parameters set the frame, timeslot and transition
times, and the workload range. Change them to try other task profiles.
