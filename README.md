# Encoder-synchronised trigger for an ultrasonic tire scanner

An ultrasonic tire inspection machine scans the sidewall of a rotating tire
in circles, one circle per radius. After each circle the probe must move
outward to the next radius, and no data may be taken while it moves. This
circuit tells the data acquisition system when to take data. It watches the
shaft encoder of the tire drive and the scanner's "motion finished" signal,
and raises `clear_to_acquire` on every other revolution:

* on one revolution the head moves to the next radius and no data are taken;
* on the next revolution data are taken, once the head has stopped.

The encoder gives 2048 A-pulses per revolution, one per data point, and one
Z (index) pulse per revolution. The hard part is to use the Z-pulse as the
revolution mark without being fooled by noise on the Z line. The circuit also
has to cope when a Z-pulse never arrives.

The design is small: 23 flip-flops and a few dozen gates, all on one clock.

## Top-level signals (`daq_trigger_top`)

| port | dir | meaning |
|---|---|---|
| `clock` | in | system clock; every flip-flop uses its rising edge |
| `reset` | in | external reset; asynchronous and active high |
| `a_in` | in | encoder A-pulse, one per data point |
| `z_in` | in | encoder Z-pulse, one per revolution |
| `motorclr_in` | in | Motor_Clear: low while the scanner head is moving |
| `clear_to_acquire` | out | take data now (`z_toggle & Motor_Clear`) |
| `z_toggle` | out | high on data revolutions, low on move revolutions |
| `q0`, `q1`, `q2` | out | one-hot main state: reset, counting, Z enable |
| `counter_clear` | out | A-pulse counter clear (equal to `q0`) |
| `aover` | out | the upper 4 bits of the A-pulse counter are all ones (count >= 3840) |

The encoder's A and Z signals arrive as complementary pairs, which guards
against common-mode noise. The differential receivers for them, and the
FPGA input pad buffers, sit outside this RTL. `a_in` and `z_in` are the
single-ended receiver outputs.

## How a revolution is tracked: the Z window

A 12-bit counter counts A-pulses since it was last cleared. A state machine
with one flip-flop per state uses the count to decide when to believe `z_in`:

```
            +----------------------- reset (asynchronous) ------+
            v                                                   |
   +-----------------+   1 clock   +-------------------+  count = 2040  +------------------+
   | Q0  RESET       | ----------> | Q1  COUNTING      | -------------> | Q2  Z ENABLE     |
   | clear counter   |             | count A-pulses,   |                | wait for Z       |
   | ignore A and Z  |             | ignore Z          |                |                  |
   +-----------------+             +-------------------+                +------------------+
            ^                                                                   |
            +------------ Z seen (flip Z-Toggle)  or  count = 2056 -------------+
```

Next-state equations (`main_fsm`):

```
Q0' = Q2 & (Z | AMAX)
Q1' = Q0 | (Q1 & ~AMIN)
Q2' = (Q1 & AMIN) | (Q2 & ~AMAX & ~Z)
Z_TOGGLE' = Z_TOGGLE ^ (Q2 & Z)
```

`AMIN` is high while the count is exactly 2040, and `AMAX` while it is
exactly 2056. The counter steps by one from zero, so equality decoders
cannot miss either value. Reset puts the machine in Q0 and clears Z-Toggle.

Z is accepted only in a window of 16 A-pulses centred on 2048 pulses after
the last accepted Z. A Z-pulse anywhere else on the revolution is ignored:
a noise spike, or the true index pulse while the machine is out of step.
The window closes at 2056 even when no Z-pulse came. The machine then
returns to Q0 without flipping Z-Toggle. The revolution is not acquired, and
Z-Toggle's phase is kept for the next revolution.

### In step with the encoder

In steady state the counter is cleared in the clock after the Z-pulse is
accepted. The A-pulse that rises with Z is counted and then cleared. The next
Z therefore arrives at a count of 2047, inside the window, on every
revolution.

### Falling into step after reset or a lost Z-pulse

After a reset the counter starts from zero wherever the shaft happens to be.
If the first Z-pulse comes early (count below 2040), it is ignored. The
window then opens and closes empty, and the counter restarts 2056 pulses
after its last clear, 8 pulses more than a revolution. Every empty
revolution therefore moves the window about 8 A-pulses later, towards the
true index, until Z falls inside it. A reset just after the index locks at
once, and one a little before it within one to three revolutions. A reset
half a turn away takes about 130 revolutions. The worst case, a reset just
past the window, takes about 250.
`clear_to_acquire` stays low until then, because Z-Toggle flips only on an
accepted Z-pulse.

A single lost Z-pulse costs one revolution. The window closes at 2056, and
the next Z arrives at a count of about 2040, just as the window opens. This
works when the Z-pulse lasts longer than a few clocks. An encoder index
pulse is normally one A period wide, which is enough. Because Z-Toggle does
not flip on the lost pulse, the extra revolution repeats the one before it:
after a move revolution the head gets one more revolution to settle. After
a data revolution, `clear_to_acquire` stays high for one more revolution at
the same radius. The acquisition system must discard that repeat if it
wants exactly one line per radius.

## Clear_To_Acquire and Motor_Clear

`z_toggle` selects the data revolutions. `clear_to_acquire` is
`z_toggle & motor_clear_sync`: on a data revolution it waits until the
scanner reports that the head has stopped. On move revolutions it stays low
whatever Motor_Clear does.

## Timing

* All three inputs pass through two flip-flops (`input_sync`).
* A `z_in` level sampled high at clock edge k reaches the state machine as
  `z_sync` after edge k+1. It flips `z_toggle` (and `clear_to_acquire`) at
  edge k+2, when Z is enabled then.
* An A-pulse is counted on its rising edge. The counter sees `a_sync` one
  clock after it rises. So an A-pulse must stay high for at least two clocks
  and low for at least two clocks. The clock must therefore run at four
  times the highest A-pulse rate or faster. One scan takes 400 data lines,
  800 revolutions, in 7 minutes. That is about 3.9 kHz A-pulse rate, so any
  clock above roughly 16 kHz works; a typical FPGA board clock of several
  MHz leaves a large margin.
* Q0 lasts exactly one clock. An A-pulse edge in that clock is dropped, as
  the reset state ignores A and Z.

## Module hierarchy

```
daq_trigger_top          top: wires the three parts together
├── input_sync           2-flip-flop synchronizers for A, Z, Motor_Clear
├── a_pulse_counter      A edge detect, 12-bit counter, AMIN/AMAX decoders
│   └── counter4 (x3)    4-bit counter slice with enable, clear, TC, CEO
└── state_system         control
    ├── main_fsm         one-hot Q0/Q1/Q2 machine
    └── z_toggle_fsm     Z-Toggle flip-flop and Clear_To_Acquire
daq_trigger_pkg          shared constants (2048, 2040, 2056, widths, state bits)
```

Parameters: `AMIN_COUNT` (default 2040) and `AMAX_COUNT` (default 2056) on
`daq_trigger_top` and `a_pulse_counter`, and `STAGES` (default 2) on
`input_sync`. For a different encoder, set the window around its
pulse count, for example 1016/1032 for a 1024-pulse encoder. The counter
stays 12 bits wide, so `AMAX_COUNT` must be below 4096.

## Choices and departures

The state equations, the window counts, the two-stage synchronizer, the
three 4-bit counter slices and the split into a main machine and a Z-Toggle
machine follow the original schematic design. These points differ from it,
or fill gaps in it:

* **Synchronous counter.** The original clocks the lowest counter slice
  directly with the synchronized A signal. Each higher slice is clocked by the
  inverted terminal count of the slice below (a ripple counter). Here all
  slices run on the system clock. An edge detector on `a_sync` gives the
  count enable, and the slices cascade through their carry-enable outputs.
  The count is the same, one clock later.
* **Synchronous counter clear.** The original clears the counter
  asynchronously from Q0. Here `counter_clear` is a synchronous clear, and
  the external reset is a separate asynchronous clear.
* **Window start 2040, not 2044.** The written specification asks to open
  the window once the count is 2044 or more. The final state diagram and the
  counter's decoder gates use 2040 (and 2056 to close). The design follows
  the gates. Both values are parameters.
* **Z-Toggle ignores Motor_Clear.** One state diagram lets Z-Toggle rise only
  if Motor_Clear is already high. The gate-level equation and the written
  rule ("changes state while Z-Enable is high and the true Z-pulse is read")
  do not. This design follows the equation. Motor_Clear acts only on
  `clear_to_acquire`.
* **Clear_To_Acquire** is not drawn at gate level in the original. It is
  built from the Z-Toggle state description as `z_toggle & motor_clear`.
  The original main-state description also lists "Clear_To_Acquire = 0" in
  the Z enable state. That rule is not applied here. With it, each data line
  would lose the last few A-pulses of its revolution (the Z window). To apply
  it, AND `clear_to_acquire` with `~q2` in `state_system`.
* **`aover`** is the upper slice's terminal count, which the original
  schematic brings out and leaves unconnected. In operation the count never
  passes 2056, so `aover` stays low. It is kept as a diagnostic.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/daq_trigger_pkg.sv tb/tb_daq_trigger_top.sv --top-module tb_daq_trigger_top
./obj_dir/Vtb_daq_trigger_top
```

| testbench | what it checks |
|---|---|
| `tb_counter4` | counting, wrap, enable, clear, TC/CEO, asynchronous reset |
| `tb_input_sync` | two-clock delay on each input, asynchronous clear |
| `tb_a_pulse_counter` | edge counting, latency, AMIN/AMAX/AOVER decode, clear priority, wrap past 4095 |
| `tb_main_fsm` | every transition against the state diagram, random inputs |
| `tb_z_toggle_fsm` | Z-Toggle flips, Clear_To_Acquire gating by Motor_Clear |
| `tb_state_system` | both machines together, Counter_Clear |
| `tb_daq_trigger_top` | end to end at full size: false Z-pulses, a lost Z-pulse, the head still moving when a data revolution starts, an external reset in mid revolution and the drift back into step. A cycle-level reference model is compared after every clock. |
| `tb_full_scan` | a complete scan of 400 data lines (800 revolutions, 819,200 data points). Each line must hold one revolution of A-pulses, and lines must be one revolution apart. |

`tb/encoder_model.sv` is a behavioural shaft encoder used by the last two.
Its A-pulses last two clocks high and two low. Its Z-pulse covers the whole
A period of position 0, and it can drop a Z-pulse or inject a false one.
Both top-level runs take a few seconds.
