# ECL counter crate for precision timing — SystemVerilog model

This crate generates precisely placed timing pulses. A trigger arrives, and some
programmed time later a pulse goes out. That time is a coarse part, counted in
clock periods (up to 2^24 − 1 periods, 67 ms at 250 MHz), plus a fine part in
10 ps steps (up to 5.11 ns). A chassis holds up to four drawers. Each drawer has
four such channels, started by one common trigger. Settings come from the
drawer's front-panel switches or, byte by byte, from a control computer.

The RTL follows the crate described in *ECL Counter Crate for CTF3 Precision
Timing* (CTF3 Note 064). That note describes a board built from ECL counter
chips, fine delay chips and PLDs. It gives the chips' roles, the control bytes
and the timing of a trigger, but not the PLD logic. Everything below the level
of those descriptions is this design's own choice, and the choices are listed
in the section on departures.

## How a delay is produced

```
trig_rear[4], trig_fp ──► trigger_select ──► fine_delay (trigger path, 20 ps steps)
                                                  │
                                                  ▼
                              clk ──►  trigger_edge ── load ──┐
                                                              ▼
        settings ─► 4 × [ delay_counter (3 × counter8) ─► fine_delay ] ─► out[3:0]
                                                                        └─► out_sum (OR)
```

1. **Trigger selection.** One of four rear triggers or the front-panel trigger
   is chosen. The chosen trigger passes through a fine delay set by two
   front-panel switches (0–5.1 ns in 20 ps steps). This delay is set once, when
   the crate is set up, so that the trigger edge does not fall on the clock
   edge.
2. **Load cycle.** `trigger_edge` samples the delayed trigger on the drawer
   clock. `load` is high for the one clock cycle after the first edge that sees
   the trigger high. In that cycle every channel's counter takes its coarse
   setting, and every fine delay chip latches its 9-bit code.
3. **Counting.** From the next cycle on, the counters count up by one per
   clock.
4. **Output.** When a counter reaches all ones, its output register emits a
   pulse exactly one clock period long. The counter then holds until the next
   trigger. The pulse passes through the channel's fine delay to `out[ch]`.

With **T** the first clock edge that sees the trigger high, **N** the coarse
setting and **F** the fine setting, a channel's pulse rises at

    T + (2 + N) · Tclk + F · 10 ps

and lasts one clock period. N = 0 gives the shortest path, two periods after T.
The testbenches check this formula to the picosecond.

A trigger that comes while the counters are still running reloads them and
restarts the delay. A disabled channel counts as usual, but its output
register stays low.

### Why the written values are inverted

The counters count **up to** all ones, and they are loaded with the byte that
the computer wrote. So the delay is the bitwise inverse of the written value:

| written coarse bytes (MS..LS) | delay |
|---|---|
| `FF FF FF` | 0 periods |
| `FF FF FE` | 1 period |
| `00 00 00` | 16 777 215 periods |

All the computer's delay fields use this inverted form. The fine delay byte
(`FF` = 0 ps, `00` = 5100 ps in 20 ps steps) and the 10 ps bits (0 = add 10 ps)
are inverted in the same way. Inside the RTL, `control_select` turns every
field into a positive number: `coarse_delay` in periods, and `fine_delay` in
10 ps units. `counter_drawer` inverts `coarse_delay` again when it loads the
counters. The front-panel switches and displays use the positive form
throughout.

### Cascaded counters

A channel is `NUM_STAGES` 8-bit counters (`counter8`) in cascade. A stage
counts only when every stage below it shows `FF`. The terminal count is the
AND of all stages' terminal-count flags. `COUNTER_STAGES = 1` or `2` builds
the cheaper 8-bit or 16-bit channels that the original hardware allows. In
that case only the low coarse bytes are used.

## Computer control

The control bus carries an address byte, a data byte in, a data byte out, and
three control lines: `write_n`, `read_n` (both active low) and `local_line`.

* **Address.** A7..A5 select the drawer. A drawer answers when these bits
  equal its board address. The board address is set with poles 2–4 of an
  on-board DIL switch (pole ON reads as 0; pole 2 ↔ A5, pole 4 ↔ A7). A4..A0
  select one of the drawer's 18 byte latches.
* **Write.** A latch takes the data at the rising edge of `write_n`. The host
  keeps address and data stable from 20 ns before the strobe falls to 20 ns
  after it rises. The strobe is at least 50 ns long. Assertions in
  `drawer_regs` stop a simulation if the address or data changes while a
  strobe is low, or if both strobes are low together.
* **Read.** While `read_n` is low, the addressed drawer drives the chosen latch
  onto `dout`. Drawers that are not addressed drive zero, and the crate ORs all
  the drawers. Unused byte addresses 18–31 read as zero and ignore writes.

Byte map (byte *k* is at address *k* − 1):

| byte | content |
|---|---|
| 1 | D2..D0 trigger: `111`, `110`, `101`, `100` = rear 1–4, `000` = front panel; D3..D6 = counter 1–4 enabled (1) / disabled (0) |
| 2 | D0..D3: 10 ps step of counter 1–4, 0 = on |
| 3, 7, 11, 15 | fine delay of counter 1–4, 20 ps steps, inverted |
| 4–6, 8–10, 12–14, 16–18 | coarse delay of counter 1–4, bits 0–7, 8–15, 16–23, inverted |

**Local or remote.** A drawer obeys the computer when DIL pole 1 is ON and
`local_line` is low. In every other case it obeys its front panel. Pole 1 OFF
forces local control whatever the computer says. The host can still write and
read the latches in local mode. The written values take effect when the drawer
returns to remote control.

## Front panel

Inputs (`panel_switches_t`):

* a trigger rotary switch: 0 = front panel, 1–4 = rear trigger 1–4;
* four disable switches;
* two trigger-delay hex switches;
* for each counter, two fine-delay hex switches (20 ps steps; the 10 ps step
  cannot be set locally) and six coarse-delay hex switches.

Outputs (`panel_indicators_t`):

* five trigger-select LEDs;
* a trigger LED, held on for `LED_HOLD_CYCLES` clocks (about 17 ms at
  250 MHz) after each trigger;
* four disable LEDs, which also show the fast disables;
* four supply LEDs;
* REMOTE, ADDRESSED, READ and WRITE LEDs;
* four 8-character displays, given as ASCII codes. Per display, six hex digits
  show the coarse delay and two show the fine delay from the 20 ps bit upward
  (`FF` = 5100 ps).

Each counter also has a fast disable input on the rear (`fast_disable`,
active high). It works in both local and remote mode.

## Rear cards

* **`fanout_combiner`.** One input fanned out to four true and two
  complementary outputs, plus a four-input OR with two true and two
  complementary outputs.
* **`converter_card`.** Four TTL→ECL and four ECL→TTL channels, and one
  inverter of each kind. A per-channel jumper inserts a 90 ns monostable ahead
  of the ECL→TTL converter, so a one-period counter pulse becomes long enough
  for TTL inputs.

These cards are wired to the drawers by cables on the patch panel. The crate
top therefore brings their pins out as ports: four fan-out/combiner cards and
two converter cards, the fitting of the pictured crate.

## Modules

| module | role |
|---|---|
| `ctf3_timing_pkg` | constants, byte map, trigger codes, settings and panel structs |
| `ctf3_counter_crate` | top: `NUM_DRAWERS` drawers on one bus, rear cards |
| `counter_drawer` | one drawer, wires everything below |
| `drawer_regs` | address match, 18 latches, read-back |
| `control_select` | local/remote choice, decoding into positive settings |
| `trigger_select` | five-way trigger selector |
| `trigger_edge` | trigger sampling, load strobe |
| `delay_counter` | cascaded counters, run control, one-period output |
| `counter8` | one 8-bit counter chip |
| `fine_delay` | **behavioural model** of the 9-bit programmable delay chip |
| `front_panel` | LEDs and displays |
| `fanout_combiner` | fan-out and OR combiner card |
| `converter_card` | **behavioural model** of the level-converter card |

`fine_delay` and `converter_card` model analog parts with `#` delays. They
need a simulator with timing support and are not meant for synthesis. The
rest is synthesizable. Each drawer runs on its own clock. The setting latches
are clocked by the bus's WRITE strobe; the counters read them only at a
trigger, when the host is expected to have finished writing.

## Simulating

Every testbench in `tb/` checks its own results. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator
from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -Irtl rtl/ctf3_timing_pkg.sv tb/tb_ctf3_counter_crate.sv \
    --top-module tb_ctf3_counter_crate -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_ctf3_counter_crate` | The whole crate at default parameters: four drawers, two at 250 MHz and two at 400 MHz. Covers programming over the bus, read-back, all five trigger sources, remote, local and DIL override, computer and fast disables, retrigger, 10 ps steps, a carry through all three stages, the OR output, the trigger LED, fan-out, combiner and monostable. Each of these mechanisms is counted and must occur. |
| `tb_full_range` | The largest settings: 16 777 215 periods + 5110 ps on a 24-bit drawer (67 ms of simulated time, about half a minute), plus the 16-bit and 8-bit builds at their maxima. |
| `tb_counter_drawer` | One drawer end to end, including the trigger-path delay. |
| `tb_<module>` | Each block alone against an independent reference. |

## Departures and open points

The original description fixes the control bytes, the trigger timing, the
counter width and the fine delay resolution. The following points were left
open there and are decided here:

* **Output timing.** The output pulse comes one period after the terminal
  count, which gives the `2 + N` latency above. The counter then stops. A
  retrigger restarts it. Disable gates the output register.
* **Reset.** Power-on reset is an added input. It sets every latch to `FF`:
  zero delays, 10 ps steps off, trigger 1 selected, all counters enabled.
* **Write timing.** Latches capture at the rising edge of WRITE. Unused byte
  addresses read as zero.
* **Board address.** DIL pole 2 maps to A5, pole 3 to A6 and pole 4 to A7.
* **Switches.** The encodings of the trigger rotary switch and of the
  delay switches (positive delay) are chosen here. Trigger codes `001`–`011`
  select no trigger.
* **Status LEDs.** One computer-status LED is named LOCAL in one place and
  REMOTE in another. Here it is REMOTE, lit under computer control. ADDRESSED,
  READ and WRITE follow the bus without stretching. The trigger LED is held on
  for a chosen time.
* **Trigger sampling.** The trigger is sampled by one flip-flop, with no
  synchroniser, because its phase is set by the trigger fine delay. The
  trigger monitor output is taken after that delay.
* **Fine delay model.** Only the programmed delay is modelled. The chip's
  fixed insertion delay (`INSERTION_PS`, default 0) and its jitter (about
  1.1 ps rms measured on the original) are not. Each edge is delayed on its
  own, so a 4 ns pulse survives a 5 ns delay.
* **Combiner inputs.** The combiner has four inputs (`COMB_INPUTS`).
* **Converter card.** The monostable ignores edges while its pulse runs.
  Level translation is logic identity.

Not modelled at all: the computer-interface buffer cards (pass-through only),
the AC-coupled clock receivers, the power supplies and the patch panel. The
clock speed (250 MHz nominal, 400 MHz maximum in ECL) is a property of the
implementation. The RTL has only been simulated at those periods, not timed.
