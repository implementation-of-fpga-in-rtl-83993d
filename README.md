# Two FPGA embedded designs: a prioritized highway traffic-light controller and a speech scrambler

This RTL contains two unrelated small systems. Each would normally sit on its own
FPGA board. They are placed side by side in one top module, `fpga_embedded_top`,
and share no signals.

1. **Prioritized highway traffic-light controller.** It runs the lights where a busy
   highway crosses a quiet side road. The highway gets a long green phase and the
   side road a short one, with a yellow phase after each. Two request inputs let
   an emergency or priority vehicle bend the cycle:
   - `sh` favours the highway;
   - `sg` favours the side road.
   
   Each phase length is held in a small RAM and can be changed while the lights
   run.
2. **Speech encryption/decryption unit.** It takes 14-bit ADC samples at 1 MHz and
   XORs each one with the next key of a 14-bit pseudo-random sequence of 30 keys.
   It outputs the top 12 bits to a DAC. A second, identical unit with the same seed
   undoes the scrambling, because XOR with the same key is its own inverse.

## Traffic-light controller

### The cycle and the eight states

With no requests, one full cycle is 160 s:

| phase | length | states |
|---|---|---|
| highway green, side red | 80 s | A1 A2 A3 A4 (4 × 20 s) |
| highway yellow, side red | 20 s | B |
| highway red, side green | 40 s | C1 C2 (2 × 20 s) |
| highway red, side yellow | 20 s | D |

Long phases are split into several equal 20 s states, so one timer value serves a
whole phase. This split also gives the priority logic places to act part-way
through a phase.

State codes are fixed as `{Qx,Qy,Qz}`:

| A1 | A2 | A3 | A4 | B | C1 | C2 | D |
|---|---|---|---|---|---|---|---|
| 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |

The code is exposed on the `state` port. The lamp outputs (`tlc_light_dec`) are
plain functions of it:

| state | HR HY HG | CR CY CG |
|---|---|---|
| A1–A4 | 0 0 1 | 1 0 0 |
| B | 0 1 0 | 1 0 0 |
| C1, C2 | 1 0 0 | 0 0 1 |
| D | 1 0 0 | 0 1 0 |

### Priority requests

The requests are checked only when a state's time runs out. The state machine then
takes one of these arrows:

| state | `sh sg` | next state | meaning |
|---|---|---|---|
| A1, A2, A3 | 0 1 | B | side road wants green: cut the highway green short |
| A4 | 1 0 | A4 | highway wants more green: hold |
| B | 1 0 | A4 | highway asks again during yellow: return to green |
| C1 | 1 0 | D | highway wants green: cut the side-road green short |
| C2 | 0 1 | C2 | side road wants more green: hold |
| D | 1 1 | D | both ask: hold yellow |
| D | 0 1 | C2 | side road asks during yellow: return to green |
| any | anything else | normal successor | |

A request is often much shorter than 20 s. So `tlc_ex_reg` latches each
synchronized request until the state machine uses it: the step that takes an
arrow also clears the latch (`ex_reset`). If the request input is still high in
that clock cycle, the bit stays set, because set wins over clear. A request held
high therefore keeps acting at every step. This is how the "hold" arrows extend a
phase for as long as the request lasts.

### Timing chain: how a state ends

This is the least obvious part of the design. Four blocks form one loop:

```
 pulse_divider --tick (1 Hz)--> tlc_timer --expired (level)--> tlc_fsm
      ^                            ^                              |
      +---------- clear -----------+-------- start_timer ---------+
                                   value <-- tlc_time_params[interval]
```

- **`pulse_divider`** counts down from `DIV-1` and emits a one-clock enable
  `tick` when it reaches zero.
  - At the default 4 MHz clock this is a 1 Hz tick.
  - It is an enable, not a derived clock, so the whole controller stays on one
    clock.
- **`tlc_timer`** counts ticks. When the count reaches the length of the present
  interval (`value`, in seconds, read from the parameter RAM), it raises `expired`
  and starts counting again.
- **`tlc_fsm`** detects the rising edge of `expired` and produces a one-cycle
  `step`.
  - `step` moves the state and clears the latched requests.
  - One cycle later, `start_timer` clears both the timer and the divider.
  - The new state therefore gets exactly `value` fresh seconds, regardless of
    where the divider was in its count.

As a result, a state lasts `value × DIV + 3` clock cycles. The 3 extra clocks are
the hand-over:
- one to register `expired`;
- one for `step`;
- one for `start_timer`.

The full-size testbench measures exactly `20 × 4,000,000 + 3 = 80,000,003` cycles
for every state.

Because the state only moves on an edge, a stuck-high `expired` cannot push the
machine through several states. Assertions in `tlc_fsm` check that the state
changes only on `step` and that `start_timer` always follows `step`.

### Timing parameters and reprogramming

`tlc_time_params` holds four `TIME_W`-bit words, all 20 s after reset. Each is
addressed by the interval type of the present state:

| word | interval |
|---|---|
| 0 | highway green stage |
| 1 | highway yellow |
| 2 | side-road green stage |
| 3 | side-road yellow |

To change a word:
1. Set the two-bit selector (`param_sel`) to the word and the value switches
   (`param_value`) to the new length.
2. Press the reprogram button.

`tlc_sync` turns the press into one clock pulse. The state machine turns that
pulse into a one-cycle write enable. The lights keep cycling during the write.
The new value applies from the next time that interval starts.

A green-stage value applies to every state of that phase. For example, a highway
green value of 10 gives 4 × 10 s of highway green.

A second read port shows the word at the selector address on two seven-segment
digits (`hex7seg`, hexadecimal, active-high segments `{g,f,e,d,c,b,a}`). The
operator can therefore see a value before and after changing it.

### Input synchronization

`tlc_sync` passes reset, `sh`, `sg` and the reprogram button through two-flop
chains. Reset is synchronous and active high inside the design:
- the state machine goes to A1;
- the RAM reloads the 20 s defaults;
- the request latches clear.

## Speech encryption/decryption unit

`speech_unit` is one channel. It contains a `pulse_divider` and a
`speech_keygen`:

- **Sample tick.** The divider turns the 100 MHz clock into a 1 MHz sample tick.
  - The tick is output as `adc_sample`, the ADC's convert/strobe.
  - On the same tick the unit registers `(adc_data XOR key)[13:2]` into
    `dac_data` and raises `dac_valid` for one clock.
  - The key generator then advances to its next key.
- **Key sequence.** `speech_keygen` is a 14-bit Fibonacci LFSR.
  - Taps are 14, 5, 3, 1 (x^14 + x^5 + x^3 + x + 1), loaded with `SEED`.
  - After `NUM_KEYS` (30) keys it reloads the seed, so the scrambler cycles
    through a fixed key table of 30 entries.
  - `key_index` tells which entry is in use.
  - The table is computed rather than stored, so `NUM_KEYS` and `SEED` can be
    changed freely.
- **Decryption.** Decryption is the same unit fed with the scrambled signal.
  - It must use the same seed.
  - It must step through the keys in the same phase: it is released from reset
    one sample period after the transmitter, so its key `k` meets the transmitter's
    output word `k`.
  - In the top this alignment is the user's job. Each unit has its own clock and
    reset ports.
- **DAC width.** The DAC is 12 bits wide, so the two least significant bits of
  every scrambled word are dropped. After decryption, the top 12 bits of the
  original sample are recovered exactly. The dropped bits cannot be recovered,
  and they are the ones that matter least.

The ADC and DAC chips themselves are outside the FPGA and not modelled. Their
digital signals are the `enc_*`/`dec_*` ports of the top.

## Top level: `fpga_embedded_top`

| group | ports |
|---|---|
| `tlc_*` | clock, reset button, `sh`/`sg` requests, reprogram button, parameter selector and value, six lamps (a `tlc_lights_t` struct `{hr,hy,hg,cr,cy,cg}`), state code, two display digits |
| `enc_*`, `dec_*` | clock, reset, 14-bit ADC word in, ADC sample strobe out, 12-bit DAC word and valid out, key index |

Top-level parameters:

| parameter | default |
|---|---|
| `TLC_CLK_HZ` | 4,000,000 |
| `TIME_W` | 5 |
| `SP_CLK_HZ` | 100,000,000 |
| `SAMPLE_HZ` | 1,000,000 |
| `NUM_KEYS` | 30 |

## Where this RTL departs from its source, and why

- **1 Hz divider instead of a 20 s divider.** The source is inconsistent here. It
  describes:
  - a divider by 80,000,000 with one pulse per 20 s;
  - a 1 Hz enable feeding a timer that counts seconds.
  
  The second reading is built, because it is the one that makes per-interval
  lengths meaningful. The counter width follows from `DIV`.
- **`TIME_W = 5`.** The source's block diagram shows 4-bit time values, which
  cannot hold its own 20 s default. Five bits allow up to 31 s per state.
- **No sensor input.** The block diagram shows a vehicle sensor, but no state
  transition uses one, so none is built.
- **Six lamp outputs.** The lamp table has six lamp outputs. The block diagram
  shows seven lamp lines; the seventh has no function given.
- **Request latch priority.** Set wins over clear (see above). This is a choice
  that keeps held requests effective.
- **Display.** The display uses a second read port addressed by the selector. It
  has no separate "read mode" that stops the lights, and no shared three-state
  data bus between RAM, timer and switches. Each reader has its own port, which
  suits an FPGA better.
- **Reprogramming during the cycle.** Reprogramming does not pause the lights.
- **Speech clock.** A 100 MHz clock is assumed. The source gives only the 1 MHz
  sample rate.
- **Keys.** The key sequence is an LFSR with 30 keys. The source says only that a
  shift operation generates them. It gives both 30 and 20 as the size of the key
  table; 30 is the default here, and `NUM_KEYS = 20` gives the other.
- **Dropped DAC bits.** The source names both ways of fitting 14 bits into the
  12-bit DAC: dropping the two most significant bits, and rounding off the two
  least significant ones. The two LSBs are dropped here, because dropping the
  MSBs would wrap loud samples and destroy the signal. The LSBs are truncated,
  not rounded: rounding could carry into the key-scrambled upper bits and would
  not survive decryption.
- **Breadboard version not covered.** The source also describes building the
  traffic controller from discrete logic gates. That version only serves as a
  comparison and is not part of this RTL. The offline speech experiments, done in
  software, are not part of it either.

## Files

| file | contents |
|---|---|
| `rtl/tlc_pkg.sv` | state/interval enums, lamp and request structs |
| `rtl/tlc_sync.sv`, `rtl/tlc_ex_reg.sv` | input synchronizers, request latch |
| `rtl/pulse_divider.sv` | clock-enable divider (both designs) |
| `rtl/tlc_time_params.sv`, `rtl/tlc_timer.sv` | interval RAM, seconds timer |
| `rtl/tlc_fsm.sv`, `rtl/tlc_light_dec.sv` | state machine, lamp decoder |
| `rtl/hex7seg.sv` | two-digit hex display decoder |
| `rtl/tlc_top.sv` | complete traffic controller |
| `rtl/speech_keygen.sv`, `rtl/speech_unit.sv` | key generator, one scrambler channel |
| `rtl/fpga_embedded_top.sv` | both designs side by side |

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=… failures=…`:

- `tb/tb_fpga_embedded_top.sv` runs both designs at reduced clock rates. It counts
  every priority arrow, the request latching, a reprogramming with the new timing,
  the display, key-table wraps and the recovered speech samples. It fails if any of
  these never happened.
- `tb/tb_fpga_embedded_top_full.sv` runs the top with its default parameters:
  - a whole traffic cycle at 4 MHz (640 million clocks), checking every state's
    exact length;
  - a priority cut-short;
  - 200 speech samples through the encrypt/decrypt pair at 100 MHz.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl --top-module tb_fpga_embedded_top \
    rtl/tlc_pkg.sv tb/tb_fpga_embedded_top.sv
./obj_dir/Vtb_fpga_embedded_top
```

`-y rtl` lets Verilator find each module by its file name. The package is
named explicitly because it must be read first. The same command works for every
block testbench: change the top module and the testbench file. Each testbench
ends by printing `TB_RESULT checks=N failures=M`.

The full-size testbench simulates 160 s of traffic at 4 MHz. It takes about
seven minutes with an optimized build.

Lint leaves two warnings, both harmless:
- the two unused low bits of the scrambled word in `speech_unit`;
- the deliberately unconnected `step` output of the state machine in `tlc_top`.
