# Dual-loop digital DLL with hybrid binary/sequential search

A delay-locked loop (DLL) delays an input clock by exactly one period, so that
an internally buffered copy of the clock lines up with the external one. This
design does that with two loops in cascade, both fully digital:

* a **coarse loop** that finds the right delay in a few tens of cycles with a
  *binary* search (a successive-approximation register) over a 32-unit delay
  line, and
* a **fine loop** that then closes the remaining error with a *sequential*
  search (an up/down counter) over a 7-bit phase interpolator. One
  interpolator step is 280 ps / 128 = 2.19 ps.

Two details make the combination work. The **variable SAR** (VSAR) starts
with a narrow search range and widens it only when no lock is found. That
keeps the loop from settling at two or three periods when one period is
reachable (harmonic locking). The **phase-interpolation range selector**
(PIRS) places the interpolator's window so that it overlaps two adjacent coarse
steps. Once the coarse code is chosen it never has to toggle: the fine loop
absorbs all further drift. This removes the boundary-switching jitter of
coarse/fine DLLs.

The clock path (delay line, range selector, interpolator, DAC, level
converter) is analog or full-custom in silicon. Here it is written as
behavioural timing models with picosecond delays. Everything that decides is
synthesizable RTL: the VSAR, the SAR controller, the counter, the decoders,
the dividers and the phase detectors.

## Block diagram

```
          +--------------------- coarse loop ---------------------+  +------ fine loop ------+
CLK_IN -->| DCDL (32 x DCDU) --DL_MID--> PIRS (3 x LDU) --DL_OUTA-+--+--> PI --> level conv --+--> CLK_OUT
   |      |     ^ T0..T31/b              ^ K0..K2/b    +-DCDU-DL_OUTB-+   ^ I_DAC_A/B          |
   |      |  5-to-32 therm.           2-to-3 therm.                   |  DAC <- C[6:0]         |
   |      |     ^ Q[6:2]                 ^ Q[1:0]                     |     up/down counter    |
   |      |     +------- VSAR (clk SCLK) -+                           |     ^ PI_EN  ^ Up/Down |
   |      |        ^Comp  ^Reset ^VSAR_CM  |Stop                      |     |   fine phase det.|
   |      |  coarse phase det. -Lock-> SAR controller -- PI_EN -------------+     (CLK_IN vs   |
   |      +--------------------------------------------------------+  +--------- CLK_OUT) ---+
   +--> /4 --> SCLK --> /2 --> counter clock
```

Both phase detectors compare CLK_IN with CLK_OUT. The coarse loop runs on
SCLK = CLK_IN / 4 and the counter on SCLK / 2.

| File | Block | Kind |
|---|---|---|
| `rtl/dll_top.sv` | whole DLL | structure (instantiates models and logic) |
| `rtl/dll_pkg.sv` | widths, initial codes, enums | package |
| `rtl/vsar.sv` | variable-width SAR | RTL |
| `rtl/sar_ctrl.sv` | SAR controller | RTL |
| `rtl/updn_counter.sv` | 7-bit fine counter | RTL |
| `rtl/therm_dec.sv` | 5-to-32 and 2-to-3 thermometer decoders | RTL |
| `rtl/clk_div.sv` | /4 and /2 clock dividers | RTL |
| `rtl/coarse_pd.sv`, `rtl/bb_pd.sv` | phase detectors | RTL (flip-flops sampling clocks) |
| `rtl/dcdl.sv`, `rtl/dcdu.sv`, `rtl/ldu.sv` | delay line, delay unit, lattice cell | behavioural |
| `rtl/pirs.sv` | range selector | behavioural |
| `rtl/phase_interp.sv`, `rtl/dac.sv` | interpolator and its DAC | behavioural |
| `rtl/level_conv.sv`, `rtl/delay_cell.sv` | output converter, lock-window delays | behavioural |

## The delay path and its code

The whole loop rests on how the codes Q[6:0] and C[6:0] map to delay. This
is the least obvious part of the design.

**Lattice delay unit (LDU).** This is a turn-around cell. With its bit set it
passes the signal forward to the next cell and passes the returning signal
back. With its bit clear it sends the signal straight back. A turn costs
td1 = 140 ps. Each cell passed adds td1 (half on the way out, half on the way
back).

**Delay line (DCDL).** It has 32 delay units (DCDUs) of two LDUs each;
td2 = 2·td1 = 280 ps. Q[6:2] = n goes through the thermometer decoder
(outputs 0..n-1 high). The signal then passes n units and turns back in unit
n. DL_MID, taken at unit 0, follows CLK_IN after (n+1)·td2. The last unit is
looped back on itself.

**Range selector (PIRS).** Three more LDUs driven by the 2-to-3 code of
Q[1:0] give DL_OUTA. DL_OUTB is DL_OUTA through one extra DCDU that always
turns, so it is exactly td2 later.

| Q[1:0] | K2 K1 K0 | DL_MID to DL_OUTA |
|---|---|---|
| 0 | 000 | td1 (phase p0) |
| 1 | 001 | 2·td1 (p1) |
| 2 | 011 | 3·td1 (p2) |
| 3 | 111 | 3·td1 (same as 2: the last cell loops back on itself) |

**Interpolator (PI) and DAC.** The DAC steers binary-weighted currents:
I_B = C and I_A = 128 − C, in LSB units. The interpolator puts its edge at
DL_OUTA + (DL_OUTB − DL_OUTA)·I_B/(I_A+I_B), i.e. C·2.1875 ps. At the
initial code C = 32 this is 70 ps.

Altogether, with k = min(Q[1:0], 2):

    delay(CLK_IN -> CLK_OUT) = (n+1)·td2 + (k+1)·td1 + C·td2/128 + t_conv

Here t_conv is the level converter's delay, 500 ps in this model.

The coarse code is **not monotonic** in Q. Going from Q = 4m+3 to 4m+4 lowers
the delay by td1, because the PIRS range (td1…3·td1) overlaps the next DCDU
step. This overlap is deliberate. Whatever coarse code the search ends on,
the true lock point lies within the interpolator's td2-wide window
(DL_OUTA … DL_OUTB). The fine loop can therefore reach it without touching Q
again. The binary search still converges, to within about one td2 of the
target. That is the accuracy the lock window checks.

## The hybrid search

### Coarse loop: variable SAR

Q starts at 0 and C at 0100000 (32). The VSAR makes one decision per SCLK
edge. It first sets the top bit of the current search width on trial. On each
later edge it keeps the bit under trial if **Comp = 1** (output early, more
delay needed), clears it otherwise, and sets the next lower bit on trial.

1. **5-bit search** over Q[4:0], first trial 10000 = 16. Only delay units
   0–7 can be reached, a short range.
2. After the last bit the VSAR raises **Stop**. The SAR controller waits two
   SCLK edges for the last code to reach CLK_OUT and the lock detector, then
   reads **Lock**.
3. No lock: the controller sends a one-cycle **Reset**. The VSAR clears Q and
   widens to **6 bits** (first trial 32), then **7 bits** (64). No lock after
   the 7-bit search ends in **Fail**.
4. Lock: the controller raises **PI_EN** and the fine loop takes over. Q then
   stays fixed.

An n-bit search takes n + 1 SCLK edges (4·(n+1) CLK_IN cycles) plus 3 for
the lock judgement.

Simulated example at 250 MHz (period 4000 ps, default parameters;
`tb/tb_dll_top.sv`):

| SCLK edges | Q after each edge | Comp for each trial | what happens |
|---|---|---|---|
| 1–6 | 16, 24, 28, 30, 31, 31 | 1, 1, 1, 1, 1 | 5-bit search; the range is too short; Stop on edge 6 |
| 7–10 | 31, 31, 31, 0 | | no Lock: Reset on edge 9; width 6 |
| 11–17 | 32, 48, 40, 44, 42, 41, 41 | 1, 0, 1, 0, 0, 1 | 6-bit search; Stop on edge 17 |
| 18–20 | 41 | | Lock: PI_EN on edge 20, 77.5 CLK_IN periods after reset release |

The counter then climbs from 32 to 64 and dithers 63/64 or 64/65. The
remaining error is 0–2 ps.

### Fine loop: sequential search and tracking

While PI_EN is high, the counter takes one step per counter clock (every
8 CLK_IN cycles). It counts up when the fine phase detector says the output
is early and down otherwise. At lock this becomes a one-LSB dither that
follows slow drift of process, voltage and temperature.

If the counter runs into 0 or 127 while still being pushed outward, the
required delay has left the fine range. This happens after a large frequency
change, for example. The controller then drops PI_EN, which returns the
counter to 32, and pulses **VSAR_CM**. The VSAR repeats the binary search at
its current width, and a new sequential search follows.

## Phase detectors and the lock window

**Comp and Up/Down** come from the same circuit (`bb_pd`): a flip-flop
clocked by CLK_IN that samples CLK_OUT. A 1 means CLK_OUT rose less than half
a period before CLK_IN: the output is early.

**Lock** (`coarse_pd`) tells whether the output edge lies within ±W of an
input edge. W = 140 ps by default, i.e. td2/2. Two delay cells make copies of
CLK_IN and CLK_OUT delayed by W. One flip-flop samples CLK_IN at the delayed
CLK_OUT edge: this is 1 unless the output is more than W late. Another
samples the delayed CLK_IN at the CLK_OUT edge: this is 1 if the output is
more than W early. Lock is the first and not the second, synchronized into
the CLK_IN domain with two flip-flops. The window works for W < T/4, i.e. up
to about 1.8 GHz at the default W.

A sampling detector cannot tell a delay D from D + T. Any delay below half
a period looks too long. The narrow first search range is what keeps the
loop at the shortest multiple of the period that it can reach.

## Operating range of the model

Measured with `tb/tb_dll_freq.sv` at default parameters:

| CLK_IN | search that locks | Q | C | loop delay | CLK_OUT error |
|---|---|---|---|---|---|
| 150 MHz | 7-bit | 80 | 66 | 6664 ps = 1 T | −1.6 ps |
| 250 MHz | 6-bit | 41 | 64 | 4000 ps = 1 T | 0 ps |
| 500 MHz | 5-bit | 13 | 45 | 1998 ps = 1 T | −1.6 ps |
| 1.5 GHz | 5-bit | 4 | 61 | 1333 ps = 2 T | −0.8 ps |

The shortest delay the model's path can produce is 920 ps: one DCDU
(280 ps), one LDU (140 ps) and the assumed 500 ps converter. That is longer
than the 667 ps period at 1.5 GHz, so the output locks aligned but two
periods late. A faster output stage (smaller `CONV_DELAY_PS`) moves that
limit. The longest delay is about 10.2 ns, about 98 MHz. Below 98 MHz the
controller ends in Fail; the end-to-end test checks this at 40 MHz.

### Input jitter

`tb/tb_dll_jitter.sv` locks the loop and then displaces every CLK_IN edge
at random (uniform, peak-to-peak J) for 3000 cycles. The loop holds its coarse
code throughout. The models add no noise, so any output jitter beyond J is
the loop's own. It comes from the bang-bang fine loop: it compares two
independently jittered edges, so its code wanders over about ±J.

| CLK_IN | input J (pk-pk) | CLK_OUT (pk-pk) |
|---|---|---|
| 150 MHz | 20 ps | about 35 ps |
| 500 MHz | 20 ps | 37–39 ps |
| 1.5 GHz | 7.5 ps | 18–20 ps |

## Parameters (`dll_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `TD1_PS` | 140.0 | LDU delay td1; DCDU delay td2 = 2·td1 = 280 ps; PI step td2/128 |
| `CONV_DELAY_PS` | 500.0 | level converter delay (assumed value) |
| `LOCK_WIN_PS` | 140.0 | half-width W of the coarse lock window |
| `SETTLE` | 2 | SCLK edges between Stop and the Lock judgement |

Fixed sizes: 7-bit Q, 7-bit C, 32 DCDUs, 3 PIRS cells, first search width
5, initial C = 32 (all in `dll_pkg`).

## Where this RTL goes beyond or departs from its source description

The block structure, code widths, initial codes, the 5→6→7-bit search,
Reset/Stop/Lock/PI_EN, the 1/4 and 1/2 clock dividers, the LDU/DCDU/PIRS
structure, td1/td2 and the 7-bit interpolator follow the original design.
These parts are this implementation's own:

* **Phase detector circuits.** Only their outputs (Comp, Lock, Up/Down) were
  given. The sampling flip-flops, the ±W window and its synchronizer are new.
* **SAR controller details.** The two-edge settle time before the Lock
  judgement is new. So is the way loss of lock is detected in closed loop
  (the counter reaching a limit), and with it the use of VSAR_CM as the
  re-search command. The source only names VSAR_CM.
* **Search start.** The search starts at Q = 0 and first tries 10000. One
  sentence of the source instead has Q[1:0] = 01 at the start of the search;
  that sentence was not followed.
* **Trial sequence.** The 6-bit search makes six decisions, one per bit. The
  reference locking trace shows the 6-bit search arriving at Q = 52 in fewer
  edges.
* **Thermometer code.** Output i is high when i < value, so T31 is never set
  (the last unit is looped back anyway).
* **Counter.** It saturates at 0 and 127 instead of wrapping and is held at
  32 while PI_EN is low.
* **Analog models.** The DAC and interpolator are ideal and linear. The
  original interpolator is only monotonic, with about 1.1 LSB differential
  and 2.7 LSB integral nonlinearity. Jitter, supply noise and power are not
  modelled.
* **Converter delay.** 500 ps is an assumed value.

## Simulating

Testbenches in `tb/` are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself. Every file uses
`timescale 1ps/1fs`, and `--timing` is required. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dll_pkg.sv tb/tb_dll_top.sv \
          --top-module tb_dll_top -o sim && obj_dir/sim
```

Replace `tb_dll_top` with any other testbench. `-Irtl` lets Verilator find
each module in `rtl/<name>.sv`.

| Testbench | What it checks |
|---|---|
| `tb_dll_top` | full DLL at default parameters. 250 MHz: 5-bit failure, Reset, 6-bit lock, fine search and dither, alignment. Re-lock through VSAR_CM after a jump to 4.4 ns. 7-bit lock at 150 MHz. Fail at 40 MHz. Counts every mechanism. |
| `tb_dll_freq` | lock, alignment and loop delay in periods at 150 MHz, 250 MHz, 500 MHz and 1.5 GHz |
| `tb_dll_jitter` | lock held and output jitter bounded under random input jitter |
| `tb_vsar` | trial sequences, Stop timing, widening, restart, random targets |
| `tb_sar_ctrl` | Reset / PI_EN / Fail / VSAR_CM decisions and their cycle timing |
| `tb_updn_counter` | reference-model comparison, hold at 32, saturation |
| `tb_therm_dec` | both decoders, all codes |
| `tb_clk_div` | periods, duty cycle and phase of SCLK and the counter clock |
| `tb_bb_pd`, `tb_coarse_pd` | decisions against a swept known delay |
| `tb_dcdl`, `tb_pirs`, `tb_phase_interp`, `tb_dac`, `tb_level_conv` | measured delays against the formulas above |

Notes for changing the models:

* The behavioural delays use one forked process per edge (transport delay).
  They use edge-list sensitivity (`@(posedge x or negedge x ...)`). Verilator
  loses delayed assignments that are closer together than the delay in the
  plain `out <= #d in` form, and does not converge with `@(x)` lists on this
  structure.
* Reset is asynchronous and active low. Testbenches must create a falling
  edge on `rst_n`, because an initial low level does not trigger the reset
  processes.
* The phase detectors sample one clock with another on purpose, so lint
  reports CLK_IN and CLK_OUT as used both as clocks and as data.
