# Low power test pattern generator (LP-TPG) for test-per-clock BIST

A pseudo-random test pattern generator for built-in self test burns power
because consecutive LFSR patterns are uncorrelated: on average half of the
circuit's primary inputs flip on every clock, and the switching ripples
through the whole circuit under test. The LP-TPG keeps the LFSR sequence but
inserts three intermediate patterns between every two LFSR patterns. The
intermediate patterns are built so that each primary input changes **at most
once** on its way from one LFSR pattern to the next, and only one half of the
inputs can change on any clock. The total number of input transitions is
exactly that of the bare LFSR sequence, but it is spread over four clocks,
which lowers the average switching per clock and, more importantly, the peak.

The RTL follows the LP-LFSR described in the 2011 M.Tech thesis *Design of
Low Power and High Fault Coverage Test Pattern Generator for BIST* (Thapar
University). The generator is reproduced from its description and checked
bit for bit against its published 8-bit example. The thesis evaluates the
generator on the ISCAS-85 benchmark c432. This repository adds a functional
model of c432 so that the whole test set-up can be simulated. Choices the
thesis leaves open are listed under "Where this RTL decides" below.

## The four-pattern cycle

The LFSR's `n` flip-flops FF1..FFn are cut into two halves:

```
          +-------- XOR of TAPS stages --------+
          v                                    |
   FF1 -> FF2 -> ... -> FF(h) -> [HOLD] -> FF(h+1) -> ... -> FFn ---> R, so
   \______ first half (en1) ______/         \_____ second half (en2) _____/
```

* `en1` shifts the first half, and at the same time loads the holding
  flip-flop `HOLD` from FF(h). `en2` shifts the second half, which takes
  `HOLD` into FF(h+1). Because `HOLD` keeps FF(h)'s value from *before* the
  first half shifted, the two halves can shift on different clocks without
  losing a bit. FF1 takes the XOR of the stages selected by `TAPS`.
* Every flip-flop has an **injection circuit**. It compares the flip-flop's
  current value (Q) with its next value (D). If they are equal it passes
  the bit. If they differ it passes `R`, the output of the last flip-flop
  FFn, which is a pseudo-random bit.
* Two **output selectors**, `sel1` and `sel2`, choose per half between the
  flip-flop outputs and the injection outputs.

A cycle takes four clocks, one pattern per clock:

| pattern | edge that produces it | en1 | en2 | sel1 | sel2 | first half shows | second half shows |
|---|---|---|---|---|---|---|---|
| T  (LFSR) | first half shifts | 1 | 0 | 1 | 1 | new value F(k) | old value L(k) |
| Ta | none | 0 | 0 | 1 | 0 | F(k) | L(k) where it equals L(k+1), else R |
| Tb | second half shifts | 0 | 1 | 1 | 1 | F(k) | L(k+1) |
| Tc | none | 0 | 0 | 0 | 1 | F(k) where it equals F(k+1), else R | L(k+1) |

The next T pattern is then `{F(k+1), L(k+1)}`. Take any input that differs
between T(k) and T(k+1). In the two clocks where its half moves it goes old
value -> R -> new value. Whatever R is, exactly one of those two steps is a
transition. An input that does not differ never moves. So:

* transitions over T(k) -> Ta -> Tb -> Tc -> T(k+1) = Hamming distance of
  T(k) and T(k+1);
* on any single clock at most one half of the inputs can switch.

### Worked 8-bit example

These are the thesis's example values: seed `0100 1011`, feedback from FF8
and FF1 (x^8 + x + 1), R = FF8. O1 (FF1) is printed first, which is the MSB
of `pattern`.

| clock | pattern | output | remark |
|---|---|---|---|
| 1 | T1 | `1010 1011` | first half shifted in `1 = FF8 ^ FF1`; HOLD <= FF4 = 0 |
| 2 | Ta | `1010 1111` | second half: current 1011, next 0101, every bit differs -> R = 1 |
| 3 | Tb | `1010 0101` | second half shifted, taking HOLD = 0 |
| 4 | Tc | `1111 0101` | first half: current 1010, next 0101 -> R = 1 |
| 5 | T2 | `0101 0101` | |
| 6..15 | | `0101 0111`, `0101 0010`, `0000 0010`, `0010 0010`, `0010 0000`, `0010 1001`, `1011 1001`, `1001 1001`, `1001 1101`, `1001 0100` | continues the same way |

T1 -> T2 flips 7 inputs. The four steps above flip 1 + 2 + 2 + 2 = 7.

Where the T patterns come from: count HOLD as an extra stage between FF(h)
and FF(h+1). Over one cycle this (n+1)-stage register shifts exactly once.
Its feedback into FF1 is the XOR of the same stage *positions* as in
`TAPS`, because a tap in the second half is read after that half has
shifted. So the register runs the recurrence of an ordinary n-stage LFSR
with the same taps, and has the same period. The n outputs show every stage
except HOLD, so the T patterns are not the state sequence of the ordinary
LFSR bit for bit. (In the 8-bit example, T2 -> T3 already differs.)

* The example's x^8 + x + 1 is not maximal length. It factors as
  (x^2 + x + 1)(x^6 + x^5 + x^3 + x^2 + 1), and from the example seed the
  patterns repeat after 63 cycles. T1 alone already reappears after 38
  cycles, with a different value in HOLD.
* The 36-bit default x^36 + x^25 + 1 is primitive, so its period is
  2^36 - 1 cycles. That figure is from polynomial tables; it has not been
  simulated.
* Right after the first half shifts, FF1 is the XOR of the tap stages. If
  all taps lie in the second half, as with the default FF36/FF25, nothing
  else has changed them yet. Every T pattern therefore has
  `FF1 = FF36 ^ FF25`, and the T patterns take only 2^35 distinct values,
  most of them twice per period. The intermediate patterns do not follow
  this rule.
* `ZERO_STATE = 1` inverts the feedback while FF1..FF(n-1) are all zero.
  The sequence then also passes through the all-zeros state, and the period
  becomes 2^n. When the first half shifts, the flip-flops hold the n newest
  bits of the extended register, so the usual correction applies unchanged.

## Blocks

| module | role |
|---|---|
| `lp_tpg_pkg` | `phase_e`: `PH_IDLE`, `PH_T`, `PH_TA`, `PH_TB`, `PH_TC` |
| `lp_lfsr` | datapath: halves, HOLD, injection circuits, output selectors |
| `lp_tpg_ctrl` | pattern generation controller; decodes en1/en2/sel1/sel2 from the phase |
| `lp_tpg` | controller + datapath; inputs are only `clk`, `reset`, `test_en` |
| `c432_pkg`, `c432_m1`..`c432_m5`, `c432` | functional model of the c432 interrupt controller (circuit under test) |
| `lp_bist_top` | 36-bit LP-TPG applying one pattern per clock to c432 |

### lp_lfsr

Parameters: `WIDTH` (36), `HALF` (`WIDTH/2`), `TAPS`, `SEED`, `ZERO_STATE` (0). Bit k of
`TAPS` selects the flip-flop that drives `pattern[k]`, so FF1 is bit
`WIDTH-1` and FFn is bit 0. The 8-bit example is
`WIDTH=8, TAPS=8'b1000_0001, SEED=8'b0100_1011`. `pattern` is combinational
from the flip-flops and the selects. `reset` is asynchronous, active high,
and loads `SEED`; HOLD resets to 0, and it is always written before it is
read. Each half needs at least two flip-flops.

The injection is written as a per-bit compare-and-select,
`inj[i] = (q[i] == d[i]) ? q[i] : R`.

### lp_tpg_ctrl

A five-state machine. After reset it is in `PH_IDLE` with both selects at 1,
so the seed is visible. Each clock with `test_en` high then advances
T -> Ta -> Tb -> Tc -> T... The enables are decoded from the *next* phase,
so they act on the edge that produces the pattern named in the table. The
selects are decoded from the *current* phase. With `test_en` low nothing
shifts and the phase holds, so the pattern is frozen. `lfsr_pat` marks the
clocks on which an LFSR pattern is applied. An immediate assertion checks
that the two halves never shift on the same edge.

### c432 model

c432 is a 27-channel interrupt controller. Nine-bit request buses A, B and C
are gated by the enable bus E, which gives 36 inputs. The outputs are
PA, PB, PC and Chan[3:0]. A beats B, B beats C, and a higher channel index
wins within a bus. The acknowledged channel is the highest enabled request of
the highest-priority requesting bus. Every bus that requests on that channel
is acknowledged: A4, A2, B6 and C4 pending give PA = PC = 1, Chan = 4. The
split into M1 (bus A, produces the open-channel mask X1), M2 (bus B, X2),
M3 (bus C), M4 (the vector I of the winning bus) and M5 (a 9-to-4 priority
encoder) follows the benchmark's published block structure.

This is a **functional** model, not the ISCAS-85 gate netlist. Requests are
active high, and Chan is 0 when nothing is acknowledged. Its switching
activity is therefore not that of the real c432, so power figures from it
are not comparable to gate-level results.

### lp_bist_top

Pattern bits map to c432 inputs as `pattern[35:27]=A`, `[26:18]=B`,
`[17:9]=C`, `[8:0]=E`, with channel 8 at each MSB. The c432 responses, the
phase and the LFSR state are outputs. There is no response compactor: the
set-up this follows observes the responses directly.

## Where this RTL decides

* **36-bit taps and seed.** The thesis gives taps and a seed only for its
  8-bit example. The 36-bit default uses feedback from FF36 and FF25
  (x^36 + x^25 + 1, a commonly tabulated maximal-length polynomial) and
  seed `36'h4_B4B4_B4B4`. Change `TAPS` and `SEED` as needed; the period is
  that of an ordinary LFSR with the same taps.
* **All-zeros state off by default.** The thesis also asks for taps that
  generate the all-zeros pattern, which needs a NOR-corrected LFSR. Its
  8-bit schematic shows only the XOR, so `ZERO_STATE` defaults to 0. Its
  published example never reaches the state where the correction would act,
  so the example does not settle the question.
* **Controller internals.** These are not given. The idle state after reset
  and freezing while `test_en` is low are this design's choices. The control
  table itself is the thesis's.
* **Reset.** The schematic has a reset input but does not give its type.
  Here it is asynchronous and active high.
* **c432.** The request polarity, the meaning of X1/X2/I, and the Chan value
  when idle are this design's choices (see above). The order in which
  pattern bits map to c432 inputs is also this design's choice.
* **Other circuits.** The thesis lists c499 (41 inputs) and c880 (60 inputs)
  as further benchmarks. `WIDTH` covers them, but their taps must be chosen.
  The workload testbench uses x^41 + x^38 + 1 and x^60 + x^59 + 1.
* **Power.** The thesis measured power with FPGA tools (about 16 mW -> 10 mW
  on c432, 330 vs 370 vectors for 98 % fault coverage). Neither power nor
  fault coverage is reproduced here. The testbenches count input
  transitions instead.

## Verification

Each testbench is self-checking and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `lp_lfsr_tb` | 8-bit example: the 15 published patterns under the control table; 36-bit: 4000 clocks of random en/sel against a bit-level model of the shift and injection rules |
| `lp_tpg_ctrl_tb` | control values per phase, no enable while paused, phase counts |
| `lp_tpg_tb` | 8-bit example with `test_en` high (T1 one clock after enable, T every 4th clock, period 63 cycles); a second 8-bit generator with a primitive polynomial and `ZERO_STATE = 1` must repeat after 256 cycles and pass through the all-zeros state; 36-bit with random pauses: Ta/Tb/Tc predicted from neighbouring T patterns and R, the T-to-T recurrence, per-cycle transitions = Hamming distance, one half per clock |
| `c432_m1_tb`..`c432_m5_tb`, `c432_tb` | each stage and the whole controller against a loop-based reference of the priority rules, plus the A4/A2/B6/C4 example |
| `lp_bist_top_tb` | full default size, 1000 applied patterns at a 60 ns clock: c432 responses every clock, the pattern rules above; counts every phase, injection of R = 0 and R = 1, pauses, PA/PB/PC and shared-channel acknowledges, and fails if any never occurs |
| `lp_tpg_workload_tb` | 36-, 41- and 60-input generators (c432, c499, c880 sizes), 1480 patterns each, same structural checks |

Typical result at the default size, over 1000 applied patterns (249 LFSR
cycles):

* The input transitions equal those of the LFSR patterns alone (4217).
* The peak per clock is 7 inputs, against 27 when the LFSR patterns are
  applied back to back.
* In the functional c432 model, the outputs and the internal buses X1, X2
  and I toggle 7.2 times per applied pattern, against 9.7 for back-to-back
  LFSR patterns. So switching per clock, which is what sets average power
  at a fixed clock, is about a quarter lower.
* Per LFSR pattern reached, the model switches about three times as much
  (7180 against 2405 toggles). Each intermediate pattern is an input
  combination of its own, and the circuit responds to it.

These counts come from a behavioural model, not the gate netlist. They show
the trend, not the thesis's power numbers.

## Simulating

Verilator 5 with `--timing`. Run from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv \
    rtl/lp_tpg_pkg.sv rtl/c432_pkg.sv tb/lp_bist_top_tb.sv \
    --top-module lp_bist_top_tb -o sim
./obj_dir/sim
```

Replace `lp_bist_top_tb` with any other testbench name. The packages are
listed first; all other modules are found through `-y`. Every testbench has
a watchdog and finishes in well under a second.
