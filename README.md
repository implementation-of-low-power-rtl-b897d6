# PRESTO: a low-power programmable pseudorandom pattern generator

Scan-based logic BIST loads scan chains with pseudorandom data. About half of
the scan cells then flip on every shift cycle, and the circuit under test can
draw several times its functional power. PRESTO (PREselected TOggling) is a
pseudorandom pattern generator (PRPG) whose scan-in toggling rate is
programmable. It puts a hold latch between every PRPG bit and the phase
shifter. A latch that is enabled passes the PRPG bit on. A latch that is
disabled repeats its last value, so a scan chain fed only by disabled latches
receives a constant value and does not toggle. Three 4-bit codes set how many
latches are enabled and for how long:

* **Switching** sets the fraction of latches in toggle mode, chosen afresh for
  every test pattern. Code `0000` turns the low-power function off.
* **Toggle** and **Hold** split the shifting of each pattern into alternating
  toggle periods and hold periods. During a hold period every latch is frozen
  and no scan input changes. The two codes set the mean length of each kind of
  period.

The RTL here is synthesizable SystemVerilog. It builds with Verilator 5 and
with the slang front end of Yosys.

## Structure

```
                     +-----------+   w_sw   +----------------+  reload per pattern
 Switching code ---->| weighted  |--------->| shift register |-------------+
          |          |  logic    |          +----------------+             v
          |          +-----------+                              +------------------------+
          |               ^ 10 bits                             | toggle control register|
          |               |                                     +------------------------+
          |   +-----------+--------------+                           | ctrl[N]
          |   |       PRPG (N-bit LFSR)  |        T flip-flop ----+  |
          |   +-----------+--------------+          ^  mode        v  v
          |               | N bits       |          |            AND gates
          |               |              | 10 bits  |               |
          |               |              v          |        NOR(Switching)=lp_off
          |               |        +-----------+    |               v
          |               |        | weighted  |----+  t_in      OR gates
          |               |        |  logic    |                    | en[N]
          |               |        +-----------+                    v
          |               |              ^ code            +----------------+
          |               |   Hold/Toggle mux (by mode)    | hold latches   |
          |               +------------------------------->| H1 .. HN       |
          |                                                +----------------+
          |                                                        | N
          +--> pattern counter                              +-------------+
                                                            |phase shifter|--> scan_in[M]
                                                            +-------------+
```

| Module | Role |
|---|---|
| `presto_pkg` | `code_t`, the `mode_e` enum (`MODE_HOLD`, `MODE_TOGGLE`), the `presto_cfg_t` struct {switching, hold, toggle}, and `WL_BITS` |
| `prpg_lfsr` | N-bit Fibonacci LFSR with seed load |
| `weighted_logic` | four AND gates (1/2, 1/4, 1/8, 1/16) plus an OR, selected by a 4-bit code |
| `toggle_control` | shift register fed by the Switching weighted bit, and the toggle control register reloaded from it |
| `pattern_counter` | counts shift cycles and flags the last cycle of each pattern |
| `mode_control` | T flip-flop, Hold/Toggle muxes and their weighted logic |
| `enable_logic` | NOR on the Switching code, AND with the T flip-flop, OR to force all latches on |
| `hold_latches` | the N hold latches |
| `phase_shifter` | M outputs, each the XOR of three latches |
| `presto_top` | the whole generator, including the Switching, Hold and Toggle registers |

## The weighted logic and what a code means

A weighted logic block turns uniform PRPG bits into one bit that is 1 with a
programmable probability. Its four AND gates see 1, 2, 3 and 4 PRPG bits, so
they output 1 with probability 1/2, 1/4, 1/8 and 1/16. Each gate also has one
bit of the code as an enable: bit 3 enables the 1/2 gate and bit 0 the 1/16
gate. An OR gate merges the four gates. The ten PRPG bits are all different,
so the result is 1 with probability

    p(code) = 1 - prod over set code bits k of (1 - p_k)

This is exact for a single bit (code `0100` gives 1/4) and falls between the
powers of two otherwise:

| code | p | mean period 1/p (cycles) | scan toggle rate, Toggle/Hold codes `0000` |
|---|---|---|---|
| 0000 | 0 (low power off when used as Switching) | never ends | 0.500 |
| 0001 | 0.0625 | 16.0 | 0.088 |
| 0010 | 0.1250 | 8.0 | 0.165 |
| 0011 | 0.1797 | 5.6 | 0.224 |
| 0100 | 0.2500 | 4.0 | 0.289 |
| 0101 | 0.2969 | 3.4 | 0.326 |
| 0110 | 0.3438 | 2.9 | 0.359 |
| 0111 | 0.3848 | 2.6 | 0.384 |
| 1000 | 0.5000 | 2.0 | 0.438 |
| 1001 | 0.5312 | 1.9 | 0.449 |
| 1010 | 0.5625 | 1.8 | 0.458 |
| 1011 | 0.5898 | 1.7 | 0.466 |
| 1100 | 0.6250 | 1.6 | 0.474 |
| 1101 | 0.6484 | 1.5 | 0.478 |
| 1110 | 0.6719 | 1.5 | 0.482 |
| 1111 | 0.6924 | 1.4 | 0.485 |

The same logic is used in three places, each with its own meaning for p:

* **Switching** (`cfg.switching`): p is the expected fraction of ones in the
  toggle control register, that is, of latches in toggle mode. A scan input is
  the XOR of three latches. An enabled latch's PRPG bit changes with
  probability 1/2. So the scan input toggles with probability about
  `0.5 * (1 - (1 - p)^3)`, as in the last column of the table.
* **Toggle** (`cfg.toggle`): in a toggle period, p is the chance per cycle that
  the period ends. Its mean length is 1/p cycles.
* **Hold** (`cfg.hold`): the same, for hold periods.

With Hold and Toggle codes of weights `ph` and `pt`, the generator spends a
fraction `(1/pt) / (1/pt + 1/ph)` of the cycles in toggle periods, and the
toggle rate scales down by that factor. A Hold or Toggle code of `0000` never
ends that period. After reset the generator is in a toggle period and all
three registers are `0000`, so it behaves as a plain full-toggle PRPG.

## Cycle behaviour

Everything is synchronous to `clk`, and `rst_n` is an asynchronous reset. In
every cycle with `run` high:

1. `scan_in` is combinational from the current PRPG state and latch state. A
   scan chain shifts it in at the next rising edge.
2. Latch enables: `en[i] = (ctrl[i] & mode==MODE_TOGGLE) | lp_off`, where
   `lp_off = (switching == 0000)`. Low power off therefore also overrides hold
   periods.
3. Latch output: `q[i] = en[i] ? prpg[i] : held[i]`. `held` is then updated
   to `q`.
4. At the edge, the PRPG shifts, and the Switching weighted bit enters the
   shift register. The T flip-flop flips if its weighted input was 1.
5. In the last of every `SCAN_LEN` shift cycles, `pattern_end` is high, and the
   toggle control register takes the shift register's value at that edge. The
   control register is therefore constant for a whole pattern.

With `run` low, nothing advances and `scan_in` holds still. `cfg_we` writes
all three code registers at once, and the new codes take effect in the next
cycle. The new Switching code affects the control register only from the
next reload, because it fills the shift register first. `seed_we` loads
`seed` into the PRPG; an all-zero seed is replaced by 1. It takes priority
over `run`.

The hold "latches" are built as a flip-flop plus a 2:1 multiplexer per bit.
Seen at the clock edges, this behaves exactly like a latch that is
transparent while enabled. It also keeps the design free of level-sensitive
storage.

## Which PRPG bits feed the weighted logic

This is the subtle part of the design. The T flip-flop's weighted logic reads
ten PRPG bits in every cycle. In a shift register every value passes through
every bit position, so the logic sees each value several times as it moves
along. How long the current period has already lasted therefore biases when it
ends. With evenly spaced taps (every third bit), measured toggle-period
fractions were up to 0.07 off the formula above: 0.26 instead of 0.33 for Hold
`0010` with Toggle `0100`. The T-input logic now reads bits
`14, 24, 31, 9, 0, 13, 17, 20, 3, 5`, found by searching tap sets against a
bit-exact model of the LFSR. Simulated over six Hold/Toggle pairs, they are
within about 0.01 of the formula. The Switching logic reads
`1, 2, 4, 6, 8, 10, 11, 15, 19, 23`. Both lists are in gate order: the 1/2
gate's bit, then the two bits of the 1/4 gate, the three of the 1/8 gate, and
the four of the 1/16 gate. The lists are `SW_TAP` and `T_TAP` in
`presto_top.sv`. Changing `N` or `TAPS` calls for a new choice; N must be at
least 32 for these lists.

## Parameters of `presto_top`

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 32 | PRPG width, number of hold latches and control register bits |
| `TAPS` | `0x80200003` | LFSR feedback mask, x^32+x^22+x^2+x+1 (primitive) |
| `M` | 15 | scan chains (phase shifter outputs) |
| `SCAN_LEN` | 64 | shift cycles per pattern (longest scan chain) |
| `PAT_W` | 16 | width of the pattern number output |

The phase shifter's output j XORs latches `j`, `j+7` and `j+19` (mod N).
With N=32 and M=15, every latch feeds at least one output.

Of these, the architecture fixes the following: the three-latch XOR per scan
input, the four weights 1/2 to 1/16, the 4-bit codes and their registers, the
4-input NOR, the once-per-pattern reload and the T flip-flop with its four
muxes. The 15 scan chains come from the toggling-profile example that
accompanies the architecture. The width, the polynomial, the tap positions,
the scan length, the reset values, the register write port and the `run`
input are this implementation's own choices.

## Measured behaviour

All figures below come from simulation at the default size.

* Switching `0100` fills 26.6% of the control register on average; the target
  is 25%. The scan toggle rate falls from 0.53 with low power off to 0.30.
* The full toggling profile over all 16 Switching codes matches the table
  above within 0.01 at every code.
* With Switching `1000`, the toggle-period fractions for Hold/Toggle pairs
  `1000/1000`, `0100/0010`, `0010/0100` and `0001/1000` are 0.500, 0.682,
  0.325 and 0.104; the formula gives 0.500, 0.667, 0.333 and 0.111.
* On the ISCAS-85 c17 benchmark, scan inputs 0..4 drive the five c17 inputs
  on every cycle, over 22 runs of 1024 cycles each. With low power off, all 22
  single stuck-at faults are detected, with 56,576 input transitions in all.
  With Switching `0100`, Hold `0001` and Toggle `0010`, all 22 are still
  detected, with 11,095 transitions.

## Not included

* The hybrid mode that combines PRESTO-based logic BIST with deterministic
  test compression. It is named as part of the concept, but no structure or
  interface is defined for it.
* The procedure that picks Switching, Hold and Toggle codes for a target
  toggling rate or fault coverage. This is software, not hardware.
* Scan chains and the circuit under test. `scan_in` is the interface to them.
* A ring generator as the PRPG. It is an alternative to the LFSR used here;
  only `prpg_lfsr` would change.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=N failures=F`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/presto_pkg.sv tb/tb_presto_top.sv --top-module tb_presto_top -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_presto_top` | whole generator at default size against a cycle-level reference model, every cycle. Covers low-power off, Switching 0100, hold/toggle periods (no scan change during a hold), seed load, stalls and reconfiguration |
| `tb_toggling_profile` | toggle rate and control register fill for all 16 Switching codes, and period fractions for four Hold/Toggle pairs |
| `tb_c17_workload` | fault detection and input transitions on c17 (`tb/c17_model.sv`), low power off against low power on |
| `tb_prpg_lfsr` | period 255 of an 8-bit instance; step-by-step match of the 32-bit one |
| `tb_weighted_logic` | all codes and all input values; exact counts of ones per code |
| `tb_mode_control` | T flip-flop against a reference; mean period lengths 2 and 16 cycles |
| `tb_toggle_control`, `tb_pattern_counter`, `tb_enable_logic`, `tb_hold_latches`, `tb_phase_shifter` | each block against a reference model |

All testbenches finish in well under a second of wall time. The reference
models in the testbenches are written separately from the RTL. They still
share its design choices, such as the tap lists and reset values; changing
one of those means changing the model too.
