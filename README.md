# Pulsed-latch shift register with non-overlapping delayed pulsed clocks

A long shift register is nothing but storage cells in a chain, with no logic
between them. Its cost is area and clock power, not speed. A pulsed latch (a
plain latch that is transparent only during a short clock pulse) is much
smaller than a master-slave flip-flop, so replacing the flip-flops with pulsed
latches saves both. The catch: if every latch opens on the same pulse, a latch's
input (the previous latch's output) changes while it is still open. The data
then races through several stages in one cycle.

This design removes the race by giving the latches different, non-overlapping
pulses. They fire in reverse order along the chain, so each latch is written
after the latch it feeds. To avoid one pulse per bit, the N-bit register is cut
into N/K sub shift registers of K bits. Every sub shift register uses the same
K+1 pulses, and each has one extra *temporary storage latch* that carries its
last bit across the boundary to the next one. The default is the 256-bit
configuration: N = 256 and K = 4 give 64 sub shift registers, 320 latches
(N + N/K) and only 5 pulsed clocks.

Beside it, the top also holds a small, unrelated example: a 4-bit universal
shift register (hold, shift right, shift left, parallel load).

## How one clock cycle shifts the data

Take one sub shift register with K = 4 latches, Q1..Q4, and a temporary latch
T. Q1 takes the serial input. Q2..Q4 each take the latch before them, and T
takes Q4. Each rising edge of the system clock produces five pulses, one after
the other, never two at once:

| order | pulse          | latch written | what it reads                 |
|-------|----------------|---------------|-------------------------------|
| 1     | `CLK_pulse<T>` | T             | Q4, still the old value        |
| 2     | `CLK_pulse<4>` | Q4            | Q3, still old                  |
| 3     | `CLK_pulse<3>` | Q3            | Q2, still old                  |
| 4     | `CLK_pulse<2>` | Q2            | Q1, still old                  |
| 5     | `CLK_pulse<1>` | Q1            | serial input, or T of the previous sub shift register (already new) |

Every latch reads a value that stays fixed for its whole pulse, so nothing
races. The last row is the important one. All sub shift registers see the same
pulses. T of sub shift register *m* is written first and Q1 of sub shift
register *m*+1 is written last. So the bit that leaves Q4 of one group reaches
Q1 of the next group in the same cycle. T is only a holding place; it does not
add a cycle of latency. After the cycle, every Q has moved one place and Q1
holds the input. The whole N-bit register behaves exactly like N flip-flops in
a chain.

Those two pulses (T and 1) are the farthest apart in the sequence. That gap
makes the boundary tolerant of pulse skew between distant sub shift registers.

The price is N/K extra latches. The saving is that the pulse generator needs K+1
stages, not N.

## Blocks

```
ps_top
├── delayed_pulse_gen          K+1 chained clock_pulse_circuit stages + buffers  (timing model)
│   └── clock_pulse_circuit
├── pulsed_latch_shift_reg     N/K sub_shift_reg in a chain
│   └── sub_shift_reg          K data latches + 1 temporary latch
│       └── ssaspl             one pulsed latch cell
└── universal_shift_reg        4-bit example, separate clock
    └── usr_mux4               (uses usr_pkg for the mode encoding)
```

### `ssaspl`: the latch cell

This models a 7-transistor differential pulsed latch. Two cross-coupled
inverters hold the bit. Two NMOS pull-downs, gated by D and Db, share a single
foot transistor gated by the pulse. While the pulse is high, the side whose
data input is high is pulled low, so Q takes D. Otherwise the bit is held. In
RTL this is a level-sensitive latch with differential inputs `d`/`db` and
outputs `q`/`qb`. A chain passes `q`/`qb` straight into the next `d`/`db`.
If `d == db` the input is not a valid differential value, and the model keeps
the stored bit. Tools report a latch here; that is intended.

### `clock_pulse_circuit` and `delayed_pulse_gen`: the pulse generator

These two are **behavioural timing models**, not synthesizable logic. The pulse
width comes from an analog delay.

One clock-pulse stage passes its input clock through a delay cell and two
inverters. An AND gate combines the input clock with the output of the first
inverter, which is the inverted, delayed clock. The AND output is high from the
rising edge until the inverted delayed clock falls. A falling edge gives no
pulse. The output of the second inverter is the delayed clock, and it feeds the
next stage. Chaining K+1 stages gives K+1 pulses, each one stage delay after
the previous one. The first stage drives `CLK_pulse<T>`, and the following
stages drive `<K>`, `<K-1>` and so on down to `<1>`. Each pulse passes through a
clock buffer.

The delay values were chosen for this model (parameters, in ps):

| parameter    | default | effect                                      |
|--------------|---------|---------------------------------------------|
| `T_DELAY_PS` | 300     | pulse width = `T_DELAY_PS + T_INV_PS` = 400 ps |
| `T_INV_PS`   | 100     | gap between pulses = `T_INV_PS` = 100 ps    |
| `T_AND_PS`   | 50      | AND gate delay                              |
| `T_BUF_PS`   | 50      | clock buffer delay                          |

Pulse *s* (s = 0 for T, then 1..K) starts `s*(T_DELAY_PS + 2*T_INV_PS) + T_AND_PS
+ T_BUF_PS` after the clock edge. With K = 4 the last pulse ends 2.5 ns after the
edge, well inside the 10 ns period of the intended 100 MHz clock. The clock
period must be longer than the whole chain, and each delay shorter than half
the clock period.

### `sub_shift_reg` and `pulsed_latch_shift_reg`

`sub_shift_reg` is the group described above: K `ssaspl` cells plus the
temporary one. `pulsed_latch_shift_reg` chains N/K of them. The first takes
`din` (its complement comes from an inverter), and each following one takes the
previous group's T. Both parts are synthesizable: synthesis of
`pulsed_latch_shift_reg` at the defaults gives 320 latch bits. N must be a
multiple of K, which an elaboration-time assertion checks.

### `universal_shift_reg` and `usr_mux4`

Each bit is a storage element fed by a 4-to-1 selector. Both selects,
`{s1,s0}`, drive all four selectors. The encoding is in `usr_pkg`:

| s1 s0 | mode          | next value                          |
|-------|---------------|-------------------------------------|
| 0 0   | locked        | unchanged                           |
| 0 1   | shift right   | `sr` enters at `oa`, bits move toward `od` |
| 1 0   | shift left    | `sl` enters at `od`, bits move toward `oa` |
| 1 1   | parallel load | `a..d`                              |

`pin`/`pout` are ordered with `a`/`oa` in the top bit. The storage elements are
rising-edge flip-flops.

## Top-level interface and timing (`ps_top`)

| port          | dir | width     | meaning |
|---------------|-----|-----------|---------|
| `clk`         | in  | 1         | shift clock; one shift per rising edge |
| `din`         | in  | 1         | serial input |
| `q`           | out | N         | all bits; `q[0]` is Q1 (newest), `q[N-1]` is Q(N) |
| `dout`        | out | 1         | Q(N): a bit stored into Q1 on one edge appears here N-1 edges later |
| `tout`        | out | 1         | last temporary latch: the bit that has just left |
| `usr_clk`     | in  | 1         | clock of the universal shift register |
| `usr_s1`, `usr_s0` | in | 1   | mode select |
| `usr_sr`, `usr_sl` | in | 1   | serial inputs for shift right / left |
| `usr_pin`     | in  | USR_WIDTH | parallel inputs |
| `usr_pout`    | out | USR_WIDTH | parallel outputs |

Parameters: `N` = 256, `K` = 4, `USR_WIDTH` = 4.

`din` is read during the last pulse of the sequence. Keep it stable from the
rising edge of `clk` until the chain has finished (2.5 ns with the default
delays). `q`, `dout` and `tout` are settled by then and hold until the next
rising edge. There is no reset: the register holds unknown data until N bits
have been shifted in. The universal shift register must be loaded once before
its contents mean anything.

## Where this model departs from the original circuit

- **The pulses come from a delay model.** The original is a transistor-level
  delay chain. Here it is written with `#` delays, so simulation needs a
  timing-capable simulator (Verilator with `--timing`). Synthesis ignores the
  delays. Without them each pulse reduces to `clk & ~clk`, which is 0, so the
  synthesized `ps_top` shows the shift register's outputs as constant. The
  latch array itself (`pulsed_latch_shift_reg`) synthesizes properly, and in a
  real implementation the generator is a custom cell.
- **Wire skew is not modelled.** Every sub shift register sees identical
  pulses. The reverse pulse order and the wide T-to-1 gap are what make the
  real circuit tolerant of skew. `tb_pulse_skew` applies such skew from the
  testbench and shows that the latch chain tolerates it.
- **Delay values are invented** (table above). The original sets no numbers
  beyond the 100 MHz clock.
- **Own interface choices:** the parallel output `q`, the serial output taken
  at Q(N), `tout` as an extra output, an inverter that makes the complement of
  `din`, the hold behaviour for `d == db`, and no reset anywhere.
- **Universal shift register:** the original names its storage cells
  "latches" but gives no clocking for them. This design uses edge-triggered
  flip-flops, because bidirectional shifting cannot rely on a single pulse
  order. The direction convention (`sr` enters at `oa`) is the usual one and
  was chosen here.
- Physical results (area, power, transistor sizing) cannot be expressed in RTL.
  Nothing here reproduces them.
- The flip-flop shift register used as the comparison point, and the
  alternative of delay cells between latches, are not included. Only the
  proposed pulsed-latch design is.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench                    | what it checks |
|------------------------------|----------------|
| `tb_ssaspl`                  | write while the pulse is high, transparency during the pulse, hold otherwise, hold for `d == db`; random sequence against a reference bit |
| `tb_clock_pulse_circuit`     | one pulse per rising edge, exact start time, exact width, none on the falling edge, delayed-clock timing |
| `tb_delayed_pulse_gen`       | per cycle exactly K+1 pulses in the order T, K..1, exact times, never overlapping, all done before the next edge at 100 MHz |
| `tb_sub_shift_reg`           | Q1..QK and T against a reference after each pulse sequence; then one common pulse on all latches, showing the input racing through the whole chain (the problem the pulse order avoids) |
| `tb_pulsed_latch_shift_reg`  | all 256 bits against a reference every cycle, `dout` latency of N cycles, `tout` |
| `tb_usr_mux4`                | exhaustive |
| `tb_universal_shift_reg`     | random mode sequence against a reference; every mode used |
| `tb_pulse_skew`              | eight sub shift registers whose pulse sequences arrive later the farther they are (0, 100, 250, 300 ps per stage, up to 2.1 ns end to end, more than the pulse spacing): every bit still correct each cycle |
| `tb_ps_top`                  | full default size at 100 MHz: 768 random bits, every bit checked every cycle, pulse order seen inside the top, the T-to-Q1 hand-off, serial latency, plus the universal shift register in all four modes; fails if any of these never happened |

Run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_ps_top \
    rtl/usr_pkg.sv tb/tb_ps_top.sv -Mdir obj_tb_ps_top
obj_tb_ps_top/Vtb_ps_top
```

Modules are found by file name (`-I`). Each file holds one module or package,
named after it. Every file sets `` `timescale 1ps/1ps ``. The full-size
end-to-end test takes well under a second.

To change the size, set `N` and `K` on `ps_top` (N a multiple of K). The
generator grows to K+1 stages, so the clock period must stay above
`(K+1)*(T_DELAY_PS + 2*T_INV_PS)`.
