# Quasi delay-insensitive ROM

An asynchronous read-only memory that computes a fixed table lookup with no
clock. It is built from a *value table*: every input and output is a 1-of-n
channel (one wire per possible value plus an enable), the ROM waits for one
token on each input channel, picks the one table row that matches, and sends
one token on each output channel. Everything is sequenced by handshakes and
completion detection, so the circuit is correct whatever the gate and wire
delays (quasi delay-insensitive, QDI). Two control schemes are available from
the same datapath: a sequential one that spends the least energy per access,
and a pipelined one that roughly halves the cycle time at some energy cost.

The RTL models the circuit at the level of its production rules: every
state-holding node (C-element output, precharged word line, bit line) is a
level-sensitive latch, every other node is combinational, and nothing has a
delay. It simulates with plain Verilator and shows the handshake sequencing,
the table function and the difference between the two control schemes. It
does not model transistor timing, so it cannot reproduce cycle times or
energy.

## Channels

A 1-of-n channel has n data rails and one enable. The enable is active high:
it is the inverted acknowledge. One transfer is a four-phase handshake:

1. the receiver's enable is high; the sender raises exactly one rail;
2. the receiver lowers the enable once it has taken the value;
3. the sender returns all rails low (the neutral state);
4. the receiver raises the enable again.

The ROM uses one enable, `in_e`, for all of its input channels, and raises
and lowers them all together. Its output channels each have their own enable
(`out_e[j]`), because the receivers may answer at different times.

In the port lists a group of channels is a packed array
`[N][MAXW-1:0]`: channel `i` uses rails `0 .. W_i-1`, the rails above are
unused.

## The value table

The table is given as parameters. Every value is one hexadecimal digit, so a
table line reads directly as a hex literal, inputs left to right:

| parameter | type | meaning |
|-----------|------|---------|
| `N_IN`, `N_OUT`, `ROWS` | int | input channels, output channels, table rows |
| `IN_W`, `OUT_W` | `logic [0:N-1][3:0]` | rails per channel (2 .. 15, at most `MAXW`) |
| `IN_VAL` | `logic [0:ROWS-1][0:N_IN-1][3:0]` | value each input must have for the row, `F` = don't care |
| `OUT_VAL` | `logic [0:ROWS-1][0:N_OUT-1][3:0]` | value sent on each output for the row |
| `MAXW` | int | rails in each channel port (default 8) |
| `FEET` | bit | 1 = high-speed ROM, 0 = low-energy ROM |
| `MP`, `MN` | int | longest series pMOS / nMOS stack, sets the tree fan-ins (3, 6) |

A don't-care input is still handshaken and must still carry a token, but its
value is not used. Every input combination that can occur must match exactly
one row. A combination that matches no row stalls the ROM for good; a table
marks such combinations "never occurs" simply by leaving them out.

The default table (in `romantic_pkg`) has inputs a, b, c of 1-of-3, 1-of-4,
1-of-2, and five outputs of 1-of-2, 1-of-8, 1-of-3, 1-of-2, 1-of-2:

```
  a b c : outputs         IN_VAL   OUT_VAL
  - 0 1 : 1 1 1 0 0       12'hF01  20'h11100
  - 0 0 : 1 2 2 0 1       12'hF00  20'h12201
  0 1 1 : 1 1 1 0 1       12'h011  20'h11101
  1 1 1 : never           (no row)
  2 1 1 : 1 1 1 1 0       12'h211  20'h11110
  - 1 0 : 1 1 1 1 1       12'hF10  20'h11111
  - 2 - : 1 1 1 1 0       12'hF2F  20'h11110
  - 3 - : 1 1 1 1 1       12'hF3F  20'h11111
```

## Inside the ROM

One access has four steps: receive the inputs, decode them, look the row up,
send the outputs. The split between decode and lookup is the central idea:

```
  *[In?X; Out!M[X]]  =  *[In?X; Decode!d(X)]  ||  *[Decode?d; Out!M[d]]
```

`Decode` is an internal 1-of-ROWS channel: one word line per table row.

**Address decoder** (`address_decoder`). One precharged pulldown stack per
row, followed by an inverter, gives the word line. While `decodep_` is low the
word lines are held low (precharge). While it is high, a row's word line
rises when each specified input has the named rail high and each don't-care
input has any rail high; it then stays high, held by a keeper, until the next
precharge, even after the inputs go neutral.

**ROM array** (`rom_array`). Every output rail has a bit line, precharged high
while `romp_` is low. A transistor sits at every (row, rail) where the table
stores that value; the high word line pulls those bit lines down and the
output inverters raise the matching rails. In the high-speed ROM the
pulldowns do not go to ground but to one shared virtual ground
`bigromp = ~romp_`. During precharge `bigromp` is high, so a word line that is
still high cannot fight the precharge; only one word line is ever high, so one
shared foot for the whole array creates no sneak paths.

**Completion trees** (`or_tree`, `c_tree`, `c_element`). The control needs
four summary signals:

| signal | circuit | high when |
|--------|---------|-----------|
| `In^v` | C-tree over the per-channel ORs of the input rails | every input channel holds a token |
| `Decode^v` | OR tree of the word lines | a word line is high |
| `Out^v` | C-tree over the per-channel ORs of the output rails, plus `~bigromp` in the high-speed ROM | every output channel holds a token (and the array is not precharging) |
| `Out^e` | C-tree of the individual output enables | all output enables are high |

A C-tree output falls only once all its inputs are low, so each of these is
an honest "all valid" / "all neutral" detector. Gate fan-in is limited by the
longest transistor stack allowed: OR gates take `floor(sqrt(MP*MN)) = 4`
inputs and C-elements `min(MP, MN) = 3`, so a tree over k signals has
`ceil(log_4 k)` or `ceil(log_3 k)` levels. `~bigromp` is part of `Out^v` so
that the rise of the virtual ground is acknowledged like any other
transition.

## The two control boxes

The control box produces `In^e`, `decodep_` and `romp_` from the four summary
signals. The datapath is identical under both; only the control and the
grounding of the ROM array differ.

### Low-energy (`FEET = 0`, `control_le`)

One sequential process:

```
*[ [In^v & Decode^v & Out^v & ~Out^e]; In^e-;
   [~In^v]; decodep_-; [~Decode^v]; romp_-;
   [~Out^v & Out^e]; decodep_+; romp_+; In^e+ ]
```

The inputs are acknowledged only after the output has been taken; the
decoder is precharged, then the array, and only then does the next access
start. `romp_` falls only after every word line is low, so the array can
pull down straight to ground. Each signal is a set/reset node:

| node | falls when | rises when |
|------|------------|------------|
| `In^e` | `decodep_ & romp_ & In^v & Decode^v & Out^v & ~Out^e` | `decodep_ & romp_ & ~Out^v & ~Decode^v` |
| `decodep_` | `~In^e & ~In^v & Out^v & romp_` | `~romp_ & ~Out^v & Out^e` |
| `romp_` | `~decodep_ & ~Decode^v` | `decodep_` |

The state `(In^e, decodep_, romp_) = (0, 1, 1)` occurs twice in the cycle,
just after `In^e-` and just before `In^e+`. The guards tell the two apart by
`Out^v`: the output is still valid the first time and has already been
precharged the second.

### High-speed (`FEET = 1`, `control_hs`, default)

The ROM becomes two precharge half-buffers, DECODE and ROM, with `x^e` the
enable of the Decode channel between them:

```
DECODE: *[ [In^v & Decode^v]; In^e-; [~x^e]; decodep_-;
           [~In^v & ~Decode^v]; In^e+; [x^e]; decodep_+ ]
ROM:    *[ [Decode^v & Out^v]; x^e-; [~Out^e]; romp_-;
           [~Decode^v & ~Out^v]; x^e+; [Out^e]; romp_+ ]
```

which is four two-input C-elements:

```
In^e     = ~C(In^v, Decode^v)        x^e   = ~C(Decode^v, Out^v)
decodep_ =  C(In^e, x^e)             romp_ =  C(x^e, Out^e)
```

The inputs are acknowledged and precharged while the ROM half still holds the
output, so the next input token can arrive before the previous output has
been taken: the ROM has one more place of slack. The price is that the two
halves no longer wait for each other around the precharge: once the old
output has been precharged, the decoder may already raise the next word line
while `romp_` is still low, waiting for the output enables. That is exactly
the case the `bigromp` foot handles.

## Around the ROM

`romantic_top` is the ROM with a precharge half-buffer (`pchb_buffer`) on
every input and every output channel, the environment the ROM's cycle-time
estimate assumes. A PCHB stage copies one token:

```
*[ [R^e]; [L^k -> R^k+]; L^e-; [~R^e]; R^k-; [~L^v]; L^e+ ]
L^e = ~C(L^v, R^v)
```

The input buffers all wait on the ROM's shared `In^e`; each output buffer's
left enable is the ROM's enable for that output channel. Top-level ports:

| port | dir | meaning |
|------|-----|---------|
| `rst_n` | in | asynchronous reset, active low |
| `in_d[N_IN][MAXW]` | in | input channel rails |
| `in_e[N_IN]` | out | one enable per input channel |
| `out_d[N_OUT][MAXW]` | out | output channel rails |
| `out_e[N_OUT]` | in | one enable per output channel |

## Reset

The circuit needs a defined start, so every state-holding node has an
asynchronous active-low reset. Reset holds `decodep_` and `romp_` low, so
both planes precharge, and leaves the enables high. Hold the input channels
neutral and the output enables high during reset. After release the low-energy
control raises `decodep_`, `romp_` and `In^e` in that order; the high-speed
control raises `decodep_` and `romp_` at once.

## Simulation model and its limits

- No delays anywhere. A handshake that the environment starts settles
  within the same time step. Keep the environment's own actions at least one
  time unit apart (the testbenches use random delays of 1 to 5 units).
  Verilator does not always re-evaluate the settled loops correctly when a
  testbench changes inputs and the design reacts in the same time step
  through `#0`.
- State-holding nodes are `always_latch` blocks, the keepers of the real
  circuit. Synthesis therefore reports latches, and Verilator reports
  combinational loops (`UNOPTFLAT`) through the control handshakes. Both are
  how a QDI circuit holds state and are expected.
- Cycle times and energies are not modelled. `romantic_pkg` has the
  first-order estimate instead: tree depths `delta_v`, `delta_c` and cycle
  times `xi_le`, `xi_hs` in CMOS transitions, and `romantic_rom` evaluates it
  for its own size in the localparam `CYCLE_EST`. The estimate assumes the
  surrounding half-buffers acknowledge in three transitions and answer a
  changed enable in two:

  ```
  Xi_le = 19 + max(Di, Do+4, Dd+2, De+5) + Di + Dd + max(Do, De)
  Xi_hs = max(2Do+9, De+Do+10, Di+Dd+5, 2Dd+9, Dd+Do+9, 2Di+1)
  Di = Delta_C(N_IN) + max_i Delta_V(W_i)     Dd = Delta_V(ROWS)
  Do = Delta_C(N_OUT) + max_j Delta_V(V_j)    De = Delta_C(N_OUT)
  ```

  The per-channel OR trees and the input and enable C-trees are built with
  exactly these depths; the `Out^v` C-tree of the high-speed ROM has one
  extra input (`~bigromp`), which the estimate ignores. For four 1-of-4
  inputs and outputs and 256 rows the estimate is 36 transitions for the
  low-energy ROM, which is what a ROM of that size was measured at, and 17
  for the high-speed ROM, against a measured 16. It is rougher elsewhere:
  with 1-of-4 channels it gives 13/31 (high-speed/low-energy) for two
  inputs, two outputs and 16 rows (measured 16/36), 17/36 for four inputs,
  nine outputs and 113 rows (measured 22/40) and 17/36 for six inputs,
  eight outputs and 100 rows (measured 20/38). `tb_rom_workloads` prints it
  for each ROM it builds.
- Assertions check the channel rules: every output is 1-of-n, at most one
  word line is high, and the footless array never sees a high word line while
  it precharges.

## What is this design's own

- The reset, and the latch-based modelling of keepers.
- The production rules of the low-energy control box; the published
  description gives only its handshake sequence.
- A don't-care input puts its channel validity into the row's pulldown
  stack. This keeps a row made only of don't-cares from firing on neutral
  inputs; the value is still ignored.
- The default table: the five output columns are all used, with the two
  last outputs taken as 1-of-2 channels.
- Inputs marked as unused for some rows (not handshaken at all) are not
  supported.
- The input and output buffers of `romantic_top`.

## Files

| file | content |
|------|---------|
| `rtl/romantic_pkg.sv` | default table, tree fan-ins and depths, cycle-time estimate |
| `rtl/c_element.sv` | N-input C-element |
| `rtl/or_tree.sv`, `rtl/c_tree.sv` | completion trees |
| `rtl/address_decoder.sv` | precharged decoder and `Decode^v` |
| `rtl/rom_array.sv` | precharged ROM plane, `bigromp`, `Out^v` |
| `rtl/control_le.sv`, `rtl/control_hs.sv` | the two control boxes |
| `rtl/romantic_rom.sv` | the ROM |
| `rtl/pchb_buffer.sv` | PCHB stage |
| `rtl/romantic_top.sv` | ROM with buffers on every channel |
| `tb/tb_*.sv` | self-checking testbenches; `tb_rom_env` and `tb_workload_rom` are helpers |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test of both variants:

```
verilator --binary --timing --assert -Irtl -Itb rtl/romantic_pkg.sv \
  tb/tb_romantic_top.sv --top-module tb_romantic_top -Mdir obj
./obj/Vtb_romantic_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_c_element`, `tb_or_tree`, `tb_c_tree` | gates and trees against reference models |
| `tb_pchb_buffer` | token order and the half-buffer handshake order |
| `tb_address_decoder` | every legal input of the default table, keeper hold, precharge |
| `tb_rom_array` | every row, footed and footless, `Out^v`, precharge with a word line still high |
| `tb_control_le`, `tb_control_hs` | the control sequences step by step |
| `tb_romantic_rom` | both variants under random timing; the low-energy control's six-step cycle; slack only in the high-speed ROM |
| `tb_romantic_top` | both variants end to end; counts don't-care rows, slack and foot events |
| `tb_romantic_top_full` | 300 accesses at the default parameters |
| `tb_rom_workloads` | generated ROMs in both variants: 2x2 channels and 16 rows, 4x4 and 256 rows, 4x4 and 8x8 with one row, 4x9 and 113 rows, 6x8 and 100 or 81 rows; the cycle-time estimate |

To use your own table, set `N_IN`, `N_OUT`, `ROWS`, `IN_W`, `OUT_W`, `IN_VAL`
and `OUT_VAL` on `romantic_top` or `romantic_rom`; `tb/tb_workload_rom.sv`
shows how to compute a large table with constant functions.
