# A 64-bit PLA-controlled integer datapath

This is RTL for a small but complete integer datapath: a 32 x 64-bit register
file with three ports and a pipelined 64-bit adder, joined by a write-back bus
and a bypass bus. An on-chip PLA state machine drives the datapath at full
clock rate. Data enters and leaves only through two 64-bit shift registers,
which a slow external tester clocks on its own clock. The design was made as a
test vehicle for very fast datapath circuits. A slow tester cannot feed 20
control signals at full speed, so the controller runs fixed test programs
on-chip. The tester only picks a program, starts it, and shifts operands and
results in and out.

The original circuit gets its speed from precharged (dynamic) logic and
single-phase latches that work on both clock phases. This RTL keeps the
logical structure, the block boundaries and the cycle timing of that design.
It expresses them with ordinary edge-triggered flip-flops (see "Clock phases
and cycles" below). It does not model the circuits.

## Block diagram

```
 tester pins                                                     tester pins
 reset, tid ──► controller (sync2 + pla FSM) ── ctl_t, 20 bits/cycle ──┐   done ◄─┐
                                                                       ▼           │
 shi_in ──► buffer_in ──q──┐          ┌───────────── datapath_core ────────────────┤
 shi_out ◄──┘              │          │  regfile ──A──► bbus mux ──► ks_adder ──S─┐ │
                           └─bufin───►│     ▲  └──B──────────────────►   │       │ │
                                      │     │        ▲ byp               ▼       │ │
                                      │     └──────── wbus ◄── {S, A delayed, bufin}
                                      └───────────────│────────────────────────────┘
 sho_in ──► buffer_out ◄── load ──────────────────────┘
 sho_out ◄──┘
```

## The four-cycle pipeline and the bypass bus

One operation can be issued every cycle. Each one spends four cycles from
register read to register write, so up to four are in flight at once
(`datapath_core`):

| cycle | stage | what happens |
|---|---|---|
| 1 | read  | `ra`, `rb` decoded; the register file registers A and B |
| 2 | bbus  | operand A goes onto the bypass bus, from port A or, with `byp`, from `wbus`; adder block 1 |
| 3 | add   | adder blocks 2 and 3; sum registered |
| 4 | wbus  | the chosen source goes onto `wbus`; register `rw` is written at the end of the cycle; `buffer_out` may load |

The part that takes the most care is operand timing. An operation issued in
cycle *t* reads the register file as it stands after the writes of operations
issued up to *t-4*. Results of the three operations just before it are not in
the file yet. A read in the same cycle as the write of that register returns
the old value. The bypass closes part of that gap. An operation issued two
cycles after its producer is in its bbus cycle while the producer's result is
on `wbus`, so with `byp` set, operand A comes straight from `wbus`. At one
cycle apart the result does not exist yet, and at three cycles apart there is
no path. The datapath does not detect hazards: the controller's programs are
scheduled around them. A dependent chain therefore runs at one add every
second cycle.

`wbus` has three sources, chosen by the 2-bit `wsrc` field:
- the adder sum;
- the register value read in cycle 1, carried through two registers beside the
  adder (used for register-to-register moves);
- the `buffer_in` word.

`wsrc = WB_NONE` means no write. The control word moves down the pipeline with
its operation, so the write address and output-load bit arrive with the data.

### Clock phases and cycles

The original uses a single clock and works in both its phases: a decoder
stage in the low phase, a RAM read in the high phase, and so on. Read, add and
write-back then take eight phases: decode, read, bbus, adder 1, adder 2,
adder 3, wbus, write. This RTL pairs them into the four cycles above. The
whole trip still takes four cycles. One pairing differs: adder blocks 2 and 3
share one cycle here, so the adder's latency is two cycles, not one and a
half. The bypass still works at a spacing of two, because `wbus` of one
operation and `bbus` of the next fall in the same cycle in both versions.

## The adder: halving the carry chain

`ks_adder` uses bit generate `G_i = A_i·B_i` and bit propagate
`P_i = A_i + B_i` (inclusive OR). The carry into an even position can be
rewritten as `C_2n = P_2n·(G_2n + C_2n-1)`. After that rewrite, neighbouring
ANDs and neighbouring ORs can be merged into a chain of half the length:

```
P'_n = P_2n+1 · P_2n            G'_n = G_2n + G_2n-1
C'_n = P'_n · (G'_n + C'_n-1)           (32 positions for 64 bits)
```

That recurrence is solved for all 32 positions by a Kogge-Stone tree of five
levels, with leaf generate `P'_n·G'_n` and leaf propagate `P'_n`. A full
64-bit tree would need six levels and twice the logic. The real carries come
back from the reduced ones:

```
C_2n+1 = G_2n+1 + C'_n          C_2n = P_2n · (G'_n + C'_n-1)
S_i    = A_i xor B_i xor C_i-1  (no carry in)
```

Pipeline blocks:
- Block 1: bit terms, the P'/G' pairing and the tree leaves.
- Block 2: tree spans 1, 2, 4 and 8.
- Block 3: span 16, then carry reconstitution, then the sum.

Reconstitution needs the odd generates, even propagates, `G'` and the half
sums from block 1. These are carried along in the pipeline register. The
width `W` is a parameter and must be even.

## The controller and its programs

`controller` is a generic `pla` whose six next-state outputs are fed back as
inputs:
- Inputs (10): `{reset, tid[2:0], state[5:0]}`.
- Outputs (26): the 20-bit control word `ctl_t` (`ra`, `rb`, `rw`, `wsrc`,
  `byp`, `oload`, `done`) and the 6-bit next state.

`reset` and `tid` come from the tester, so they first pass a two-flop
synchronizer. While reset is high, no product term fires. Every output is then
zero, the state included, and nothing is written.

| tid | program | effect | issue slots |
|---|---|---|---|
| 0 | shift | `reg[n] = reg[n-1]` for n = 31 down to 1 (reg[0] kept) | 31 |
| 1 | add | `reg[n] = reg[n-1] + reg[n-2]` (indices mod 32) for n = 2..31, 0, 1 in turn, each using the already updated values | 63 (one add every second slot, 32 adds) |
| 2 | load1 | `reg[1] = buffer_in` | 1 |
| 3 | load31 | `reg[31] = buffer_in` | 1 |
| 4 | add_31_1 | `reg[31] = reg[1] + reg[31]` | 1 |
| 5 | out31 | `buffer_out = reg[31]` (reg[31] rewritten with itself) | 1 |
| 6 | load_even | `reg[2n] = buffer_in` | 16 |
| 7 | load_odd | `reg[2n+1] = buffer_in` | 16 |

`shift` goes from the top down so that every source is read before it is
overwritten. In `add`, each sum takes its newest operand over the bypass bus
and the older one from the file.

All programs end in state 63. That state raises `done` and holds it until
reset. The datapath delays `done` to its write-back stage. At the pin, `done`
therefore rises exactly *slots* + 6 cycles after `reset` falls: 2 cycles of
synchronizer, 1 PLA cycle, one cycle per slot, and 3 cycles of pipeline. That
is the cycle after the last register write.

The PLA has 10 inputs, 64 product terms and 26 outputs, the size of the
original. Its personality lives in `fdp_pkg` as a table of 63 terms
(`CTRL_CUBES`); the 64th row is left unprogrammed. Each term lists which of
`tid` and `state` it tests and which outputs it drives. The table is a
two-level cover of the program table written out in `prog_step()`: for every
`(tid, state)` a program can reach, the OR of the matching terms must give
exactly that step's control word and next state. The pairs no program reaches
are free ("don't care"). That freedom is what lets 63 terms do the work of one
term per program step, which would take 131.

At elaboration, `personality_ok()` re-evaluates the cover against
`prog_step()`, and the controller stops elaboration with an error if the two
disagree. Changing a program therefore means editing `prog_step()` and
finding a new cover for it. Any two-level minimizer will do, with the
unreachable pairs as don't cares. Each program must fit in 63 states.

## Talking to the chip: shift registers and protocol

`buffer_in` and `buffer_out` are 64-bit shift registers clocked by the core
clock. Each rising edge of the tester's `shift` (with `shiftb` low) is
synchronized into a one-cycle strobe, three core cycles after the edge. On
each strobe, both registers shift right by one bit:
- `buffer_in` takes `shi_in` in at the top and shows bit 0 on `shi_out`.
- `buffer_out` takes `sho_in` in at the top and shows bit 0 on `sho_out`.

Words therefore travel least significant bit first. `buffer_out` loads in
parallel from `wbus` when `oload` reaches the write-back stage. A load wins
over a strobe in the same cycle. Both registers share the shift pads, so
reading `buffer_out` also shifts `buffer_in`.

A typical session:
1. Hold `reset`. Shift a word into `buffer_in`: 64 `shift` edges, with
   `shi_in` steady around each rising edge.
2. Set `tid = 2` (load1) and release `reset`. Wait for `done`, then raise
   `reset` again.
3. Load a second word the same way with `tid = 3` (load31).
4. Run `tid = 4` (add_31_1), then `tid = 5` (out31).
5. Shift 64 bits out of `sho_out`. That is `reg[1] + reg[31]`.

Do not toggle `shift` while a program that uses the buffers is running.

## The register file

`regfile` has three independent 5-to-32 decoders (`rf_decoder`), one per port,
as the original does. `rf_decoder` builds its one-hot output as a binary tree,
one address bit per level. Reads AND each row with its select and OR the rows
together, which is the logic of a precharged bit-line. The result is
registered, so data appears one cycle after the address. A write lands at the
end of the cycle. The cells have no reset.

## How far to trust it, and where it departs from the original

Every block has a self-checking testbench against an independently computed
reference:
- `tb_ks_adder`: corner cases and random words, one add per cycle, latency
  checked.
- `tb_regfile`: random traffic, including same-cycle read and write of one
  register.
- `tb_pla`: a hand-programmed array and a random 10 x 64 x 26 array.
- `tb_controller`: the control stream of every program, cycle by cycle.
- `tb_buffer_in` and `tb_buffer_out`: bit order, and load against strobe.
- `tb_datapath_core`: a cycle-exact model of the pipeline, including stale
  reads and the bypass.
- `tb_fdp_top`: whole-chip runs through the pins only, at full size. It runs
  every program, fills all 32 registers with distinct words, runs the add
  chain, reads back the file, checks the done timing, and counts bypasses,
  each write-back source, buffer loads and shift strobes.
- `tb_typical_sequence`: load1, load31, add_31_1 and out31 through the pins,
  with worst-case carry operands such as all ones plus one.

Choices and departures to keep in mind:
- Edge-triggered timing instead of two-phase latches. Adder latency is 2
  cycles (1.5 on the chip); the read-to-write time of 4 cycles is the same.
- The controller's PLA personality is this design's own cover of its own
  program schedules. Only the PLA's size matches the original.
- Program details the original leaves open were chosen here:
  - register order and issue spacing in `shift` and `add`;
  - `reg[0]` is untouched by `shift`;
  - `out31` rewrites `reg[31]` with itself;
  - one shared done state.
- The 20 control signals are split into 3 x 5 address bits, 2 bits of
  write-back source, bypass, output load and done. The chip uses the same
  count, but its exact set is not known.
- The bypass feeds operand A only. There is no hazard detection.
- The shift registers work in the core clock domain, with synchronized
  strobes from the shift clock. The bit order is least significant bit first.
- Not included: the clock driver (a buffer chain for a 350 pF clock load,
  with a monitor output), the on-chip decoupling capacitors, the power pads
  and the package. `clk` is assumed to be the buffered core clock.

## Simulating

With Verilator 5 (the `-y rtl` option lets it find every module by file
name):

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -y rtl \
    rtl/fdp_pkg.sv tb/tb_fdp_top.sv --top-module tb_fdp_top
./obj_dir/Vtb_fdp_top
```

Replace `tb_fdp_top` with any other testbench in `tb/` to test one block.
Each testbench ends by printing `TB_RESULT checks=N failures=M`. The
whole-chip test runs in well under a second.

## Files

- `rtl/fdp_pkg.sv`: sizes, `ctl_t`, the program table and the PLA
  personality.
- `rtl/fdp_top.sv`: the chip.
- `rtl/controller.sv`, `rtl/pla.sv`, `rtl/sync2.sv`: the controller.
- `rtl/datapath_core.sv`, `rtl/regfile.sv`, `rtl/rf_decoder.sv`,
  `rtl/ks_adder.sv`: the datapath.
- `rtl/buffer_in.sv`, `rtl/buffer_out.sv`, `rtl/shift_strobe.sv`: the tester
  interface.
- `tb/tb_*.sv`: one self-checking testbench per block, plus `tb_fdp_top` for
  the whole chip.
