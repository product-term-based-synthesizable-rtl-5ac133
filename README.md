# Product-term soft programmable logic core

This is a small programmable logic fabric written as ordinary synthesizable
SystemVerilog. It is meant to be embedded in a system-on-chip. A conventional
embedded FPGA is a hard macro with its own layout. This core instead goes
through the same synthesis and place-and-route flow as the rest of the chip, so
it costs only standard cells and can be ported to any library. What the fabric
computes is set after fabrication, by shifting a configuration bitstream into
it. The RTL describes the *architecture* of the fabric, not any user circuit.

A soft fabric is less area-efficient than a hard one, so it pays off only when
small: a few hundred gates of logic that may have to change after tape-out,
such as the next-state logic of a state machine. The architecture is built to
suit that size:

* The logic element is a **product-term block (PTB)**: a small PLA with many
  inputs. Wide PTBs mean fewer logic blocks, fewer levels and less routing than
  a fabric of 4-input lookup tables.
* PTBs sit in a few **levels**, and signals only flow forward. An unprogrammed
  or wrongly programmed fabric therefore cannot form a combinational loop. This
  matters because the fabric is timed and verified by standard tools before
  anyone has programmed it.
* Routing is **fully connected** at each level: every PTB input can take any
  signal available to its level. Placement and routing of user circuits is then
  trivial.

The default configuration is a proof-of-concept core with two levels: 5 PTBs,
then 3.

## Files

| file | content |
|---|---|
| `rtl/ptb_pkg.sv` | shared types: `seq_mode_e`, `MAX_LEVELS`, `sel_width()` |
| `rtl/cfg_shift_reg.sv` | one segment of the serial configuration chain |
| `rtl/ptb.sv` | product-term block |
| `rtl/ptb_switch.sv` | interconnect switch (one full multiplexer per destination) |
| `rtl/ptb_reg_array.sv` | global register array for the decoupled sequential mode |
| `rtl/ptb_plc.sv` | the core (top level) |
| `tb/plc_tb_pkg.sv` | bitstream builder and behavioural reference model of the core |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus three random tests of the core |

## The product-term block (`ptb`)

A PTB has `I` inputs, `P` product terms and `O` outputs. The defaults are
10, 12 and 3.

* **AND plane.** Each product term can use any input in true form, complemented
  form, or not at all.
  * A term with no literals is 1.
  * A term that uses both polarities of one input is 0.
* **OR plane.** Each output is the OR of any subset of the terms. An output with
  no terms is 0.

The block is purely combinational. It needs `2·I·P + P·O` configuration bits,
276 at the defaults.

`I = 10` is where area, and area × depth, are lowest in an input-count sweep of
8 to 15, averaged over a set of benchmark circuits. Wider PTBs kept getting
faster but grew in area. `P` and `O` are this implementation's choices.
Twelve terms hold a 4-input XOR (8 terms) or a 3-bit counter's next-state
logic (9 terms).

## Levels and the one-way interconnect (`ptb_plc`, `ptb_switch`)

```
 pi ──┬──────────────┬──────────────┬──────────────┐
      │   registered signals (all switches)         │
      ▼              ▼              ▼              ▼
   switch 0 ─► PTBs 0 ─┬─► switch 1 ─► PTBs 1 ─┬─► output switch ─► po
                       └───────────────────────┴──────────▲
```

A core has `LEVELS` levels. Level `l` has `NPTB[l]` PTBs, and a switch drives
every input pin of its PTBs. A final output switch drives the primary outputs.
A switch is one multiplexer per destination pin, and each multiplexer can pick
any signal *offered* to that switch. The offer is what makes the fabric
loop-free:

| switch | offered signals |
|---|---|
| level 0 | primary inputs, registered signals |
| level l | the above, plus the unregistered outputs of every PTB in levels 0..l-1 |
| output | the above, for all levels |

Equal `NPTB` entries give a *rectangular* core. Decreasing entries give a
*triangular* one, where later levels have fewer, wider-fed blocks. In the
proof-of-concept core (`NPTB = {5,3}`) the three switches are `g_lvl[0].u_sw`,
`g_lvl[1].u_sw` and `u_osw`. Level 0 holds the chip's PTBs 1–5 and level 1 its PTBs 6–8.

All offered signals sit on one internal bus, and each switch uses a prefix of
it:

```
bus = { PTB outputs of the last level, ..., PTB outputs of level 0,
        registered signals, primary inputs }        (primary inputs at bit 0)
```

PTB `g` (counted level by level from level 0), output `k`, is bus entry
`N_IN + N_REGSIG + g·PTB_O + k`.

**Select codes.** A multiplexer with `N` sources has a select field of
`ceil(log2(N+1))` bits. Code `0` gives a constant 0, code `s` gives bus entry
`s-1`, and codes above `N` give 0. A reset or all-zero configuration therefore
drives every PTB input and every primary output to 0.

## Sequential circuits

A PTB has no flip-flop of its own. An FPGA-style element would put an output
multiplexer after a flip-flop, letting the combinational output re-enter
anywhere. In an unprogrammed soft fabric that can create a loop, so this core
offers two loop-free alternatives, chosen with `SEQ_MODE`:

* **`SEQ_DUAL`, the dual network (default).** Every PTB output drives two
  networks:
  * The unregistered value goes only to later levels, as above.
  * A flip-flop copy goes to *every* switch, including level 0 and the output
    switch.

  State feedback always passes through a flip-flop. There are
  `N_PTB·PTB_O` such flip-flops, 24 at the defaults.
* **`SEQ_DECOUPLED`, the global register array.** Flip-flops are separate from
  the PTBs in a shared bank of `N_REG` registers (`ptb_reg_array`). A
  multiplexer picks each register's input from any PTB output. The register
  outputs are offered to every switch. This uses fewer flip-flops when a
  circuit has little state, at the price of an extra configurable
  multiplexer.
* `SEQ_NONE` makes a purely combinational core.

**User flip-flops, both kinds:**
* They capture on every rising `clk` edge while `cfg_en` is 0.
* They **hold while a bitstream is being shifted in**, so a running circuit
  keeps its state across reconfiguration.
* `rst_n` clears them.

## Configuration bitstream

All configuration bits are flip-flops, chained into one shift register from
`cfg_in` to `cfg_out`. Each PTB, each switch and the register array owns one
segment. To program the core:

1. Hold `cfg_en` high for exactly `CFG_BITS` rising clock edges. `CFG_BITS` is a localparam of `ptb_plc`, 2744 at the defaults.
2. On each edge, present the next bit on `cfg_in`.

While the new bitstream goes in, the old one comes out on `cfg_out` in the same
order, which allows read-back. `rst_n` (asynchronous) clears all configuration
and all user flip-flops.

**Segment order, from `cfg_in`:**
1. switch of level 0
2. PTB 0 … PTB `NPTB[0]-1` of level 0
3. switch of level 1, its PTBs, and so on for each level
4. the output switch
5. the register array, in `SEQ_DECOUPLED` mode only

**Bit order.** Each segment shifts right: a bit enters at the top and leaves
from bit 0. The bitstream is the concatenation of the segments, first segment
at the most significant end. Its bit 0 is the last segment's bit 0, and it
goes in **first**.

**Fields inside a segment:**

| segment | bits |
|---|---|
| switch | destination `d` select code at `[d·SW +: SW]`. For a level switch, destination `k·PTB_I + j` is input `j` of the level's PTB `k`. For the output switch it is `po[d]`. |
| PTB | term `t` uses input `j`: bit `t·2I + 2j`. Term `t` uses NOT input `j`: bit `t·2I + 2j + 1`. Output `k` includes term `t`: bit `2·I·P + k·P + t`. |
| register array | register `r` select code at `[r·SW +: SW]`. Code `1+g·PTB_O+k` picks PTB `g` output `k`. |

At the defaults (16 inputs, 8 outputs, dual network) the bitstream has 2744
bits:
* level-0 switch: 50 × 6
* 5 PTBs × 276
* level-1 switch: 30 × 6
* 3 PTBs × 276
* output switch: 8 × 7

`tb/plc_tb_pkg.sv` (class `plc_prog`) builds such bitstreams from calls like
`route(level, ptb, input, c_pi(i))`, `set_lit(...)` and `set_or(...)`. It is
the easiest way to program the core in simulation.

## Parameters of `ptb_plc`

| parameter | default | meaning |
|---|---|---|
| `N_IN`, `N_OUT` | 16, 8 | primary input and output pins (implementation choice) |
| `LEVELS` | 2 | logic levels (proof-of-concept core) |
| `NPTB` | `'{5,3,0,0,0,0,0,0}` | PTBs per level; 8 entries (`MAX_LEVELS`), entries from `LEVELS` on are ignored |
| `PTB_I`, `PTB_P`, `PTB_O` | 10, 12, 3 | PTB inputs, product terms, outputs |
| `SEQ_MODE` | `SEQ_DUAL` | sequential method |
| `N_REG` | 8 | registers in the global array (`SEQ_DECOUPLED` only) |

Elaboration stops with an error if `LEVELS` is out of range or a used level has
no PTBs. At the defaults the core synthesizes to 2768 flip-flops. 2744 of them
are configuration bits and 24 are the dual-network user flip-flops. Almost all
of the logic is multiplexers and AND/OR terms.

## Where this implementation makes its own choices

The architecture fixes the PTB structure, the one-way levels, the full
connectivity of the switches, both sequential methods, the choice of `I` and
the 5 + 3 proof-of-concept arrangement. This implementation chose the
following:

* **Configuration storage and loading.** A single serial chain, with an
  asynchronous reset that clears it.
* **Encodings.** The constant-0 select code, the empty-term rules and every bit
  layout described above.
* **Sizes.** `P = 12`, `O = 3`, 16 inputs, 8 outputs and 8 registers. No values
  were available for any of them.
* **Default sequential method.** `SEQ_DUAL`. It was not known which of the two
  methods the proof-of-concept core used. `SEQ_DECOUPLED` is fully built and
  tested.
* **Unused parameters.** The interconnect parameters `(r, α)` and the
  sequential parameters `(v, d)` of the original architecture description are
  not defined precisely enough to use. Per-level PTB counts, `SEQ_MODE` and
  `N_REG` take their place.
* **User flip-flops.** They hold while configuration is loaded.

**Not included:**
* the FPGA-style flip-flop-plus-multiplexer element, which is shown only as the
  conventional alternative;
* the lookup-table fabric used for comparison;
* the CAD flow: technology mapping to PTBs, placement and routing.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ptb_pkg.sv tb/plc_tb_pkg.sv tb/tb_ptb_plc.sv --top-module tb_ptb_plc
./obj_dir/Vtb_ptb_plc
```

Substitute any testbench name.

| testbench | what it checks |
|---|---|
| `tb_cfg_shift_reg` | shift, hold, chain latency, reset |
| `tb_ptb` | hand-written functions and 30 random configurations against a sum-of-products model; read-back of every configuration bit |
| `tb_ptb_switch` | random select codes, including constant-0 and out-of-range codes |
| `tb_ptb_reg_array` | capture one clock later, hold during configuration, reset |
| `tb_ptb_plc` | end to end, on two cores. Core A is at the defaults. Core B has three triangular levels (4, 2, 1) and is decoupled. See below. |
| `tb_ptb_plc_full` | the default core, 12 random full bitstreams, each run 150 clocks against the cycle-accurate model in `plc_tb_pkg`, including the dual-network flip-flops |
| `tb_ptb_plc_decoupled` | the same random check for a rectangular decoupled core (3 levels of 4 PTBs, 10 registers) |
| `tb_ptb_plc_isweep` | the PTB input-count sweep: eight cores with `PTB_I` = 8 … 15, each on random bitstreams against the model |

In `tb_ptb_plc` the hand-built user circuits are:
* an 8-input parity through two levels;
* an input-to-output bypass;
* a 3-bit counter fed back through the dual network;
* a registered signal;
* a 3-bit counter fed back through the register array;
* a function built across the first two of its three levels.

The testbench counts each mechanism, and fails if one never occurs. The
mechanisms are bitstream read-back, two-level logic, bypass, dual-network
feedback, counter wrap, register-array feedback, state held across a
reconfiguration, and reset.

All of these pass. Each module's testbench was also run against a deliberately
broken copy of the module, and it failed.

## Trust and limits

**Simulated thoroughly.** Every module's behaviour, and the whole core at its
default size and in a second, decoupled configuration, run against an
independent model on random bitstreams.

**Not verified:**
* timing or area after synthesis to a cell library;
* any benchmark circuit mapped by a real PTB mapper;
* bit-compatibility with any existing bitstream format or tool. The format
  here is self-defined.
