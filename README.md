# Shift registers built from reversible Peres and Feynman gates

Reversible logic maps every input pattern to a distinct output pattern, so
no information is erased inside a gate. This RTL builds the storage cell of
a family of shift registers, the D flip-flop, from two reversible gates:
the Peres gate (PG) and the Feynman gate (FG). It then uses that cell for a
4-bit and an 8-bit universal shift register (parallel load, shift left,
shift right, hold) and for the four basic organisations: serial-in
serial-out (SISO), serial-in parallel-out (SIPO), parallel-in serial-out
(PISO) and parallel-in parallel-out (PIPO).

Everything is synthesizable SystemVerilog. The reversible gates appear as
real module instances, so the gate-level structure survives elaboration. On
an FPGA or a standard-cell flow, synthesis will still fold it into ordinary
LUTs or gates. Reversibility is a property of the netlist as written, not of
what synthesis produces.

## The two reversible gates

| gate | inputs | outputs |
|------|--------|---------|
| Feynman, `feynman_gate` | A, B | P = A, Q = A xor B |
| Peres, `peres_gate` | A, B, C | P = A, Q = A xor B, R = (A and B) xor C |

Tying inputs to constants turns these gates into the parts a latch needs:

* FG with B = 0 copies A onto two wires. Reversible circuits cannot fan out
  a wire directly, so this is the fan-out.
* FG with B = 1 gives A and not A.
* PG with C = 1 gives R = NAND(A, B). Its P and Q outputs are *garbage*:
  they carry no useful value, but they keep the gate reversible.

## The reversible D flip-flop (`rev_dff`)

This cell is the hardest part of the design to follow. It starts from the
classic five-NAND gated D latch:

```
s_n    = NAND(D, G)          r_n = NAND(G, not D)      -- gating stage
q_next = NAND(s_n, qb)       qb  = NAND(Q, r_n)        -- cross-coupled pair
```

Each NAND becomes a PG with C = 1. The inverter becomes an FG with B = 1,
which supplies D and not D. The outputs of the cross-coupled pair are
copied by FGs with B = 0, one copy for the output and one fed back. That
makes 4 PGs and 3 FGs.

**Clocking is this design's own choice.** A literal cross-coupled loop
gives a level-sensitive latch. A chain of such latches would be transparent
from end to end while the clock is high. It would also be a combinational
loop, which simulators and FPGA tools handle badly. `rev_dff` breaks the
loop with one rising-edge register:

```
            +--------------------------------------------+
            v                                            |
 r_n --> [PG: qb = NAND(Q, r_n)] --> FG --> [PG: q_next = NAND(s_n, qb)] --> REG --> FG --> dout
                                                                              (Q)    \-> fed back as Q
```

Evaluating the pair in this order (lower NAND first, then upper) gives, in
one pass, the value the latch would settle to:

| s_n | r_n | q_next |
|-----|-----|--------|
| 0 | 1 | 1 (set) |
| 1 | 0 | 0 (reset) |
| 1 | 1 | Q (hold) |

The register samples `q_next` on each rising edge of `clk`.

The register now does the clocking, so the gate input G of the gating stage
is held at 1. That gives s_n = not D and r_n = D, so the cell is a plain D
flip-flop: `dout` takes `d1` one rising edge later. `rst` is an
asynchronous, active-high clear.

The nine gate outputs that carry no data come out on `garbage[8:0]`. The
registers leave them unconnected. Because G and C are tied, one of these
bits is constant and two simply repeat `d1`.

What this cell does not do:

* It has no complement output Q'. In this arrangement the lower NAND's
  output is a function of the next state, not the complement of the stored
  bit.
* It is not a clock-gated latch. G is fixed at 1.

## Universal shift register (`universal_sr`, `usr_pkg`)

Each bit is one `mux4_1` feeding one `rev_dff`. All bits share the clock and
the clear. The mode is set by the two select inputs, read as the code
`{s2, s1}`. `usr_pkg::usr_mode_e` names the codes:

| {s2,s1} | mode | next Q |
|---------|------|--------|
| 00 | load | `D` |
| 01 | shift left | `{Q[W-2:0], sl}`: `sl` enters bit 0 |
| 10 | shift right | `{sr, Q[W-1:1]}`: `sr` enters the top bit |
| 11 | hold | `Q` |

The mux inputs are assigned as follows: i0 is the parallel bit, i1 the
left-shift source, i2 the right-shift source and i3 the bit itself. The
binary code and the shift directions are choices made here. Q changes on
the rising edge after the inputs are presented, so the latency is one
cycle. `WIDTH` defaults to 4; the top also uses an 8-bit instance.

## Basic registers

All four are `WIDTH` = 4 chains of `rev_dff` on a common clock and clear.

* `siso_sr`: `data_in` goes into the first stage. `data_out` is the last
  stage, so the stream is delayed by 4 edges.
* `sipo_sr`: the same chain with every stage on `q`. The first bit received
  ends up in `q[3]`.
* `piso_sr`: `write_shift = 1` loads `d` in one edge. With `write_shift = 0`,
  each edge moves the word towards the last stage, and `serial_out` gives
  `d[3], d[2], d[1], d[0]`. The first stage always takes `d[0]`, so `d[0]`
  is also what shifts in behind the word. The polarity of `write_shift` is
  a choice made here. The `q` port is there for observation.
* `pipo_sr`: every stage takes its own `d[i]` on each edge.

## Top level (`rev_sr_top`)

The six registers are independent of each other. They sit side by side on
one `clk`, and each has its own ports and its own clear, prefixed
`u4_`, `u8_`, `siso_`, `sipo_`, `piso_` and `pipo_`. Parameters:
`U4_WIDTH = 4`, `U8_WIDTH = 8`, `BASIC_WIDTH = 4`.

## Where this design departs from or adds to its source

* The flip-flop is edge-triggered. The feedback of the latch's NAND pair
  goes through a register instead of a combinational loop, and the gating
  input is tied high (see above).
* Choices made here:
  * the reset polarity and the fact that it is asynchronous;
  * the active clock edge;
  * the mode code `{s2,s1}`;
  * the shift directions;
  * the PISO `write_shift` polarity;
  * the extra `q` port on the PISO;
  * the shared clock in the top.
* The universal register's fourth mux input is wired to the bit itself, to
  give a hold mode.
* The 8-bit universal register uses 8 flip-flops, one per bit.

## Simulating

Each module `X` in `rtl/` has a self-checking testbench `tb/tb_X.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`;
a watchdog stops it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/usr_pkg.sv \
          tb/tb_rev_sr_top.sv --top-module tb_rev_sr_top -Mdir obj
./obj/Vtb_rev_sr_top
```

* `tb_rev_sr_top` runs the whole top at its default sizes for 1000 random
  cycles. It compares every register with a behavioural reference after
  each edge and again just before the next one. It counts each mechanism:
  the four modes of both universal registers, PISO write and shift, and the
  mid-run asynchronous clears. It fails if any of them never happened.
* `tb_universal_sr` checks both widths, 4 and 8.
* The gate testbenches are exhaustive. `tb_peres_gate` also checks that the
  gate is reversible: its eight input patterns give eight different outputs.

To change a width, override the `WIDTH` parameter of a register or the
`*_WIDTH` parameters of the top. The universal register works at any
`WIDTH` from 1 up. The basic registers' testbenches assume 4.
