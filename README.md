# Reversible shift registers built from Sayem gates

In a reversible circuit every gate maps its inputs one-to-one onto its
outputs. No information is erased, which in principle removes the
kT·ln2 energy cost of each erased bit. Two rules follow from this and shape
everything below:

- a gate has as many outputs as inputs;
- a wire may not fan out, and there is no ordinary feedback through
  irreversible gates.

Copies of a signal therefore come from a gate that makes them. Constant
inputs (tied to 0 or 1) set a gate to the function you want. Outputs that are
not needed stay as *garbage outputs*.

This RTL builds a reversible master-slave D flip-flop from two **Sayem
gates**, each wired as a one-gate D-latch. It then uses that flip-flop in the
four classic 4-bit shift registers:

- serial-in serial-out (SISO);
- serial-in parallel-out (SIPO);
- parallel-in serial-out (PISO);
- parallel-in parallel-out (PIPO).

Every gate is a module of its own, so the netlist keeps the reversible
structure. The gate count, the constant inputs and the garbage outputs can be
read off the hierarchy.

## The three gates

| Gate | Size | Outputs | Role here |
|---|---|---|---|
| Feynman (`feynman_gate`) | 2×2 | P = A, Q = A ⊕ B | B = 0: copies a wire (SIPO taps). B = 1: gives A and ¬A (flip-flop clock) |
| Fredkin (`fredkin_gate`) | 3×3 | P = A, Q = A'B + AC, R = AB + A'C | controlled swap. Q is a 2:1 multiplexer selected by A (PISO load/shift) |
| Sayem (`sayem_gate`) | 4×4 | P = A, Q = A'B ⊕ AC, R = A'B ⊕ AC ⊕ D, S = AB ⊕ A'C ⊕ D | one gate is a whole D-latch |

All three are purely combinational. Their testbenches check the full truth
tables. They also check that the outputs of all input patterns differ, which
is what makes the gates reversible. For the Fredkin gate they check that the
number of ones is kept.

## How one Sayem gate holds a bit

This is the least obvious part of the design. In the Sayem gate, A selects:
Q is B when A = 0 and C when A = 1. With the fourth input D tied to 0, output
R is an exact second copy of Q. `sayem_dlatch` wires the gate as follows:

| Pin | Connection |
|---|---|
| A | enable E |
| C | data D |
| D | constant 0 |
| B | driven by the gate's own output R |
| Q | latch output |
| P (= E) and S | garbage g1 and g2 |

- **E = 1:** Q = R = D, so the latch is transparent.
- **E = 0:** Q = R = B, and B is R itself. The loop holds its last value.

Together this is Q(t+1) = D·E + E'·Q. The copy needed for the feedback comes
from the gate's own second output, so no wire fans out.

The storage is written exactly as that loop: a continuous assignment through
the gate instance, with no `always_ff` or `always_latch`. Verilator reports it
as circular combinational logic (`UNOPTFLAT`). That warning is expected. The
loop settles in one pass, and Verilator's scheduler simulates it correctly.
Synthesis produces a combinational loop, not a latch cell.

## Master-slave flip-flop (`ms_dff`)

The flip-flop is two Sayem latches in series, master then slave, plus one
Feynman gate. The Feynman gate has B tied to 1, so it splits the clock into:

- a copy, which enables the master;
- a complement, which enables the slave.

| clk | master | slave | q |
|---|---|---|---|
| 1 | follows d | holds | steady |
| 0 | holds | copies master | value d had when clk fell |

**The flip-flop, and so every register here, acts on the falling edge of
`clk`.** The master is the latch whose enable input carries the clock
itself, and that fixes the edge. Setup and hold are ordinary: d must be
stable around the falling edge. Changes to d while clk is high never reach q.
The testbenches check this.

Per flip-flop the cost is 2 Sayem gates and 1 Feynman gate. That is 3
constant inputs (0, 0, 1) and 5 garbage outputs: g1/g2 of each latch and the
Feynman gate's clock copy. The master's P output, a copy of clk, is left as
garbage, because the Feynman gate supplies the master's clock.

## The four registers

All four are `WIDTH` bits wide (default 4: FF1 to FF4) and have no reset. A
register's contents are unknown until `WIDTH` bits have been shifted in or a
word has been loaded. In every parallel port, bit `WIDTH-1` belongs to FF1,
the first flip-flop of the chain.

| Register | Module | Structure | Timing (falling edges of clk) |
|---|---|---|---|
| SISO | `siso_register` | din → FF1 → … → FF4 → dout | a bit on din reaches dout after WIDTH edges |
| SIPO | `sipo_register` | same chain; a Feynman gate (B = 0) after FF1..FF3 copies each output to a pin, FF4 drives `q[0]` directly | the newest bit is on `q[WIDTH-1]`; after WIDTH edges the first bit is on `q[0]`. The serial stream 1, 0, 0, 1 gives `q = 1001` |
| PISO | `piso_register` | FF1 takes `d[WIDTH-1]` directly; a Fredkin gate in front of each later flip-flop picks `d` (ws = 1) or the previous flip-flop (ws = 0); ws passes from gate to gate through the P outputs | edge with ws = 1: load, `d[0]` on dout at once. Then each edge with ws = 0 brings `d[1]`, `d[2]`, … |
| PIPO | `pipo_register` | WIDTH independent flip-flops on one clock | `q` takes the word on `d` at each edge |

While the PISO shifts, FF1 has no multiplexer, so it reloads `d[WIDTH-1]` on
every edge. The bit that follows a word out of dout is therefore whatever
`d[WIDTH-1]` held.

The top level, `reversible_shift_registers`, places the four registers side
by side on one clock. Each has its own data ports, named `siso_*`, `sipo_*`,
`piso_*` and `pipo_*`. The registers do not interact.

### Gate budget at WIDTH = 4

| Register | Sayem | Feynman (clock) | Feynman (copy) | Fredkin | Total |
|---|---|---|---|---|---|
| SISO | 8 | 4 | – | – | 16 |
| SIPO | 8 | 4 | 3 | – | 19 |
| PISO | 8 | 4 | – | 3 | 19 |
| PIPO | 8 | 4 | – | – | 16 |

The published gate counts are 8 for SISO and PIPO and 12 for SIPO and PISO.
Those counts leave out the four clock Feynman gates that this RTL adds.

## Where this RTL makes its own choices

The register structures, the gate equations and the pin wiring of the latch
follow the published design. The following were not specified there and are
choices of this RTL:

- **Clock edge.** The master is enabled by clk and the slave by the Feynman
  complement, so the flip-flop is falling-edge triggered. The published
  flip-flop drawing shows the two latches but not the Feynman gate, and it
  routes the master's clock copy straight to the slave. Taken literally, that
  would make both latches transparent at the same time. The Feynman gate,
  which the description names, is used here as the inverter.
- **ws polarity** of the PISO: 1 loads, 0 shifts.
- **SIPO output order.** The first flip-flop drives the most significant
  output bit. This matches the published simulation, where the word steps
  through 1XXX, 01XX, 001X, 1001. The block diagram numbers the taps q[1] to
  q[4] from FF1.
- **Feynman copies in the SIPO.** P goes on down the chain and Q goes to the
  pin.
- **No reset** anywhere, as in the published circuits.
- **One clock** shared by the four registers at the top level.

## Not covered

- The transistor-level 180 nm CMOS cells and their power, delay and
  power-delay figures are analog results. They cannot be expressed in RTL:
  - a 9-transistor Feynman gate;
  - a 4-transistor pass-transistor Fredkin gate;
  - a Sayem gate made of two Feynman gates plus buffers.
- There is no stand-alone reversible NOT gate. The one inversion the design
  needs is made by the clock Feynman gate.

## Simulating

Each module has a self-checking testbench in `tb/`. It ends by printing
`TB_RESULT checks=N failures=M`. Each testbench compares the outputs with a
reference model written inside it and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    --top-module tb_reversible_shift_registers tb/tb_reversible_shift_registers.sv
./obj_dir/Vtb_reversible_shift_registers
```

Replace the module name to run another testbench: `tb_ms_dff`,
`tb_sayem_dlatch`, `tb_piso_register`, and so on. Every testbench runs in
under a second.

- `-Wno-fatal` is needed because of the intended `UNOPTFLAT` warnings.
- The register testbenches use WIDTH = 5 to exercise the parameter.
- `tb_reversible_shift_registers` runs the top at its default width. For 400
  clock periods it checks all four registers after every falling edge and
  again while clk is high. It counts how often each of these happened:
  - a bit leaving the serial register;
  - a complete SIPO word;
  - a PISO load and a PISO shift;
  - a PIPO load;
  - outputs held steady while clk is high.

  It fails if any count stays at zero.

Lint: `verilator --lint-only -Wall -Irtl rtl/<module>.sv`. Expect
`UNOPTFLAT` for the latch loops and `UNUSEDSIGNAL` for garbage outputs.

## Files

- `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/sayem_gate.sv`: the
  reversible gates.
- `rtl/sayem_dlatch.sv`: the one-gate D-latch.
- `rtl/ms_dff.sv`: the master-slave flip-flop.
- `rtl/siso_register.sv`, `rtl/sipo_register.sv`, `rtl/piso_register.sv`,
  `rtl/pipo_register.sv`: the four registers.
- `rtl/reversible_shift_registers.sv`: the top level.
- `tb/tb_<module>.sv`: one testbench per module.
