# A 32-bit carry-skip adder built for subthreshold operation

This is a 32-bit binary adder, `S = A + B + Cin`, with a carry out. It was
designed to run from very low supply voltages, down into the subthreshold
region where transistors barely switch on. Three rules follow from that, and
they shape the whole structure:

* **No wide gates.** At subthreshold voltages a stack of three or four
  transistors has a poor on/off current ratio, so no gate has more than two
  inputs in series. The design uses a mirror carry circuit, 2-input NAND/NOR
  gates and transmission-gate muxes.
* **No long wires and no duplicated logic.** Long wires rule out prefix adders,
  and duplicated logic (carry-select, conditional-sum) costs power. The
  architecture is a plain **carry-skip adder** made of fixed 4-bit blocks.
* **Every long path is re-buffered.** A carry that skips several blocks passes
  an inverter in every block, so it keeps a full logic level.

The RTL here is a gate-level logic model of that circuit. Each transistor-level
gate of the circuit is one small module, and the modules are wired exactly as
the circuit is, inverters included. Simulation therefore shows the real
signal polarities at every node. Transistor sizes, supply voltage, delay and
power are electrical properties, and they are not modelled.

## Block structure

```
csa_adder32            WIDTH bits (default 32) = WIDTH/8 pair blocks in cascade
└─ csa8  (x4)          8-bit pair: true carry in, true carry out
   ├─ csa4 CIN_INV=0   4-bit block, true carry in, inverted carry out
   └─ csa4 CIN_INV=1   4-bit block, inverted carry in, true carry out
      ├─ full_adder (x4)   P = A^B, S = P^Ci, inverted carry from the mirror circuit
      │  ├─ xor2_buf (x2)  transmission-gate XOR with output inverter
      │  └─ mirror_carry   Co_n = ~(AB + Ci(A+B)), one inverting stage
      ├─ inv_min           operand and sum inverters on the "inverted" bits
      ├─ pstar_logic       P* = P3P2P1P0 = NOR(NAND(P3,P2), NAND(P1,P0))
      │  ├─ nand2 (x2)
      │  └─ nor2
      └─ skip_mux          P* ? carry-in : rippled carry, then an inverter
```

`csa_pkg` holds the two shared constants: 4 bits per block and 8 bits per
pair.

## Alternating polarity: how the carry path avoids inverters

This is the least obvious part of the design. It explains why half of the
bits have inverters on their operands and sums.

The mirror carry circuit is a single inverting stage, so a full adder produces
only the **inverted** carry `Co_n`. Adding an inverter to restore it would put
one more gate on every bit of the critical path. Instead the design uses a
property of the full-adder equations. If A, B and Ci are all inverted, then
P = A xor B is unchanged, while both S and Co come out inverted. So a full
adder that receives an inverted carry is fed inverted operands. Its mirror
output is then the **true** carry for the next bit, and its sum is inverted
once, off the critical path.

Along a block the carry therefore alternates: true, inverted, true, inverted.
The skip mux at the end of each block has an output inverter for drive
strength, so the block's carry out is the opposite polarity of its carry in.
Rather than undo this, the next block is built for an inverted carry in.
Parameter `CIN_INV` of `csa4` selects which variant is built:

| block variant | carry in | bits with inverted A, B and S | carry out |
|---|---|---|---|
| `CIN_INV = 0` | true | 1, 3 | inverted |
| `CIN_INV = 1` | inverted | 0, 2 | true |

In general, bit `i` of a block gets inverted operands when `i + CIN_INV` is
odd. The carry rippled out of bit 3 always has the same polarity as the block
carry in, so the skip mux compares like with like.

A `CIN_INV = 0` block followed by a `CIN_INV = 1` block is an 8-bit pair
(`csa8`) whose carries are true at both ends. `csa_adder32` only has to
cascade pairs. Inside a pair the wire between the two blocks carries `C4_n`.

## The skip path and the worst case

Each 4-bit block computes `P* = P3 P2 P1 P0` from its per-bit propagates. When
P* = 1 every bit would pass a carry straight through, and the mux forwards the
block carry in directly. Otherwise it takes the carry rippled out of bit 3.
Mux input 0 is the rippled carry and input 1 is the block carry in. The mux is
two transmission gates driven by P* and its complement, followed by an
inverter.

The slowest input pattern is a carry generated in block 0 that skips blocks 1
to 6 and then ripples through block 7. One pattern that causes it: A changes
from `0x00000000` to `0x00000001` while B changes from `0x00000000` to
`0x7FFFFFFF`, so that S31 rises. The testbench applies exactly this transition.

The skip mux saves time, not logic. When P* = 1 the rippled carry equals the
block carry in, so a zero-delay simulation gives the same sums whether the mux
works or not. For that reason the block and top-level testbenches read each
block's internal P* and compare it with the expected value. Checking the sums
alone would not catch a fault there.

## Interface

`csa_adder32 #(parameter int unsigned WIDTH = 32)`

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | WIDTH | operand A |
| `b` | in | WIDTH | operand B |
| `cin` | in | 1 | carry in |
| `s` | out | WIDTH | sum |
| `cout` | out | 1 | carry out of the top bit |

The adder is purely combinational: no clock, no reset, no registers. It
produces one addition per settling of the inputs. `WIDTH` must be a non-zero
multiple of 8, or elaboration stops with an error. 32 is the design point.
Wider settings, such as 64, repeat the same pair block, and a carry still
ripples through at most two 4-bit blocks. There is no signed-overflow output.

## What the model does and does not capture

Captured: the gate structure and connectivity of the whole adder. This covers
every inverter on operands, sums and mux outputs, the polarity of every
internal carry, the NAND/NOR form of P*, the transmission-gate XOR and mux
selections, and the 4-bit and 8-bit grouping.

Not captured, because it is electrical:

* The transistor sizes. Every gate is sized to match a minimum balanced
  inverter with 10/2 pMOS and 5/2 nMOS devices. The mirror circuit uses 20/2
  pMOS and 10/2 nMOS.
* The output-level robustness target: V_OH above 0.9 VDD and V_OL below
  0.1 VDD while driving fan-out-of-4 loads.
* Any delay, power or energy figure. The circuit was characterised in a 45-nm
  predictive model. Its worst-case delay is about 0.35 ns at 1.0 V, about
  6 ns at 0.4 V and about 2.5 µs at 0.1 V. Its minimum energy is about 22 fJ
  per addition near 0.2 V.
* The measurement fixture: input driver inverters and separately supplied
  FO4 load inverters.

Choices made here that the circuit description leaves open:

* `csa4` uses the `CIN_INV` parameter to write the two block variants as one
  module.
* The per-bit propagates and P* stay inside the blocks. They are not ports.
* `xor2_buf` and `skip_mux` write each transmission-gate pair as a 2:1
  selection onto an internal node. The inverters around that node are kept.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it does |
|---|---|
| `tb_inv_min`, `tb_nand2`, `tb_nor2`, `tb_xor2_buf`, `tb_mirror_carry`, `tb_full_adder`, `tb_pstar_logic`, `tb_skip_mux` | exhaustive truth tables |
| `tb_csa4` | both `CIN_INV` variants, all 512 input combinations; checks sum, carry polarity and internal P*; requires skips carrying both 0 and 1 |
| `tb_csa8` | all 2^17 input combinations; requires upper-block skips and skips through both blocks |
| `tb_csa_adder32` | default 32-bit adder, end to end (details below) |
| `tb_csa_adder_widths` | WIDTH = 8, 16 and 64, 20,000 random additions each, every 16th with A xor B all ones |

`tb_csa_adder32` applies:

* the worst-case transition;
* corner cases;
* 100 uniform random additions, the stimulus used for the average-power
  figures;
* 200,000 additions biased towards long propagate runs.

It checks every sum against the integer sum, and every block's internal P*.
It counts rippled carries, skipped carries, full six-block skips and carry
outs, and fails if any of them never occurred.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/csa_pkg.sv tb/tb_csa_adder32.sv --top-module tb_csa_adder32 -Mdir obj
./obj/Vtb_csa_adder32
```

Lint a module with `verilator --lint-only -Wall -Irtl rtl/csa_pkg.sv rtl/<module>.sv`.
All testbenches finish in well under a second of simulation.
