# FPFA: a field programmable function array with graph-based execution

This is synthesizable SystemVerilog for a coarse-grained reconfigurable array.
It follows the architecture in "Low Cost & Fast Turnaround: Reconfigurable
Graph-Based Execution Units". An FPGA programs single logic gates. This array
programs word-level arithmetic instead: 16-bit ALUs with a multiplier-adder,
small look-up tables (LUTs) and programmable busses. An application's inner
loop becomes a data-flow graph. Each ALU is one node of that graph. The whole
graph computes one new result every clock cycle. Nothing fetches or decodes
instructions. Nothing acts as a central controller either: "control" is part of
the graph. For example, one ALU counts addresses, and a LUT at those addresses
feeds samples to other ALUs.

The default build has 4 ALU-blocks. Each block has 16 ALUs and 8 LUTs of
64 x 16 bits, so the array has 64 ALUs in all.

## The data-flow model in one paragraph

Every value that moves between graph nodes comes from a register. That
register is an ALU's output register, a LUT's read register, an
interpolation-fraction register or a block-boundary register. The
interconnect between these registers is pure combinational multiplexing, so
no configuration can create a combinational loop. Latency is therefore easy
to count:

| step | latency |
|---|---|
| ALU operation (one graph node) | 1 cycle |
| LUT read | 1 cycle |
| crossing from one block to the next (switch lane) | 1 cycle |
| track inside a block | 0 (combinational) |

A graph is a pipeline. Throughput is one result per cycle, and latency is the
sum of the steps along the path. For a correct result, the programmer must
balance path lengths where paths join. This is the same job as retiming a
hand-made datapath.

## The ALU (`rtl/fpfa_alu.sv`)

Each ALU has four corner ports: NW, NE, SE and SW. Each port is configured as
an input or as an output. The ALU has three adder/subtractors, one 16x16
multiplier-adder, three bitwise Boolean units and a scaling shifter. The
multiplexers that join them are set by the configuration:

```
 a,b,c,d,y,w  <- each picks one of: NW NE SE SW, constant C0, constant C1, 0, own out1
 A1 = a ± b      L1 = a {and,or,xor,andn} b
 A2 = c ± d      L2 = c {...} d
 P  = X*Y + Z    X ∈ {A1, L1, 0}, Y = y, Z ∈ {A2, L2, 0}, X and Y each signed or unsigned
 S  = (P >>> shift)[15:0]                 shift = 0..31, arithmetic
 R  ∈ {S, A1, L1, A2, L2}
 A3 = R ± w      L3 = R {...} w
 out1 = cond[0] ? o1_t : o1_f     out2 = cond[1] ? o2_t : o2_f    (each from {A3, L3, R, w})
```

`out1` and `out2` are registered. Each output port shows one of them. An ALU
can therefore drive at most two different values, for example 2 inputs and
2 outputs, or 3 inputs and 1 output. The two constants C0 and C1 are part of
the configuration. Because of them, a FIR tap needs no port for its
coefficient.

Some typical nodes (the testbenches use all of them):

| node | setting |
|---|---|
| linear interpolation F = (B−A)·h + A, h with 8 fraction bits | A1 = B − A, X = A1, Y = h (unsigned), shift 8, out1 = A3 = S + A |
| FIR tap, Q15 coefficient | X = x, Y = C0, shift 15, out1 = A3 = S + y_in |
| max(a, b) | A1 = a − b, R = A2 = a + 0, w = b, out1 = sign(A1) ? w : R |
| counter / accumulator | A2 = out1 + C0 (or + input), out1 = R |

### Conditionals (`rtl/fpfa_cond.sv`)

Conditionals run inside the ALU as multiplexer selections, not as branches.
Each ALU computes eight condition codes:

- sign, zero and carry (no borrow) of A1
- sign and zero of A2 and of A3
- sign of P

A small programmable-logic section turns them into the two output-mux
selects. It has two 4-input LUTs, and each LUT input can take any of the eight
codes. So any Boolean function of up to four condition codes can steer an
output. `max(a,b)` sets LUT 0 to "sign of A1" (truth table `16'h8000` with all
four inputs on that code).

### Multiplier-adder (`rtl/fpfa_mac.sv`)

This is a 16x16 Booth-recoded Wallace-tree multiplier-adder. Each operand is
signed or unsigned on its own. Both operands are first extended to 17-bit
two's complement. The multiplier operand is then radix-4 Booth recoded into
9 digits. The 9 partial products, one row of negation bits and the addend are
reduced in 5 levels of carry-save adders (11 → 8 → 6 → 4 → 3 → 2 rows). A
final adder produces the 34-bit result. The final adder is written as `+`,
and synthesis chooses its structure.

## The ALU-block (`rtl/fpfa_alu_block.sv`)

A block contains:

- 16 ALUs
- 8 LUTs
- one interpolation address generator
- 5 switch lanes to the block below
- a switch matrix of 32 bus tracks with programmable interconnect points (`rtl/fpfa_pip_matrix.sv`)

Each track has one driver PIP that picks its source. Each sink has one PIP
that picks a track. A track can feed any number of sinks. A setting that is
out of range means "not connected" and reads as 0. After reset, nothing is
connected.

Source and sink numbers in a default block (ALU *a*, port *p*: NW=0, NE=1,
SE=2, SW=3):

| sources | index | sinks | index |
|---|---|---|---|
| ALU port (0 if the port is an input) | 4a+p (0–63) | ALU port input | 4a+p (0–63) |
| LUT *l* read data | 64+l | LUT *l* address | 64+l |
| fraction x, y, z | 72, 73, 74 | LUT *l* write data | 72+l |
| lane *i* from the block above | 75+i | coordinate x, y, z | 80, 81, 82 |
| lane *i* from the block below | 80+i | lane *i* to the block above | 83+i |
| | | lane *i* to the block below | 88+i |

Each LUT has one of four modes:

- off
- read at the address on its address sink
- read at the address from the address generator
- write its data sink at its address sink every cycle, which keeps state in RAM

The global IO-bus can read and write every LUT. When the IO-bus and the data
path write in the same cycle, the IO-bus write wins.

### Table interpolation (`rtl/fpfa_addrgen.sv`)

Functions such as sin x, 1/x or a shading table take one cycle each. The array
stores them as tables and interpolates linearly between table points. The
address generator reads unsigned coordinates with 8 fraction bits. In 1D, 2D
or 3D mode it sends the address of each neighbouring table point to its own
LUT, so all 2, 4 or 8 points are read in the same cycle:

| mode | table shape | LUTs | interpolating ALUs |
|---|---|---|---|
| 1D | 64 points | 0, 1 | 1 |
| 2D | 8 × 8 | 0–3 | 3 (two along x, one along y) |
| 3D | 4 × 4 × 4 | 0–7 | 7 (four along x, two along y, one along z) |

LUT *n* reads corner (i+dx, j+dy, k+dz), where n = 4dz + 2dy + dx. Indices
wrap around at the table edge. Every LUT holds a full copy of the table. The
fractions leave the generator staggered, to fit an interpolation tree of
one-cycle ALUs:

- `frac_x` arrives together with the LUT data, 1 cycle after the coordinate.
- `frac_y` arrives 1 cycle later than `frac_x`.
- `frac_z` arrives 1 cycle after `frac_y`.

An x-level ALU, a y-level ALU and a z-level ALU can therefore take their
fractions straight from the generator.

## The array (`rtl/fpfa_top.sv`, `rtl/fpfa_switch.sv`, `rtl/fpfa_iobus.sv`)

The blocks form a column. Each lane of the switches below block *b* is set to
carry a word down, up or nothing. Each lane and direction has a register.
The top lanes of block 0 and the switch lanes of the last block are top-level
ports.

The host has two buses:

- **Configuration bus** (`cfg_we`, `cfg_blk`, `cfg_unit`, `cfg_idx`, `cfg_data`). Each cycle it writes one setting. `cfg_unit` selects:
  - 0–15: ALU (`cfg_data` is an `alu_cfg_t`)
  - 16–23: LUT mode
  - 24: address-generator mode
  - 25: track driver number `cfg_idx`
  - 26: sink number `cfg_idx`
  - 27: lane directions, 2 bits per lane (1 = down, 2 = up)

  The bus may be used while the array runs. A new setting acts from the next
  clock edge. This allows parts of the array to be reprogrammed on the fly
  while the rest keeps running.
- **Global IO-bus** (`io_*`). It reads or writes one LUT entry per cycle, addressed by block, LUT and entry. Read data comes back one cycle later, with `io_rvalid`. This is the path by which a peripheral processor loads tables and collects results.

All encodings are in `rtl/fpfa_pkg.sv`. Reset is asynchronous and active low.
It clears all settings and pipeline registers, but not the LUT contents.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/fpfa_pkg.sv tb/tb_fpfa_top.sv --top-module tb_fpfa_top
./obj_dir/Vtb_fpfa_top
```

`tb_fpfa_top` runs the full-size array (default parameters) with four graphs
at once:

- an 8-tap FIR filter producing one output per clock, fed from a LUT, with its coefficients reprogrammed mid-run
- a 3D interpolation that uses all 8 LUTs and 7 ALUs of a block
- a 2D interpolation followed by a conditional clamp
- storage of the FIR output in a LUT, read back over the IO-bus

Every output is compared, cycle by cycle, with a fixed-point model. The test
takes about 20 s to build and under a second to run. `tb_fpfa_alu_block`
covers 1D interpolation, LUT write mode and upward lanes. The unit
testbenches compare the ALU against a behavioural model under random
configurations, and the multiplier against integer arithmetic in all four
signedness combinations.

`tb_fft_butterfly` maps a radix-2 FFT butterfly onto 8 ALUs of one block:
X = A + B and Y = (A − B)·W. Two ALUs add, four ALUs each subtract and
multiply by a Q15 twiddle constant, and two ALUs add the products. The block
produces one butterfly per clock. The test steps through four twiddles while
the graph runs. It checks the results both exactly and against the
real-valued butterfly.

To program your own graph, copy the helper tasks in `tb/tb_fpfa_top.sv`:
`cfg`, `drive`, `listen`, `route`, `counter_cfg`, `lerp_cfg` and `tap_cfg`.

## What follows the source and what does not

These parts follow the source publication:

- the ALU's unit counts (3 add/sub, 1 multiplier, 3 Boolean), four corner ports and programmable constants
- conditionals done with multiplexers steered by a small programmable-logic section fed by condition codes
- the 16x16 Booth/Wallace multiplier-adder with signed and unsigned operands
- 16-bit × 64-entry LUTs
- 1D/2D/3D addressing with 2/4/8 LUTs and 1/3/7 interpolating ALUs
- blocks of 16 ALUs with LUTs, a PIP switch matrix and bidirectional switches to other blocks (5 switches drawn per block)
- the global IO-bus to the LUTs
- the 64-ALU array size

The source describes these only by function or leaves them open. This design
chooses them itself:

- how the ALU's units connect, and every encoding
- a single pipeline register per ALU, at its outputs
- condition logic of two 4-input LUTs
- 8 LUTs and 32 tracks per block, with every track reaching every port (the source distinguishes short nearest-neighbour busses from busses of 4–8 ALUs' reach; inside a 4 × 4 block every port is within that reach, so all tracks are alike here)
- a register on every block-crossing lane
- the coordinate format, the table shapes and edge wrap-around of the address generator
- the column arrangement of blocks
- both host buses and their timing

Not built:

- the micro-PAL of the first design, which the source itself replaces with the programmable-logic section
- the burst-mode peripheral processor (external)
- the larger-port ALU variants that the source proposes as future work (5 ports, or 4 inputs and 2 outputs)
- higher-order (Bessel) interpolation, which would be a mapping onto the same ALUs rather than new hardware

Limits of this model:

- The source reports clock rates, power and area for its VHDL and full-custom implementations, for example 25 MHz for the VHDL ALU. Nothing here has been timed or measured. The multiplier, scaling shifter and output adder lie in one register stage, which makes a long combinational path.
- A mapping that needs more than two outputs or more than four ports per ALU does not fit: an adaptive-FIR section on one ALU (5 ports) or multi-word multiplication on one ALU (6 ports).
- Writes from the IO-bus and the data path to the same LUT in the same cycle drop the data-path write.
- Scaling truncates without saturation.
