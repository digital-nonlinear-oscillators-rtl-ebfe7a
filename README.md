# Digital Nonlinear Oscillators: entropy sources from plain logic gates

A true random number generator needs a physical process that cannot be
predicted. FPGAs contain only digital logic, so the usual source there is
the jitter of a ring oscillator. Ring oscillators are well understood, and
so are their weaknesses. A **Digital Nonlinear Oscillator (DNO)** is a
different kind of source built from the same parts. It is a small network
of look-up tables (LUTs) wired into combinational loops. Seen as an analog
circuit, every gate is a saturating amplifier with a delay. A suitable
network of them behaves as a nonlinear dynamical system, and it can be
chaotic. A flip-flop samples one node of the network, which turns the
waveform into random bits.

This repository holds synthesizable SystemVerilog for:

- the building blocks: the LUT node, the sampling flip-flop, the inverter
  ring, and the XOR/NXOR feedback loop with delay buffers;
- three oscillators: the **high-performance DNO** (eleven nodes, the main
  design), a **seven-node DNO**, and a **single-LUT oscillator**;
- an **entropy source selector**, which measures a set of sampled sources
  and passes on the one with the highest Shannon entropy;
- a top level, `dno_trng_top`, which joins four sources and the selector
  into one random bit generator.

## The node: a LUT with a delay

`elb` ("elementary logic block") models the FPGA cell every node is built
from. It has a K-input LUT whose `INIT` vector is the truth table.
`INIT[a]` is the output for the input address `a = {.., i1, i0}`, as in
Xilinx `LUT1`/`LUT2` primitives: an inverter is `2'b01` and a 2-input XOR
is `4'b0110`. The cell also has a flip-flop and an output multiplexer.
`SYNC = 1` selects the registered output. Every oscillator node uses the
unregistered output (`SYNC = 0`). `dno_pkg` holds the truth tables used
here: NOT, DEL (a buffer used as a delay), XOR2, NXOR2 and XOR3.

In silicon, the behaviour comes from the gate delays and from the routing
between gates. In this RTL each node has a parameter `DELAY_PS`. It is
applied as `assign #(DELAY_PS)` on the LUT output and stands for the gate
plus its routing. Synthesis ignores it. Simulation needs it: without it a
loop of gates would never settle. All delay values in this repository are
illustrative choices. On a real device, placement and routing set them.

## The loop primitive: a gate that switches an oscillation on and off

`xor_del_loop` is the structure the larger oscillators are built from. Its
first node computes XOR(x, feedback). A chain of `K_DEL` buffers carries
that node's output back to its feedback input.

- With **x = 1** the XOR inverts, so the loop is an odd ring and
  oscillates. The period is `2*(gate delay + K_DEL*buffer delay)`.
- With **x = 0** the XOR passes its input through, so the loop is a ring
  of buffers. It holds its last value, which makes it bistable.
- The NXOR version (`NXOR = 1`) does the opposite: it runs for x = 0 and
  holds for x = 1.

A first-order analog model of the gates explains the default
`K_DEL = 2`. Each node is a sigmoid transfer function driving an RC
stage. With zero or one buffer, all the fixed points of the loop stay
stable. Two buffers are the minimum that makes the fixed point unstable
for x = 1, so the loop can oscillate. A logic simulation oscillates for
any `K_DEL`. The parameter therefore accepts smaller values, but only
`K_DEL >= 2` is an oscillator in silicon.

## The high-performance DNO (`hp_dno`)

The idea is to join two loops that have opposite enables, and to drive
their shared enable with a signal that depends on both loops:

```
 ELB#1-3  ring of three inverters          phi = ELB#3
 ELB#4    z  = XOR3(x3, phi, y3)           mixer; the DNO output
 ELB#5    y1 = NXOR(y3, z)  ┐
 ELB#6    y2 = DEL(y1)      ├ NXOR loop: runs while z = 0, holds while z = 1
 ELB#7    y3 = DEL(y2)      ┘
 ELB#8    x1 = XOR(x3, z)   ┐
 ELB#9    x2 = DEL(x1)      ├ XOR loop: runs while z = 1, holds while z = 0
 ELB#10   x3 = DEL(x2)      ┘
 ELB#11   flip-flop sampling z on every clock edge  -> rnd_out
```

At any moment, one loop oscillates and the other holds the last value it
reached. Each toggle of a loop output changes `z`, and `z` decides which
loop runs. The free-running ring adds a periodic drive `phi` to the same
XOR. The result is a *forced nonlinear oscillator*: a periodic driver
excites a nonlinear oscillator that gates itself. Coupled oscillators of
this kind can lock, run quasi-periodically or become chaotic. Which of
these happens depends on the ratio of the time constants. In hardware the
placement of the eleven LUTs sets that ratio. Here four parameters set it:
`RO_DELAY_PS`, `MIX_DELAY_PS`, `X_DELAY_PS` and `Y_DELAY_PS`.

The ports `z`, `ro_nodes`, `x_nodes` and `y_nodes` are for observation
only. On a device, only `rnd_out` leaves the block.

## The other oscillators

**`custom_dno7`** (7 nodes plus a sampler) is an earlier, smaller design
of the same kind:

- ELB#1-3 form a three-inverter ring.
- ELB#4 = XOR(ring, ELB#7).
- ELB#5 and ELB#6 are two delays after ELB#4.
- ELB#7 = XOR(ELB#6, ELB#7) is a one-gate loop. It toggles by itself
  while ELB#6 is 1 and holds while ELB#6 is 0.

A ring edge travels through ELB#4-6 and starts ELB#7. ELB#7's toggling
then flows back into ELB#4, where it mixes with the ring again. `OUT_NODE`
(4 to 7) chooses the node that ELB#8 samples. The default is ELB#4. The
nodes and their gate types follow the original design. Which input pin
each loop connection lands on is this implementation's own reading.

**`single_lut_oscillator`** is a single LUT configured as XOR(en,
feedback), with its output routed back to its own input. Inside an FPGA
that route passes through switch-matrix multiplexers, and these act as
the delay stages a loop needs. One LUT is therefore already an
XOR-plus-two-delays loop, and it runs faster than a three-LUT ring. The
routing is modelled as `ROUTE_STAGES` delays of `ROUTE_DELAY_PS` on the
feedback wire. With `en = 1` the period is
`2*(LUT_DELAY_PS + ROUTE_STAGES*ROUTE_DELAY_PS)`, which is 1 ns with the
defaults. With `en = 0` the loop holds.

**`ring_oscillator`** is N inverters in a loop (N odd, default 3). Its
period is `2*N*delay`. It serves as the periodic driver inside both DNOs.

## Sampling (`sync_interface`)

A single D flip-flop with synchronous reset (an FDRE-style cell, with
clock enable tied high) does two jobs at once. It quantises the oscillator
node to one bit, and it samples that node at the clock rate. There is no
second synchroniser stage. `rnd_out` is valid one clock after the edge that took
the sample.

## Choosing the best source (`entropy_source_selector`)

Identical oscillators placed at different spots in a chip give sources of
different quality. The selector measures `NSRC` sampled streams and keeps
the best one. It uses a single histogram memory and measures the sources
one after another, which keeps the logic small.

1. **Clear** the histogram: `2**SYM_BITS` cycles.
2. **Count**, for each source in turn: take `NBITS` bits, one per clock.
   Pack them into `NSYM = NBITS/SYM_BITS` words of `SYM_BITS` bits, first
   bit in the LSB, and count each word value. `meas_valid` and `meas_src`
   show which source's bit is counted in the current cycle.
3. **Sum**: sweep the histogram (`2**SYM_BITS` cycles), add up
   `S = sum c*log2(c)` and clear each bin. `score_valid` pulses with `S`
   on `score`.
4. **Decide** (1 cycle): keep the source if its `S` is strictly smaller
   than the best so far. On a tie the lower index wins.

Why the smallest `S` wins: the average Shannon entropy per bit is
`ASE = (log2 NSYM - S/NSYM) / SYM_BITS`. Every source gives the same
`NSYM`, so the smallest `S` means the highest entropy. No division or
real logarithm is needed.

`log2` is computed in fixed point with `LOG_FRAC` fraction bits, using
Mitchell's approximation. If the leading one of `c` is at bit `p`, then
`log2 c ≈ p + (c - 2^p)/2^p`, with the fraction truncated. The error is
below 0.09 bit per count. It is the same for every source, so it biases
the comparison only between sources that are nearly equal.

`done` pulses exactly
`2**SYM_BITS + NSRC*(NSYM*SYM_BITS + 2**SYM_BITS + 1)` cycles after the
edge that sampled `start`. `sel` holds the winner until the next
comparison ends. `rnd_out = src[sel]` at all times. With the defaults
(`SYM_BITS = 10`, `NBITS = 1,000,000`, `NSRC = 4`), one comparison takes
4,005,124 cycles, 40 ms at 100 MHz. The histogram is 1024 × 17 bits.

## The generator (`dno_trng_top`)

| source | oscillator | note |
|---|---|---|
| `src_bits[0]` | `hp_dno` | first set of node delays |
| `src_bits[1]` | `hp_dno` | second set of node delays ("another placement") |
| `src_bits[2]` | `custom_dno7` | ELB#4 sampled |
| `src_bits[3]` | `single_lut_oscillator` + `sync_interface` | 2 × 215 ps routing |

A pulse on `start` runs one comparison. After `done`, `rnd_out` carries
the chosen source, one bit per clock. `SYM_BITS` and `NBITS` are passed
to the selector. `rst` resets the samplers and the selector. The
oscillators have no reset and no enable: they run from power-up.

## What a logic simulation shows, and what it does not

The randomness of a DNO comes from noise and from analog behaviour:
chaos, jitter and the finite gain of each gate. An event-driven simulator
has none of these. Each node delay is exact and every signal is 0 or 1,
so in simulation every oscillator here is deterministic and eventually
periodic. For example, the sampled `hp_dno` settles into a repeating
pattern. The simulations therefore check structure and mechanism: that
each node computes its gate function with its delay, that loops run and
freeze when they should, and that sampling and selection are correct.
They say nothing about entropy. Entropy has to be measured on a device.

Three side effects of ideal delays show up in the testbenches:

- **Harmonic modes.** A ring started from an arbitrary state can keep
  several edges circulating forever. A real ring loses the extra edges.
  The testbenches therefore force a one-edge start state for a few
  hundred picoseconds and then release it, much as an analog simulation
  sets node initial conditions.
- **Pulses that never die.** A loop switched off while its edge is in
  the buffer chain keeps a pulse running. In silicon that pulse would
  shrink and vanish. `tb_xor_del_loop` therefore switches loops off while
  the edge is inside the gate.
- **Phase lock to the clock.** An oscillator whose ideal period divides
  the clock period is always sampled at the same phase. For this reason
  the top's single-LUT instance uses a 1.06 ns period rather than 1 ns.

## Building it on an FPGA

The RTL synthesizes, but an oscillator only works if the tools keep its
structure:

- DNOs are combinational loops on purpose. The loop design-rule check has
  to be lowered from error to warning (on Vivado: `LUTLP-1`).
- Each node should be its own LUT. Keep the hierarchy and mark the nodes
  `DONT_TOUCH`, so that LUTs are not merged or optimised away.
- Place the nodes by hand (`LOC`/`BEL`) in a few neighbouring slices.
  Placement decides the delays, and the delays decide the dynamics.
- Place the sampling flip-flop by hand as well, so that it meets timing.

None of these attributes are in the RTL, because they are specific to a
vendor and a device.

## Where this implementation makes its own choices

- All delay values. The dynamics depend on them, so they are parameters.
- The wiring detail of `custom_dno7`, and ELB#4 as its sampled node.
- XOR(en, feedback) as the function of the single-LUT oscillator.
- The whole method of `entropy_source_selector`. The goal is to pick the
  highest-entropy source cheaply. The histogram, the Mitchell logarithm,
  the sequential schedule and `NSRC = 4` are choices made here.
- The top's set of four sources.
- No reset or enable on any oscillator, and no flip-flop reset inside
  `elb`.

## Simulating

Testbenches are self-checking. Each one prints
`TB_RESULT checks=N failures=M` and ends. They need Verilator 5 with
`--timing`. Example:

```
verilator --binary --timing --assert --top-module tb_hp_dno \
    -y rtl -y tb -Irtl rtl/dno_pkg.sv tb/tb_hp_dno.sv
./obj_dir/Vtb_hp_dno
```

| testbench | what it checks |
|---|---|
| `tb_elb` | every truth table and `INIT` bit; output moves only after `DELAY_PS`; registered mode changes only at clock edges |
| `tb_sync_interface` | sample taken at the edge; synchronous reset; output still between edges |
| `tb_ring_oscillator` | node equations; period `2*N*tau` and high time `N*tau` for N = 3 and 5 |
| `tb_xor_del_loop` | node equations; run/hold for XOR and NXOR; period for K_DEL = 2 and 4 |
| `tb_single_lut_oscillator` | period for two routing delays; hold with `en = 0`; restart |
| `tb_custom_dno7` | all 7 node equations; sampler; ELB#7 self-oscillation and hold; feedback into ELB#4 |
| `tb_hp_dno` | all 10 node equations; sampler; both loops run and are frozen |
| `tb_entropy_source_selector` | score of each source against an independent reference; winner equals highest exact entropy; cycle count; forwarding |
| `tb_dno_trng_top` | the whole generator, twice: cycle count, winner against reference scores, forwarding, and a count of every mechanism above (run at 4-bit words, 4,000 bits per source) |
| `tb_workload_ase10` | the same flow at 10-bit words and 100,000 bits per source |

`tb_node_check` is a monitor module used by several testbenches. It
checks each transition of one node against the gate equation, applied to
that node's inputs as they were one delay earlier.

The largest size simulated is `SYM_BITS = 10` with 100,000 bits per
source: about 400,000 clock cycles, roughly a minute and a half. A full
default comparison (1,000,000 bits per source, about 4 million cycles)
would need about 15 minutes with Verilator. Most of that time is spent
on the picosecond-scale events of the oscillators. No testbench runs it.
