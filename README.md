# A Heat-Bath engine for the 3D Ising spin glass

This is synthesizable SystemVerilog for a special-purpose machine that runs
Heat-Bath Monte Carlo on the three-dimensional Edwards-Anderson spin glass.
The lattice is an L x L x L cube with periodic boundaries. Each site holds a
spin of +1 or -1. Each site also holds three fixed random couplings Jx, Jy
and Jz, each +1 or -1. The machine updates every site of the lattice once in
2·L clock cycles. At the default L = 24 that is 13 824 spins in 48 clocks,
done by an array of 24 x 12 = 288 identical Functional Units (FUs). At a
91.5 MHz clock, which an FPGA implementation of this architecture has been
reported to reach, a sweep takes about 525 ns, or 38 ps per spin.

## The update rule

For the site (i, j, k) being updated, the machine forms the neighbour sum

    nbs = s(i+1,j,k)·Jx(i+1,j,k) + s(i-1,j,k)·Jx(i-1,j,k)
        + s(i,j+1,k)·Jy(i,j+1,k) + s(i,j-1,k)·Jy(i,j-1,k)
        + s(i,j,k+1)·Jz(i,j,k+1) + s(i,j,k-1)·Jz(i,j,k-1)

with all indices taken mod L. The coupling used for each term is the one
stored with the *neighbour* site, in the array of that direction.
It then draws a 32-bit random number r and sets the spin to +1 if
`r < HBT[nbs]`, and to -1 otherwise. The old value of the spin plays no part.
The sum takes only the seven values -6, -4, …, +6, so HBT is a
seven-entry table. Entry n (n = 0..6) belongs to nbs = 2n − 6 and holds the
probability of spin +1, as an unsigned 32-bit threshold (probability × 2³²).
The temperature enters only through this table. For inverse temperature β
the usual heat-bath values are `HBT[n] = 2³² / (1 + exp(−2β(2n−6)))`. That
is the formula the testbenches use. The hardware lets the host load any values.

Every ±1 quantity is one bit, 1 for +1 and 0 for −1. A product of two such
values is then an XNOR. The table address is simply the number of products
that are +1, which equals (nbs + 6)/2.

## How 288 units update 13 824 spins in 48 clocks

This is the part of the design that needs the most care. A heat-bath sweep
may update two sites at the same time only if they are not neighbours. The
design uses the checkerboard (red/black) split. A site's parity is
(i + j + k) mod 2. A sweep is two half-sweeps: first every even site is
updated, then every odd one. The neighbours of an even site are all odd,
so within a half-sweep nothing an update reads changes. The result is the
same as visiting the sites one by one in any order within a parity class.
L must be even for the split to close around the torus.

**Ownership.** FU (x, y), with x = 0..L−1 and y = 0..L/2−1, owns two whole
columns of the lattice along k: (i = x, j = 2y) and (x, 2y+1). That is 2·L
sites per FU.

**One site per clock.** At step k of half-sweep p, exactly one of the FU's
two sites (x, 2y, k) and (x, 2y+1, k) has parity p. That site lies in
column c = (x + k + p) mod 2, and the FU updates it. So each FU updates one
site per clock, L sites per half-sweep and all 2·L of its sites per sweep.
All FUs work in lockstep on the same k.

**Rotating columns.** Each FU keeps its two columns in circular shift
registers of length L (`column_store`). The registers rotate by one place
per step. Position 0 therefore always holds site k, position 1 holds site
k+1 and position L−1 holds site k−1. The two k-direction neighbours are
fixed taps at loop delays 1 and L−1. As the head of column c moves to the
tail, it takes the new spin and keeps its couplings. After L steps both
columns are back where they started, with position k holding site k. The
host reads and writes them in that rest alignment.

**One bit per neighbour link.** The other column of the pair, o = 1 − c,
is not being updated. Its head, site (x, 2y+o, k), is exactly what the
neighbours need:

* FU (x±1, y) is updating its own column 1 − c, because its row parity
  differs. So its x-neighbour of interest sits in its column c, which is
  also the column it is not updating. Each FU therefore exports
  `px_out = s·Jx` of its resting head to the FUs above and below it.
* For c = 0 the updated site's y-neighbours are (x, 2y−1), which is
  column 1 of FU (x, y−1), and (x, 2y+1), which is the FU's own column 1.
  For c = 1 they are the FU's own column 0 and column 0 of FU (x, y+1). In
  both cases the neighbour FU has the same row, so it updates the same c.
  The column needed from it is its resting one. Each FU exports
  `py_out = s·Jy` of its resting head, and uses it for its own term as well.

So an FU sends two bits per clock and receives four. The neighbour links
are combinational. Within one clock an FU takes its neighbours' products,
adds them with its two k terms, looks up the table, compares with its
random number and writes the new spin at the clock edge.

## Blocks

| module | what it is |
|---|---|
| `ising_pkg` | `site_t` (spin, jx, jy, jz), widths, the ±1 product, the per-FU seed function |
| `ising_top` | control FSM + FU array + host ports |
| `sweep_controller` | control FSM: start/busy/done, step k, phase p, `par = (k+p) mod 2` |
| `fu_array` | L x L/2 grid of FUs, links closed into rings in both grid directions, host address decode and read mux |
| `ising_fu` | one Functional Unit: column store, energy engine, random generator, HBT table, update engine, checkerboard column select |
| `column_store` | two rotating columns of L sites, taps at k, k+1, k−1, host port |
| `energy_engine` | six ±1 products → count of +1 products, 0..6 (the table address) |
| `shiftreg_rng` | 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5), one value per clock |
| `hbt_lut` | 7 × 32-bit heat-bath table, written by the host, read combinationally |
| `update_engine` | new spin = (r < HBT[nbs]) |

Each FU has its own random generator and its own copy of the table. FU
(x, y) has index x·(L/2)+y. Its generator seed is
`SEED_BASE ^ ((index+1)·0x9E3779B9)`, with 0 replaced by 1. A table write
from the host goes to all 288 copies at once.

## Interface and timing of `ising_top`

Parameters: `L` (default 24, must be even) and `SEED_BASE` (default
`32'h2545F491`). Coordinates are `$clog2(L)` bits wide. Reset is synchronous
and active low. It resets the controller, the generators (to their seeds) and
the tables (every entry to 0x8000_0000, probability 1/2). It does not reset
the lattice.

* **Table load:** put `hbt_we=1`, `hbt_addr` (0..6) and `hbt_data` on the
  ports for one clock.
* **Site load:** put `site_we=1`, `site_i/j/k` and `site_wdata` (a `site_t`)
  on the ports for one clock. `rd_i/j/k` → `rd_data` is a combinational read.
* **Run:** pulse `start` for one clock with `n_sweeps`. From the next clock
  `busy` is high for exactly 2·L·n_sweeps clocks, with no gap between steps,
  half-sweeps or sweeps. `done` pulses for one clock as `busy` falls.
  `phase`, `step_k` and `sweeps_done` show progress. `n_sweeps = 0` gives
  only the done pulse.
* While busy, table writes, site writes and a second `start` are ignored.
  Reads during a run see the rotated columns and are not meaningful.

## Where this design makes its own choices

The architecture behind it is described only at the level of the array
(an N x N/2 grid of FUs on a torus, N = L = 24), the contents of an FU (a
32-bit shift-register random generator, a 7-entry heat-bath table, an energy
engine and an update engine), and the sweep time of 2 x 24 clocks. These
choices were made here:

* **The schedule.** The checkerboard column-pair schedule above is this
  design's own. It meets the stated 2·L clocks per sweep with L·L/2 units.
  The original architecture attaches clock delays to its links: delays 1 and
  N−1 on each unit's self loops, and N on the links between units. The delays
  1 and L−1 here are the k±1 taps of the rotating columns. The links between
  units here carry no register. Still, the value an FU reads over a link was
  written by that neighbour exactly L clocks earlier: the same step k in the
  previous half-sweep. In dependency terms, then, the inter-unit distance is
  L. Along k, site k+1 was written L−1 clocks earlier and site k−1 L+1
  clocks earlier. Whether the original pipelines its links in some other way
  is not known. The update rule is usually
  written as a loop that visits the sites one after another in lexicographic
  order. No parallel array can follow that order. The checkerboard order is
  an equally valid heat-bath sweep, but it is a different Markov chain step
  by step.
* **The random generator.** The 32-bit shift-register feedback is xorshift32.
  The original's exact generator is unknown.
* **Table contents** are loaded by the host. No default temperature is built in.
* **Site storage** is in registers, 192 bits per FU. An FPGA build could map
  the columns to block RAM or SRL shift registers.
* **Host interface, reset and start/done handshake** are this design's own.
* The energy engine ignores the spin being updated, as the update rule
  requires.
* The FPGA results reported for the original (91.5 MHz on a Virtex-4
  XC4VLX160; about 62 k slices, 96 k flip-flops, 168 block RAMs) are not a
  target of this RTL.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference model used by the array and
top tests, `tb/ising_ref_pkg.sv`, works in plain integer ±1 arithmetic. It
visits every site of one parity class in order, then the other, drawing each
site's random number from the generator of the FU that owns it.

* `tb_ising_top` runs at the default L = 24 with no parameter overrides.
  It loads the table for β = 0.3 and a random spin glass, then runs 1 sweep,
  then 2 sweeps back to back, then a zero-sweep start. After each run it
  compares all 13 824 sites (spins and couplings) with the reference. It
  checks for exactly 2·L clocks per sweep. It counts, and requires, both
  half-sweep phases, all seven energy levels, both update outcomes, table
  loads, a dropped write and an ignored start while busy, a back-to-back
  sweep and the zero-sweep run (55 323 checks).
* `tb_ising_physics`, also at the default size, checks physics through the
  ports only, with no model of the hardware. A ferromagnet (all J = +1)
  started ordered stays ordered at β = 0.5 (m > 0.9; about 0.995 is
  observed). It loses its order at β = 0.1 (|m| < 0.05). An antiferromagnet
  (all J = −1) started at all +1 orders into the Néel state at β = 0.5
  (|staggered m| > 0.9, |m| < 0.05). These runs confirm the sign
  conventions of the table and the checkerboard interplay. The critical
  point of the 3D Ising model lies near β ≈ 0.2217.
* `tb_fu_array` (L = 6, eight sweeps) checks the ring closure in both grid
  directions. `tb_ising_fu` drives two units (even and odd row) with random
  neighbour bits and checks their exports every clock. `tb_column_store`,
  `tb_sweep_controller`, `tb_energy_engine` (exhaustive), `tb_update_engine`,
  `tb_hbt_lut` and `tb_shiftreg_rng` (against known xorshift values) cover
  the leaves.

## Simulating

Compile the packages first. For the full design test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ising_top \
      rtl/ising_pkg.sv tb/ising_ref_pkg.sv \
      rtl/shiftreg_rng.sv rtl/hbt_lut.sv rtl/energy_engine.sv rtl/update_engine.sv \
      rtl/column_store.sv rtl/ising_fu.sv rtl/fu_array.sv rtl/sweep_controller.sv \
      rtl/ising_top.sv tb/tb_ising_top.sv
    ./obj_dir/Vtb_ising_top

The C++ build takes about two minutes for the 288-unit array. The simulation
itself takes well under a second. For a block test, swap in its testbench
and the modules it uses. Verilator has two-state values, so every testbench
initialises what it reads.

To change the lattice size, set `L` on `ising_top` (any even L ≥ 2). The
array grows as L²/2 units of 2·L sites each. A sweep always takes 2·L
clocks.
