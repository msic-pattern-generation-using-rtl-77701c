# MSIC test pattern generator with low-power LFSR seeds

A built-in self-test (BIST) pattern generator burns power in the circuit under
test (CUT) in proportion to how many CUT inputs toggle from one pattern to the
next. A plain LFSR toggles about half of them every clock. The multiple
single-input-change (MSIC) generator keeps the pseudo-random flavour of an
LFSR but changes very few bits per clock:

* a **seed circuit** (an LFSR, updated rarely, on *Clock1*) provides a vector
  `S` of m bits;
* a **twisted ring counter** (Johnson counter, updated every clock, on
  *Clock2*) provides a vector `J` of n bits in which exactly one bit changes
  per step, and which runs through 2n distinct states;
* an **XOR network** combines them: every CUT input is `S[a] ^ J[b]` for some
  pair (a, b).

While the seed is fixed, each CUT input sequence is a single-input-change
sequence, and different inputs get different copies of it (true or inverted
by their seed bit). After 2n counter steps a new seed is taken. The seed
circuit itself can be a conventional LFSR, a bit-swapping LFSR or a low-power
LFSR; the last two cut the toggling of the seed lines as well.

The generator is provided in two application schemes, both in `msic_top`:

| scheme | module | what the CUT sees |
|---|---|---|
| test-per-clock | `msic_tpc` | a new m x n-bit input vector every clock |
| test-per-scan  | `msic_tps` | m seed bits on its primary inputs, plus scan chains loaded with twisted codewords, one capture per load |

The default sizes fit the ISCAS-85 benchmark C432 (36 inputs, 7 outputs). The
CUT is not part of this RTL; its inputs and outputs are ports of the top.

## Forming the patterns

### The twisted ring counter and its three modes (`rtrc`)

`LEN` flip-flops J1..Jl (`j[0]`..`j[LEN-1]`) shift toward Jl on every enabled
clock. Two control inputs choose what enters J1:

| mode | `rj_mode` | `init` | J1 receives | result |
|---|---|---|---|---|
| Start | 1 | 0 | 0 | all 0s after more than `LEN` clocks |
| Circular shift | 1 | 1 | Jl | rotation; `LEN` clocks give the vector back |
| Normal | 0 | x | not Jl | Johnson counting, 2·`LEN` states, one bit change per clock |

From all 0s, Normal mode gives `0..01, 0..011, ..., 1..1, 1..10, ..., 10..0,
0..0`: after t steps the low t bits are 1 for t ≤ LEN, and the low t−LEN bits
are 0 for t > LEN.

### Test-per-clock: the XOR grid (`xor_grid`, `msic_tpc`)

The M·N CUT inputs form an N-row x M-column grid:

    cut_pi[i*M + c] = seed[c] ^ j[i]          row i = counter stage J(i+1)

One counter bit changes per clock, so exactly one row (M bits) flips per
vector. Every column is a single-input-change sequence.

### Test-per-scan: twisted codewords in scan chains (`msic_tps`)

Each scan chain k is fed by one XOR, `seed[k] ^ J1`. To load a chain the
counter is put in Circular-shift mode (J1 takes Jl) and clocked `LEN` times
together with the chains. J1 then presents the whole twisted vector as J1,
Jl, J(l-1), ..., J2, so after the shift

    cell LEN-1 of chain k = seed[k] ^ J1      (scan-out end)
    cell i     of chain k = seed[k] ^ J(i+2)  for i < LEN-1 (cell 0 = scan-in end)

and every chain holds the current twisted vector, rotated by one place, true
or inverted by its seed bit. Then one
Normal-mode step makes the next twisted vector, so consecutive loads of one
chain differ in exactly one cell. The seed itself drives the CUT's primary
inputs (`cut_pi = seed`). This needs `CHAINS ≤ SEED_W`; the counter length
equals the scan length.

### Seed circuits (`seed_gen`: `lfsr`, `bs_lfsr`, `lp_lfsr`)

All three are Fibonacci registers that shift toward bit 0, with the parity of
the tap stages entering the MSB. The tap sets are maximal-length polynomials
from a table in `msic_pkg` (`lfsr_taps`, widths 2..32), e.g. x^6+x^5+1 for 6
bits and x^8+x^4+x^3+x^2+1 for 8 bits. `seed_gen #(.KIND(...))` picks one:

* **`SEED_LFSR`** — the plain register.
* **`SEED_BS`, bit-swapping LFSR.** Every output goes through a 2:1 mux. The
  last stage (bit 0) is the common select: at 0 the outputs equal the
  register, at 1 adjacent pairs are swapped (`q[1]<->q[0]`, `q[3]<->q[2]`,
  ...; an odd top bit stays). Over a 4-bit period this cuts output toggles
  from 30 to 18. Note that the select bit is one of the swapped bits, so two
  register states can produce the same output: the 4-bit version shows 11
  distinct patterns in its 15-state period.
* **`SEED_LP`, low-power LFSR** (the default). Each LFSR step from T1 to T2
  is spread over four output patterns. The register is split into an MSB half
  and an LSB half (the MSB half is the larger one for odd widths), and an
  R-injector (`ri_cell`) passes a bit where T1 and T2 agree and injects
  R = bit 0 of T1 where they differ:

  | output | MSB half | LSB half |
  |---|---|---|
  | T1  | T1 | T1 |
  | T1k | T1 | RI(T1, T2) |
  | T2k | T1 | T2 |
  | T3k | RI(T1, T2) | T2 |
  | next T1 (= T2) | T2 | T2 |

  Every bit that differs between T1 and T2 flips exactly once along the way,
  so a step's toggles are shared out over four clocks. Worked example with
  the 8-bit register: T1 = 1010_0011, T1k = 1010_0011 (R = 1), T2k =
  1010_0001, T3k = 1111_0001, T2 = 0101_0001. Each Clock1 pulse gives the
  next of these patterns, so one LFSR period of 2^m−1 states yields
  4·(2^m−1) seeds.

## Control and timing

There is one clock, `clk`. *Clock1* and *Clock2* of the scheme are one-cycle
enables (`clk1_en`, `clk2_en`) made by the driver blocks, so the whole design
is a single synchronous clock domain. All flip-flops have an asynchronous,
active-low reset `rst_n`.

A test starts with a one-cycle `start` pulse; `n_seeds` (16 bits) sets its
length in seeds. `busy` is high during the test, `done` rises at its end and
stays high until the next `start`. A `start` while `busy` is ignored (and flagged by an assertion). `start` also clears the MISR, whose
`signature` is final once `done` is high.

**Test-per-clock (`driver_tpc`).** Clear (Start mode, N+1 cycles); then per
seed one Clock1 cycle followed by 2N Normal-mode cycles with `vec_valid` = 1.
In each `vec_valid` cycle `cut_pi` is a new vector and the MISR takes
`cut_po` at the end of that cycle (the CUT is assumed combinational, settling
within the cycle). Cycles from `start` to `done`: **N+1 + n_seeds·(2N+1)**.

**Test-per-scan (`driver_tps`).** Clear (Start mode, LEN+1 cycles); then per
seed one Clock1 cycle and 2·LEN times: one Normal-mode Clock2 cycle (new
twisted vector), LEN Circular-shift cycles while the chains shift, one
capture cycle (`scan_capture` = 1). After the last seed, LEN unload shifts
move the last captured values into the MISR. Cycles from `start` to `done`:
**LEN+1 + n_seeds·(2·LEN·(LEN+2)+1) + LEN**. The MISR (`NPO+CHAINS` bits,
`{primary outputs, scan-outs}`) takes the scan-outs during every shift and
the CUT primary outputs in the capture cycle. During capture, `scan_cells`
and `cut_pi` hold one complete test pattern and the chains load `cut_ppo`,
the CUT's next-state bits.

## Top-level ports (`msic_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `tpc_start`, `tpc_n_seeds` | in | 1, 16 | start a test-per-clock test of n seeds |
| `tpc_cut_pi` | out | TPC_M·TPC_N | to the CUT inputs |
| `tpc_cut_po` | in | NPO | from the CUT outputs |
| `tpc_vec_valid`, `tpc_busy`, `tpc_done` | out | 1 | status |
| `tpc_signature` | out | NPO | MISR result |
| `tps_start`, `tps_n_seeds` | in | 1, 16 | start a test-per-scan test |
| `tps_cut_pi` | out | TPS_SEED_W | to the CUT primary inputs |
| `tps_scan_cells` | out | TPS_CHAINS·TPS_LEN | scan cells, chain k cell i at bit k·LEN+i |
| `tps_cut_po` | in | NPO | CUT primary outputs |
| `tps_cut_ppo` | in | TPS_CHAINS·TPS_LEN | CUT next-state bits, captured into the chains |
| `tps_scan_capture`, `tps_busy`, `tps_done` | out | 1 | status |
| `tps_signature` | out | NPO+TPS_CHAINS | MISR result |

Parameters: `SEED_KIND` (`SEED_LP`), `TPC_M` = 6, `TPC_N` = 6, `TPS_SEED_W` =
6, `TPS_CHAINS` = 6, `TPS_LEN` = 5, `NPO` = 7. With these, the test-per-clock
grid drives 36 inputs; the test-per-scan side drives 6 primary inputs plus
6 x 5 = 30 scan cells, again 36; both compact 7 outputs, which matches C432.
A C432 test over the whole 252-seed period of the 6-bit low-power LFSR takes
3,283 cycles (3,024 vectors) test-per-clock and 17,903 cycles (2,520 scan
loads) test-per-scan.

## Design choices beyond the scheme

The scheme fixes the structure described above. These points are this
design's own:

* Single clock with Clock1/Clock2 enables instead of two clocks.
* The LFSR polynomials and reset value (1), and the MISR structure
  (Fibonacci register with the data XORed into every stage) and polynomial.
* The R value of the low-power LFSR is bit 0 of T1, and its output is
  decoded from the register and a 2-bit phase counter, not registered, so it
  may glitch between clock edges.
* The bit-swapping LFSR pairs for widths other than 4, and the top bit left
  alone for odd widths.
* The `start`/`n_seeds`/`done` handshake, the Start-mode clearing before the
  first seed, and the final unload shift of the test-per-scan scheme.
* The scan chains belong to the CUT in a real full-scan design. Here they are
  modelled as mux-D scan cells with a parallel capture input, so that the
  test-per-scan generator is complete and testable; with a purely
  combinational CUT such as C432 they simply act as its input register.
* Default sizes (6 x 6, 6 chains x 5) chosen to fit C432, and the low-power
  LFSR chosen as default seed circuit.
* The ordering of the XOR grid outputs on `tpc_cut_pi`.

Not included: the CUT netlist (C432) and any power estimation. Patterns are
only as good as the seed and counter sizes chosen; fault coverage has not
been measured.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. Reference models live in `tb/tb_ref_pkg.sv`;
the CUT is played by two small stand-in functions there. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/msic_pkg.sv tb/tb_ref_pkg.sv tb/tb_msic_top.sv \
        --top-module tb_msic_top -y rtl +libext+.sv
    ./obj_dir/Vtb_msic_top

`tb_msic_top` runs the top at its default parameters through a complete
252-seed test in both schemes, checks every vector, every scan load and both
signatures against the reference models, checks the cycle counts above and
confirms that clearing, Normal steps, circular shifts, captures, unload
shifts, seed updates and low-power intermediate patterns all occur.
`tb_msic_tpc` and `tb_msic_tps` do the same for each scheme with all three
seed circuits side by side. `tb_workload_c432` (see below) measures switching
activity.

### Switching activity on a C432-sized test

`tb_workload_c432` runs all six configurations (two schemes x three seed
circuits) at the default sizes for 252 seeds and counts bit toggles with a
stand-in CUT. It checks the test-per-clock counts against values worked out
from the reference seeds, and that both modified seed circuits toggle their
seed lines less than the plain LFSR. Measured:

| seed circuit | seed-line toggles per seed | test-per-clock: input toggles per vector | test-per-scan: cell and input toggles per scan load |
|---|---|---|---|
| LFSR    | 3.05 | 7.01 | 88.41 |
| BS-LFSR | 2.03 | 6.67 | 87.21 |
| LP-LFSR | 0.76 | 6.25 | 87.36 |

In the test-per-clock scheme a vector changes 6 of the 36 inputs (one grid
row), except at a seed change, so the seed circuit affects only 1 vector in
12 and the three seed circuits differ little per vector. In the test-per-scan
scheme every load shifts all 30 cells five times, so it toggles over ten
times as many cell and input bits per applied pattern as test-per-clock does
per vector (about 12.5 per clock against 6 to 7). The published comparison reports lower power for test-per-scan;
these toggle counts do not show that, but they are not a power figure: they
weigh a scan-cell toggle like a CUT-input toggle and say nothing about the
logic the toggles drive.

The testbenches need no waveform dumps and no files. Random initial values
(`+verilator+rand+reset+2`) do not affect any of them.

## Files

| file | contents |
|---|---|
| `rtl/msic_pkg.sv` | seed kind enum, counter mode struct, polynomial table |
| `rtl/lfsr.sv`, `rtl/bs_lfsr.sv`, `rtl/lp_lfsr.sv`, `rtl/ri_cell.sv` | seed registers |
| `rtl/seed_gen.sv` | seed circuit, selects one of the three |
| `rtl/rtrc.sv` | reconfigurable twisted ring counter |
| `rtl/xor_grid.sv` | test-per-clock XOR network |
| `rtl/scan_chains.sv`, `rtl/misr.sv` | scan chains, signature register |
| `rtl/driver_tpc.sv`, `rtl/driver_tps.sv` | clock and control blocks |
| `rtl/msic_tpc.sv`, `rtl/msic_tps.sv` | the two schemes |
| `rtl/msic_top.sv` | both schemes side by side |
| `tb/` | one testbench per module, reference package |
