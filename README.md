# Nonbonded-force accelerator for NAMD on a two-FPGA board

This design computes the short-range (nonbonded) forces of the NAMD
molecular-dynamics code in hardware. NAMD splits the simulated system into
spatial cells called *patches*. It computes forces either inside one patch (a
*self* compute) or between two neighbouring patches (a *pair* compute).

For every pair of atoms closer than the cutoff, the hardware works out the
electrostatic and Lennard-Jones (van der Waals) force from interpolation
tables. It adds the force to one atom and subtracts it from the other, so each
pair is computed only once. The host calls the accelerator once per compute:

1. On the first call, the host sends the lookup tables.
2. The host streams in the atoms of the patch or patches, with their current
   forces.
3. The host reads back the updated forces.

The hardware targets a board with two FPGAs joined by a chip-to-chip bridge.
Each FPGA has its own compute engine:

- engine A, on the primary FPGA, handles the even atoms `i`;
- engine B, on the secondary FPGA, handles the odd atoms `i`.

Inside each engine, the cheap work and the expensive work are separated:

- Several *distance lanes* test candidate pairs against the cutoff.
- The pairs that pass are queued.
- One fully pipelined *force pipeline* takes one pair per clock from the
  queue.

Most candidate pairs lie outside the cutoff. This split keeps the costly force
pipeline busy with real work.

## Block structure

```
namd_map_top                   two chips, streams, bridge protocol, merge
 ├─ compute_engine  (A, 6 lanes, even i)   ─┐
 └─ compute_engine  (B, 8 lanes, odd i)    ─┤ each contains:
      ├─ atom memory (LANES+3 read ports)   │
      ├─ coef_tables      interpolation + LJ tables
      ├─ distance_engine  i/j walk, LANES × distance_lane, per-lane sync_fifo,
      │                   round-robin merge
      ├─ sync_fifo        shared j queue
      ├─ force_engine     19-stage pair-force pipeline
      └─ fi / fj accumulators (per atom, read-modify-write)
packages: fp32_pkg (single-precision arithmetic), md_pkg (types, layouts)
```

The bridge, the on-board memories, the DMA engine and the host are not part of
the RTL:

- The two bridge directions are ports of the top.
- `tb/bridge_model.sv` closes the bridge in simulation with a fixed delay.

## The pair walk and how it is split

For a self compute over `i_upper` atoms, every pair `i < j` is visited. For a
pair compute, every `i` in `[0, i_upper)` is paired with every `j` in
`[i_upper, i_upper + j_upper)`. The atoms of the two patches are stored one
after the other.

Each engine walks a subset of `i`: `i_first, i_first + i_step, ...`. The top
uses `0, 2` for engine A and `1, 2` for engine B. For each `i`, the
distance engine spends one clock loading the `j` range. It then issues `LANES`
candidates per clock. Lane `l` takes `j_from + l`, `j_from + l + LANES`, and so
on.

Each lane is a 4-stage pipeline: coordinate differences, squares, sum, then
compare. It passes the pair when `r2 <= cutoff2`.

Each lane writes the pairs that pass into its own queue. A round-robin arbiter
moves at most one pair per clock from the lane queues into the j queue in
front of the force pipeline. When any lane queue comes close to full, issuing
stops for that clock. That stall is the back-pressure mechanism. It shows as
`ev_stall`.

The force pipeline consumes one pair every clock, so the j queue itself never
fills in this configuration. Its `full` flag is still wired, as
`ev_queue_full`.

## The force pipeline

Per pair, in IEEE single precision, in the order shown:

```
d      = p_i - p_j                      (x, y, z)
r2     = d.x*d.x + d.y*d.y + d.z*d.z
kqq    = (q_i * dielectric_1) * q_j
A, B   = LJ table[vdw_i * m + vdw_j]
k      = (bits(r2) >> 17) + r2_delta_expc          table bin
diffa  = r2 - float(bits(r2) & 0xfffe0000)         offset inside the bin
for t in {d, c, b}:
  fast_t = kqq*elec_t + A*vdwA_t - B*vdwB_t        coefficients of bin k
force_r = -2 * ((3*diffa*fast_d + 2*fast_c)*diffa + fast_b)
force_r = min(force_r, 100)                         (reported as "clamped")
force_r = force_r * ivbias
F      = int32(0.5 + force_r * d)       truncated toward zero, saturating
```

The bin index takes the sign, the exponent and the top 6 mantissa bits of
`r2`. The table is therefore finer at short distance.

`F` is added to atom `i` and subtracted from atom `j`.

The pipeline is 19 stages deep, with fixed latency. It takes one pair every
clock. Its reads are at fixed stages:

| Addressed from | Read |
|---|---|
| input pair | atom memory, one clock |
| stage 2 register | LJ table |
| stage 5 register (`r2`) | coefficient table |

Every table address comes from a pipeline register, so the table reads add
no combinational path.

### Number format

- Round to nearest, ties to even, on every operation.
- Subnormal inputs and results are flushed to zero.
- Overflow goes to infinity. NaN is not treated specially.
- The float-to-integer conversion truncates toward zero and saturates at the
  32-bit limits.

All of this is in `rtl/fp32_pkg.sv`. Each operation is one function, and the
pipeline puts a register after each operation.

## Accumulating the forces

A pair `(i, j)` can reach the accumulators while another pair with the same
`i` or `j` is still in flight. Each engine keeps two per-atom arrays:

- `fi` holds the force of the pairs in which the atom is `i`;
- `fj` holds the force of the pairs in which it is `j`.

Both are updated in a single clock by read-modify-write, so there is no hazard.

An atom's engine result is `fi + fj`. Loading an atom clears both arrays.
The input force is kept only on the primary chip. It is added once, at the
merge:

```
out[k] = f_in[k] + (fi_A + fj_A)[k] + (fi_B + fj_B)[k]
```

## Streams

All host streams carry two 64-bit words per beat. The input streams use
`valid`/`ready`. The output stream has `valid` only.

| Stream | Beat | word0 [63:32] | word0 [31:0] | word1 [63:32] | word1 [31:0] |
|---|---|---|---|---|---|
| atom in | 0 | p_y | p_x | charge | p_z |
| atom in | 1 | f_x | vdw type | f_z | f_y |
| result out | – | f_x | 0 | f_z | f_y |

The table stream (`tbl_data`, one 64-bit word per beat) is sent on the first
call only, that is, when `first_time` is set. It carries:

1. `n` interpolation entries, each six words. Word `w` holds floats `2w`
   (low half) and `2w+1` (high half) of the 12 floats of the entry.
2. `m*m` LJ words, each `{B, A}`.

Of the 12 floats, the pipeline uses the following:

| Floats | Term | Coefficients |
|---|---|---|
| 1–3 | van der Waals A | b, c, d |
| 5–7 | van der Waals B | b, c, d |
| 9–11 | electrostatics | b, c, d |

Both chips write the tables from the same stream.

A call:

1. Pulse `start` with `prm` (`run_params_t`) and `first_time` valid.
2. Send the tables if `first_time` is set.
3. Send `size_in` atoms, where `size_in` is `do_self ? i_upper : i_upper + j_upper`.
4. Wait for `size_in` result beats. `done` pulses with the last one.

`ivbias` is the force scale applied before the conversion to integer. The
host passes the Coulomb constant folded into `dielectric_1`.

## Bridge protocol

Each direction carries at most one 218-bit word per clock: `{kind[1:0],
addr[15:0], data[199:0]}`. The link must keep the order of the words and lose
none. It may have any delay.

Primary to secondary:

| Kind | Carries |
|---|---|
| PARAMS | `run_params_t` |
| ATOM | one atom (position, charge, type) at `addr` |
| START | start engine B |
| DRAIN | request engine B's results |

Secondary to primary: one RESULT word per atom, in atom order, carrying the
96-bit force in `data`.

The primary chip sends DRAIN only after engine A has finished. The secondary
chip answers once engine B has also finished. The primary chip then forms one
output beat per arriving RESULT word. The output stream therefore needs no
back-pressure.

## Sizes and parameters

| Parameter | Default | Meaning |
|---|---|---|
| `LANES_A` / `LANES_B` | 6 / 8 | distance lanes in engines A and B |
| `MAX_ATOMS` | 1400 | atoms per call (two patches of 700) |
| `TABLE_DEPTH` | 1024 | interpolation entries (`n` ≤ this) |
| `LJ_TYPES` | 32 | van der Waals types (`m` ≤ this) |
| `J_DEPTH` | 64 | j queue per engine |
| lane queue depth | 16 | per distance lane |

At 700 + 700 atoms, engine A (6 lanes) needs about 700/2 × (700/6 + 1), or
roughly 41,000 clocks of walking. Engine B needs about 31,000.

## Where this design departs from the original description

- **Cutoff test.** The cutoff test is `r2 <= cutoff2`. Block diagrams of the
  scheme draw it as a strict `<`.
- **Bin mask.** The bin mask is `0xfffe0000`, which matches the `>> 17` of the
  index. A software version of the kernel masks with `0xffff0000`.
- **Integer conversion.** Forces are converted to integer by truncation
  (`int32(0.5 + x)`). The software kernel uses `floor(0.5 + x)`. The two
  differ for negative values.
- **Lane order.** Lanes take interleaved `j` (`j ≡ l mod LANES`). One drawing
  shows each lane with a contiguous block instead.
- **Input force.** The input force is added once, in the merge. The accumulators
  start at zero, instead of each copy starting from the input force.
- **Pipeline depth.** The force pipeline is 19 stages deep. The original
  implementation was much deeper, because its floating-point cores were
  deeper. The throughput is the same, one pair per clock.
- **Run-time parameters.** The force scale `ivbias`, the table depth and the
  number of LJ types are run-time or elaboration parameters. The original
  gives them no values.
- **Stream and bridge formats.** The stream handshakes and the bridge word
  format are this design's own.

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare
against `tb/md_ref_pkg.sv`, a reference that computes in double precision and
rounds to single after every operation.

| Testbench | What it checks |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue model; full, almost-full and empty flags |
| `tb_distance_lane` | cutoff decisions, including pairs exactly on the cutoff, and the 4-clock latency |
| `tb_distance_engine` | every in-cutoff pair appears exactly once; walk rate (`LANES` per clock plus one clock per `i`); stalls under a slow consumer |
| `tb_coef_tables` | word-to-coefficient mapping and the one-clock read |
| `tb_force_engine` | 400 random pairs back to back; bit-exact forces, the clamp flag, and the 19-clock latency |
| `tb_compute_engine` | engine A alone on a self patch and on a patch pair; per-atom sums |
| `tb_namd_map_top` | two calls (self with table load, then pair without); random stream gaps; bridge model; counts table load and skip, both modes, pairs and stalls in both engines, clamps, and traffic in both bridge directions |
| `tb_namd_map_full` | the top at its default parameters: a 700-atom self patch, then a 700 + 700 patch pair |

Each test prints `TB_RESULT checks=N failures=M`. Each test has a watchdog.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fp32_pkg.sv rtl/md_pkg.sv tb/md_ref_pkg.sv tb/tb_namd_map_top.sv \
  --top-module tb_namd_map_top
./obj_dir/Vtb_namd_map_top
```

For a block testbench, put its name in place of `tb_namd_map_top`.
`tb_namd_map_full` takes about half a minute of simulation.

## Not included

- The chip-to-chip bridge.
- The on-board memory banks.
- The DMA engines.
- The host-side software that packs atoms and tables and calls the
  accelerator once per compute.

The top exposes the interfaces these parts would connect to.
