# VNSA-PGDBF: a probabilistic bit-flipping LDPC decoder without a random number generator

Probabilistic Gradient Descent Bit Flipping (PGDBF) is a hard-decision decoder
for LDPC codes on the binary symmetric channel. Every iteration it computes an
*energy* for each variable node (VN). It then flips a **random subset** of the
VNs whose energy equals the maximum. Each VN in that set is flipped with
probability p0. The randomness makes it decode much better than the
deterministic GDBF, which flips all of them. The cost is a random bit per VN
per iteration.

This RTL implements the *Variable-Node Shift Architecture* (VNSA) for
quasi-cyclic (QC) LDPC codes. VNSA gets the randomness from the structure of
the code instead of from a random generator:

* Each VN position gets one of two hard-wired VN units (VNUs). A **flipping**
  unit (type-1) acts as if its random bit were 1. A **non-flipping** unit
  (type-2 or type-3) acts as if it were 0. About p0 of the positions are
  flipping.
* After every iteration, each VN value and its received channel bit are
  written to the registers one position further along their base column. The
  same VN therefore meets a different VNU type in every iteration. That
  sequence acts as its random bit.
* In a QC code, rotating a whole base column of Z VNs rotates the check
  results the same way. So the check-node wiring of an ordinary parallel
  decoder stays exactly as it is. The shift costs only wiring.

Two decoders are built, and `vnsa_pgdbf_top` holds both side by side:

| decoder | non-flipping VNU | maximum taken over |
|---|---|---|
| VNSA-PGDBF (`IMPRECISE = 0`) | type-2: computes its energy, never flips | all N energies |
| VNSA-IM-PGDBF (`IMPRECISE = 1`) | type-3: only the two registers, no energy | the p0·N type-1 energies |

The imprecise decoder is smaller and has a shorter critical path. Its maximum
can be lower than the true one, namely when only non-flipping VNs hold the
true maximum. That is a deliberate approximation, not a bug. Published results
for this architecture report that it decodes better than the precise one for
p0 ≥ 0.6.

## The code and the default configuration

| parameter | default | meaning |
|---|---|---|
| `Z` | 54 | lifting size (circulant size) |
| `NR`, `NC` | 12, 24 | base matrix rows and columns |
| `DV` | 3 | VN degree; the CN degree is `NC*DV/NR` = 6 |
| `P0_PCT` | 70 | p0 in percent; round(p0·Z) = 38 type-1 VNUs per base column |
| `SHIFT_L` | 1 | positions a VN moves per iteration |
| `ITMAX` | 100 | maximum number of flipping iterations |

This gives a regular (3,6) rate-1/2 code with N = 1296 and M = 648. It has the
size of the dv3R050N1296 code used to evaluate this architecture. **The shift
values of that code are not published.** `pgdbf_pkg` therefore computes a
base matrix of the same shape (0-based indices):

* base column i is connected to base row a when `a mod 4 == i mod 4`, which
  makes it (3,6)-regular;
* the circulant shift is `h(a,i) = a·i·(a+7) mod Z`, which has no 4-cycles at
  Z = 54.

To decode a real code, replace `hb_shift` and `col_row` in `pgdbf_pkg`. The
error-rate figures published for the dv3R050N1296 code do not carry over to
this stand-in matrix.

Which positions are flipping is not published either. Position p of base
column i is type-1 when `(p·S + 29·i) mod Z < round(p0·Z)`. S is the first
integer ≥ 17 that is coprime to Z, so every column has exactly round(p0·Z)
type-1 units in a column-dependent scrambled order. Any pattern with the right
count keeps the principle intact.

## How one iteration works (one clock cycle)

All VNs and all checks are processed in parallel, one iteration per clock.
With VN (i, p) meaning physical position p of base column i:

1. **Checks** (`check_node_array`). Check (a, b) is the XOR (`cnu`) of the VN
   at position (b + h(a,i)) mod Z of every connected base column i.
   `all_sat` is high when every check is 0.
2. **Energy** (`vnu_type1`, `vnu_type2`). E = (v xor y) + the DV checks of
   the VN, where VN (i, p) reads check (p − h(a,i)) mod Z of each of its
   base rows a. With DV = 3, E ranges 0..4 (3 bits).
3. **Maximum** (`max_finder`). A balanced tree of two-input max cells over
   N inputs, or over the round(p0·Z)·NC = 912 type-1 energies in the
   imprecise decoder.
4. **Flip and shift**. A type-1 unit outputs v xor (E == Emax). The other
   types output v. The output of position p is written into the B register
   of position (p + SHIFT_L) mod Z. The C register (channel bit) moves in
   the same way.

`decode_ctrl` stops the frame when `all_sat` is seen, with success, or after
`ITMAX` flipping iterations, without success.

### Why the shift changes nothing but the random bits

Let r = k·SHIFT_L mod Z. After k iterations, VN j of column i sits at position
(j + r) mod Z. The check network is a set of per-column rotations, so the
checks computed on the rotated columns are the true checks rotated by r, and
every VN still receives its own checks. The energies are therefore the true
energies, permuted within each column, and the maximum is unchanged. The
random bit of VN j in iteration k is `is_type1(i, (j + r) mod Z)`. The test
reference model (`tb/pgdbf_ref_pkg.sv`) is written in code order from exactly
this statement. The RTL matches it bit for bit.

Because the VNs have moved, the registers at the end hold the word rotated by
r per column. A barrel rotator per column (`qc_unrotate`) puts `x_hat` back in
code order. The published architecture does not include this rotator; it is
added so that the output is directly usable.

## Interface and timing (`vnsa_decoder`; the top has `pg_*` and `im_*` copies)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (controller only) |
| `start` | in | 1 | one-cycle pulse that loads `y` and starts a frame (ignored while busy) |
| `y` | in | N | received hard decisions; bit i·Z + j is VN j of base column i |
| `busy` | out | 1 | frame in progress |
| `done` | out | 1 | one-cycle pulse when the frame has ended |
| `success` | out | 1 | all checks were satisfied (held until the next start) |
| `iters` | out | ⌈log2(ITMAX+1)⌉ | flipping iterations performed (held) |
| `x_hat` | out | N | decoded word in code order, valid from `done` until the next start |

Timing: at the `start` edge, every B and C register takes `y`. Each following
cycle evaluates the checks and either ends the frame or performs one
iteration. `done` is registered, so a frame that needs k iterations takes
**k + 2 cycles** from the `start` cycle to the `done` cycle. A new `start` may
be given in the cycle after `done`.

## Files

| file | content |
|---|---|
| `rtl/pgdbf_pkg.sv` | base matrix (`hb_shift`, `col_row`), VNU type pattern (`is_type1`, `type1_rank`), energy width |
| `rtl/vnu_type1.sv`, `vnu_type2.sv`, `vnu_type3.sv` | the three VNU types, each holding its B and C registers |
| `rtl/cnu.sv` | DC-input XOR |
| `rtl/check_node_array.sv` | VN-to-CN wiring, all CNUs, CN-to-VN wiring, `all_sat` |
| `rtl/max_finder.sv` | maximum tree |
| `rtl/decode_ctrl.sv` | load / iterate / stop control, iteration and rotation counters |
| `rtl/qc_unrotate.sv` | per-column barrel rotator for the output |
| `rtl/vnsa_decoder.sv` | one decoder; `IMPRECISE` selects the variant |
| `rtl/vnsa_pgdbf_top.sv` | both decoders side by side |
| `tb/pgdbf_ref_pkg.sv` | code-order PGDBF reference model used by the decoder tests |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The unit tests (`tb_cnu`, `tb_max_finder`, `tb_vnu_type*`,
  `tb_check_node_array`, `tb_decode_ctrl`) compare against values computed
  directly in the testbench. `tb_decode_ctrl` also checks the k + 2 cycle
  latency, the single load pulse, and that the rotation offset wraps modulo Z.
* `tb_vnsa_decoder` runs both variants on a reduced code (Z = 16,
  ITMAX = 6, SHIFT_L = 3, p0 = 0.6).
* `tb_vnsa_pgdbf_top` runs both decoders at full size with all defaults:
  19 frames from 0 to 200 errors (13 errors is about a crossover probability
  of 0.01).

Both decoder tests compare the decoded word, the iteration count, the success
flag and the latency with the reference model for every frame. They also
require each of these mechanisms to occur at least once:

* stop on satisfied checks;
* stop at ITMAX;
* a frame that is already a codeword;
* a VN shift that wraps around its column;
* type-1 flips;
* maximum-energy VNs held by non-flipping units;
* iterations in which the imprecise maximum is below the true one.

On the all-zero codeword with random errors, all of these are seen at full
size.

Two further full-size tests run the evaluated operating points. Each frame is
again compared bit for bit with the model.

* `tb_alpha_sweep` runs both decoders at crossover probabilities 0.004, 0.01,
  0.02, 0.04 and 0.07, with 6 to 40 frames per point. At 0.01 both decoders
  average about 4 iterations, which is about 216 decoded bits per clock
  including the 2 frame-overhead cycles.
* `tb_p0_sweep` builds both variants at p0 = 0.4, 0.7 and 0.95 and runs them
  at a crossover probability of 0.014. At p0 = 0.4 the imprecise decoder
  already misses frames and needs many more iterations. This matches the
  expected weakness of the imprecise maximum at small p0.

These frame counts show trends only. They are far too small to measure error
rates.

What is **not** verified: error-rate curves (they need millions of frames),
nonzero transmitted codewords (the decoder is symmetric under adding a
codeword, but no encoder is included), and timing or area.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing --assert --top-module tb_vnsa_pgdbf_top \
  -y rtl -y tb +libext+.sv rtl/pgdbf_pkg.sv tb/pgdbf_ref_pkg.sv \
  tb/tb_vnsa_pgdbf_top.sv
./obj_dir/Vtb_vnsa_pgdbf_top
```

The full-size build takes about a minute; the run takes under a second.

## Where this RTL departs from, or adds to, the published architecture

* **Base matrix and VNU type pattern** are stand-ins with the published
  dimensions (see above). The published allocation only shows that it differs
  from one base column to the next.
* **ITMAX = 100** is chosen; no value is published.
* **Frame loading, the start/done handshake and the output rotator** are
  additions. They add 2 cycles per frame and one barrel rotator per base
  column. The published throughput formula N·f / It_ave counts neither.
* **The maximum finder's structure** (a comparator tree) is not published;
  only its input count (N or p0·N) is.
* The VNU registers have no reset. A frame always begins with a load.
* The energy is 3 bits wide, from its range 0..DV+1.
