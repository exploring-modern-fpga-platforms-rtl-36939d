# FPGA accelerator for the phylogenetic likelihood function

Maximum-likelihood phylogeny programs such as RAxML spend most of their run
time (typically 70 to 95 %) in one kernel: the phylogenetic likelihood
function (PLF). During Felsenstein's pruning, the program computes the
ancestral probability vector of an inner tree node from the vectors of its two
children. The work per alignment site is small and regular, and the vectors
are long (10^4 to 10^7 sites). That makes the kernel a good fit for a deep,
wide floating-point pipeline fed by streams.

This repository holds synthesizable SystemVerilog for such an accelerator, in
the two platform variants of the architecture published as *Exploring Modern
FPGA Platforms for Faster Phylogeny Reconstruction with RAxML*:

* **F1 accelerator** (`plf_f1_accel`). This is a decoupled access/execute
  design for a PCIe FPGA card with four DDR4 channels, like the Amazon
  EC2 F1. Seven access units feed one 512-bit execution unit, which finishes
  one site every two clock cycles.
* **ZCU102 subsystem** (`plf_zynq_system`). This is the programmable-logic
  part of a Zynq UltraScale+ MPSoC system. It has two independent PLF cores
  with 128-bit streams, and each core finishes one site every eight cycles.
  The processors' DMA engines feed the cores directly from shared DDR memory.

Both variants use the same execution unit (`plf_core`) at different widths.
`plf_top` places the two side by side.

## What one site costs

The design handles DNA data (4 states) under the Γ model with 4 discrete
rates. One site of a probability vector is therefore 16 binary64 values,
stored rate-major: `v[4*k + s]` for rate `k` and state `s`. For every site
and every rate `k` the unit computes

```
al[u] = Σ_s PL[k][u][s] · vl[k][s]        left child, branch matrix P(t_l)
ar[u] = Σ_s PR[k][u][s] · vr[k][s]        right child, branch matrix P(t_r)
x[u]  = al[u] · ar[u]
p[k][l] = Σ_j x[j] · EV[j][l]             inverted eigenvector
```

This is the pruning recurrence written in the eigen-basis that RAxML uses:
the transition matrices `P(t) = e^{Qt}` come from an eigen-decomposition.
After all 16 values of a site exist, the site is **scaled**. If every
magnitude is below 2^-256, all 16 values are multiplied by 2^256 and the
site's integer weight is added to a scaling counter. Without scaling, long
products of probabilities would underflow on large trees. Per site this is
208 multiplications and 144 additions, in double precision.

Register files hold the matrices. `PL` and `PR` each hold 64 doubles, one 4×4
matrix per rate, flattened as `k*16 + u*4 + s`. `EV` holds 16 doubles,
flattened as `j*4 + l`. These files are loaded once per call, before any
site streams through.

## The execution unit (`plf_core`)

`plf_core` is where the design's difficulty lies. Its parameter `LANES` sets
the number of doubles per stream beat. `LANES = 8` is the 512-bit F1 unit and
`LANES = 2` the 128-bit ZCU102 core; 1, 4 and 16 also work. A site needs
`16/LANES` beats on each child stream, so the unit runs at one site per
`16/LANES` cycles. The published design has the same rates: two cycles on F1,
eight on the 128-bit ZCU102 core, sixteen on its first 64-bit version.

Data moves through four stages.

1. **Join and gather.** A beat is taken only when the left stream, the right
   stream and the weight stream all have data. The weight is needed only on
   the first beat of a site. Beats collect into a *step* of
   `RCS = max(1, LANES/4)` whole rate categories. At `LANES = 2` a step is
   two beats; at `LANES = 8` each beat is a step of two rate categories.
2. **Rate-category units.** `RCS` copies of `plf_rcu` each evaluate one rate
   category with no operator sharing. Each has 4 + 4 dot products
   (`fp64_dot4`), 4 multipliers and 4 eigenvector dot products. The step
   counter picks the right `PL`/`PR` matrix from the register file. A step
   takes 14 cycles.
3. **Site assembly and scaling.** Finished steps fill a 16-double site
   buffer. When the last step of a site lands, the site goes through
   `plf_site_scale` (a combinational threshold test and exponent add) into
   the output buffer, and the scaling counter is updated.
4. **Output.** The output buffer sends the site as `16/LANES` beats.

Flow control uses one pipeline enable for the whole arithmetic pipeline,
including the floating-point units. The pipeline stops only when a finished
step cannot enter the site buffer, because the buffer still holds a complete
site that the output buffer has not taken. The output buffer reloads in the
same cycle its last beat leaves, so a ready consumer sees an unbroken stream.
The latency from the last input beat of a site to its first output beat is
16 cycles. `busy` is high while any site is inside the unit. An assertion
checks that a parent beat holds still while it waits.

### Floating-point units

`fp64_mul` and `fp64_add` are IEEE-754 binary64 units with two pipeline
stages each. They round to nearest-even. Subnormal operands count as zero and
subnormal results flush to zero. Overflow gives infinity, and NaN or invalid
operations give the default quiet NaN. Scaling keeps real likelihood data far
from the subnormal range, so flush-to-zero does not affect the results. For
normal operands with normal results, both units are bit-exact with a software
`double`. The sums run as balanced trees, `(t0+t1)+(t2+t3)`. A software loop
that adds left to right rounds differently, so results can differ from
RAxML's in the last bit.

## F1 accelerator: decoupled access and execute (`plf_f1_accel`)

```
 DDR ch0 (512b) ─► au_stream_rd  (left vector,  FIFO) ─┐
 DDR ch1 (512b) ─► au_stream_rd  (right vector, FIFO) ─┼─► plf_core (LANES=8) ─► au_stream_wr (FIFO) ─► DDR ch2 (512b)
                   au_stream_rd  (weights,      FIFO) ─┘        ▲  ▲  ▲
 DDR ch3 (64b) ◄─► mem_arbiter ◄─ au_regfile_rd (left matrices) ─┘  │  │
                               ◄─ au_regfile_rd (right matrices) ───┘  │
                               ◄─ au_regfile_rd (eigenvectors) ────────┘
```

One call is started by a `start` pulse, with `n_sites` and seven byte
addresses held on the argument ports. `plf_f1_ctrl` then runs two phases:

1. **Prefetch.** The three register-file access units read 64 + 64 + 16
   words over the shared 64-bit channel. They have no FIFO; each returning
   word goes straight into its register.
2. **Stream.** The left, right and weight readers, the execution unit and the
   parent writer work as a dataflow pipeline. The call ends (`done_pulse`)
   when the writer has written the last parent word. At that point
   `scale_count` holds the summed weights of the scaled sites.

**Memory channel protocol.** This is a simplified in-order channel, not AXI.
A read request is `rq_valid`/`rq_ready` with a byte address, one request per
word. Read data comes back in request order as `rs_valid`/`rs_data`, with no
ready signal. A stream reader issues a request only while its FIFO has room
for every word in flight (`outstanding + occupancy < FIFO_DEPTH`), so
returning data always has a place to go. An assertion checks this. A write
carries address and data together under `wr_valid`/`wr_ready`.
`mem_arbiter` grants the shared channel round-robin, one request per cycle.
It keeps the order of grants in a small FIFO so that in-order responses reach
the right unit.

**Data layout in card memory.** Each vector is `n_sites × 128` bytes, two
512-bit words per site, low lanes first. Matrices and eigenvectors are
consecutive doubles. The weights are one 64-bit word per site, with the
weight in the low 32 bits.

**Speed.** With memory that is always ready, 100,000 sites take 200,186
cycles. That is two cycles per site, plus about 190 cycles for the prefetch
and pipeline fill. At the 222 MHz reported for the card design, one site
takes 9 ns. On the real card, PCIe transfers of the vectors take longer than
the computation. The published system hides part of that with double
buffering in host software: it calls the accelerator once per block of
4k to 128k sites while the next block is transferred. That needs nothing
from the hardware beyond being called once per block.

## ZCU102 subsystem (`plf_zynq_core`, `plf_zynq_system`)

Each core is a `plf_core` with `LANES = 2` and stream ports in AXI4-Stream
style (`tvalid`/`tready`/`tdata`, plus `tlast` on the output). The streams
connect to DMA engines, two for the child vectors and one for the parent. The
processors load the core through a register port:

| address  | content                                                   |
|----------|-----------------------------------------------------------|
| 0–63     | left matrices `PL[k][u][s]` at `k*16+u*4+s`               |
| 64–127   | right matrices `PR`                                       |
| 128–143  | inverted eigenvector `EV[j][l]` at `j*4+l`                |
| 144      | number of sites in the next run (sets `p_tlast`)          |
| 145      | write: clear scaling counter; read: scaling counter       |

This variant has no weight stream. Each site counts as weight 1, so the
scaling counter holds the number of scaled sites. Two cores are built
because, in the published system, two cores at 250 MHz already use the whole
processor-to-fabric bandwidth (about 7 GB/s per core against about 11 GB/s
available). A third core would gain nothing.

## Files

| file | role |
|------|------|
| `rtl/plf_pkg.sv` | shared types (`f64_t`), sizes, scaling constants |
| `rtl/fp64_mul.sv`, `rtl/fp64_add.sv` | binary64 multiplier and adder, 2 stages each |
| `rtl/fp64_dot4.sv` | 4 multipliers + 2-level adder tree, latency 6 |
| `rtl/plf_rcu.sv` | one rate category of the recurrence + eigenvector product, latency 14 |
| `rtl/plf_site_scale.sv` | per-site underflow scaling |
| `rtl/plf_core.sv` | execution unit (join, gather, rate-category units, assembly, output) |
| `rtl/sync_fifo.sv` | FIFO used by the stream access units |
| `rtl/au_stream_rd.sv`, `rtl/au_regfile_rd.sv`, `rtl/au_stream_wr.sv` | access units |
| `rtl/mem_arbiter.sv` | round-robin sharing of the 64-bit channel |
| `rtl/plf_f1_ctrl.sv` | two-phase call sequencer |
| `rtl/plf_f1_accel.sv` | F1 accelerator |
| `rtl/plf_zynq_core.sv`, `rtl/plf_zynq_system.sv` | ZCU102 core and two-core subsystem |
| `rtl/plf_top.sv` | both systems side by side |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `plf_workload_tb` |
| `tb/tb_pkg.sv` | reference model in `real` arithmetic, random data |
| `tb/mem_model.sv` | behavioural DDR channel (random ready, fixed latency) |

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module plf_top_tb \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/plf_pkg.sv tb/tb_pkg.sv tb/plf_top_tb.sv
obj_dir/Vplf_top_tb
```

Change the testbench name to run another one. Lint any module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/plf_pkg.sv rtl/<module>.sv`.

How far the design is tested:

* The floating-point units are compared bit for bit with the simulator's
  `double` arithmetic on thousands of random operands. The tests cover heavy
  cancellation, wide exponent gaps, zeros, infinities, overflow and
  flush-to-zero.
* The `plf_core` testbench runs the 512-bit and 128-bit units on the same
  data. Pass 0 uses random gaps and backpressure. In pass 1 the test checks
  the full rate of one site per `16/LANES` cycles. About a quarter of the
  sites are small enough to be scaled.
* `plf_top_tb` runs everything at the default parameters: two F1 calls
  through four memory models, plus both ZCU102 cores, one without gaps and
  one with random gaps. Every parent value is compared with a reference. The
  test also checks that each mechanism occurs at least once: memory stalls,
  shared-channel contention, execution-unit backpressure, scaling, join
  waits and repeated calls.
* `plf_workload_tb` runs a 100,000-site F1 call, a 16,384-site block, and
  10,000 sites per ZCU102 core (about 10 s).

## Where this RTL departs from the published design

* **Latency and resources.** The published cores were written in high-level
  synthesis. They take 114 cycles (64-bit) or 92 cycles (128-bit) to produce
  the first result, and share operators to match their initiation interval.
  This RTL matches the throughput but not the latency: 16 cycles after the
  last beat of a site. It also gives every rate category its own operators,
  so the 128-bit core uses more multipliers than it needs. No FPGA
  implementation or timing closure has been done. The published clocks were
  250 MHz (ZCU102) and 222 MHz (F1).
* **Floating-point details.** Rounding, subnormal handling and adder-tree
  order are this design's choices (see above).
* **Scaling rule.** The published design only says that results are scaled
  when needed, using a per-site weight vector. The rule used here (threshold
  2^-256, factor 2^256, sum of weights) is RAxML's.
* **Interfaces.** The memory channels, the register port and the start/done
  handshake are simplified stand-ins for the AXI4, AXI-Lite and
  platform-shell interfaces of a real system. The DMA engines, the processor
  system, the PCIe host link, the Amazon shell and the DDR4 controllers are
  not part of this RTL. Their sides of the connections are ports.
* **Not supported.** Protein data (20 states) and rate counts other than 4.
  The published work evaluates neither.
