# Quantum-circuit emulation kernels in double-precision complex arithmetic

A quantum circuit on `n` qubits acts on a state vector of `N = 2^n` complex
amplitudes. If the circuit is cut into *layers*, sets of gates that act on
different qubits at the same time, each layer is one `N x N` complex matrix, and
running the circuit means multiplying the state vector by the layer matrices
one after another. This RTL is the FPGA side of such an emulator. A host
program splits the circuit into layers and builds one matrix per layer. The
kernels here then do the arithmetic in IEEE-754 double precision, with complex
numbers throughout.

The kernel hardware is the same for every circuit of a given qubit count.
Only the matrices the host sends change. Three kernel architectures are
provided. They trade memory for speed:

| | what one run does | matrices stored | compute per run |
|---|---|---|---|
| **Type-1** `mv_kernel` | applies one layer matrix | 1 | `N^2` cycles |
| **Type-2** `mvk_kernel` | receives up to K layer matrices on K parallel streams, applies them in turn | K | `K * N^2` cycles |
| **Type-3** `mm_tree_kernel` + `mv_kernel` | multiplies K layer matrices into one matrix `M_Total`, then applies `M_Total` once | 2K-1 | `log2(K) * N^3` + `N^2` cycles |

`qemu_top` holds all three side by side. Each has its own host-facing ports.
The host and its link to the FPGA (for example a PCIe shell) are not part of
this design.

## Numbers and the arithmetic core

Every matrix element and amplitude is a `cplx_t` (`fp64_pkg`). It is a packed
128-bit struct: the real part is in bits 127:64 and the imaginary part in
bits 63:0, both IEEE-754 binary64.

All arithmetic goes through `cplx_mac`, which computes `y = acc + a*b` in a
fixed order:

    y.re = acc.re + (a.re*b.re - a.im*b.im)
    y.im = acc.im + (a.re*b.im + a.im*b.re)

It uses four `fp64_mul` and four `fp64_add` instances. All of them are
combinational, and the functions behind them are in `fp64_pkg`. Results are
rounded to nearest even. For normal operands and normal results they match
IEEE-754 double arithmetic bit for bit; the testbenches check this against
the simulator's own `real` arithmetic. The simplifications:

- subnormal inputs are treated as zero, and subnormal results are flushed to a
  signed zero;
- any NaN input gives the quiet NaN `0x7FF8...`;
- overflow gives a signed infinity.

Quantum amplitudes and gate coefficients stay far from these ranges.

The MAC is one combinational stage: four multipliers, then two adders in
series, in one clock cycle. That is convenient for simulation, but on an
FPGA it would need pipelining to reach a useful clock rate. See
*Limitations*.

## Engines

- `mv_engine`: `y = M x`. Row `i` is accumulated over `N` cycles
  (`acc = 0 + M[i][0]x[0]`, then `acc += M[i][j]x[j]`). `y[i]` is written on
  the cycle that adds the last term. The whole product takes exactly `N*N`
  cycles.
- `mm_engine`: `C = A B`, one element `C[i][j]` per `N` cycles. The whole
  product takes exactly `N^3` cycles.

Neither engine holds any memory. Each drives read addresses, expects the
data back in the same cycle, and issues a write for each finished result.
The kernels own the buffers. In Type-1 and Type-2 each buffer is its own
`cplx_ram` instance, with one write port and one read port. The Type-3 tree
keeps all its node buffers in one array, `nbuf[node][element]`. Each engine
reads two nodes and writes one, selected by the current level.

## Type-1: one layer per run (`mv_kernel`)

A run has three phases:

1. **Load.** The layer matrix arrives on `m_*`: `N*N` elements, row-major. If
   `load_state` was high with `start`, the initial state arrives on `s_*`
   (`N` elements, index 0 first) at the same time.
2. **Compute.** The kernel forms `S_out = M * S_in`.
3. **Output.** `S_out` leaves on `o_*`.

There are two state buffers, and they swap roles after every product. So the
result of one run is already the input of the next. A circuit of depth `D`
takes `D` runs: the first with `load_state = 1`, the others with
`load_state = 0`. The host streams only the next matrix each time, and reads
every intermediate state if it wants to.

When no stream stalls, `done` rises `2*N*N + N + 3` cycles after the clock
edge that samples `start`.

## Type-2: K layers per transfer (`mvk_kernel`)

The host sends up to `K` matrices on `K` streams at once: `m_valid[s]`,
`m_ready[s]`, `m_data[s]`. Each stream fills its own buffer. `n_layers`
(1..K, given with `start`) says how many slots this run uses; the rest stay
idle. The kernel applies slot 0 first, then slot 1, and so on, feeding each
result back inside, and streams out only the final state. A last, short
batch either uses a smaller `n_layers` or is padded with identity matrices.

With `load_state = 0` a run continues from the previous run's result, so a
deep circuit is processed as `ceil(D/K)` runs. With no stalls, `done` rises
`N*N + n_layers*(N*N + 2) + N + 1` cycles after `start`.

## Type-3: folding K layers into one matrix (`mm_tree_kernel`)

This is the least obvious part of the design. Two adjacent layers can be
multiplied into one equivalent matrix, and so can K layers. Type-3 does this
on the FPGA, so that the state vector sees a single matrix-vector product
per batch.

**Tree.** The `2K-1` matrix buffers are numbered like a heap:

- node 1 is the root, `M_Total`;
- nodes `2 .. K-1` are intermediate results;
- nodes `K .. 2K-1` hold input slots `0 .. K-1`.

Node `v` is computed as `node(2v) * node(2v+1)`. Level 0 forms nodes
`K/2 .. K-1` from the inputs, level 1 forms the next layer of nodes up, and
so on. That makes `log2(K)` levels. Each intermediate result has a buffer of
its own and is read again at the next level.

There are `K/2` `mm_engine` instances. Every product of a level runs at the
same time, engine `e` forming node `K/2^(l+1) + e` at level `l`. The levels
themselves run one after another. A batch therefore takes `log2(K) * (N^3 + 2)`
compute cycles.

**Order.** The result is the ordered product

    M_Total = M_slot0 * M_slot1 * ... * M_slot(K-1)

Applied to a state vector, the highest slot acts first. So the host puts
the *earliest* layer of a batch in slot `K-1` and the latest in slot 0. For
example, with K = 8 the slots hold L8 .. L1.

**Chaining.** If `chain` is high with `start`, slot `K-1` is not loaded.
Its leaf reads the root buffer instead, which still holds the previous
`M_Total`:

    M_Total(new) = M_slot0 * ... * M_slot(K-2) * M_Total(old)

A circuit of any depth can therefore be folded batch by batch, with `K-1`
new layers per batch. Pad a short batch with identity matrices. The root is
written only at the last level, after level 0 has finished reading it.

**Output.** `M_Total` leaves on `o_*` (`N*N` elements, row-major). The host
then passes it, together with the initial state, to a matrix-vector kernel:
the `t3mv_*` instance of `mv_kernel` in `qemu_top`. With no stalls, the tree
kernel's `done` rises `2*N*N + log2(K)*(N^3 + 2) + 1` cycles after `start`.

## Stream and command conventions

- Every stream uses valid/ready: one element moves on a rising edge where
  both are high. Outputs hold `o_valid` and `o_data` stable until `o_ready`;
  an assertion in each kernel checks this.
- Matrices are sent row-major. Vectors are sent index 0 first.
- In the index of an amplitude, qubit 0 is the most significant bit. This is
  a convention for the host's matrices only; the kernels do not depend on
  it.
- `start` is sampled only while `busy` is low. `done` is a one-cycle pulse
  after the last output word.
- `rst_n` is asynchronous and active low. It resets control state only. The
  buffers start undefined, so the first Type-1/Type-2 run must load a state,
  and the first Type-3 run must not chain.

## Sizes at the defaults

The defaults are `NQ = 7` qubits (`N = 128`) and `K = 8` for both Type-2
(`K2`) and Type-3 (`K3`). One matrix is `N*N*16 B = 256 KiB`. One vector is
2 KiB.

| kernel | buffers | cycles, no stalls |
|---|---|---|
| Type-1 | 1 matrix + 2 vectors (≈ 260 KiB) | 32 899 per layer |
| Type-2 | 8 matrices + 2 vectors (≈ 2 MiB) | 147 601 per batch of 8 layers |
| Type-3 tree | 15 matrices (3.75 MiB) | 6 324 231 per batch of 8 layers, plus 32 899 for the final matrix-vector run |

For other qubit counts, set `NQ`. The tests use 2, 3, 5 and 7 qubits.
`K`/`K2`/`K3` must be powers of two, at least 2.

The Type-1 figures at 3, 5 and 7 qubits are 140, 2084 and 32 900 clock edges
per layer. These are the sizes of the published Alveo U200 measurements,
whose kernel times are 0.012, 0.131 and 1.923 ms for circuits of unstated
depth. At an assumed 300 MHz, a whole Type-1 run (load, compute and output) takes
0.46, 6.9 and 110 µs per layer.

## Files

    rtl/fp64_pkg.sv        cplx_t type, fp_add / fp_sub / fp_mul functions
    rtl/fp64_add.sv        combinational double adder/subtractor
    rtl/fp64_mul.sv        combinational double multiplier
    rtl/cplx_mac.sv        complex multiply-accumulate (4 mul + 4 add)
    rtl/cplx_ram.sv        one buffer: 1 write port, 1 asynchronous read port
    rtl/mv_engine.sv       sequential matrix-vector product, N^2 cycles
    rtl/mm_engine.sv       sequential matrix-matrix product, N^3 cycles
    rtl/mv_kernel.sv       Type-1 kernel (also Type-3's final stage)
    rtl/mvk_kernel.sv      Type-2 kernel
    rtl/mm_tree_kernel.sv  Type-3 matrix-product tree
    rtl/qemu_top.sv        all kernels side by side

    tb/tb_fp64_add.sv, tb_fp64_mul.sv, tb_cplx_mac.sv   bit-exact arithmetic checks
    tb/tb_mv_kernel.sv, tb_mvk_kernel.sv, tb_mm_tree_kernel.sv
                           kernels at 2-3 qubits: bit-exact results, feedback,
                           partial batches, chaining, stalls, cycle counts
    tb/tb_qemu_top.sv      whole design at the default size, ten-layer circuit
                           through all three architectures
    tb/tb_qubit_sizes.sv   Type-1 at 3, 5 and 7 qubits (uses t1_circuit_runner.sv)

Every testbench checks itself. It ends by printing
`TB_RESULT checks=<n> failures=<n>`, and it has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/fp64_pkg.sv tb/tb_qemu_top.sv --top-module tb_qemu_top
    ./obj_dir/Vtb_qemu_top

Replace `tb_qemu_top` with any other testbench name. `tb_qemu_top` runs the
full-size design: about 13 million clock cycles, roughly a minute of
simulation, mostly the Type-3 tree at N = 128. The kernel testbenches finish
in well under a second.

Simulation reference values:

- The unit tests compare bit for bit with `real` arithmetic done in the same
  order as the hardware.
- The circuit tests compare with a gate-by-gate reference: pairwise updates
  of the amplitudes, not matrices, within 1e-9.
- The top-level test counts each mechanism and fails if one never happened:
  loaded state, feedback, full and partial Type-2 batches, tree batches,
  chaining, identity padding, output back-pressure and input gaps.

## Limitations and departures

- **Buffers have asynchronous reads.** Every buffer returns data in the
  same cycle as addressed. That keeps the engines simple, but an FPGA flow
  would map them to distributed RAM, not block RAM. For block RAM, register
  the read address and add one pipeline stage in front of the MAC in both
  engines.
- **The MAC is not pipelined.** It handles one complex MAC per cycle, with a
  full double multiply and two double adds in series. A production version
  would pipeline it and interleave rows to hide the latency of the
  accumulation loop.
- **Type-3 buffering.** The tree keeps `2K-1` matrices (15 at `K = 8`), enough
  for one batch at a time. The published space estimate for Type-3 at maximum
  parallelism is `K(K/2+1)` matrices (40 at `K = 8`), which suggests more
  overlap between loading and computing than is built here. The Type-1 and
  Type-2 buffers do match the published estimates: two vectors plus one
  matrix, or plus `K` matrices.
- **Type-2's K is a free choice.** 8 is used.
- **Floating-point simplifications.** Subnormals are flushed to zero, and
  NaNs are not propagated with their payload.
- **The host is outside.** So is its matrix generation (layering, Kronecker
  products of gate matrices, CNOT permutations, identity padding). The
  testbenches do this work in SystemVerilog to feed the kernels.
- **Synthesis.** The combinational double adders are large: each has a
  56-bit alignment shifter, a leading-one detector and a normalising shifter.
  With 28 of them in the top level, a generic Yosys run is slow and
  memory-hungry. Synthesize one kernel at a time, or use vendor
  floating-point cores in place of `fp64_add`/`fp64_mul`; their ports are
  simple to match.
