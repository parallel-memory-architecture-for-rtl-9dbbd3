# Parallel memory for arbitrary-stride access

A SIMD datapath wants N data elements per clock, and often they are not adjacent.
Vector and matrix code, FFTs and image scaling read N elements that lie a constant
*stride* apart: `r, r + stride, r + 2*stride, ...`. This memory serves such an
access in one cycle. It is built from N = 2^n ordinary single-port memory modules
that work in parallel. The hard part is the placement of the data. Element i must
be stored so that, for the stride in use, the N elements of any access fall into N
different modules. That must hold for any start point `r`. If two elements share a
module, the access has a *conflict* and cannot finish in one cycle.

No single fixed placement can make every stride conflict free. Given any placement,
pick two locations in the same module and use their distance as the stride. So the
placement here is chosen **at run time**, from the stride. There is one *skewing
scheme* per power of two in the stride.

## Placement: one XOR scheme per power of two

Write any stride as `stride = sigma * 2^s` with `sigma` odd. A scheme that makes
stride `2^s` conflict free also makes every `sigma * 2^s` conflict free. One
scheme per value of `s` is therefore enough. With `n = log2(N)`, location `i` goes to:

| | module `S(i)` | address in the module `a(i)` |
|---|---|---|
| odd strides (`s = 0`) | `i[n-1:0]` (low-order interleaving) | `i >> n` |
| `s >= 1` | `i[n+s-1:s] XOR i[n-1:0]` | `i >> n` |

The address never changes with the scheme. Only the module number is skewed, with
`n` XOR gates fed from a shifter. Example with N = 4 and s = 1 (strides 2, 6, 10, ...):

```
i     0 1 2 3 4 5 6 7 8 9 10 11 12 13 14 15
S(i)  0 1 3 2 2 3 1 0 0 1  3  2  2  3  1  0
a(i)  0 0 0 0 1 1 1 1 2 2  2  2  3  3  3  3
```

A stride-2 access at `r = 1` reads locations 1, 3, 5 and 7. These sit in modules
1, 2, 3 and 0, so all four can be read in one cycle.

Two rules follow for the user:

* **The scheme is part of the data.** Data written under one scheme must be read
  under a scheme with the same `s`. Changing `s` scrambles what the modules hold,
  so rewrite the data after a change. The scheme is chosen by its own input,
  `stride_s`, kept apart from the access stride `stride_a`.
* **Row accesses work under every scheme, on word boundaries.** With
  `stride_a = 1` and `r` a multiple of N, the elements are always conflict free.
  So a block stored for stride 12 can still be loaded or dumped as rows. Rows that
  start at other locations may conflict: under the example scheme, locations 11
  and 12 both sit in module 2.

An access is guaranteed conflict free when `stride_a = sigma' * 2^s` uses the same
`s` as `stride_s`, or when it is a word-aligned row. It must also fit the location
space: `n + s <= LOC_W`.

## Datapath

```
 r, stride_a ──► format_control ──► i_0..i_{N-1} ──► address_decode ──► a(i_k) ─┐
 stride_s ──► scheme_determination ──► s ──┐                                     ▼
                        i_k ──► module_assignment ──► S(i_k) ──► permutation_control ──► S'(k)
                                                        │                          │
                                            rControl ◄──┘          wControl ◄──────┤
                                                                                   ▼
                                                   address permutation: module j gets a(i_{S'(j)})
 wd_0..wd_{N-1} ──► write data permutation (ctrl S') ──► modules S_0..S_{N-1} ──► read data permutation (ctrl S) ──► rd_0..rd_{N-1}
```

* **format_control**: `i_k = r + k*stride_a`. It uses N-1 adders and multipliers
  by the constants 2 … N-1. Locations wrap modulo `2^LOC_W`.
* **scheme_determination**: gives `s`, the number of zero bits of `stride_s`
  below its lowest one. There is one equality comparator per low field,
  `str[j:0] == 0` for j = 0 … d-2, and an adder sums the one-bit results. The
  fields are nested, so the sum is the trailing-zero count. The top bit of
  `stride_s` is not needed, because a stride is never zero.
* **module_assignment**: N identical slices. Each shifts `i_k` right by `s`,
  keeps n bits, and XORs them with `i_k[n-1:0]`. A comparator on `s == 0` swaps
  in a zero operand, which gives the low-order interleaved scheme.
* **address_decode**: wiring only, `a(i_k) = i_k >> n`.

The element-to-module steering is the part that needs care. `S(i_k)` answers the
question "which module holds element k?". The two crossbars need that mapping
turned one way or the other:

* **Reading** gathers. Output `rd[k]` takes the read port of module `S(i_k)`, so
  the read data permutation is steered by `S` directly (rControl).
* **Writing and addressing** scatter. Module `j` needs the element that lives in
  it, the `k` with `S(i_k) = j`. **permutation_control** computes this inverse
  permutation `S'`. For each module number `j`, it compares all N values of
  `S(i_b)` with the constant `j`. The one-hot result then selects the constant
  `b`. This takes N² small comparators with constant inputs. `S'` steers both the
  address permutation and the write data permutation (wControl). Example:
  `S = {1,2,3,0}` gives `S' = {3,0,1,2}`.
* **permutation_unit** is the crossbar used three times: `out[j] = in[ctrl[j]]`,
  one N-input multiplexer per output. These three crossbars grow as N² and
  dominate the area for large N.

## Interface and timing (`parallel_memory`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low; clears only the read-steering register |
| `we` | in | 1 | write enable, common to all modules |
| `r` | in | LOC_W | first element location (scanning point) |
| `stride_a` | in | LOC_W | access stride |
| `stride_s` | in | STRIDE_W | stride that selects the skewing scheme (must be non-zero) |
| `wd` | in | N × DATA_W | write data, `wd[k]` goes to location `r + k*stride_a` |
| `rd` | out | N × DATA_W | read data of the previous cycle's request |
| `conflict` | out | 1 | the request now on the inputs puts two elements in one module |

The memory takes one request per clock and has no handshake. Address computation
is combinational, from the inputs to the module address pins.

* **Writes** happen on the rising edge while `we` is high.
* **Reads** are every cycle. `rd` shows the elements of the request sampled on the
  last rising edge. The modules are synchronous RAMs with one cycle of latency, and
  the read steering `S` is registered so that it lines up with their output. `rd`
  therefore does not change when the inputs change between edges.
* **During a write**, `rd` returns the data the written locations held before the
  write (read-first).

`conflict` is only advisory. The memory does not stall or split a conflicting
access. Its read data is undefined. A conflicting write still writes, and it can
overwrite locations that are not part of the request. In simulation, two
assertions in `parallel_memory` catch misuse: one fires on a conflicting write,
the other on a zero `stride_s`.

## Parameters

| parameter | default | notes |
|---|---|---|
| `N_LOG2` | 2 | n, so N = 4 modules. This is the module count of the worked example above. |
| `DEPTH_LOG2` | 10 | 1024 words per module. Design choice. |
| `DATA_W` | 16 | bits per element. Design choice. |
| `STRIDE_W` | `N_LOG2 + DEPTH_LOG2` | width d of `stride_s`. Design choice. |

`LOC_W = N_LOG2 + DEPTH_LOG2`, which is 12 bits by default. The shared defaults
live in `pm_pkg`, and every module is generic in them.

## Design choices beyond the architecture

The architecture fixes the placement equations and the block structure. The
following are choices of this implementation:

* Module depth, data width and `stride_s` width (see the table above).
* Synchronous read-first RAMs and the registered read steering. The result is a
  one-cycle read latency with one access per clock.
* Only the read-steering register is reset. The data array has no reset.
* The `conflict` output. Permutation control raises it when some module number is
  matched by no element. That happens exactly when two elements share a module.
* Location arithmetic wraps modulo `2^LOC_W`. An access that runs past the end of
  the location space continues at location 0. The placement depends only on the
  low `n + s` bits, so a matched stride stays conflict free across the wrap.
* `stride_s = 0` selects `s = d-1`.
* The write and read data crossbars are separate. Merging them into one crossbar
  with an input select would save area for N > 2, at the cost of delay and
  write-to-read turnaround. That variant is not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each computes its expected
values independently from the equations above and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

* `tb_format_control`, `tb_scheme_determination`, `tb_address_decode`,
  `tb_permutation_unit`: exhaustive tests (all 4096 values of `stride_s`) or
  random tests against a reference.
* `tb_module_assignment`: the example table above, the low-order scheme, and the
  reference equation for every `s`. It also checks that random matched strides
  give N distinct modules.
* `tb_permutation_control`: the `{1,2,3,0}` example, random permutations, and
  injected conflicts.
* `tb_address_computation`: the full address path on matched, row and random
  requests.
* `tb_memory_module`: read latency and read-first behaviour.
* `tb_parallel_memory` runs the whole memory at its default size. For every scheme
  `s = 0 … 10` it fills the memory with row writes. It then runs back-to-back
  strided reads and writes, some of which wrap around the end of the location
  space. It reads everything back as rows under a different stride with the same
  `s`, and presents mismatched requests to exercise `conflict`. It counts each of
  these situations and fails if one never occurred. The run is about 30,000 clock
  cycles.
* `tb_parallel_memory_sizes` runs the same end-to-end sequence on memories of
  N = 2, 8 and 16 modules, with 64 words of 8 bits each. The sequence lives in the
  helper `pm_e2e_checker`.
* `tb_stride_sweep` rebuilds the address computation for N = 2, 4, 8, 16, 32 and
  64 modules, with 64 words per module. It checks that every matched stride is
  conflict free and correctly routed. For small configurations it tries every
  start point and every odd multiplier below 2N. Larger configurations (N = 128
  up to 1024) were not simulated, because the simulator's build time grows with
  the N² crossbars and the N² comparators of permutation control. At N = 1024
  even elaborating the design takes several minutes in the open-source tools.

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pm_pkg.sv tb/tb_parallel_memory.sv --top-module tb_parallel_memory
./obj_dir/Vtb_parallel_memory
```

Replace the testbench name to run another test. All files are plain
SystemVerilog-2017 and synthesizable except those in `tb/`. To change the size,
override the parameters of `parallel_memory`. The per-block testbenches and
`tb_parallel_memory` take their sizes from `pm_pkg`.
