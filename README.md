# BiSon-e: narrow-integer SIMD on a scalar core's multiplier

This is synthesizable SystemVerilog for BiSon-e, a small unit that lets a 64-bit scalar core
compute inner products and convolutions of 1- to 8-bit integers several elements at a time.
It needs no vector register file and no new arithmetic unit. The core's ordinary 64 x 64-bit
integer multiplier does the arithmetic. BiSon-e only prepares the operands in front of the
multiplier and picks the useful bits out of the product. The architecture follows the
published BiSon-e design (Reggiani et al., ASPLOS 2022). The encodings, the reset behaviour and
the handling of details the publication leaves open are this implementation's own. They are
listed in [Departures and choices](#departures-and-choices).

## The idea: binary segmentation

Take a vector of unsigned integers `v[0..n-1]`. Write element `i` into bits `i*cw .. i*cw+cw-1`
of one wide integer, `V = sum v[i] * 2^(i*cw)`. The segment width `cw` is the *clustering
width*. It is wider than the data, and the spare guard bits absorb carries.

* **Convolution.** Multiply two such integers `U` and `V`. Segment `k` of the product holds
  `sum_i u[i] * v[k-i]`, which is element `k` of the linear convolution. The guard bits keep
  segments from spilling into each other: `cw >= b_u + b_v + ceil(log2(min(m, n)))`.
* **Inner product.** Store the second vector in reverse order. Then segment `n-1` of the
  product is `sum_i u[i] * v[i]`, the inner product.

One multiplication replaces `n` multiplications and `n-1` additions, or `n*n` multiplications for
a convolution. Two small examples are checked by the testbench:

* Inner product of `[7,5]` and `[4,2]` with 7-bit segments. The product's segment 1 is 38.
* Convolution of `[3,1,2]` with `[1,2]` with 5-bit segments. The product's segments are 3, 7, 4, 4.

In software, building the segmented operands (unpack, widen, shift, OR) and extracting the
results cost far more than the one multiply saves. BiSon-e moves exactly those two steps into
hardware beside the multiplier. Data can then stay compressed in memory and in registers,
element `k` of a `b`-bit vector at bit `k*b` of a 64-bit word.

## Instructions

| instruction | operands | result |
|---|---|---|
| `bs.set`  | src1 = configuration word | none. Loads the control register and clears `cnt_i`, `cnt_o`. |
| `bs.ip`   | src1, src2 = compressed words | inner product of input-cluster `cnt_i` of src1 and src2. Advances `cnt_i`. |
| `bs.lc.l` | src1, src2 | convolution elements `0 .. ic_dim-1` of cluster `cnt_i`, still in `cw`-bit segments |
| `bs.lc.h` | src1, src2 | convolution elements `ic_dim .. 2*ic_dim-2`, shifted down to bit 0, in segments. Advances `cnt_i`. |
| `bs.pack` | src1 = wide elements, src2 = destination | src2 with slice `cnt_o` replaced by the src1 elements cut to the narrow width. Advances `cnt_o`. |

The opcodes are the `bison_pkg::op_e` values. They are this design's own encoding. The top
module takes already-decoded instructions.

### The control register

The control register is `bison_pkg::cfg_t`. Every field is 7 bits wide, and each field takes
one byte of the `bs.set` operand:

| byte | field | extend meaning (`bs.ip`, `bs.lc.*`) | pack meaning (`bs.pack`) |
|---|---|---|---|
| 0 | `b1` | element width of src1 | width of the wide input elements |
| 1 | `b2` | element width of src2 | unused |
| 2 | `n_elem` | valid elements per source word | elements converted per `bs.pack` |
| 3 | `cw` | clustering width | narrow output width |
| 4 | `ic_dim` | elements per input-cluster | output elements per packed word |
| 5 | `pre_iter` | `cnt_i` wraps here (clusters per word) | 1 |
| 6 | `post_iter` | 1 | `cnt_o` wraps here (`bs.pack` per word) |

`bison_pkg::cfg_to_word` and `cfg_from_word` convert between the struct and the word. The
functions `extend_preset(b)` and `pack_preset(bo)` return the published configurations:

| data bits | elements / word | cluster width | elements / cluster | `bs.ip` per word |
|---|---|---|---|---|
| 8 | 8  | 21 | 3  | 3 |
| 7 | 9  | 16 | 4  | 3 |
| 6 | 10 | 16 | 4  | 3 |
| 5 | 12 | 16 | 4  | 3 |
| 4 | 16 | 12 | 5  | 4 |
| 3 | 21 | 9  | 7  | 3 |
| 2 | 32 | 8  | 8  | 4 |
| 1 | 64 | 6  | 10 | 7 |

The pack presets convert eight 8-bit elements per instruction to 1, 2 or 4 bits. Eight, four
or two `bs.pack` instructions then fill a 64-bit word.

Nothing limits the configuration to these rows. Any layout with `ic_dim*cw <= 64` and
`n_elem*b1 <= 64` works. Examples are the guard-bit-heavy layouts used for long
accumulations, and mixed precision such as 8-bit by 4-bit (`b1 = 8`, `b2 = 4`, `cw = 14`,
four per cluster). An assertion in `bison_control` flags a `bs.set` that breaks these limits.

## How the kernels use it

**Inner product.** This is the loop from the published design:

```
bs.set(extend_preset(b))
for each pair of 64-bit words (x, y):
    repeat pre_iter times:  acc += bs.ip(x, y)     // cnt_i walks the clusters
```

The extend unit picks elements `cnt_i*ic_dim ..` of each word. It widens them to `cw` bits and
reverses the src2 cluster. Elements past `n_elem` read as zero. For example, the last of the
three 8-bit clusters holds only two elements. The `bs.ip` instructions of one word issue back to
back, one per cycle.

**Convolution with fused overlap-add.** A cluster-by-cluster convolution gives `2*ic_dim-1`
outputs per pair of clusters. `bs.lc.l` returns the low `ic_dim` outputs and `bs.lc.h` returns
the rest. Both stay in segmented form, so the host accumulates with plain 64-bit additions:

```
ova[i+j]   += bs.lc.l(u_cluster_i, v_cluster_j)
ova[i+j+1] += bs.lc.h(u_cluster_i, v_cluster_j)
```

Each `ova` register holds `ic_dim` consecutive outputs. The result is extracted only once, at
the end. For a 16 x 12 convolution of 4-bit data, with four elements per cluster and 16-bit
segments, that is 24 additions into 7 registers. The guard bits must cover the whole
accumulation, not just one product. `bs.lc.l` leaves `cnt_i` alone and `bs.lc.h` advances it,
so a pair always works on the same clusters. Both operands use the same `cnt_i`. To pair
cluster `i` of one vector with cluster `j` of the other, the host shifts the words, or it
configures one cluster per word (`pre_iter = 1`).

**Packing.** `bs.pack` takes eight wide elements from src1 and keeps the low `cw` bits of each.
It writes them into src2 at bit `cnt_o * n_elem * cw`. Successive `bs.pack` instructions,
each fed the previous result as src2, build one compressed word. The host must forward that
result, because it is a true data dependency.

## Microarchitecture and timing

```
            src1,src2 ──► extend unit ──ic_1,ic_2──► [multiplier input regs] ──► * ──► [product reg] ──m_out──► mask unit ──► ro
                     └──► pack unit ──slice──────► [sideband reg 1] ──────────────► [sideband reg 2] ─────────┘
 control register, cnt_i, cnt_o ──┘ (configuration and cnt_o copied into the sideband registers)
```

* **Cycle 1 (issue).** The extend unit (or the pack unit) works combinationally from src1 and
  src2, the control register and `cnt_i`. Its outputs are captured in the multiplier input
  registers, and the instruction's sideband fields in the first sideband register. The
  counters update at the same edge.
* **Cycle 2.** The multiplier forms the 128-bit product into its output register.
* **Cycle 3.** The mask unit cuts the result out of the product and drives `ro` with
  `out_valid`. For `bs.pack` it merges the slice into src2 instead. The core writes `ro` back
  at the end of this cycle.

A new instruction can issue every cycle. There is no stall, and up to two instructions sit in
the multiplier registers at once. `bs.set` travels down the pipeline too, but raises no
`out_valid`. Each instruction carries its own configuration and `cnt_o`. A `bs.set` can
therefore follow instructions still in flight without changing their results.

The mask unit's slices, with `n = ic_dim`:

| instruction | product bits |
|---|---|
| `bs.ip`   | `(n-1)*cw .. n*cw-1` |
| `bs.lc.l` | `0 .. n*cw-1` |
| `bs.lc.h` | `n*cw .. (2n-1)*cw-1`, returned from bit 0 |

Reset is synchronous and active low. It loads the 8-bit preset and clears the counters and
valid bits. Data registers are not reset.

## Files

| file | contents |
|---|---|
| `rtl/bison_pkg.sv` | opcodes, `cfg_t`, configuration word layout, preset functions |
| `rtl/bison_control.sv` | control register, `cnt_i`, `cnt_o` |
| `rtl/bison_extend_unit.sv` | input-cluster builder (combinational) |
| `rtl/bison_pack_unit.sv` | `bs.pack` narrowing (combinational) |
| `rtl/bison_mask_unit.sv` | result extraction and pack merge (combinational) |
| `rtl/int_mul64.sv` | two-stage 64 x 64 -> 128 unsigned multiplier (stands in for the core's own) |
| `rtl/bison_e.sv` | the BiSon-e unit: the above without the multiplier, plus the sideband registers |
| `rtl/bison_e_top.sv` | top: `bison_e` wired to `int_mul64` |

The parameters are `MAX_IC = 10`, the largest cluster the extend unit builds, and
`MAX_PACK = 8`, the elements one `bs.pack` converts. After generic synthesis the top has about
390 word-level cells and 640 flip-flop bits. 258 of those bits belong to the multiplier (two
64-bit operand registers, the 128-bit product register and two valid bits), which the host
core already has. The
extend unit is written as general variable shifters, so it accepts any layout. A version
limited to the eight presets would be considerably smaller.

## Verification

Each testbench checks against arithmetic done independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_bison_e_top` | Full top at default parameters. Long inner products for every preset and 8x4-bit mixed precision. The 16 x 12 fused overlap-add convolution. Per-cluster `bs.lc` pairs for every preset. Packing to 1/2/4 bits over two words. A `bs.set` with instructions in flight. The two small examples above. Every result is checked for order and for its two-edge latency, and each mechanism must occur. |
| `tb_bison_e` | The unit with a testbench-side multiplier. A random instruction stream against a cycle-level model. |
| `tb_bison_control`, `tb_bison_extend_unit`, `tb_bison_pack_unit`, `tb_bison_mask_unit`, `tb_int_mul64` | Each unit alone against bit-level references. |
| `tb_qcnn_layers` | Quantized CNN layers at 8, 4 and 2 bits: a 12 x 128 fully-connected layer, a 1000 x 4096 one (the size of AlexNet's last layer), and an img2col convolution (four 3x3x4 filters on a 6x6x4 input). |
| `tb_string_match` | Approximate string matching with don't-care symbols: a 256-symbol pattern over 4096- and 131072-symbol texts, with 4- and 256-letter alphabets. It runs boolean convolutions per letter with 9-bit segments and fused overlap-add. |

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/bison_pkg.sv tb/tb_bison_e_top.sv --top-module tb_bison_e_top
./obj_dir/Vtb_bison_e_top
```

The testbenches warn about width mismatches in their own arithmetic, hence `-Wno-fatal`. Every testbench finishes within seconds (`tb_string_match`, the longest, in about 30).

## Departures and choices

* **Host core not included.** Decode, register file, forwarding and write-back belong to the
  core, and they appear here as the top's ports. Sharing the multiplier with the core's
  ordinary `mul`/`mulh` instructions, through an operand multiplexer, is left to the
  integration.
* **Multiplier.** `int_mul64` is a behavioural `*` between input and output registers. In a
  real integration BiSon-e drives the core's existing multiplier. It returns the full 128-bit
  product in one pass, because `bs.lc.h` needs the high half.
* **Operand multiplexers.** The published block diagram shows a multiplexer on each source
  operand in front of the units. Their inputs are not specified, so here src1 and src2 simply
  feed the extend unit, the pack unit and the control register in parallel, and the opcode
  selects which result is used.
* **Unsigned data only.** Signed segmentation is possible in principle but is not built.
* **Encodings.** The opcodes, the `bs.set` word layout and the 7-bit fields are this design's
  own.
* **Counter rules.** `bs.ip` and `bs.lc.h` advance `cnt_i`, and `bs.lc.l` does not. `bs.pack`
  advances `cnt_o`. `bs.set` clears both.
* **Partial clusters** are zero-padded.
* **Packing** truncates (it does not saturate) and replaces the target field of src2.
* **Sideband registers.** `bs.pack` is delayed to the same three-cycle depth as the
  multiplying instructions, so all results leave in order. The configuration travels with
  each instruction.
* **Mixed precision.** Separate src1/src2 widths share one element count and one `cnt_i`.
* **Operand order in drawings.** Diagrams of segmented words are often drawn with element 0
  on the left (most significant end). This design always places element 0 in the least
  significant bits, `V = sum v[i] * 2^(i*cw)`. Either way the inner product and convolution
  values are the same.
* **Not reproduced.** Area, power and timing figures of the published 65 nm and 22 nm
  implementations (about 1100-1200 standard cells, below 0.07 % of the SoC area), and the
  speed-ups measured on full networks. The testbenches run one full-size fully-connected layer
  and a reduced convolutional layer, not whole networks.
