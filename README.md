# Associative-memory floating-point processing element

A convolutional network whose weights have been clustered to a few dozen
centroid values, and whose activations have been profiled for their most frequent
values, keeps multiplying the same few operand pairs. This processing element
exploits that: it stores the products of the frequent (activation, centroid)
pairs in a small associative memory, computed offline, and looks them up instead
of multiplying. Only a pair that is not found goes through the floating-point
multiplier, which otherwise stays idle. The lookup is *approximate*: only the
most significant bits of each operand (sign, exponent and the top of the
fraction) take part in the match, so operands that are close to a stored pattern
also hit. The number of bits matched is a run-time knob that trades accuracy for
hit rate.

The element is a three-stage multiply-accumulate pipeline for IEEE 754 single
precision (default) or half precision. It accepts one operand pair per cycle,
hit or miss, and never stalls.

```
            stage 1                 stage 2                         stage 3
          +-------------+        +-----------------+
 in_act ->| inputs CAM  |-row--->|                 |
          |             |        | address decoder |-> results memory --+
 in_wgt ->| weights CAM |-row--->|  in_row*N_W+w   |   (ABIT-bit words) |   +-----+
          +-------------+        +-----------------+                    +-->|     |
                |  hit = both CAMs match                                    | MUX |--> accumulator --> result
                v                                                           |     |
 operands -> [operand reg, loads on miss] --> FPMul [out reg, en on miss] ->|     |
                                                                            +-----+
```

## One operand pair through the pipeline

| edge | what happens |
|------|--------------|
| t    | `in_act`, `in_wgt` (with `in_valid`) are sampled. During the cycle before it, both CAMs compared the operands' top bits with every stored row. At the edge the hit flag and the results-memory address are registered; on a miss the operands are also loaded into the multiplier's input register. |
| t+1  | On a hit the results memory is read; on a miss the multiplier's output register takes the product. The other path keeps its registers unchanged. `prod`/`prod_valid`/`prod_hit` show the chosen product after this edge. |
| t+2  | The accumulator adds the product to the running sum (or starts a new sum when the pair carried `in_first`). For a pair carrying `in_last`, `done` pulses and `result` holds the finished sum. |

So a pair presented before edge t is in `acc` after edge t+2: three stages,
a latency of three cycles counted from the cycle the pair is presented. Hits and
misses take the same time; the multiplier is sized to fit one pipeline stage.

On a hit neither register of the multiplier loads, so its logic sees no input
change and its output register does not toggle. This is the element's energy
saving; a synthesis flow turns those register enables into clock gates.

## Approximate matching

Each CAM row holds a key of `ABIT` bits, by default half the operand: the top
16 bits of a single precision pattern (sign, 8 exponent bits, 7 fraction bits),
or the top 8 bits of a half precision one. A search compares only the `cfg_abit` most significant key
bits (1 to ABIT) and ignores the rest. With `cfg_abit = 13`, a single precision
operand matches on bits 31..19: sign, exponent and 4 fraction bits. For example
`1 10011011 1111 0101111100011111110` matches a stored row whose top 13 bits are
`1 10011011 1111`, whatever its other bits. With `cfg_abit = ABIT` only the
stored 16 (or 8) bits take part.

A pair hits only when the activation matches a row of the inputs CAM *and* the
weight matches a row of the weights CAM. When several rows match, the lowest
row wins. Rows are valid only after they have been written; `am_clear`
invalidates all of them.

## The associative memory and what it holds

* **Weights CAM**: `N_W` rows, one per weight cluster centroid. With per-filter
  clustering the centroids of one layer or filter are loaded before its
  products are streamed.
* **Inputs CAM**: `N_IN` rows, one per profiled activation value of the layer.
* **Results memory**: `N_W * N_IN` words of `ABIT` bits. Word
  `in_row * N_W + w_row` holds the top `ABIT` bits of the product of input
  pattern `in_row` and centroid `w_row`. For power-of-two sizes that address is
  the concatenation `{in_row, w_row}`. On a hit the word is widened to a full
  operand by appending zeros, so with the default word a product read from memory has the precision of
  a bfloat16 (single precision) or of an 8-bit float (half precision).

Nothing on chip computes these contents. An offline flow clusters the weights,
chooses the matched width, profiles the activations and computes the product
table, and writes the result through the load port:

| `ld_target` | array          | `ld_addr`             | `ld_data` |
|-------------|----------------|-----------------------|-----------|
| 0           | inputs CAM     | row, 0..N_IN-1        | key (top ABIT bits of the pattern) |
| 1           | weights CAM    | row, 0..N_W-1         | key |
| 2           | results memory | `in_row * N_W + w_row`| top ABIT bits of the product |

One write per cycle with `ld_en` high. Assertions flag an out-of-range load
address and a `cfg_abit` outside 1..ABIT. Loading while pairs are in flight is
allowed, but a pair then sees whichever contents the CAMs hold at its stage 1.

## Arithmetic conventions

`fp_mul` and the accumulator's adder `fp_add` round to nearest, ties to even.
They read subnormal operands as zero, flush results below the normal range to a
signed zero and turn overflow into infinity. A NaN operand, infinity times zero
and infinity minus infinity give the quiet NaN `7FC00000` (`7E00` in half
precision). An exact cancellation in the adder gives +0.

## Interface of `axp_pe`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears the pipeline, the CAM valid bits and the accumulator; CAM keys and memory words are not reset) |
| `cfg_abit` | in | `$clog2(ABIT+1)` | number of key MSBs compared, 1..ABIT |
| `am_clear` | in | 1 | invalidate both CAMs |
| `ld_en`, `ld_target`, `ld_addr`, `ld_data` | in | 1, 2, `$clog2(N_W*N_IN)`, ABIT | load port (table above) |
| `in_valid`, `in_first`, `in_last` | in | 1 | operand pair valid, opens a sum, closes a sum |
| `in_act`, `in_wgt` | in | W | activation, weight |
| `prod_valid`, `prod_hit`, `prod` | out | 1, 1, W | product entering the accumulator and whether it came from memory |
| `acc` | out | W | running sum |
| `done`, `result` | out | 1, W | finished sum, one-cycle pulse |

## Parameters and configurations

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 32 | operand width: 32 single precision, 16 half precision |
| `N_W` | 64 | weights CAM rows |
| `N_IN` | 16 | inputs CAM rows |
| `ABIT` | W/2 | CAM key and results word width, 1..W |

The default, 64 centroids and 16 activation patterns, is the configuration
that keeps a traffic-sign LeNet-5 within its accuracy target. Other networks need
other sizes:

| workload | weights rows | input rows | fits the default? |
|----------|--------------|------------|-------------------|
| digit classification (LeNet-like, single precision) | 16 | 16 | yes |
| traffic-sign recognition (LeNet-5, single precision) | 64 | 16 | yes, exactly (1024 of 1024 result words) |
| keyword spotting (GscNet, single precision) | 512 | 16 | no: set `N_W = 512` (8192 result words) |
| input-pattern sweep up to 64 | any | 64 | no: set `N_IN = 64` |
| matched widths 9 to 13 and 16 bits, single precision | any up to 64 | any up to 16 | yes |
| exact matching on all 32 bits | any | any | no: set `ABIT = 32` |
| the same networks in half precision, 6 to 8 matched bits | as above | as above | no: set `W = 16` |
| half precision, 9, 10 or 16 matched bits | any | any | no: set `W = 16`, `ABIT = 10` or `16` |

Network size does not limit the element: it holds no feature maps and streams
one multiply-accumulate per cycle for as long as pairs arrive.

## Departures and design choices

The function and organisation described above are the element as published.
The following are choices made here where the description gives no detail:

* **Pipeline depth of the multiplier.** The multiplier is described as
  multi-stage, running at the same clock as the lookup path. Here it is one
  registered stage inside stage 2, so hits and misses have equal latency. A
  deeper multiplier would need the memory path delayed by as many cycles.
* **Matched width versus word size.** The stored word defaults to W/2 bits,
  as the published memory organisation has it, and `cfg_abit` selects how many
  of those bits are compared. The published accuracy sweeps also match on 9 and
  10 bits in half precision and on every bit (exact matching); those need
  `ABIT` raised to 10, or to W.
* **Product words are truncated, then zero-padded.** How the stored ABIT bits
  become a full operand is not specified; zero padding is used.
* **Clock gating** is expressed as register enables, not as gated clocks.
* **Load port, clear, row valid bits, lowest-row priority, first/last framing,
  reset behaviour and IEEE special-case handling** are this design's own.
* **Memories.** The CAMs and the results memory are synthesizable arrays
  (registers and comparators, a memory array). The published element uses
  custom 6T CAM cells and an SRAM macro of a 28 nm library; those circuits and
  their energy characterisation are not part of this RTL.

* **Not built.** Cascading several CAM modules in extra pipeline stages, the
  published way to grow a CAM beyond 512 rows, is not part of this RTL; here a
  larger `N_W` or `N_IN` just makes one wider comparator array.
* **Timing and energy.** The published element closes a 1.5 ns clock in a
  28 nm process, with the 512-row CAM search fitting in one cycle. This RTL has
  not been through timing analysis. The energy saving comes from the fraction of
  products served by the memory; `prod_hit` marks each of them, so the hit rate
  of a workload can be counted at the output.

## Verification

Every module has a self-checking testbench that compares against values
computed independently in the testbench: floating-point results come from
double-precision arithmetic rounded to the target format (`tb/tb_fp_pkg.sv`),
CAM and memory behaviour from reference arrays.

| testbench | what it covers |
|-----------|----------------|
| `tb_fp_mul` | 50k random and directed products in both formats, specials, overflow, underflow, rounding carry, one-cycle latency, hold on `en` low |
| `tb_fp_accumulator` | 3000 random sums in both formats, exact cancellation, `done` timing, result hold |
| `tb_cam` | random writes and masked searches, the 13-bit matching example, clear |
| `tb_results_mem` | read latency, hold on `re` low, simultaneous write and read |
| `tb_assoc_mem` | both CAMs and the memory together, one search per cycle, hit timing, read data, clear |
| `tb_axp_pe` | the default element end to end: four layers (clear, reload, new matched width) of 150 dot products with exact hits, approximate hits and misses; checks every product, every sum, the two- and three-cycle latencies and that the multiplier does not switch on a hit |
| `tb_axp_pe_workloads` | the same workload on seven other configurations: 16/16, 512/16 and 64/64 rows in single precision, 16/16 with 32-bit words (exact matching), and 64/16 with 8- and 10-bit words and 512/16 with 16-bit words in half precision |

The workload is synthetic: centroids and activation patterns are random
numbers, and operands are drawn near them, so the hit rates the testbenches print
(around 65 to 80 percent) say nothing about a real network.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/axp_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv tb/tb_pe_workload.sv tb/tb_axp_pe.sv \
    --top-module tb_axp_pe -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Change the
`--top-module` and the last file for another testbench.

## Files

| file | content |
|------|---------|
| `rtl/axp_pkg.sv` | load-target enum, format widths |
| `rtl/axp_pe.sv` | the processing element (top) |
| `rtl/assoc_mem.sv` | two CAMs, address decoder, results memory, stage-1 registers |
| `rtl/cam.sv` | approximate-matching CAM |
| `rtl/results_mem.sv` | results memory |
| `rtl/fp_mul.sv` | floating-point multiplier |
| `rtl/fp_accumulator.sv`, `rtl/fp_add.sv` | single-stage accumulator and its adder |
| `tb/` | testbenches; `tb_axp_pe_body.svh` is the shared end-to-end workload |
