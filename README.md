# Scale Cascading+ on a Newton-style DRAM-PIM channel

Group-wise weight-only quantization stores LLM weights as 4-bit or 2-bit integers, one FP16
scale `s_i` and (asymmetric case) one zero-point `z_i` per group of `g` consecutive inputs. The
textbook way to use such weights is to dequantize every weight, `s_i (w + z_i)`, before the
multiply. That doubles the arithmetic, and on processing-in-memory hardware the arithmetic rate
is matched to the memory bandwidth, so the doubling shows up directly as lost time.

This RTL implements a PIM channel that avoids per-weight dequantization. Each bank's 16-lane FP16
MAC unit multiplies the raw integers, converted to FP16 with one fixed power-of-two scale
`s' = 1/2048`. Each group's real scale and zero-point are applied once per group, with a few
extra FP16 units:

```
y_0 = s' w_0 . a_0                               alpha_i = s_i z_i S(a_i)
y_i = s' w_i . a_i + (s_{i-1}/s_i) y_{i-1}       S(a_i)  = sum of the inputs of group i
y   = (s_f/s') y_f + sum_i alpha_i               (f = last group of the segment)
```

The partial sum is rescaled at each group boundary ("scale cascading"). The zero-point term does
not depend on the weights, so it is formed from the input sum `S(a_i)`. One adder tree in the DRAM
periphery computes that sum once for all banks, while the MACs run. The channel also still runs
plain FP16 GEMV.

Packing more weights per DRAM row is where the speed comes from. A 1 KB row holds a 512-weight
FP16 tile, or three INT4 tiles, or seven INT2 tiles (six for INT2 asymmetric with g = 64), each
with its parameters. So one all-bank row activation, which costs at least 3·tFAW, serves several
outputs.

## Channel structure (`scpim_channel`)

```
 host ──256b──► global_buffer (512 FP16) ──16 inputs/step──┬──► global_adder_tree ─► Sum result ─┐
                                                           │                                    │
 sc_controller ── op word, all-bank ACT/RD/PRE ──► DRAM banks (outside)                         │
        │                                              │ 256-bit column per bank                │
        └────────────── op word ───────────────► pim_unit × 16 ◄──────────────────────────────┘
                                                       │
                                       16 FP16 results (one per bank) ──► host
```

Each `pim_unit` contains:

* **bit_selector_plus**: picks the 64 bits (16 × INT4) or 32 bits (16 × INT2) of the column that the
  current step uses.
* **int2fp_converter_plus**: gives `s'·w` in FP16 exactly, using leading-one detection and no
  multiplier. Weights are signed in symmetric mode and unsigned in asymmetric mode.
* **newton_mac**: 16 FP16 multipliers, a 15-adder tree and an accumulating adder into Result.
* **buffer_q**: 16 × 16-bit parameters. Entries 0–7 hold the cascade scales `s_i/s_{i+1}` and the
  last one `s_f/s'`. Entries 8–15 hold `s_i z_i`.
* **fp16_mul** (MUL SCALE), **fp16_mac** (MAC OFFSET into the mid result), **fp16_add** (ADD RESULT).

`fp16_adder_tree` is the shared 16-to-1 tree. `fp16_pkg` holds the FP16 rounding function and
`pim_pkg` holds the shared types.

## Operation pipeline

The sequencer emits one operation word (`pim_op_t`) per cycle at most. Every PIM unit and the
peripheral tree act on it at fixed offsets:

| cycle | CLEAR | LOADQ | COMP | GEND (group i) | FINAL |
|---|---|---|---|---|---|
| t   | issued | column read issued | column read and global-buffer read issued | issued | issued |
| t+1 | – | column → buffer_q | bit select, INT→FP, 16 products registered; input tree sum registered | – | – |
| t+2 | Result, mid, scaled, Sum := 0 | – | Result += tree(products); Sum += input sum | Result := Result·q[i] (inner group) or scaled := Result·q[i] (last group); mid += q[8+i]·Sum; Sum := 0 | result := scaled + mid (asym), scaled (sym), Result (FP16) |

Because each unit processes the words in order, a GEND always sees the completed sums of its group.

## Row layout and job sequence (`sc_controller`)

A job is one all-bank row activation holding `n_out` output tiles of `in_chunks × 16` inputs (512
at most). `cpc` is the number of COMP steps one column serves: 1 for FP16, 4 for INT4 and 8 for
INT2. `WC = ceil(in_chunks / cpc)` is the number of columns one output's weights take.

* Weights of output `o`, step `c` are in column `o·WC + c/cpc`, slice `c mod cpc`.
* Parameter tiles come after all weight tiles. A tile is `ngrp` scales followed by `ngrp` values
  of `s_i z_i`.
* A tile of more than 8 entries (only asymmetric with g = 64) takes column `n_out·WC + o`.
* Smaller tiles share a column two by two: column `n_out·WC + o/2`, with even `o` in the lower
  half and odd `o` in the upper half.

This layout gives the row capacities quoted above (`pim_pkg::max_outputs`). Jobs that do not fit
are rejected with `cfg_err`, and so are group sizes other than 64, 128 and 256 and segments that
are not a whole number of groups.

Job timing, with the default DRAM parameters (tRCD 14, tCCD_L 4, tRAS 34, tRP 14, tFAW 30):

* **Activation:** the first column read comes 3·tFAW + tRCD = 104 cycles after the all-bank
  activation.
* **Per output:** CLEAR (1 cycle), then LOADQ (tCCD, integer modes only), then `in_chunks` COMP
  reads spaced tCCD apart. Each GEND uses the idle cycle after its group's last read. Then FINAL
  and 2 drain cycles (3 cycles), then READRES (tCCD).
* **Cycles per output:** 1 + tCCD + 32·tCCD + 3 + tCCD = 141 for a full INT segment, and 136 for
  FP16.
* **End of job:** precharge, no earlier than tRAS after activation, then `done` tRP later.

Inputs longer than 512 are split by the host into 512-input segments. The host reloads the global
buffer for each segment and adds the partial results, as in the original Newton dataflow.

## Using the channel

1. Write the 512 inputs with 32 writes of `gb_wr_data` (16 FP16 values) to `gb_wr_addr` 0–31.
2. Pulse `start` with `cfg`: the format (`WFMT_FP16/INT4/INT2`), `asym`, `gshift` (g = 16 << gshift),
   `in_chunks`, `n_out` and `row`.
3. Read the results. For each tile, `res_valid` is high for one cycle, `res_idx` numbers the tile,
   and `res_data[b]` is bank `b`'s FP16 output.
4. `done` pulses when the row has been precharged.

The banks are outside the channel. The channel drives `bank_act`, `bank_rd` and `bank_pre`,
together with `bank_row` and `bank_col`, to all banks, and expects each bank's 256-bit column on
`bank_rdata` one cycle after `bank_rd`. `tb/dram_bank_model.sv` is a behavioural model of these
banks.

## Arithmetic

All arithmetic units are IEEE binary16 with round-to-nearest-even and subnormals kept. Each adder
and multiplier forms its exact result as an integer and rounds it once
(`fp16_pkg::fp16_round_pack`). The FP16 MAC rounds twice, once after the multiply and once after the
add. The INT→FP conversion is exact. The whole datapath is therefore bit-reproducible by the
reference model in `tb/scpim_ref_pkg.sv`.

Against exact real arithmetic, the accuracy is that of FP16 accumulation. The testbenches accept
1% of the sum of absolute terms, and every output stays within that.

## Simulation

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. Two examples:

```
verilator --binary --timing -Irtl -Itb --top-module tb_scpim_channel \
  rtl/fp16_pkg.sv rtl/pim_pkg.sv tb/fp16_ref_pkg.sv tb/scpim_ref_pkg.sv tb/tb_scpim_channel.sv
./obj_dir/Vtb_scpim_channel

verilator --binary --timing -Irtl -Itb --top-module tb_fp16_add \
  rtl/fp16_pkg.sv rtl/pim_pkg.sv tb/fp16_ref_pkg.sv tb/tb_fp16_add.sv
```

| testbench | covers |
|---|---|
| `tb_fp16_add`, `tb_fp16_mul`, `tb_fp16_mac` | random, subnormal, overflow and special operands against real-valued rounding |
| `tb_bit_selector_plus`, `tb_int2fp_converter_plus`, `tb_buffer_q`, `tb_global_buffer` | every slice, every code, both tile halves, read latency |
| `tb_newton_mac`, `tb_global_adder_tree` | accumulation, clear and load, two-cycle latency |
| `tb_pim_unit` | whole outputs in every mode, back to back, bit-exact against the reference model |
| `tb_sc_controller` | the operation stream, every address, DRAM timing, cycles per output, rejected jobs |
| `tb_scpim_channel` | end to end at the default size in every mode and group size, full rows, a short segment, a 1024-input GEMV over two segments, rejected jobs; counts each mechanism |
| `tb_gemv_workload` | a 2048×2048 GEMV as FP16, INT4 and INT2 (asymmetric, g = 128), checked output by output, with cycle counts |

`tb_gemv_workload` reports these cycle counts for the 2048×2048 GEMV:

| run | cycles | speedup over FP16 |
|---|---|---|
| FP16 | 131072 | 1 |
| INT4 ASYM g=128 | 92320 | 1.42× |
| INT2 ASYM g=128 | 80800 | 1.62× |

The evaluation this design is based on reports lower speedups: 1.16× and 1.27×. Its DRAM
simulator also charges for the transfer of results to the host, refresh and command-bus
contention, and this RTL's cycle model includes none of them.

## Where this design makes its own choices

The structure, the equations, the unit list, the row capacities, `s' = 1/2048`, the buffer_q split
and the DRAM timings come from the published description. The following are choices of this
implementation:

* **Interfaces and timing:** the host and bank interfaces, the operation word and the two-stage
  pipeline.
* **Mode handling:** the same `s'` for INT2 as for INT4, and signed weights in symmetric mode
  versus unsigned weights in asymmetric mode.
* **Row layout:** the slice order inside a column and the parameter tile layout and packing.
* **Sequencing:** the all-bank activation wait of 3·tFAW + tRCD, one CLEAR, FINAL and 2-cycle
  drain per output, and the READRES length.
* **Arithmetic details:** binary16 round-to-nearest-even everywhere and an unfused FP16 MAC.

The scaled result and the cascade share one FP16 multiplier. Its product goes back into Result
for inner groups and into a separate scaled-result register for the last group.

The DRAM array, its row buffer and bank bus, and the host are not part of the RTL.
