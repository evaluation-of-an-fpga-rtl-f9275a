# A heterogeneous multicore accelerator platform with SIMD and MIMD PE arrays

Image-processing kernels such as window filtering and template matching (sum of absolute
differences, SAD) mix two kinds of work. Control-heavy work suits a CPU. Data-heavy work suits an
array of simple processing elements (PEs). Which array shape suits a kernel best depends on the
kernel. This RTL is the FPGA side of a platform that puts accelerator cores of two templates next
to a host CPU:

* **SIMD-1D**: a one-dimensional row of PEs that all run the same operation. It is close to a GPU
  datapath. Each PE has its own two memories and computes a whole window by itself
  (*window-parallel*). The design is simple and has many memory ports, so it suits kernels with a
  single operation type, such as a filter built from multiply-accumulates.
* **MIMD-2D**: a two-dimensional array of PEs, each running its own operation. Data streams from
  the left column, which reads the memories, to the right column, which writes results back. The
  pixels of one window are spread over the lanes (*pixel-parallel*), and different operations
  (absolute difference, add, accumulate) work at the same time as a pipeline. This suits kernels
  with several operation types, such as SAD.

Every local memory has its own **address generation unit (AGU)**. The AGU produces one address per
clock, so the PEs never spend cycles on address arithmetic. The CPU loads the memories and
configurations over a 32-bit AXI4-lite port, starts the cores through a small control unit, and
reads the results back.

The default build, `hmp_top`, holds four MIMD-2D cores of 4×4 PEs (64 PEs in all) and one
SIMD-1D core of 4 PEs. Each core has eight 2 kB memories.

## Files

| file | contents |
|---|---|
| `rtl/hmp_pkg.sv` | shared types: tagged data word, PE opcodes and configuration, AGU configuration, host-bus structs, address map |
| `rtl/pe.sv` | processing element |
| `rtl/agu.sv` | address generation unit |
| `rtl/local_mem.sv` | dual-port local memory, 1-clock read |
| `rtl/simd1d_core.sv` | SIMD-1D accelerator core |
| `rtl/mimd2d_core.sv` | MIMD-2D accelerator core with context memory |
| `rtl/control_unit.sv` | start/stop and status of the cores |
| `rtl/axil_bridge.sv` | AXI4-lite slave to internal host bus |
| `rtl/hmp_top.sv` | platform top: bridge, decoder, control unit, cores |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_simd1d_workload.sv` | full 16×256 filter + SAD workload on a 4-PE and a 9-PE SIMD core, in five image segments |
| `tb/tb_table6_workload.sv` | one full scan area of a 640-column image, with 12×12, 18×18 and 24×24 filters, on the four MIMD cores of `hmp_top` |

## The data word and its tags

Every word that moves between memories and PEs is a `word_t`. It has a 16-bit signed value and
three tag bits:

* `valid`: the word carries data.
* `first`: first element of a window.
* `last`: last element of a window.

The AGU creates the tags together with the addresses. They follow the read data through the memory
latency, and each PE passes on the tags of its operand A with the same latency as the result.
Accumulation and write-back are therefore driven by the data itself, with no per-stage control
counters:

* an accumulating PE restarts from zero on a word tagged `first`;
* the write-back logic stores a word tagged `last`, or every valid word, depending on the mode.

Arithmetic wraps at 16 bits. Products keep the low 16 bits: the scaling is integer, with no
binary point. The filter's division by a constant is left to the host.

## Processing element (`pe`)

Each PE has two input multiplexers (A and B), each picking one of `NIN` candidate words. Behind
them sit a 16-bit ALU and a multiplier. A switch routes the results, and an output register drives
outputs A and B. Output A is fed back into the ALU and acts as the accumulator.

| op | result on output A | latency |
|---|---|---|
| `OP_ADD` | a + b | 1 |
| `OP_SUB` | a − b | 1 |
| `OP_MUL` | a × b (low 16 bits) | 1 |
| `OP_CMP` | 1 if a < b (signed), else 0 | 1 |
| `OP_AD`  | \|a − b\| (subtract, negate, select) | 1 |
| `OP_ACC` | acc += a | 2 |
| `OP_MAC` | acc += a × b, one new pair per clock | 2 |
| `OP_NOP` | invalid word | 1 |

Output B carries one of four sources, chosen by `swb`:

* the same word as output A;
* operand A, registered;
* operand B, registered;
* the product.

The pass-through settings let an unused PE forward data. The configuration is one 13-bit
`pe_cfg_t`. Changing it from one clock to the next is the PE's dynamic reconfiguration: the SIMD
core changes it between the AD and ACC passes of a SAD.

## Address generation unit (`agu`)

A start pulse loads `{base, len_x, len_y, stride_y}`. The AGU then emits
`base + y*stride_y + x` for x = 0..len_x−1 (inner loop) and y = 0..len_y−1, one address per clock,
with `valid`/`first`/`last`. A start in the clock of the last address chains the next walk with no
gap. The controllers reload `base` for every window, which moves the walk across the image.

## SIMD-1D core (`simd1d_core`)

Each PE k owns two memories: memory 2k (image, "Mi") and memory 2k+1 (coefficients or template,
then results, "Mc"). Each memory has its own AGU. In round r, PE k processes window
`w = r*NPE + k`. Its image AGU starts at `img_base + k*pe_step + r*round_step`, so one image layout
serves every lane.

* **Filter**: one MAC pass per round. Mi and Mc are read in parallel. The sum goes to
  `Mc[res_base + r]`.
* **SAD**: two passes per round. The AD pass writes \|Mi − Mc\| for every pixel to
  `Mc[scratch_base + i]`. The PE is then switched to ACC, and the accumulation pass sums the
  scratch area into `Mc[res_base + r]`. The SIMD array cannot run both operation types at once.
  That is why SAD costs twice the clocks of the filter here, while the MIMD core pipelines it.

A pass issues `len_x*len_y` addresses and then idles one clock. A 16×16 window therefore takes 257
clocks per pass. A run takes

    ceil(n_windows / NPE) * passes * (len_x*len_y + 1) + 4 clocks

where the 4 clocks drain the AGU → memory → PE → write-back pipeline. The PE operation is delayed
two clocks behind the pass counter, so that it changes exactly when the data of the new pass reach
the PE. Results go in through memory port A. The host uses that port only while the core is idle,
so write-back never conflicts with the AGU reads on port B. Windows past `n_windows` in the last
round are not written.

Configuration registers (region `RGN_CFG`, offset):

| offset | meaning |
|---|---|
| 0 | mode: 0 filter, 1 SAD |
| 1, 2 | len_x, len_y (window size) |
| 3 | image row stride |
| 4 | image base of window 0 on PE 0 |
| 5, 6 | base step per PE, per round |
| 7 | coef_base |
| 8 | n_windows |
| 9 | res_base |
| 10 | scratch_base |

## MIMD-2D core (`mimd2d_core`)

The core has `ROWS×COLS` PEs (default 4×4) and `NMEM = 2*ROWS` memories, each with its own AGU.
Three networks connect them, and a context sets all three:

* **memory → column 0**: each input mux of a column-0 PE picks any memory. Only the left column
  reads memories.
* **column c → column c+1**: each PE input picks output A (candidates 0..ROWS−1) or output B
  (candidates ROWS..2·ROWS−1) of any PE in the previous column. This is a full crossbar.
* **last column → memory**: up to `ROWS` write-back ports. Port p takes output A of right-column
  row `wb_row + p` and writes it to memory `wb_mem + p`, at `wb_base` plus that port's own count
  of words written. The ports write either every valid word or only words tagged `last`.
  Pixel-parallel mappings use one port. Window-parallel mappings use one port per row.

A **context** holds:

* the 16 PE configurations;
* per AGU: enable, base, per-window base step, window shape and row stride;
* the window count and the period between windows;
* the write-back setup;
* a "last context" flag.

Up to `NCTX` = 4 contexts are stored. One start runs them in order. Within a context the windows
follow each other every `period` clocks without draining, so the array stays a full pipeline.
Between contexts the core drains for `2*COLS+3` clocks before the next configuration takes effect.
A run therefore takes `Σ (n_windows*period + 2*COLS + 3)` clocks.

### Pixel-parallel mapping (the main mapping)

For a 16×16 window on the 4×4 array:

```
column 0   MUL/AD  MUL/AD  MUL/AD  MUL/AD      lane L: image memory (y+L) mod 4, coef memory 4+L
column 1     -      ADD     ADD      -         ADD(lane0,lane1), ADD(lane2,lane3)
column 2     -       -      ADD      -
column 3     -       -      ACC      -         -> memory 4, one word per window
```

Image row r is stored in memory `r mod 4` at `(r div 4)*W + column`. A 32-bit pack-4 write loads
rows 4q..4q+3 of one column in one transfer. For window x of the scan area starting at row y, lane
L reads image rows y+L, y+L+4, …. Its AGU starts at `((y+L) div 4)*W + x`, walks 16 columns × 4
rows with stride W, and advances by 1 per window. Because rows are spread over the memories, the
lane that a memory feeds depends on `y mod 4`. Moving to a new scan area is therefore a new context
whose column-0 selects rotate by `y mod 4`: the reconfiguration of the memory-to-PE network. Coefficient `R(i, 4g+L)` sits at
`g*16 + i` of memory 4+L. With 4 pixels per clock, a window takes 64 clocks.

### Window-parallel mapping

Each row computes a whole window by itself, as a SIMD PE does. Row L's column-0 PE runs MAC on
image memory L and coefficient memory 4+L. Columns 1..3 pass the running sum on: ADD with operand
B set to an unused candidate, which reads as an idle zero word. Four write-back ports store the
word tagged `last`, from row L into memory 4+L. Each image memory needs its own copy of the image.
A pack-4 write whose four bytes hold the same pixel loads all four copies at once. AGU L starts at
column L and steps by 4 per window group, and the period is 256. Four windows therefore finish
every 256 clocks, the same rate as the pixel-parallel mapping. This mapping needs only one column
doing work, so it also fits arrays with fewer columns.

### Context layout

Region `RGN_CFG`, offset = `ctx*256 + item`:

| item | meaning |
|---|---|
| 0..31 | PE `col*ROWS + row`: `pe_cfg_t` in bits [12:0] |
| 32+4m | AGU m: bit 31 enable, [11:0] base |
| 33+4m | AGU m: base step per window |
| 34+4m | AGU m: [7:0] len_x, [15:8] len_y |
| 35+4m | AGU m: row stride |
| 96 | n_windows |
| 97 | [3:0] wb_row, [11:8] wb_mem, [19:16] number of write-back ports (0 means 1), bit 31 write only `last` words |
| 98 | wb_base |
| 99 | bit 0: last context |
| 100 | period (clocks per window) |

## Host side: address map, control unit, AXI4-lite

Bus addresses are byte addresses. Word address bits `[20:17]` select the target: 0 is the control
unit, 1..4 the MIMD cores, 5 the SIMD core. Inside a core, bits `[16:15]` select a region, `[14:10]`
an index and `[9:0]` an offset:

| region | meaning |
|---|---|
| `RGN_MEM` (0) | memory *index*, word *offset* (16-bit, read/write) |
| `RGN_PACK4` (1) | write only: bytes 0..3 of the 32-bit data go to memories 4·*index*..4·*index*+3 at *offset*, zero-extended. Four 8-bit pixels per bus transfer. |
| `RGN_CFG` (2) | configuration registers or contexts (see above) |
| `RGN_STAT` (3) | offset 0: busy; offset 1: clocks of the last run |

A core takes writes to its memories and configuration only while it is idle.

Control unit registers:

| offset | access | meaning |
|---|---|---|
| 0 | write | bit k pulses start of core k |
| 1 | write | bit k pulses stop (abort) of core k |
| 2 | read | busy bits |
| 3 | read | sticky done bits |
| 3 | write | write 1 to clear a done bit; a start also clears it |

Cores are numbered MIMD first, then SIMD. Several cores can be started with one write, so that
computation on some cores overlaps data transfer to the others.

`axil_bridge` handles one AXI4-lite transaction at a time and ignores byte strobes. Every write
is a full word. It asserts that BVALID and RVALID are held until accepted.

## Performance of the default build

At 100 MHz, on a 16×256 image with a 16×16 window (241 windows):

| kernel | core | clocks | time |
|---|---|---|---|
| filter | one MIMD 4×4 core | 241·64 + 11 = 15435 | 0.154 ms |
| SAD | one MIMD 4×4 core | 15435 | 0.154 ms |
| filter | SIMD, 4 PEs, five image segments | 64·257 + 20 = 16468 | 0.165 ms |
| SAD | SIMD, 4 PEs, five image segments | 64·514 + 20 = 32916 | 0.329 ms |
| filter | SIMD, 9 PEs (`NPE=9`), five segments | 29·257 + 20 = 7473 | 0.075 ms |
| SAD | SIMD, 9 PEs (`NPE=9`), five segments | 29·514 + 20 = 14926 | 0.149 ms |

The times exclude host transfers. Each MIMD image memory holds exactly 4 rows × 256 columns =
1024 words, so the whole image is resident. A SIMD image memory would need all 4096 pixels. It
holds 1024 words, so the host loads five overlapping 64-column segments, and the partly filled
last round of each segment costs the extra rounds. With the image resident, 16×16 windows take
257 clocks per pass per round: 61 rounds on 4 PEs, 27 rounds on 9 PEs.

### Large images on the four MIMD cores

A 640×480 image does not fit the lane memories. With k×k windows, each lane holds
`rl = ceil(k/4)` image rows. For an 18-row window the chain pads the window to 20 rows with zero
coefficients. A scan area is therefore cut into column segments of at most `1024/rl` columns,
and the host hands the segments to the MIMD cores, which it starts together. A window takes
`k*rl` clocks:

| window | clocks per window | segments per scan area | computation per scan area (4 cores) |
|---|---|---|---|
| 12×12 | 36 | 2 | 11891 clocks |
| 18×18 | 90 | 4 | 16841 clocks |
| 24×24 | 144 | 5 (two batches) | 25366 clocks |

Sums of 24×24 products of 8-bit values wrap at 16 bits.

## Where this design departs from, or goes beyond, its source

* **Networks**: the MIMD inter-column network is a full crossbar over the previous column. The
  source shows only the links its mappings use. The write-back ports take consecutive rows and
  consecutive memories. That is enough for both mappings above, but it is not a full network.
* **Array size of the comparisons**: the single-core comparisons in the source use a 4-row ×
  3-column MIMD array. The mapping above needs four stages (MUL/AD, ADD, ADD, ACC), and an
  accumulating PE here sums only one input, so it needs four columns. The 4×4 array of the
  platform's main configuration is the default, and the clock counts above are for it. On a 4×3
  array the window-parallel mapping reaches the same filter rate.
* **Memory size**: memories are 1024 × 16 bits (2 kB). This matches the 16 kB in eight memories of
  the 4-lane cores. The 9-PE SIMD configuration in the source uses 1 kB memories instead.
  `DEPTH` is a parameter.
* **Host access**: memories are written by the host only while their core is idle. Transfer and
  computation overlap across cores, not within one core.
* **Scaling and minimum search**: there is no 1/constant scaling of filter sums, and no search for
  the minimum SAD in hardware (the host picks it). `OP_CMP` exists in the PE but no mapping uses
  it.
* **SIMD schedule**: only the window-parallel schedule is built. The pixel-parallel SIMD schedule
  would need PEs to reach other PEs' memories.
* **Vendor blocks**: the AXI timer and the vendor AXI interconnect are not included. Each core
  counts the clocks of its last run, and a plain address decoder routes the bus. The CPU and the
  external DRAM are outside this RTL.
* **Own choices**: the tag bits, opcode encodings, register and context layouts, the pack-4
  region, `NCTX` = 4, the drain lengths and all reset values.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/hmp_pkg.sv tb/tb_hmp_top.sv \
          --top-module tb_hmp_top -o sim && ./obj_dir/sim
```

Replace `tb_hmp_top` with any other testbench. `tb_hmp_top` runs the platform at its default size
end to end, over AXI, in about 10 seconds. It loads the 16×256 image into two MIMD cores (filter
and SAD), runs two-context filters on two more cores, and runs filter and SAD on the SIMD core.
It stops one core, rewrites that core's contexts while the others are still computing, and
restarts it. It checks every result and clock count. It also counts that
each mechanism happened at least once: pack-4 transfer, multi-core start, stop, context switch,
network rotation, SIMD mode switch, masked last round, sticky done, and a transfer to one core
while others compute.

To change the platform, set the parameters of `hmp_top`:

| parameter | default |
|---|---|
| `N_MIMD` | 4 |
| `N_SIMD` | 1 |
| `ROWS`, `COLS` | 4, 4 |
| `SIMD_NPE` | 4 |
| `DEPTH` | 1024 |

The address map allows up to 15 cores and 32 memories per core.
