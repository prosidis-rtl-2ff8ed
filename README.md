# PROSIDIS: a systolic coprocessor for protein similarity search

PROSIDIS slides a short amino-acid string, the *peptide* `s` (length `m`),
along a long one, the *proteome* `p` (length `n`), and scores every
alignment. For each window start `i` it computes

    M(i) = sum_{j=0}^{m-1} DM(p(i+j), s(j))      i = 0 .. n-m-1

where `DM(a,b)` is a substitution matrix (BLOSUM62) giving the similarity of
two amino acids. The sum is never allowed to go negative: whenever the
running total drops below 0 it is reset to 0 before the next term is added.
The work is `m` tiny additions per window, on 4- and 8-bit numbers, which a
general-purpose CPU does poorly and an FPGA does well when many adders work
in parallel.

This RTL implements the processor as originally built on an FPGA
prototyping board: four identical linear pipelines of `m = 24` computing
elements, each scoring one quarter of a 2,096,000-character proteome
(524,000 characters per section), plus the logic that connects them to a
host PC through a control port, a status port and two SRAM banks.

## The pipeline and its schedule

This is the part worth understanding first; everything else is plumbing.

The computation is the two-index loop nest `(i, j)`. The schedule maps
iteration `(i, j)` to **time step `t = i + j`** on **processing element
`j`**. Consequences:

* Element `j` always uses the same peptide character `s(j)`, so it keeps it
  in a register for the whole run.
* At step `t` every element needs `p(i + j) = p(t)`: the same proteome
  character. So `p(t)` is *broadcast* on a bus to all elements, and one
  character enters the chip per step.
* The partial score of window `i` leaves element `j-1` at step `t-1` and is
  needed by element `j` at step `t`: one register between neighbouring
  elements carries it. Element 0 starts every window from 0.
* Window `i` is complete at the output of the last element at step
  `t = i + m - 1`.

Picture for `m = 3` (columns are steps, entries are the window each element
works on; negative windows are discarded warm-up work):

    step t        0    1    2    3    4   ...
    element 0    w0   w1   w2   w3   w4
    element 1   w-1   w0   w1   w2   w3
    element 2   w-2  w-1   w0   w1   w2      <- result M(t-2) leaves here

After `m-1` warm-up steps one finished score leaves the pipeline every
step. A section of `n` characters therefore takes `n` steps after the
peptide has been loaded, and the results are windows `0 .. n-m-1` (the last
window `n-m` is not produced, matching the original output size of `n-m`
scores per section).

Each computing element (`prosidis_cell`) is a look-up table, an adder and a
multiplexer:

    out_M = (in_M + DM(p, s) < 0) ? 0 : in_M + DM(p, s)

### The controller

`prosidis_dp_ctrl` runs the schedule. A run has two phases:

1. **Load**: `m` cycles, strobing `read_s[j]` for `j = 0..m-1` to fetch the
   peptide; element `j` latches the returned character.
2. **Stream**: `n` cycles, strobing `read_p` to fetch `p(0) .. p(n-1)`.

Memory answers `RD_LAT` cycles after a strobe (1 for the synchronous SRAM
assumed here). The controller delays its strobes by the same amount to
decide when an element latches `s(j)` and when the pipeline steps. It counts
steps and raises `write_M` on steps `m-1 .. n-2`, when the last element's
output is a finished score.

`enable` is a level. A run starts when it is first seen high. While it is
low, no new request is issued, but data already requested is still used, so
the schedule survives pauses. `run_end` rises after the drain and stays high
until `enable` falls.

Timing with `enable` held high: `read_s[0]` one cycle after `enable` is
sampled, then `m + n` request cycles, `RD_LAT` drain cycles and `run_end`:
`m + n + RD_LAT + 1` cycles in all. That is 524,026 cycles at the default
size; the original design is quoted at `m + n = 524,024`.

## Number formats and the similarity table

| quantity | width | format |
|---|---|---|
| amino acid | 5 bits | code 0..19, codes 20..31 unused |
| `DM(a,b)` | 4 bits | two's complement, `[-8, 7]` |
| score `M` | 8 bits | unsigned, `0 .. 255` |

Amino-acid codes follow the order `I F V L W M A G C Y P T S H E D Q N K R`
(`I` = 0, `R` = 19).

The table is BLOSUM62. Its entries lie in `[-4, 11]`. The three above 7
(`W/W` 11, `C/C` 9, `H/H` 8) are saturated to 7 so every weight fits in 4
bits. Unused codes weigh 0. `prosidis_pkg` holds the matrix in its usual
`A R N D C Q E G H I L K M F P S T W Y V` order, plus the mapping from this
design's codes to that order. Each `dm_lut` builds its 1024-entry ROM from
these at elaboration time, so no data file is needed. To use another matrix,
edit `blosum62_std` and/or the saturation in `dm_weight`.

The sum inside an element is formed on 9 bits and its top bit decides the
clamp. An 8-bit sign bit would not work, because scores reach 7 x 24 = 168
for `m = 24` (224 for `m = 32`), which is above 127. Positive overflow past
255 cannot happen for `m <= 36` and is not handled.

## The FPGA around the pipelines

`prosidis_top` contains:

* `ctrl_port_mgr`: decodes host writes on the 8-bit control port. Writing
  `CMD_START` (8'h01) gives a one-cycle `go`; other codes are ignored.
* `status_port_mgr`: the 8-bit status port. It reads `STAT_IDLE` (8'h00)
  after reset, `STAT_BUSY` (8'h02) from `go` and `STAT_END` (8'h01) from
  `stop` until the next `go`.
* `bus_requester`: on `go` it raises `mem_req` to the board memory
  controller. The pipelines stay stalled (`enable` low) until `mem_gnt`
  arrives. On `run_end` it releases the banks and pulses `stop`.
* four `prosidis_pipeline` instances, each with its own controller, running
  in lockstep (an assertion checks this).
* `mem_if_bank0`: turns pipeline 0's strobes into bank-0 reads and splits
  each returned word into byte lanes.
* `mem_if_bank1`: packs the four scores of a step into one word and writes it
  to bank 1.

### Memory layout

Bank 0 (read; 32-bit words, 19-bit word address = 512K words):

| word | contents |
|---|---|
| `S_BASE + j`, j = 0..m-1 | `s(j)` in bits 4:0 |
| `P_BASE + t`, t = 0..n-1 | `p_k(t)` of section k in bits `8k+4 : 8k` |

Bank 1 (write): word `R_BASE + i` holds `M_k(i)` of section k in byte k,
for `i = 0 .. n-m-1`.

Defaults are `S_BASE = 0`, `P_BASE = m`, `R_BASE = 0`. At the default size,
bank 0 uses 524,024 words and bank 1 uses 523,976 words, both within 524,288.
Byte-aligned packing lets the host move all four sections, or all four
result streams, in one DMA.

### Host sequence

1. Write the peptide and the packed proteome words to bank 0.
2. Write `CMD_START` to the control port.
3. Poll the status port until it reads `STAT_END`.
4. Read `n - m` result words from bank 1.

### Bus protocol

`mem_req`/`mem_gnt` arbitrate both banks at once. The board must keep the
grant until `mem_req` falls. The pipelines keep returning read data and
writing results for a few cycles after each request, so the banks cannot be
taken away in mid-run; `bus_requester` asserts this rule. Bank accesses
happen only while the grant is held.

## Performance

Each step does `4 x 24 = 96` element operations and moves `4 x (5 + 8) = 52`
useful bits. At the 30 MHz the original FPGA reached, that is 2.88 x 10^9
operations/s and 1.56 Gb/s. One full run (2,096,000 characters) takes about
17.5 ms of computation.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_PIPES` | 4 | pipelines (proteome sections) |
| `M_LEN` | 24 | peptide length = elements per pipeline |
| `N_LEN` | 524000 | characters per section |
| `RD_LAT` | 1 | bank read latency, cycles |
| `ADDR_W`, `DATA_W` | 19, 32 | bank address and data width |
| `S_BASE`, `P_BASE`, `R_BASE` | 0, `M_LEN`, 0 | memory layout |

`N_PIPES` can be at most `DATA_W/8`. `M_LEN` must be below `N_LEN`. A longer
peptide (up to 36 without score overflow) or a longer section only needs new
parameter values, and bank space for the longer section.

## How this differs from the original description

Taken from the original: the schedule, the broadcast bus and the element
(LUT, adder, clamp). Also the widths, the sizes (4 x 24 elements, 524,000
characters per section), BLOSUM62 as the weighting matrix, the byte-aligned
32-bit packing, the names of the blocks and of their main signals, and the
host sequence.

Choices of this design, where the original gives no detail:

* the amino-acid code assignment, the saturation of BLOSUM62, and zero
  weight for unused codes;
* the 9-bit sign for the clamp, described above;
* the peptide held in a register per element, loaded in a phase before
  streaming;
* the strobe timing, the memory latency handling, the stall behaviour, and
  the extra start and drain cycles (524,026 cycles instead of 524,024);
* output of windows `0 .. n-m-1`; the last window `n-m`, which the
  recurrence would also allow, is not written;
* the control and status codes, the write-strobe port handshake, the
  request/grant protocol and the memory layout, including the peptide's place
  in bank 0;
* the bank size (512K x 32 per bank, four banks making up 8 MB).

Not included: the PCI bridge, the board memory controller, the SRAM chips
and the host. The testbenches model the banks, the arbitration and the host
program. A variant with eight pipelines on a larger FPGA was proposed for the
original design but is not the configuration built here; set `N_PIPES` to 8
and widen `DATA_W` to 64 to try it (that configuration has not been simulated).

## Files

    rtl/prosidis_pkg.sv        widths, codes, BLOSUM62 and the scaling function
    rtl/dm_lut.sv              weighting-matrix ROM
    rtl/prosidis_cell.sv       computing element
    rtl/prosidis_dp_ctrl.sv    data path controller
    rtl/prosidis_pipeline.sv   M_LEN elements + delay registers + controller
    rtl/ctrl_port_mgr.sv       control port
    rtl/status_port_mgr.sv     status port
    rtl/bus_requester.sv       bank request/grant and run enable
    rtl/mem_if_bank0.sv        bank-0 reads, byte-lane split
    rtl/mem_if_bank1.sv        bank-1 writes, byte packing
    rtl/prosidis_top.sv        the FPGA
    tb/tb_<module>.sv          one self-checking testbench per module
    tb/tb_prosidis_top_full.sv full-size run at default parameters
    tb/tb_prosidis_peptide32.sv FPGA re-elaborated for a 32-character peptide

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=F`. With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal \
        -y rtl -y tb +libext+.sv rtl/prosidis_pkg.sv \
        tb/tb_prosidis_top.sv --top-module tb_prosidis_top
    ./obj_dir/Vtb_prosidis_top

Replace the testbench name to run another. What each one covers:

* `tb_prosidis_top`: the whole FPGA with 300-character sections. It runs
  twice: the first run waits for a delayed grant and uses a peptide rich in
  high-weight residues, so scores go above 127. It also checks that a
  non-start command is ignored, that the status port goes busy and then End,
  the run length of `m + n + 2` cycles from request to release, every score
  against a straightforward software model, and that nothing is written past
  the last result.
* `tb_prosidis_top_full`: one run at the default size (4 x 524,000
  characters), all 2,095,904 scores checked. It simulates in about a second
  after compilation.
* `tb_prosidis_peptide32`: the FPGA re-elaborated for the longest peptide
  the formats are sized for (`M_LEN = 32`). It checks that the best possible
  score, 224, comes out intact.
* The block testbenches check the ROM against hand-written BLOSUM62
  entries, the element over random and edge inputs, and the controller's
  strobe order, counts, latency, stalls and cycle count. They also cover the
  pipeline against the loop-nest definition with random stalls, and the
  port, bus and memory-interface blocks on their own.

The testbenches need only two-state simulation. Every register in the RTL
has an asynchronous active-low reset.
