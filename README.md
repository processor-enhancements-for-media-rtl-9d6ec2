# Stream coprocessor: an 8 x 3 matrix of chained 32-bit processing elements

Media decoders such as Matching Pursuit video spend most of their time in a
few regular kernels: multiply-accumulate for reconstruction, multiplication by
a reciprocal for normalization, butterflies for FFTs. They are short chains of
multiply, add, subtract and accumulate applied to long streams of 32-bit
fixed-point data. This design attaches such a chain engine to a
general-purpose CPU as a memory-mapped coprocessor. It keeps the
reconfiguration cost low by fixing almost everything:

* The coprocessor is a matrix of **8 rows x 3 processing elements (PEs)**.
  Each row processes one data stream and chains up to three operations.
  All eight rows run in lock step on eight streams.
* Each PE has a 32-bit multiplier and a 32-bit add/subtract/accumulate unit.
* Every embedded memory is wired to one PE for good. Only the result memory
  moves: it takes the output of PE1, PE2 or PE3, depending on the chain
  length.
* A 256-bit system bus moves eight 32-bit words per beat. One beat fills one
  index of a given memory in all eight rows.
* The CPU configures an instruction by writing one 32-bit configuration word
  per row and a data count. Writing a fixed "start" address launches it.
* A DMA controller with separate read and write masters moves operands in and
  results out. The CPU keeps working, and can even reconfigure the matrix,
  during those transfers.

The CPU core is not part of this RTL. Its instruction and data bus masters are
ports of the top level, `soc_top`.

## System

```
 CPU (external)              DMA controller
 instr master  data master   read master  write master   control slave
      |             |             |            |               ^
 =====+=============+=============+============+===============|====  bus_module
      |                           |                            |      (256-bit, per-slave
   ram_if                     coproc_if                    dma_ctrl    round-robin)
      |                           |
     ram                         rmx  --  matrix_ctrl (decode, config, path table,
  (1024 x 256 bit)                |                     sequencer)
                                  +-- 8 x pe_row (3 x pe, 5 x op_mem)
```

Bus word addresses are 16 bits, one 256-bit beat each. `addr[15:14]` selects
the slave:

| addr[15:14] | slave | notes |
|---|---|---|
| 0 | RAM | `addr[9:0]` at the default size |
| 1 | coprocessor | `addr[11:0]` = {region[3:0], index[7:0]} |
| 2 | DMA control | any address |
| 3 | unmapped | completes at once, reads zero |

Each slave has its own arbiter, so transfers to different slaves go ahead in
the same cycle. For example, the DMA reads RAM while it writes the
coprocessor, and the CPU fetches from RAM while the DMA fills the matrix.

### Bus handshake (`coproc_pkg::bus_req_t` / `bus_rsp_t`)

A master raises `read` or `write` and holds `addr` and `wdata` steady until it
sees `waitreq` low. For a read, `rdata` is valid in that same cycle. Each
master has one transfer in flight at a time. Concurrent assertions check that
a master keeps its request until it completes. A granted master keeps the
slave until its transfer ends. The grant then passes, round-robin, to the next
master that is requesting.

| slave | write | read |
|---|---|---|
| RAM interface | 1 cycle | 2 cycles |
| coprocessor interface | 1 cycle; stalls while the matrix is busy | 2 cycles; stalls while busy, except the status address |
| DMA control | 1 cycle; stalls while a transfer runs | 1 cycle |

## The row and its pipeline

This is the part that needs the closest reading. One row (`pe_row`) holds:

```
 op1 --\
        PE1 --+-------------------------------> result select
 op2 --/      |                                   (chain length 1/2/3)
              a                                          |
 op4 ------b- PE2 --+---------------------------> ------ +--> res memory
                    a                                    |
 op6 ------------b- PE3 ------------------------> -------+
```

* PE1 computes `f1(op1, op2)`.
* PE2 computes `f2(PE1, op4)`.
* PE3 computes `f3(PE2, op6)`.

So a three-operation row evaluates, for instance, `((op1*op2) + op4) * op6`
for every index. The memory names (op1, op2, op4, op6, res) are those of the
original architecture.

**PE operations** (`coproc_pkg::pe_op_e`): `a` is the chained operand, `b` the
PE's own memory operand. Products are signed 32 x 32 -> 64 bits. They are
shifted right arithmetically by the row's `frac` field (the fixed-point
format) and truncated to 32 bits. Sums wrap.

| op | result |
|---|---|
| `OP_MUL` | `(a*b) >>> frac` |
| `OP_ADD` | `a + b` |
| `OP_SUB` | `a - b` |
| `OP_ACC` | `acc += a`, result = acc |
| `OP_MAC` | `acc += (a*b) >>> frac`, result = acc |

Accumulators clear at the start of every instruction.

**Timing.** The sequencer reads index *i* of every operand memory of every row
in the same cycle *t*:

* the memory data is valid at *t+1*;
* PE1's registered result is valid at *t+2*;
* PE2's result at *t+3*, PE3's at *t+4*.

PE2 and PE3 therefore need their memory operand one and two cycles later than
it was read. Each PE has a small **shift register** that delays its memory
operand by 0, 1 or 2 cycles (parameter `DELAY`), so both operands of a datum
meet. A result produced by PE *k* is written to the result memory at the end
of cycle *t+k+1*. Results are stored at consecutive indices from 0, so
result *i* always lands at index *i*.

The sequencer issues one index per cycle to all rows. Rows may have different
chain lengths in the same instruction. The drain time follows the deepest
active row:

    busy cycles = count + depth + 1        (depth = longest chain, 1..3)

So each row processes one datum per cycle, and eight rows process eight per
cycle. A row configured with zero operations sits idle and leaves its result
memory alone.

## Programming the coprocessor

Coprocessor address = {region, index}:

| region | meaning |
|---|---|
| 0 | op1 memory (PE1 first operand) |
| 1 | op2 memory (PE1 second operand) |
| 2 | op4 memory (PE2) |
| 3 | op6 memory (PE3) |
| 4 | result memory (read only) |
| 8 | control: index 0 = configuration words, 1 = data count, 2 = start (write) / status (read) |

A memory beat carries lane *r* (bits `32r+31:32r`) for row *r*. The
configuration write likewise gives row *r* the configuration word in lane *r*:

| bits | field |
|---|---|
| 1:0 | `nops`: 1..3 chained operations; 0 = row idle |
| 4:2 | `op1`: operation of PE1 |
| 7:5 | `op2`: operation of PE2 |
| 10:8 | `op3`: operation of PE3 |
| 15:11 | `frac`: product shift |
| 31:16 | reserved |

The status word has busy in bit 0 and "done since last start" in bit 1.
Bit 1 is already set in the cycle busy falls, so a poll never sees both bits
clear after an instruction.
While the matrix runs, the interface stalls every access except the status
read, and the control ignores writes to the memories and to the
configuration.

The count register is 9 bits wide and holds 0..256.

DMA control: one write to the DMA region starts a transfer.

* lane 0: source beat address;
* lane 1: destination beat address;
* lane 2: number of beats.

A status read returns:

* lane 0: bit 0 busy, bit 1 done;
* lane 1: beats still to write.

`dma_irq` and `coproc_irq` pulse for one cycle when a transfer or an
instruction ends. The DMA's read and write masters are decoupled by a 4-entry
FIFO. A RAM-to-coprocessor copy moves one beat every two cycles, limited by
the two-cycle reads.

A typical sequence, as run by `tb/soc_top_tb.sv`:

1. The CPU writes the operand arrays to RAM.
2. The DMA copies them to regions 0..3. During the last copy, the CPU writes
   the configuration words and the count.
3. The CPU writes the start address.
4. The CPU programs the DMA to copy region 4 back to RAM. The DMA's reads
   wait until the instruction ends.
5. The CPU waits for `dma_irq`, or polls the DMA status.

A stalled DMA read holds the coprocessor slave. So poll the matrix status
before handing the DMA the result copy, or wait for `coproc_irq`.

## What follows the original architecture, and what is this design's own

These points follow the architecture:

* the 8 x 3 matrix and the limit of three chained operations;
* the 32-bit PEs, each with a multiplier and an add/subtract/accumulate unit;
* the memories fixed to their PEs (op1/op2 to PE1, op4 to PE2, op6 to PE3);
* the result memory switched among PE1..PE3 by chain length;
* a small fixed set of predefined paths (the "ROM" of the control block,
  here `path_rom` in `coproc_pkg`);
* the 256-bit bus carrying eight words per beat;
* one generic sequencer parameterized only by data count and chain length;
* starting by a write to a fixed address, and configuration by a
  configuration word;
* the DMA controller with read and write masters;
* the system structure: CPU, DMA, bus module, RAM and coprocessor interfaces.

These are this design's own choices, since the architecture leaves them open:

* the bus handshake, the address map, arbitration and per-slave concurrency;
* the DMA control slave, its register layout and its FIFO;
* the RAM size (1024 beats = 32 KiB) and the memory depth (256 words);
* the configuration word layout and the fixed-point shift;
* the `MAC` operation inside one PE, besides `ACC` on a chained product;
* idle rows;
* the status register and the interrupt pulses;
* the stall-while-busy rule;
* the reading of the PE's "shift register" as the operand-alignment delay.

Not covered:

* The CPU core.
* Any instruction-set extension on the CPU side. The CPU reaches the
  coprocessor only through memory-mapped loads and stores.
* A single-pass complex butterfly. A radix-2 butterfly (4 multiplies,
  2 adds, 2 subtracts) does not fit in one three-operation row. It runs in
  two passes with data moved in between (see below).

## Kernels mapped onto the matrix

In Matching Pursuit coding a video is a weighted sum of *atoms*, waveforms
taken from a dictionary. The decoder has three main steps:

1. It builds each atom's samples from a Gaussian mother function or its
   second derivative.
2. It normalizes the atom by its norm.
3. It adds `c * atom` into the frame.

The encoder spends much of its time in FFTs.

`tb/workloads_tb.sv` runs the kernels this engine was designed for on `rmx`
at full size. Each instruction takes 256 + depth + 1 cycles for 8 x 256 data.

| kernel | rows | configuration | check |
|---|---|---|---|
| atom normalization (divide every pixel by the atom norm) | 8 atoms | `MUL` by a Q24 reciprocal, `frac` = 24 | `floor(p/norm)` or one less |
| frame reconstruction, `frame += c * atom` | 8 x 256 pixels | `MUL`, `ADD` (`frac` = 12); result copied back to op4 for the next atom | exact, 3 atoms |
| pixel as a sum of atoms, `sum c_i * g_i` | one pixel per row | `MAC` | every partial sum exact |
| radix-2 FFT butterfly, Q14 twiddles | 2 groups x 256 | two passes, below | exact / within 1 LSB |
| atom samples `(4x^2 - 2) * e`, e = scaled Gaussian from a table | 8 atom lines | `MUL` (x by 4x), `SUB` 2, `MUL` e (`frac` = 12) | exact |
| atom squared norm, `sum g^2` | 8 atom lines | `MAC` of the samples with themselves | exact |

The butterfly is `X0 = a + w*x`, `X1 = a - w*x`, with `tr = xr*wr - xi*wi`
and `ti = xr*wi + xi*wr`. It needs eight operations, so it takes two
instructions:

1. Two rows per group form `p = xi*wi` and `q = xr*wi` (`MUL`).
2. The host moves `p` and `q` into the op4 memories. Four rows per group
   then compute:
   * `xr*wr - p + ar`;
   * `xr*(-wr) + p + ar`;
   * `xi*wr + q + ai`;
   * `xi*(-wr) - q + ai`.

The subtraction outputs come from the negated twiddle, so a product rounds
the other way and may differ by one LSB from `a - t`.

`tb/soc_decode_tb.sv` runs the frame reconstruction through the whole system
at its default sizes, with the CPU loop played by the testbench. For each of
four atoms:

1. The DMA copies the atom, the coefficients and the frame from RAM into
   op1, op2 and op4.
2. The matrix runs.
3. The DMA copies the result back over the frame in RAM.
4. Meanwhile the CPU writes the next atom into a second buffer.

One atom over 2048 pixels takes 2321 cycles, of which the matrix is busy for
259. The rest is four 256-beat transfers at one beat per two cycles. At this
size the system is bound by data movement, not by the matrix. Keeping
operands resident in the matrix memories between instructions, or a
single-cycle RAM read, is what would pay off.

## Sizes and parameters

| module | parameter | default |
|---|---|---|
| `soc_top` | `RAM_DEPTH` | 1024 |
| | `MEM_DEPTH` | 256 |
| | `FIFO_DEPTH` | 4 |
| `rmx` / `matrix_ctrl` | `LN` (rows) | 8 |
| | `W` | 32 |
| | `DEPTH` | 256 |
| `pe` | `W` | 32 |
| | `DELAY` | 0 |

The 256-bit bus width and the 8 lanes are package constants (`coproc_pkg`),
tied to each other as `BUS_W = DATA_W * LANES`.

## Files

* `rtl/coproc_pkg.sv`: widths, address map, PE operations, configuration
  word, predefined-path table, bus structs.
* `rtl/pe.sv`, `rtl/op_mem.sv`, `rtl/pe_row.sv`: the processing element, the
  embedded memory and a row.
* `rtl/sequencer.sv`, `rtl/matrix_ctrl.sv`, `rtl/rmx.sv`: the sequencer, the
  control block and the matrix.
* `rtl/coproc_if.sv`, `rtl/ram_if.sv`, `rtl/ram.sv`: the bus slaves and the
  RAM.
* `rtl/bus_arbiter.sv`, `rtl/bus_module.sv`: the interconnect.
* `rtl/sync_fifo.sv`, `rtl/dma_ctrl.sv`: the DMA controller.
* `rtl/soc_top.sv`: the system.
* `tb/*_tb.sv`: one self-checking testbench per module.
* `tb/ref_pkg.sv`: the reference model of a row, shared by the matrix
  testbenches.
* `tb/workloads_tb.sv`: the media kernels above, run on the matrix.
* `tb/soc_decode_tb.sv`: frame reconstruction through the whole system.

## Simulating

Every testbench checks its module against values it computes itself. Each one
has a watchdog, and ends by printing `TB_RESULT checks=N failures=M`. To run
one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module soc_top_tb \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/coproc_pkg.sv tb/ref_pkg.sv tb/soc_top_tb.sv
./obj_dir/Vsoc_top_tb +verilator+rand+reset+2
```

Replace `soc_top_tb` with any other testbench name. `tb/soc_top_tb.sv` runs
the whole system at the default sizes:

* two instructions, the first over all 256 entries with chains of 1, 2 and 3
  side by side;
* checks of every result word and of the matrix busy time;
* counts of the mechanisms involved: chain lengths, DMA in and out,
  reconfiguration during DMA, stall on a busy matrix, status poll while busy,
  RAM contention, instruction fetch during DMA.

The run takes a few seconds. `tb/rmx_tb.sv` exercises the matrix alone over
full 256-entry streams.
