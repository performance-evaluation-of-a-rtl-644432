# EMAX: a ring-connected array of memory-owning processing elements for 3D stencils

EMAX is an accelerator made of a matrix of processing elements (PEs). Each PE
has its own small local memory (LMM), an address generator and two arithmetic
units. A program is mapped onto the array like a dataflow graph: every PE
holds one instruction and executes it once per cycle, `count` times. A
partially built set of register values flows down the array, one row per
cycle, so the array produces one result per cycle once the pipeline is full.

This RTL targets stencil codes such as the 7-point (degree 1) and 19-point
(degree 3) 3D Jacobi kernels on double-precision data. Two structural ideas
cut the traffic between the array and external DRAM:

* **X neighbours come from a FIFO.** A PE streams one X row of the grid out of
  its LMM. Each word is also placed on the row's common data path. Every PE in
  that row keeps a short window of recent words (the LMM_FIFO), so the points
  x-1, x and x+1 are loaded from FIFO taps. The row is read from memory only
  once.
* **Y neighbours come from LMMs that stay put while the instructions move.**
  When the kernel moves from row y to row y+1, the streams for y and y+1 are
  already in LMMs. Between two activations the instructions are shifted by
  `dist` rows around the ring, and the LMM contents stay where they are. An
  instruction that needs the old stream finds it in the LMM of its new
  position, so only the new stream is fetched from DRAM.

## Array and ring

`emax_array` holds `ROWS x COLS` PEs (default 88 x 4, which gives 352 PEs).
Each PE stores its instruction plus the *logical* row that instruction belongs
to. A `rot` pulse moves every instruction, with its logical row number, one
physical row down; the bottom row wraps around to the top. The LMMs are not
moved.

The register bundle is `NREG` = 16 slots of 64 bits:

* Row r takes its input bundle from the output register of row r-1. Row 0
  wraps around to take from the last row.
* The row that currently carries logical row 0 starts from an all-zero bundle
  instead.
* A PE reads its operands from the incoming slots. Slot number `NREG` means the
  instruction's constant (RGI).
* A PE can write its ALU result and/or a loaded word into slots of the outgoing
  bundle. The ALU result wins over a load, and later columns win over earlier
  ones.

## Timing of an activation

The controller counts a global cycle `g`. The row carrying logical row `L`
works on iteration `lt = g - PRE - L`, and it is active while `0 <= lt < count`.
`PRE = FIFO_DEPTH + 2` leaves room for the memory streams to run ahead of the
first iteration.

A PE with `lmm_rd` set streams its LMM through its address generator:

* In cycle `lt` it reads element `j = lt + lead + 1`, for `0 <= j < count + lead`.
* The LMM has a one-cycle read, so in iteration `i` FIFO tap `k` holds element
  `i + lead - k`.
* A stencil with a halo of `h` points uses `lead = h`. Taps `0 .. 2h` then
  give x+h down to x-h.
* Each LMM row in DRAM carries `h` halo words at each end, so element `e` is
  grid point `x = e - h`.

A store (`st_en`) writes the ALU result of iteration `i` to LMM word `base +
i*stride`. An activation lasts `PRE + ROWS + count + 1` cycles.

## Controller (`emax_ctrl`)

One `start` runs `n_act` activations. Each activation goes through these
steps:

1. **Prefetch.** The controller visits every PE in row-major order. For each
   PE whose instruction asks for data, it copies `dlen` words from DRAM
   address `ddr_addr + k*ddr_step` into LMM words `0..dlen-1`. Here `k` is the
   activation number. `PF_EVERY` PEs are loaded before every activation.
   `PF_FIRST` PEs are loaded only before the first one; after that their data
   is reused (`stat_pf_skip` counts these reuses).
2. **Execute.** The controller clears the address generators, then runs `g`
   from 0 to `PRE + ROWS + count`.
3. **Drain.** For every PE with `drain` set, LMM words go back to DRAM.
4. **Shift.** The controller pulses `rot` `dist_rows` times. (The port is not
   called `dist` because that is a SystemVerilog keyword.)

The DRAM port moves one 64-bit word at a time:

* `ddr_req` is held until `ddr_gnt`. An assertion checks this.
* Read data comes back later on `ddr_rvalid`.
* Only one read is outstanding at a time.

## Instruction word (`pe_cfg_t` in `emax_pkg`)

An instruction has the written form `@row,col,dist [count] ALU_OP RGI & MEM_OP
RGI LMM_CONTROL`. Here it is held already decoded, as a packed struct:

* **EX1.** The operation, three operand slots and their `{f,h,l}` field selectors.
* **EX2.** The operation, a second operand slot and a per-lane shift.
* **ALU result.** The destination slot and the RGI constant.
* **Load.** Width, destination slot and FIFO tap. `fifo_bus` chooses whether
  the FIFO is fed by the row data path or by the PE's own LMM.
* **Stream.** `lmm_rd`, `bus_drv`, `lead`, `base` and `stride`.
* **Store.** The `st_en` flag.
* **DMA.** The prefetch mode, DRAM address and step per activation, length,
  and the drain flag.

`count`, `dist` and the activation count are shared by all PEs. They are
inputs of the top, not fields of each instruction.

## Arithmetic units

**EX1** (`emax_ex1`) has these operations:

* 32-bit add/add3/sub/sub3.
* 16bit[2] SIMD mauh, mauh3, msuh, msuh3, mmax, mmax3, mmin, mmin3 and mmid3
  (median).
* mluh: each 16-bit lane times a 9-bit Y.
* mh2bw: saturate four lanes to bytes and pack them.
* Double-precision fmul, fadd and fma3 (X + Y*Z).

The floating-point units round to nearest-even and flush subnormals to zero.
fma3 rounds after the multiply and again after the add, like a separate
multiply followed by an add.

**EX2** (`emax_ex2`) has and/or/xor and two-lane add/subtract, followed by an
optional arithmetic right shift of each lane.

## Files

| file | content |
|---|---|
| `rtl/emax_pkg.sv` | sizes, opcodes, instruction struct |
| `rtl/fp64_mul.sv`, `rtl/fp64_add.sv` | combinational FP64 multiply and add |
| `rtl/emax_ex1.sv`, `rtl/emax_ex2.sv` | arithmetic units |
| `rtl/emax_eag.sv` | address generator: base + k*stride, with an access counter |
| `rtl/emax_lmm.sv` | single-port 1024 x 64 local memory (8 KB) |
| `rtl/emax_lmm_fifo.sv` | 8-deep shift-register window with a tap multiplexer |
| `rtl/emax_pe.sv` | one PE |
| `rtl/emax_array.sv` | PE matrix, ring, row data path, instruction shift |
| `rtl/emax_ctrl.sv` | activation sequencer and DMA |
| `rtl/emax_top.sv` | controller plus array |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ddr3_model.sv` | behavioural DRAM with random grant stalls and read latency |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/emax_pkg.sv tb/tb_emax_top.sv --top-module tb_emax_top
    ./obj_dir/Vtb_emax_top

`tb_emax_top` runs the top at its default size, 88 x 4 PEs. It runs a
7-point Jacobi stencil:

* 320 points per X row, 4 activations along Y, `dist` = 1.
* The X-row stream is shared over the row data path.
* The Y-1 and centre streams are reused from LMMs after the first activation.

Every result word is compared with a double-precision reference computed in
the same order of operations. The testbench also checks the number of words
prefetched, reused, drained and shifted, and the execution cycle count. It
counts a failure if any mechanism never happened: prefetch, reuse, shift, row
data path, drain or a DRAM wait. The build takes about half a minute and the
run a few seconds.

The block testbenches use smaller arrays (4 rows) where that keeps them short.

## Departures and limits

* **Array size.** 88 x 4 is inferred: 352 PEs, and a degree-3 pattern of 11
  rows times 8 parallel copies. The mapping rules also discuss arrays with 7,
  8, 11 or 12 columns; `COLS` is a parameter.
* **Missing operations.** The misc operations mmrg3, msad, minl, minl3 and
  mcas are not built, because their exact function is not defined.
* **Store width.** Stores are always 64-bit; byte and half stores (stb/sth)
  and the conditional store (cst) are missing. Loads support all widths.
* **Outside the RTL.** The host link (USB 3.0), the host processor and DRAM
  are not part of the RTL. The DRAM port is a plain request/grant interface,
  and instructions are written directly through `cfg_we`.
* **Instruction encoding.** Instructions are decoded structs, not a binary
  instruction format. Fetching instructions from memory is not modelled.
* **FIFO depth and slot count.** FIFO depth (8) and slot count (16) are
  chosen. Eight taps cover the x-3..x+3 neighbours of degree 3.
* **Generating instructions.** The stencil library that turns a kernel into
  instructions and unrolls it in Z is software and is not included. The
  top-level testbench writes its instructions by hand.
