# Vicuna: a timing-predictable RISC-V vector coprocessor

A hard real-time system needs a safe bound on the worst-case execution time (WCET) of its programs. To get that bound, the timing of each part must be analysable on its own, and the parts' worst cases must add up to the whole's worst case. Fast processors break this in two ways:

- A local speed-up can make the whole program slower. For example, a cache hit can change the order in which units are chosen.
- A small local delay can grow into a larger global one. For example, reordered bus accesses can do this.

These are called *timing anomalies*. Vicuna adds data-parallel throughput without creating them. It is a vector coprocessor for a small in-order RV32 core, and it implements a subset of the RISC-V "V" extension (draft 0.10).

The design relies on a few rules, and everything else follows from them:

1. **One unit per instruction type.** The unit is never chosen at run time. Each unit takes a fixed number of cycles that depends only on the instruction, the unit's width and the current vector length `vl`.
2. **Strictly in-order issue from a queue.** A stage may be stalled only by a later stage, never by an earlier one or by the main core.
3. **Vector execution units never stall.** The one exception is the load/store unit on a data-cache miss.
4. **Memory is accessed in program order.**
   - The vector core always has precedence in the shared data cache.
   - A main-core memory access that misses in a cache waits until the vector loads and stores handed over before it have finished.
   - When the main core's own data access and its instruction fetch both miss, the data access goes first.

This repository gives synthesizable SystemVerilog for the coprocessor and its memory system. The default parameters are the largest ("fast") configuration:

- 2048-bit vector registers
- a 1024-bit multiplier datapath, which performs 128 8-bit multiply-accumulates per cycle
- a 128 kB data cache

The main core itself is not included. Its three interfaces are ports of the top module `vicuna_top`:

- the coprocessor interface
- the data port
- the fetch port

## The system

```
            coprocessor interface
main core ----------------------> vproc_core --VLSU--> port 0 -+
   | data port                                                  | data cache ----+
   +------------------------------------------------> port 1 ---+ (2-way, LRU)   |
   | fetch port                                                                  +--> mem_arbiter --> external memory
   +------------------------------------------------> instruction cache ---------+     ^
                                          vec_pending (vector load/store pending) -----+
```

| Module | Role |
|---|---|
| `vicuna_top` | Coprocessor, data cache, instruction cache and memory arbiter |
| `vproc_core` | Decoder, queue, issue logic, five units, register file, write-port sharing |
| `vproc_decoder` | Decodes, acknowledges and executes `vsetvl`/`vsetvli` |
| `vproc_queue` | In-order instruction FIFO (depth 4) |
| `vproc_dispatcher` | Issues the head when its unit is free and no register hazard remains |
| `vproc_vlsu` | Unit-stride vector loads and stores |
| `vproc_valu` | Integer ALU built from fracturable adders (`vproc_frac_adder`) |
| `vproc_vmul` | Multiplier and multiply-accumulate built from `vproc_frac_mul` |
| `vproc_vsldu` | Slide up and slide down |
| `vproc_vidxu` | Register gather and scalar moves; the only unit that returns a scalar |
| `vproc_vregfile` | 32 vector registers as an XOR-based multi-ported RAM |
| `vproc_wport_arb` | Shares one write port between two units |
| `cache` | Two-way LRU cache with two ports; port 0 has precedence |
| `mem_arbiter` | Orders external memory traffic |
| `vproc_pkg` | Shared types: the decoded instruction, unit and operation codes |

## Coprocessor interface and the decoder

The main core offers every vector instruction:

- `instr_valid_i` is held high together with `instr_i`, `rs1_i` and `rs2_i`.
- These stay stable until `instr_ack_o`.

In the acknowledge cycle the decoder also drives two flags:

- `instr_wait_o` says that a scalar result will follow. The main core must stall until `res_valid_o`.
- `instr_illegal_o` says that the instruction is not supported and was dropped.

The decoder acknowledges only when the queue has room. A full queue therefore stalls the main core, which is the only way the vector side slows the scalar side down.

Two instructions return a scalar:

- `vsetvl` and `vsetvli` are executed by the decoder itself. It computes `vl = min(AVL, VLMAX)` and returns the new `vl` one cycle after the acknowledge. Nothing is queued.
- `vmv.x.s` returns its result from the VIDXU when it executes.

`vtype` uses the 0.10 layout:

| Bits | Field |
|---|---|
| 1:0 | vlmul[1:0] |
| 4:2 | vsew |
| 5 | vlmul[2] |

Any of the following sets `vill`:

- LMUL other than 1
- SEW above 32
- a reserved bit set

`vill` is also set after reset. While `vill` is set, every vector instruction except `vsetvl(i)` is refused.

## Issue: queue, hazards and one unit per type

Decoded instructions wait in `vproc_queue`. Each entry holds the unit, the operation, the registers read and written, the scalar operand, and the `vl`/SEW in force when the instruction was decoded.

`vproc_dispatcher` looks only at the head of the queue. It issues the head when both of these hold:

- the head's unit is not occupied;
- no occupied unit has a register conflict with the head. A conflict is one of:
  - the occupied unit writes a register the head reads or writes (RAW, WAW);
  - the occupied unit reads a register the head writes (WAR).

Each unit records two 32-bit masks at issue: the registers it reads and the registers it writes. One instruction can issue per cycle.

A unit that may lose a write-port collision keeps its masks for **one cycle after it finishes**. This applies to the VALU and the VIDXU. The rule holds whether or not a collision actually happened. The result is that the time at which a dependent instruction can issue never depends on what another unit did.

## Shared write ports

The register file has three write ports for five units. Each unit reads and writes whole registers, with byte enables:

| Port | Precedence | Gives way |
|---|---|---|
| 0 | VLSU | VALU |
| 1 | VMUL | – |
| 2 | VSLDU | VIDXU |

`vproc_wport_arb` handles each shared port:

- The precedence unit always writes in the cycle it asks.
- If the other unit asks in the same cycle, its address, data and byte enables go into a one-entry buffer. That write happens in the next cycle.
- Neither unit finishes another instruction within two cycles, so a second collision cannot arrive while the buffer is full.

The buffered write is at most one cycle late. The issue logic already adds that cycle for the unit that gives way, so the write never becomes visible later than the hazard logic assumes.

## Functional units and their timing

All units except the VLSU work the same way:

1. Read the source registers whole, one per cycle, through the unit's own read port. Register-file reads have one cycle of latency.
2. Consume the operands from shift registers, one datapath-width part per cycle.
3. Collect the results in a result shift register.
4. Write the whole register back in one cycle, with byte enables that cover the first `vl` elements. Tail bytes keep their old value.

`busy_o` is high from the cycle after issue up to and including the write cycle. Every count below is a function of the instruction and `vl` only.

- **VALU** (`ALU_W` = 512 bits per cycle)
  - Operations: add, sub, rsub, and, or, xor, min, minu, max, maxu, sll, srl, sra, and move, in .vv, .vx and .vi forms.
  - Time: one read cycle per source register, 1 cycle of read latency, ⌈vl·SEW/ALU_W⌉ part cycles, 2 pipeline cycles, 1 write cycle.
  - The adders are `vproc_frac_adder`: four 8-bit adders whose carries are joined or cut, giving four 8-bit, two 16-bit or one 32-bit add per 32-bit lane.
- **VMUL** (`MUL_W` = 1024 bits per cycle)
  - Operations: vmul, vmulh, vmulhu, vmulhsu, vmacc, vnmsac.
  - It has two read ports, so vs1 and vs2 arrive in the same cycle. The accumulator is read in the next cycle.
  - Time: 1 read cycle (2 with an accumulator), 1 cycle of latency, ⌈vl·SEW/MUL_W⌉ parts, 2 pipeline cycles, 1 write cycle.
  - At the default size, a full 256-byte `vmul.vv` writes back 7 cycles after it issues.
  - `vproc_frac_mul` returns four 8-bit, two 16-bit or one 32-bit product per lane, in signed and unsigned forms, low or high half.
- **VSLDU**
  - Operations: vslideup and vslidedown by a scalar or an immediate offset, plus vslide1up and vslide1down.
  - The source register is shifted by `offset·SEW/8` bytes in one step. The byte enables select the elements the instruction changes.
  - vslide1up and vslide1down shift by one element and insert the scalar operand into the freed element: element 0 for up, element `vl-1` for down.
  - Time: always 3 cycles (read, shift, write), whatever the offset.
- **VIDXU**
  - Operations: vrgather (.vv, .vx, .vi), vmv.s.x and vmv.x.s.
  - A gather handles one element per cycle, so it takes vl cycles between the reads and the write.
  - The scalar moves skip that phase. `vmv.x.s` ends with a one-cycle pulse on `res_valid_o` in place of a register write.
- **VLSU**
  - Operations: unit-stride loads and stores of 8-, 16- or 32-bit elements. The element width must not exceed SEW.
  - It makes one 32-bit data-cache access per word.
  - A load collects the words and writes the register once.
  - A store reads the register first, then writes only the bytes that belong to the first `vl` elements.
  - A cache hit completes in the cycle it is presented. A miss stretches only that access.
  - Time without misses: ⌈bytes/4⌉ + 1 cycles for a load and + 2 for a store.
  - The base address must be word aligned. An assertion checks this.

## XOR-based register file

`vproc_vregfile` has 32 registers of `VREG_W` bits, three write ports and six read ports:

- one read port each for the VLSU, VALU, VSLDU and VIDXU;
- two read ports for the VMUL.

It is built from plain single-write RAMs:

- Write port *w* owns a bank, and the bank is copied once per read port, so every copy has one write and one read port.
- A write to register *r* through port *w* stores `data XOR (the other banks' contents of r)`.
- A read XORs the copies of all banks, which returns the last value written by any port.

Byte enables work directly, because each byte lane is independent. This is what lets a unit update only some elements of a register.

The `XOR (other banks)` term needs the other banks' current contents in the same cycle. Each bank therefore has an extra copy for every other write port, which is read asynchronously at that port's write address.

Reads are registered: an address in cycle *t* gives data in *t*+1. A write in cycle *t* is visible to reads from *t*+1 on. The issue logic guarantees that two ports never write the same register in the same cycle. The arrays start at zero, as FPGA block RAM does.

## Shared data cache

`cache` is two-way set associative, with one LRU bit per set and 32-byte lines. It handles one request at a time:

- **Read hit:** completes combinationally in the cycle it is presented.
- **Read miss:** fills the LRU way with eight word reads sent back to back, then completes as a hit.
- **Writes:** write-through without allocation. A write updates the cached copy if the line is present, and completes when memory acknowledges it.

When both ports ask in the same cycle, port 0 is served; port 0 is the vector core.

Each transaction the cache sends to memory carries two flags:

- `m_scalar_o` marks a main-core transaction. If the arbiter holds it back, the cache withdraws the attempt and stays free. The vector port can therefore still be served while a main-core miss waits for the vector core.
- `m_last_o` marks the last beat of the transaction.

The instruction cache is the same module, read-only, with port 0 tied off.

## Memory arbiter: program order on the bus

`mem_arbiter` is what keeps the vector core and the main core from reordering each other's memory traffic. The vector core drives `vec_pending`, which is high while a load or store is queued, being issued, or executing. The arbiter applies these rules:

- A transaction from the vector core may always start.
- A main-core data transaction, or any instruction-cache transaction, is held while `vec_pending` is high. `ev_mem_hold_o` pulses every cycle this happens.
- If the data cache and the instruction cache both ask, the data cache goes first.
- Once a transaction is granted, the arbiter stays with it until its last beat is granted.
- A new transaction starts only after every response of the previous one has returned. Responses are therefore always routed back to the right cache.

External memory protocol:

- one 32-bit word per beat;
- `mem_req_o` is held until `mem_gnt_i`;
- each beat, read or write, gets one `mem_rvalid_i`, in order, after the memory's latency.

The testbenches use a memory with a 5-cycle latency.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `VREG_W` | 2048 | Vector register width in bits. 128 and 512 give the smaller configurations. |
| `MUL_W` | 1024 | Multiplier datapath width. The small and medium configurations use 32 and 128. |
| `DC_SIZE` | 131072 | Data cache size in bytes. The small and medium configurations use 8 kB and 64 kB. |
| `ALU_W` | 512 | ALU datapath width. This design's choice. |
| `Q_DEPTH` | 4 | Instruction queue depth. This design's choice. |
| `IC_SIZE` | 8192 | Instruction cache size in bytes. This design's choice. |
| `LINE_B` | 32 | Cache line size in bytes, for both caches. This design's choice. |

Constraints:

- `VREG_W`, `ALU_W` and `MUL_W` must be powers of two, with `ALU_W` and `MUL_W` no wider than `VREG_W`.
- `vl` is at most `VREG_W/SEW`.

## Instruction subset and departures from the original design

Built:

- `vsetvl` and `vsetvli`
- the integer ALU, multiply, slide and gather instructions listed above
- `vmv.s.x` and `vmv.x.s`
- unit-stride `vle8/16/32` and `vse8/16/32`

All of these are unmasked, with LMUL = 1 and SEW of 8, 16 or 32.

The original Vicuna supports the complete integer and fixed-point part of the 0.10 draft. This implementation departs from it in these ways:

- **Missing instructions.** Not implemented:
  - masked execution (`vm = 0` is refused)
  - register groups (LMUL ≠ 1)
  - fixed-point and saturating arithmetic
  - widening and narrowing operations
  - compares and mask-register operations
  - reductions and division
  - `vmadd` and `vnmsub`
  - `vcompress`, `viota`, `vid`, `vpopc` and `vfirst`
  - strided, indexed and segment memory accesses
  - unaligned base addresses

  Unsupported encodings are acknowledged with `instr_illegal_o`.
- **Write-port pairing.** Pairing the VLSU with the VALU, with the VLSU first, is from the original. Pairing the VSLDU with the VIDXU, and giving the VMUL its own port, is this design's choice.
- **Holding main-core traffic.** The arbiter holds *every* main-core memory transaction while vector loads or stores are pending, not only those that follow a cache miss. Hits are not affected, because they never reach the arbiter. This is at least as strict as the original rule.
- **Unit internals.** The sizes of the ALU, queue, caches and lines, the cycle-by-cycle sequence inside each unit, the one-element-per-cycle gather rate and the one-step slide are this design's own choices. The original states only that each unit's time depends on the instruction, the unit's throughput and `vl`.
- **Write-back buffer.** The original is not specific about the gate-level structure of the collision buffer; `vproc_wport_arb` is one way to build it.
- **Main core.** Not included. The original uses a two-stage RV32 core extended with this coprocessor interface.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- drives random stimulus with `$urandom`;
- compares against a reference model;
- checks cycle counts for the timing claims above;
- stops with a watchdog;
- prints a single line, `TB_RESULT: pass=... failures=N`.

`tb/rvv_enc_pkg.sv` provides two things:

- instruction encoders;
- a reference model, class `vref`, with the register state, the memory, `vl`/SEW, and a random instruction generator.

`tb/ext_mem_model.sv` is a behavioural external SRAM with 5-cycle latency.

`tb_vproc_core` runs 4000 random instructions on a 128-bit core. It then compares all registers and memory against the model. It also requires that each of these events happened at least once:

- hazard stalls
- unit stalls
- a full queue
- write-port collisions on both shared ports
- scalar waits

`tb_vicuna_top` runs the whole system. It mixes three kinds of traffic:

- a random vector program
- random main-core data accesses
- instruction fetches

It also runs directed cases:

- a main-core miss behind a long vector load, which must wait;
- simultaneous data and fetch misses, where the data access must be served first;
- the multiplier latency;
- a loop that forces a write-port collision.

Its parameter `FULL` selects the small size or the default size. `tb_vicuna_top_full` instantiates it with `FULL = 1`, which is `vicuna_top` with no parameter overrides. That run takes about 20 s.

`tb_vicuna_workloads` runs three 8-bit benchmark kernels on the full-size system and checks every result byte:

- AXPY, `Y <- a*X + Y`, with n = 1000: 2903 cycles.
- Matrix multiply on 32x32 matrices: 14 759 cycles. Each `A[i][k]` is loaded by the main core through the data port, and that load must wait for the pending vector loads.
- 3x3 convolution on a 64x12 image: 2589 cycles. It uses `vslidedown` to form the neighbouring pixels.

The sizes are kept small so the run finishes in seconds. Larger sizes run the same code with strip-mining.

### Simulating with Verilator

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/vproc_pkg.sv tb/rvv_enc_pkg.sv tb/tb_vicuna_top_full.sv \
    --top-module tb_vicuna_top_full
./obj_dir/Vtb_vicuna_top_full
```

Replace the file and top name to run any other testbench. Verilator may print style warnings; add `-Wno-fatal` if your version treats them as errors. Synthesis of the full-size configuration builds 2048-bit datapaths and six-copy register banks, so expect long run times for the top and the core.

### Lint warnings that remain

All remaining warnings are explained in the opening comment of the module that produces them:

- **SYNCASYNCNET.** Assertions use `disable iff (!rst_ni)` on an asynchronously reset design.
- **Unused outputs.** The instruction cache's write-side outputs are never used.
- **Unused fields.** Some decoded-instruction fields are not used by every unit.
- **Unused `vtype` bits.** The `vta`/`vma` bits of `vtype` are accepted and ignored.
- **Unused carry.** The multiplier leaves the adder carry output unconnected.
