# Vecim: a RISC-V vector co-processor whose register file multiplies

Matrix multiplication on a vector processor spends most of its energy moving
operands between the vector register file (VRF) and the functional units. This
design moves the multiplier into the register file instead. Each VRF bank is a
1R1W SRAM with a small set of compute bits next to every 16-bit slot. A
vector multiply copies one operand into those bits and holds the other on the
bitlines. The copied operand is then rotated through the compute bits, and the
AND on each bitline gives one row of partial products per rotation. A few
adders beside the array turn these into products. They also add the
accumulator and, for floating point, handle exponents and rounding. Loads,
stores and all other vector instructions still run around the register file.
A small out-of-order sequencer keeps these from colliding with the in-memory
work.

The RTL follows Vecim, a RISC-V vector co-processor based on the open-source
Ara vector unit. Its main configuration is 4 lanes × 8 banks × 4 kb, which is
this RTL's default. Everything is written in synthesizable SystemVerilog
(IEEE 1800-2017). The RTL is in `rtl/` and a self-checking testbench for every
module is in `tb/`.

## Organisation of the register file

| Level | Count | Contents |
|---|---|---|
| lane | `LANES` = 4 | 8 banks plus a 64-bit memory port |
| bank | `NBANK` = 8 per lane | `WORDS` = 64 words × 64 bits = 4 kb, one read and one write port |
| slot | 4 per word | 16 bits: one BF16/FP16 element or two INT8 elements |

A vector register in this design is a **row**: the same word address in all 32
banks. That is 256 INT8 or 128 16-bit elements, 2 KiB per register and 64
registers. The register fields `vd`, `vs1` and `vs2` of an instruction are row
numbers (6 bits). Every CIM (compute-in-memory) operation runs in all 32 banks
in lock step on the same three rows.

## The in-memory multiplier (`cim_slot_mul`, `nm_accum`)

In each slot, operand A (from `vs2`) is written **inverted** into a ring of
compute bits. Operand B (from `vs1`) is latched at the bitline node. With A
rotated left by `r` positions, bitline `j` carries `B[j] & A[(j-r) mod N]`.
That is a partial-product bit of weight `2^(j + (j-r) mod N)`. Summing over
all `N` rotations gives `A·B`.

The multiply is **double-rate**. Every slot has two rings. Ring 1 is loaded
already rotated by one position, and both rings rotate by two positions per
cycle. Each cycle therefore produces the partial products of two rotations,
and an `N`-bit multiply takes `N/2` cycles.

The rings take three shapes:

| Mode | Rings per slot | Ring width | Contents | Multiply cycles |
|---|---|---|---|---|
| INT8 | 2 | 8 bits | the two bytes of the slot | 4 |
| BF16 | 1 | 8 bits | the 7 mantissa bits plus the hidden one in bit 7 | 4 |
| FP16 | 1 | 10 bits | the 10 stored mantissa bits | 5 |

`nm_accum` is the adder next to the array. Each cycle it spreads the two AND
vectors to their weights and adds them to a product register. It keeps its own
copy of the rotation count. The original design uses a 13-bit adder with 16-
and 14-bit registers. This RTL uses one full-width adder per product (20 and
16 bits), which gives the same products with simpler wiring.

## Near-memory arithmetic (`nm_int_unit`, `nm_fp_unit`)

The in-memory products are unsigned. Everything else happens beside the array.

**INT8** (`nm_int_unit`). The signed product is `U − 256·(a7·B + b7·A)`
mod 2^16, where `U` is the unsigned product and `a7`, `b7` are the sign bits.
Two operations use it:

- `vmacc` at SEW=8 keeps the low 8 bits of `vd + vs1·vs2`.
- The dot-product instruction (8b × 8b → 32b) treats each 64-bit word as two
  32-bit accumulators. It adds four INT8 products to each.

**Floating point** (`nm_fp_unit`). This unit adds the exponents, forms the
sign, aligns and adds with a sticky bit, normalises, and rounds.

- FP16 multiply: the 10-bit ring holds only the stored mantissa bits, so the
  hidden-one terms `2^20 + 2^10·(ma+mb)` are added here.
- BF16 multiply-accumulate is fused: the exact product is added to `vd` and
  rounded once.

The original design does not specify the floating-point rules, so these are
this design's choices:

- rounding is round to nearest even,
- subnormal inputs and results become zero,
- overflow gives infinity,
- infinities and NaNs on the inputs are treated as ordinary large numbers.

## A bank's operation sequence (`cim_vrf_bank`)

A CIM operation is a fixed sequence of one-cycle steps. Step 0 is the cycle
after issue.

| Operation | Steps | Read port used | Write port used |
|---|---|---|---|
| `vmacc` INT8, dot INT8, `vfmacc` BF16 | COPY, KEEP, MUL×4, ADD, WB (8) | steps 0, 1, 6 (`vs2`, `vs1`, `vd`) | step 7 |
| `vfmul` FP16 | COPY, KEEP, MUL×5, ADJUST, WB (9) | steps 0, 1 | step 8 |
| `vfadd` BF16/FP16 | read, read, ADD, WB (4) | steps 0, 1 | step 3 |

In every other cycle both SRAM ports are free, and the load/store unit and the
lane ALU use them through the bank's external ports. A new operation may be
issued in the write-back cycle of the previous one, so MACs follow each other
every 8 cycles. Bank reads are asynchronous and writes happen at the clock
edge. Assertions flag any external access that collides with the bank's own
use of a port.

## The sequencer (`vec_sequencer`, `sync_fifo`)

Instructions from the scalar CPU enter through a valid/ready handshake into an
instruction FIFO. From there they are sorted into three queues: **MEM**
(loads and stores), **CIM** (the six in-memory operations) and **ARITH**
(everything for the lane ALU/FPU and slide unit). Every cycle the head of each
queue may issue, so younger work in one queue can overtake older work stuck in
another.

A head issues when all of these hold:

1. **Its unit is free.** One CIM operation runs at a time. The load/store unit
   takes a new row in the last beat of the current one. ARITH waits for
   `arith_ready_i`.
2. **It has no register conflict.** RAW, WAW and WAR on row numbers are checked
   against three groups:
   - up to `NINF` = 8 instructions still in flight,
   - instructions issued earlier in the same cycle,
   - older instructions still waiting in the other queues. Age comes from a
     sequence number given at dispatch.
3. **Its port use fits.** Every class uses the bank ports at fixed offsets from
   its issue cycle `t`. A reservation table per bank, `HOR` cycles deep, must
   have those slots free:

   | Class | Reads | Writes |
   |---|---|---|
   | CIM MAC | t+1, t+2, t+7 | t+8 |
   | FP16 mul | t+1, t+2 | t+9 |
   | FP add | t+1, t+2 | t+4 |
   | load | — | bank b at t+1+`MEM_LAT`+b |
   | store | bank b at t+1+b | — |
   | ARITH | t+1, t+2 | t+2+`ARITH_LAT` |

The queues are tried in the order CIM, MEM, ARITH. As a result, CIM
write-backs win the write port, and a load whose write would collide waits a
cycle. The sequencer's testbench replays a short conv2d sequence (`vmacc`,
`vle16`, `vslidedown`) that shows exactly this: the load is held until its
eight bank writes no longer meet the `vmacc` write-back, and the slide, sent
after the load, issues before it.

Each instruction is acknowledged in its issue cycle, on the ack lane of its
queue, with its 4-bit id. The `ev_*` outputs pulse when a mechanism happens:
port stall, dependency stall, out-of-order issue, and two or more issued in
one cycle. They are meant for performance counters and tests. There is no
register renaming, matching the original design.

## Loads and stores (`vlsu`)

Each lane has a 64-bit memory port, so a row moves in 8 beats, one per bank.

- **Load:** beat `b` requests address `scalar + b`. The data returns
  `MEM_LAT` cycles later (`mem_rvalid_i`) and is written into bank `b` of
  every lane.
- **Store:** beat `b` reads bank `b` and writes it to memory in the same
  cycle.

The fixed-latency memory interface and the address mapping are choices of
this design. Only the 64 bit/lane/cycle bandwidth comes from the original.

## Top level (`vecim_top`) and what is outside it

`vecim_top` contains the sequencer, the load/store unit and `LANES` lanes
(`vecim_lane`, 8 banks each). The following are outside it and reached
through ports:

- **The scalar CPU.** It sends decoded instructions of type `vinstr_t` (in
  `vecim_pkg`): the op, `vd`, `vs1`, `vs2`, a 32-bit scalar used as the memory
  address, a function code and an id. Decoding RISC-V encodings is left to the
  CPU side, and no scalar results are returned.
- **Memory**, on the `mem_*` ports.
- **The lane ALU/FPU and slide unit**, taken unchanged from Ara. For an ARITH
  instruction issued in cycle `t`:
  - the top shows row `vs2` on `arith_rdata_o` in cycle t+1,
  - then row `vs1` in cycle t+2,
  - and writes `arith_wdata_i` into row `vd` in cycle t+2+`ARITH_LAT`.

`cim_done_o` marks the write-back cycle of a CIM operation.

Parameters and defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `LANES` | 4 | lanes |
| `NBANK` | 8 | banks per lane |
| `WORDS` | 64 | 64-bit words per bank (4 kb) |
| `MEM_LAT` | 4 | memory read latency (assumed) |
| `ARITH_LAT` | 2 | external ALU latency (assumed) |
| `IFIFO_DEPTH` | 4 | instruction FIFO depth |
| `QDEPTH` | 4 | depth of each issue queue |

## How far it matches the original, and where it departs

What follows the original design:

- the 1R1W bank with in-place multiply,
- inverted copy and keep,
- two rings rotating two steps per cycle (4 cycles for 8 bits, 5 for FP16's
  10-bit ring),
- the INT8/BF16/FP16 ring shapes,
- exponent, hidden-bit and adjust logic beside the array,
- the three-queue sequencer with light out-of-order issue and CIM write
  priority,
- the acknowledge to the CPU,
- the 64 bit/lane/cycle memory path,
- the 4 × 8 × 4 kb size.

Where it departs or fills in gaps:

- **Throughput.** A bank runs one operation at a time. The copy and keep of
  the next MAC are not overlapped with the current multiply. A full 256-element
  MAC row takes 8 cycles, which is 32 MAC/cycle or 64 op/cycle. The original's
  measured 31.8 GOPS at 250 MHz corresponds to about 127 op/cycle, so this RTL
  reaches half of that INT8 peak. FP16 is further behind: a multiply takes 9
  cycles per row.
- **Register mapping.** A register is one full row across all lanes and banks.
  The original does not say how RISC-V registers map onto banks.
- **Circuit level.** Transistor-level behaviour is modelled one step per clock:
  the 8T bitcell, the compute-bit latch, global-bitline sensing and their
  clock phases.
- **Sequencer details** are this design's own: the dependency rules, the port
  offsets, the queue depths, the memory latency and the ALU timing.
- **Floating-point special cases** are not handled, as described above.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/vecim_pkg.sv tb/tb_fp_ref_pkg.sv rtl/cim_slot_mul.sv rtl/nm_accum.sv \
  rtl/nm_int_unit.sv rtl/nm_fp_unit.sv rtl/cim_vrf_bank.sv rtl/vecim_lane.sv \
  rtl/sync_fifo.sv rtl/vec_sequencer.sv rtl/vlsu.sv rtl/vecim_top.sv \
  tb/tb_vecim_top.sv --top-module tb_vecim_top
./obj_dir/Vtb_vecim_top
```

Replace the top module to run another testbench.

| Testbench | What it checks |
|---|---|
| `tb_cim_slot_mul` | AND vectors of both rings at every rotation, all three modes |
| `tb_nm_accum` | products after N/2 cycles |
| `tb_nm_int_unit`, `tb_nm_fp_unit` | against integer and real-number references in `tb_fp_ref_pkg` |
| `tb_cim_vrf_bank`, `tb_vecim_lane` | every operation with its exact cycle count, and external writes during the multiply |
| `tb_sync_fifo` | order and flags |
| `tb_vec_sequencer` | the conv2d example, then 400 random instructions with a scoreboard of port use, per-row access order, unit exclusivity and ack ids |
| `tb_vlsu` | row transfers and their timing against memory and VRF models |
| `tb_vecim_top` | end to end at full size |

`tb_vecim_top` runs at full size with no parameter overrides. It acts as the
CPU, as a memory with `MEM_LAT` latency, and as an ALU that adds or XORs rows.
It sends a random program of about 640 instructions covering all instruction types and
then stores every row. The memory image must equal an in-order reference model,
and every mechanism above must occur at least once.

## Files

- `rtl/vecim_pkg.sv` holds the shared types: the instruction struct, op
  enums, and step counts per operation.
- Every other file holds one module, named after the file.
- `tb/tb_fp_ref_pkg.sv` holds the reference arithmetic used by the
  testbenches.
