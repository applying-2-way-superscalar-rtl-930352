# 2-way superscalar out-of-order 32-bit RISC core

This core fetches, decodes, dispatches and retires **two instructions per clock**.
Between dispatch and retirement, instructions run **out of order**. They wait in
reservation stations until their operands are ready. A 32-entry reorder buffer (ROB)
then puts them back into program order.

A combined local/global branch predictor with a BTB keeps the two-instruction fetch
stream going. It is backed by a prediction queue and a return stack. Memory is
two-level:
- 32 KB instruction cache (IL1) and 32 KB data cache (DL1);
- a shared 256 KB unified L2 (UL2) with a store gathering buffer;
- an AHB-Lite bus interface for burst line transfers.

Everything is synthesizable SystemVerilog 2017 in `rtl/`, one module per file. Each
block has a self-checking testbench in `tb/`. Each file opens with a comment that
describes its function, interface and timing.

## Pipeline overview

```
IF0 -> IF1 -> DEC -> DP -> ISU -> EX -> (M0 -> M1 for loads) -> retire
```

| Stage | Module(s) | What happens |
|---|---|---|
| IF0/IF1 | `fetch_unit`, `il1_cache`, `btb`, `btb_lookup`, `branch_predictor`, `prediction_queue`, `return_stack`, `instruction_queue` | A state machine (IQ_SM) requests 16-byte lines. Each line holds 4 instructions. Fetch looks up the IL1 and its 1-entry prefetch buffer (PB) and predicts branches. Instructions enter a 10-entry instruction queue (IQ), which hands out two per cycle. |
| DEC | `decoder` (x2), `skid_buffer` | Two decoders work in parallel and their output is registered. When dispatch stalls, the skid buffer holds the pair that was already in flight and replays it once the stall clears. |
| DP | `dispatch_stage`, `register_file`, `rob` | Renaming maps each source register to a value or to the ROB tag of its producer. Two ROB entries are allocated per cycle. |
| ISU | `reservation_station` (x5) | ALU0RS and ALU1RS: 4 entries each, issue out of order. LSRS: 6 entries, BRRS: 4, MULTRS: 4; these three issue in order. |
| EX | `alu` (x2), `ls_addr_calc`, `branch_unit`, `mult_unit` | One cycle for the ALUs, address generation and branches. Two cycles for multiplies. |
| M0/M1 | `dl1_cache` | Data cache access. |
| Retire | `rob` | Up to two instructions retire per cycle, in order. |

Results travel on six result buses: ALU0, ALU1, LOAD, STORE, BR and MULT. Each bus
marks its ROB entry done. It also wakes up every reservation-station operand that waits
for that tag. A woken instruction can issue in the same cycle as the broadcast.

## Out-of-order core

**Reorder buffer.** The ROB is circular and holds 32 entries. A ROB tag is simply the
entry number.

Up to two instructions retire per cycle. Retirement writes the register file, which
therefore always holds the architectural state. Within one cycle at most one store and
one branch retire.

A mispredicted branch, or an instruction that raised an exception, retires alone and
raises `flush`:
- every younger instruction is discarded;
- the speculative predictor state is restored from its retirement copy;
- fetch restarts at the correct target, or at the exception vector `0x180` with the
  faulting PC in `epc`.

**Renaming.** Dispatch reads the register file and the ROB. For each source operand it
produces one of three things:
- the architectural value;
- the finished result that still sits in the ROB;
- the producer's tag.

The second instruction of a pair also sees the first one's destination.

**Loads and stores.** Addresses are computed in EX. Stores are kept in the ROB and
written to the DL1 and the L2 only at retirement, so nothing speculative reaches
memory. A load leaves LSRS only when no older store remains in the ROB.

**Multiplier.** MULT/MULTU write an internal upper/lower product pair, read back with
MFUP/MFLP. Because this write happens at execute, a multiply starts only when it is the
oldest instruction. Reads of coprocessor 0 registers (MFC0) go through the multiplier's
result multiplexer to an external CP0 read port.

## Branch prediction

| Structure | Size | Role |
|---|---|---|
| Local history table | 256 x 2-bit counters, indexed by PC[9:2] | per-branch bias |
| Global history table | 256 rows x 32 bits (16 counters per row) | final direction |
| GHR | 10 bits, speculative copy and retirement copy | recent branch outcomes, shifted in LSB first |
| BTB | 1K entries, 4-way, tree pseudo-LRU | target and kind (conditional, jump, call, return) |
| BTB lookup buffer | 16 entries | keeps the PLRU bits of a lookup until the BTB is updated |
| Prediction queue (PQ) | 16 entries | everything the prediction used, for training at retirement |
| Return stacks | 8 entries; fetch copy and retirement copy | return address prediction |

The global table row is selected by `PC[9:2] ^ GHR[7:0]`. The counter within the row is
selected by the local counter and `GHR[9:8]`. Bit 1 of the chosen 2-bit counter is the
predicted direction and bit 0 its strength.

After reset, both history tables are swept to "weakly not taken", one row per cycle for
256 cycles. Predictions made during this sweep are not-taken.

## Memory hierarchy

- **IL1.** 32 KB, 4-way, 16-byte lines, PLRU replacement, 1-entry prefetch buffer.
  Misses go to the UL2.
- **DL1.** 32 KB, 4-way, 16-byte lines. It is non-blocking, with a 2-entry miss buffer
  (PB):
  - a second miss can be outstanding while hits continue;
  - a third miss while the PB is full returns a *replay*, and the load is re-sent from
    LSRS.

  Stores are write-through and do not allocate a line on a miss.
- **UL2.** 256 KB, 4-way, 64-byte lines, shared by both L1s, hit latency parameter
  `HIT_LAT` (default 4). Stores update a hitting line and always pass through the
  **store gathering buffer**. The buffer collects bytes of one 64-byte line and writes
  the line to the bus once every byte is present. It is written out early on a store to
  another line, or before the L2 reads that line from the bus.
- **BIU.** An AHB-Lite master. Line fills and line writes use INCR16 bursts of 32-bit
  beats. Byte strobes (`hwstrb`) mark the valid bytes of a partial line.

## Instruction set

The instructions use a MIPS-style layout: `op[31:26] rs[25:21] rt[20:16] rd[15:11]
shamt[10:6] funct[5:0]`. There is no branch delay slot. The opcode values are defined
in `rtl/core_pkg.sv`:

- ALU: ADD, ADDU, SUB, SUBU, CLT, CLTU, AND, OR, XOR, NOR, SLL, SRL, SRA, and the
  immediate forms ADDI, ADDIU, CLTI, CLTIU, ANDI, ORI, XORI, LUI. ADD, SUB and ADDI
  trap on signed overflow.
- Memory: LB, LBU, LH, LHU, LW, SB, SH, SW. A misaligned access raises an exception.
- Branches: BEQ, BNE, J, JAL (call), JR (a return when the register is r31).
- Multiply: MULT, MULTU, MFUP, MFLP; coprocessor read: MFC0.
- Any other encoding raises an illegal-instruction exception.

## Differences from the original description

- **Branch recovery.** The original microarchitecture keeps a third return stack at
  execute and can recover from a misprediction before it retires. Here all recovery
  happens at retirement, so there are two return-stack copies (fetch and retirement).
- **Details the original leaves open**, chosen here:
  - the instruction encoding and the exception vector;
  - cache associativity (4-way everywhere);
  - the L2 hit latency;
  - the DL1 write policy (write-through, no allocate);
  - the two-cycle multiplier;
  - the exact history-table initialisation.
- **Loads and stores.** Loads are not forwarded from older stores; they wait until the
  stores have retired.
- **Bus clock.** The bus runs at the core clock; wait states come from `HREADY`. The
  original runs the bus at one third of the core clock.
- **Coprocessor 0.** Only the CP0 read port exists. The CP0 registers themselves and
  main memory are outside this design.

## Simulation

Any recent Verilator (5.x) works. The package must come first. Example for one block:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/core_pkg.sv rtl/alu.sv tb/alu_tb.sv --top-module alu_tb -Mdir obj/alu -o sim
obj/alu/sim
```

Some testbenches need submodules:

| Testbench | Extra files |
|---|---|
| `ul2_cache_tb` | `rtl/store_gathering_buffer.sv` |
| `dispatch_stage_tb` | `rtl/rob.sv rtl/register_file.sv` |
| `fetch_unit_tb` | `rtl/il1_cache.sv rtl/btb.sv rtl/btb_lookup.sv rtl/branch_predictor.sv rtl/prediction_queue.sv rtl/return_stack.sv rtl/instruction_queue.sv` |
| `biu_tb` | `tb/ahb_mem_model.sv` |

Whole processor:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/core_pkg.sv $(ls rtl/*.sv | grep -v core_pkg) tb/ahb_mem_model.sv \
  tb/superscalar_top_tb.sv --top-module superscalar_top_tb -Mdir obj/top -o sim
obj/top/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. A pass is
`failures=0`.

## Verification

Each block testbench drives random stimulus against a reference model written
independently of the RTL. Where a latency is defined, the testbench checks the cycle
count as well. Examples:
- the ROB model checks every retirement rule;
- the DL1 test checks hits under a miss and PB-full replays;
- the BIU test includes an AHB protocol monitor.

The processor testbench runs a program against an instruction-set model. The program
covers:
- dependent arithmetic;
- all load and store sizes;
- loops, calls and returns;
- multiplies and a CP0 read;
- a full-line store burst;
- a run of load misses;
- a final overflow exception.

At the end, every architectural register and the written memory line are compared with
the model. The testbench also counts each mechanism and fails if any of them never
occurred:
- dual dispatch and dual retirement;
- out-of-order issue and skid stalls;
- taken predictions, mispredict flushes and return-stack predictions;
- instruction-cache misses, L2 hits, DL1 hits under miss and replays;
- full and partial store-gathering writes;
- multiplier use and exceptions.

All testbenches pass.
