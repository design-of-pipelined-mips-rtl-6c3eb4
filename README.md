# Pipelined MIPS processor with instruction and data cache controllers

A 32-bit MIPS integer processor rarely gets to talk to a memory that answers
in one cycle. This design puts a five-stage MIPS pipeline in front of a slow
main memory and hides the delay with two small caches inside the core: a
two-way set-associative instruction cache and a direct-mapped, write-back
data cache. Each cache has its own controller, a finite-state machine that
moves whole four-word lines between the cache and main memory and stalls
the pipeline while it does so. Fetch uses a 64-entry branch history table
to guess the direction of `beq`/`bne` before they are decoded.

Beside the processor, and not connected to it, the design contains two
arithmetic units of the same publication: an ALU whose results are stored
into a bank of eight block RAMs, and an IEEE-754 double-precision adder.

The RTL follows the block structure and the signal names of the paper
*Design of pipelined MIPS Processor with Cache controller using Verilog
Implementation*. The paper gives the architecture diagram, the cache
organisation and the tag format, but little about behaviour; everything it
leaves open (instruction subset, encodings, timing of the memory, FSM
states, prediction details, FP rounding) is a choice made here and is
listed in the section *Choices made where the source is silent*.

## Block map

```
mips_top
├── mips_core                 five-stage pipeline
│   ├── pc_reg                program counter + incrementer
│   ├── bht                   64 x 2-bit branch history table
│   ├── main_control          opcode decoder          ┐ "instruction decoder"
│   ├── rtype_control         funct / ALU decoder     ┘
│   ├── regfile               32 x 32, 2 read + 1 write (+ debug read)
│   ├── imm_extend            sign / zero / upper (lui) extension
│   ├── alu  (WIDTH=32)       execute-stage ALU
│   ├── muldiv                mult/multu/div/divu -> Hi, Lo
│   └── hazard_unit           forwarding, stalls, flushes, freeze
├── icache                    2 ways x 4 sets x 4 words, MRU bit per set
│   └── tag_cache x2          26-bit tag + valid (no dirty)
├── icache_ctrl               IDLE / FILL / BYPASS / BDONE
├── dcache                    4 lines x 4 words, write-back
│   └── tag_cache             26-bit tag + valid + dirty
├── dcache_ctrl               IDLE / WRITEBACK / ALLOCATE
├── main_memory               16 lines x 4 words, two ports with access delay
├── alu_reg_bank              8-bit ALU operands -> 32-bit result -> 8 BRAMs
│   ├── alu  (WIDTH=32)
│   └── bram_bank             8 BRAMs (64 x 32) + 4 two-input muxes
└── fp_add_dp                 double-precision add / subtract
```

`mips_pkg` holds the shared types: ALU select codes, opcodes and funct
codes, and the two control bundles (`ctrl_t` from the main control,
`rctrl_t` from the R-type control).

## The pipeline

| Stage | Work |
|---|---|
| F | PC addresses the I-cache. If the fetched word is `beq`/`bne` and the BHT counter for `PC[7:2]` is 2 or 3, the next PC is the branch target (computed in F from the fetched word), else PC+4. |
| D | Decode, register read, immediate extension. The branch is **resolved here** with a 32-bit equality comparator on forwarded operands. `j`, `jal`, `jr`, `jalr` also complete here. The BHT counter is updated with the outcome. |
| E | ALU, multiply/divide, `mfhi`/`mflo`. |
| M | Data-cache access. Stores send a word with byte enables; loaded bytes/halves are extracted and sign- or zero-extended. |
| W | Register write (ALU result, load data or PC+4 for `jal`/`jalr`); Hi/Lo write. |

There is **no branch delay slot**: the instruction after a taken branch or
jump is never executed. When D finds that the fetch stage guessed wrong (a
misprediction, or any jump), it loads the correct PC and turns the
instruction just fetched into a bubble: a one-cycle penalty. A correctly
predicted taken branch costs nothing.

### Hazards

`hazard_unit` is combinational and implements these rules:

* **Forwarding to E.** Each E operand takes the M-stage result if M writes
  that register, else the W-stage result, else the register-file value.
  The M-stage value is PC+4 for `jal`/`jalr` and the ALU result otherwise.
* **Forwarding to D.** The branch comparator and `jr` take the M-stage
  result. A W-stage result reaches D through the register file, which is
  write-first (a read of the register being written returns the new value).
* **Hi/Lo forwarding.** `mfhi`/`mflo` in E take Hi/Lo from M or W if a
  `mult`/`div`/`mthi`/`mtlo` there writes them.
* **Load-use stall.** A load in E whose destination is `rs` or `rt` of the D
  instruction stalls F and D for one cycle and sends a bubble into E.
* **Branch stall.** A branch or `jr` in D whose operand is produced by the
  instruction in E, or loaded by the instruction in M, waits the same way.
* **Instruction-cache miss.** F and D stall, bubbles enter E, and the older
  instructions keep flowing.
* **Data-cache miss.** `freeze`: every pipeline register and the PC hold
  until the data cache reports completion; the stalled load or store stays
  in M and hits when the line has arrived.

## Memory hierarchy

All addresses are byte addresses; accesses are word-wide on the bus and
lines are four 32-bit words. For both caches:

```
 31                      6 5   4 3   2 1  0
+-------------------------+-----+-----+----+
|        tag (26)         |index|word |byte|
+-------------------------+-----+-----+----+
```

The 26-bit tag, one valid bit and (data side only) one dirty bit per line
live in `tag_cache`. Reset clears all valid and dirty bits.

### Instruction cache (`icache`, `icache_ctrl`)

Two ways of four sets. Each way compares its tag, ANDs with its valid bit,
and the OR of the two is `hit`; a mux picks the word of the hitting way.
One MRU bit per set remembers the way used last. On a miss the line goes
into an invalid way if there is one, otherwise into the way that is **not**
the MRU way.

`icache_ctrl` states:

* `IDLE` – hits cost nothing. A miss asserts `stall` and moves to `FILL`.
* `FILL` – reads words 0..3 of the line one after the other; each waits for
  the memory's ready. The last word also writes tag and valid. Back in
  `IDLE` the fetch hits.
* `BYPASS`/`BDONE` – with `ic_enable` low every fetch is an uncached read
  of one word, delivered from a holding register in `BDONE`.

`ic_invalidate` clears all valid bits in one cycle.

### Data cache (`dcache`, `dcache_ctrl`)

Four lines, direct-mapped, **write-back with write-allocate**. A store hit
writes the enabled bytes and sets the dirty bit; main memory is updated only
when the line is evicted.

`dcache_ctrl` states:

* `IDLE` – hit: done in the same cycle. Miss: `stall`, then `WRITEBACK` if
  the line is dirty, else `ALLOCATE`.
* `WRITEBACK` – writes the four words of the old line to the address
  `{stored tag, index, wsel, 00}`.
* `ALLOCATE` – reads the four words of the new line, writes tag/valid and
  clears dirty on the last one.

Both controllers carry concurrent assertions on the memory handshake. They
check four rules. The memory is never read and written in the same cycle.
The pipeline stays stalled for as long as a transfer runs. Every transfer
begins with `rst_dly`. The tag is written only together with a data word.
Simulate with `--assert` so that they are checked.

### Main memory and miss timing

`main_memory` has an instruction port (read), a data port (read/write) and
a load/inspect port without delay (to load programs and read results). A
port held in read or write raises `rdy` every `LATENCY` cycles. `rst_dly`
restarts the delay count; each controller pulses it in the cycle it detects
a miss. With `L = LATENCY` the pipeline therefore stalls for:

| Event | Stall cycles |
|---|---|
| I-cache or D-cache hit | 0 |
| I-cache miss (line fill) | 1 + 4L |
| uncached fetch (`ic_enable` = 0) | 1 + L |
| D-cache miss, clean line | 1 + 4L |
| D-cache miss, dirty line | 1 + 8L |

The testbenches check these numbers cycle by cycle.

The memory holds 16 lines (256 bytes), and addresses wrap around at that
size. Programs and data share it: the end-to-end test puts code at
0x00–0x7F and 0xE0–0xFF and data at 0x80–0xDF.

## Instruction set

R-type: `add addu sub subu and or xor nor slt sltu sll srl sra sllv srlv
srav jr jalr mult multu div divu mfhi mflo mthi mtlo`.
I-type: `addi addiu slti sltiu andi ori xori lui lb lbu lh lhu lw sb sh sw
beq bne`. J-type: `j jal`.
Arithmetic never traps (`add` behaves like `addu`). Unknown opcodes and
functs do nothing. Memory is little-endian: byte 0 of a word is bits 7:0.
Division by zero gives Lo = all ones and Hi = the dividend.

## Arithmetic units beside the processor

**`alu`** – 4-bit select: 0 and, 1 or, 2 add, 3 xor, 4 nor, 5 sll, 6 sub,
7 slt, 8 sltu, 9 srl, A sra, B pass B (others give 0). For shifts B is the
value and the low bits of A the amount. Default width 64 bits. The core uses
it at 32 bits.

**`alu_reg_bank` / `bram_bank`** – two 8-bit operands are zero-extended,
combined by a 32-bit ALU, and the result is the common write data of eight
BRAMs of 64 x 32 bits. Each BRAM has its own 6-bit address and write enable,
so one result can be stored in up to eight places in one cycle. Reads are
synchronous: `dout[i]` shows the word at the address of the previous clock
edge. Four 2:1 muxes halve the read lines: `o[k] = msel[k] ? dout[2k+1] :
dout[2k]`.

**`fp_add_dp`** – combinational IEEE-754 binary64 add/subtract. It unpacks
the operands, orders them by magnitude, and aligns the smaller one with
guard, round and sticky bits. It then adds or subtracts, normalises (also
into the subnormal range), rounds to nearest-even and handles overflow. Any
NaN, or inf − inf, gives the quiet NaN `7FF8_0000_0000_0000`. `c` is the
carry out of the significand addition. Results are checked bit-exactly
against the host's double arithmetic.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `alu` | `WIDTH` | 64 | operand width (core uses 32) |
| `bht` | `ROWS`, `CW` | 64, 2 | table rows, counter bits |
| `icache` | `SETS`, `WORDS` | 4, 4 | sets per way, words per line (tag = 32 − log2 SETS − log2 WORDS − 2) |
| `dcache` | `LINES`, `WORDS` | 4, 4 | lines, words per line |
| `tag_cache` | `LINES`, `TAG_W`, `HAS_DIRTY` | 4, 26, 1 | |
| `main_memory` | `LINES`, `LATENCY` | 16, 4 | lines of 4 words, cycles per word |
| `bram_bank` | `NBRAM`, `AW`, `DW`, `NMUX` | 8, 6, 32, 4 | |
| `pc_reg`, `mips_core` | `RESET_PC` | 0 | |

`mips_top` has no parameters. The write-back address in `mips_top` and the
controllers assume four-word lines. If you change `WORDS` or `LINES` there,
also adapt the `{tag, index, wsel}` concatenations.

## Choices made where the source is silent

* Instruction subset, opcode/funct handling, no delay slot, no overflow
  traps.
* Branch prediction: counters indexed by `PC[7:2]`, reset to 1 (weakly not
  taken), prediction used only for `beq`/`bne`; target computed in fetch.
* Multiply and divide are single-cycle combinational. Hi/Lo are written in
  W.
* Register file is write-first rather than written in the first half of
  the cycle.
* Instruction cache: the paper's cache diagram shows two ways with an MRU
  column, while its text says the instruction tag store is identical to the
  data one (26-bit tag). Both hold here: two ways of 4 sets, each with a
  26-bit tag. Another diagram of the paper suggests a different address
  split; it is not used.
* Data cache: write-back as stated in the paper's summary and implied by
  the dirty bit. (One passage describes write-through behaviour instead.)
  Write-allocate on store misses.
* Cache controller states, and the use of `rst_dly`, are this design's. The
  paper gives only the signal names (cache read/write, data source, wsel,
  memory read/write, delay reset, address select, memory ready, stall).
* Main memory access delay `LATENCY` = 4 is arbitrary. The 16-line size is
  the one drawn in the paper, which is small but enough for the test
  program.
* The program counter's S-R latch is an edge-triggered register with
  enable.
* BRAM reads are registered; the pairing of BRAMs onto the four muxes is a
  choice.
* The paper does not show where the double-precision adder attaches to the
  processor (there is no floating-point instruction path in its diagram).
  The adder and the ALU/BRAM bank are therefore separate units with their
  own ports in `mips_top`.
* Added for testing: the main-memory load/inspect port and the register
  debug read port.

Not built: any floating-point instructions for the core, and a
gate-by-gate S-R latch program counter. The paper's instruction-decoder
waveform shows signals of another instruction set; only MIPS decoding
exists here.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mips_pkg.sv tb/mips_ref_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
./obj_dir/Vtb_mips_top
```

Replace `tb_mips_top` with any other testbench. `mips_ref_pkg.sv` is needed
only by `tb_mips_core` and `tb_mips_top`.

| Testbench | What it shows |
|---|---|
| `tb_mips_top` | The whole design at default sizes. The test program runs three times: with the I-cache enabled, disabled, and invalidated mid-run; the disabled run must see no line fill and the invalidated run more fills than the first. Each time registers, Hi/Lo and memory (seen through the D-cache) are compared with an instruction-level reference model. Every mechanism must occur at least once: I-miss, MRU replacement, uncached fetch, invalidate, D-hit, clean and dirty miss, load-use and branch stall, forwarding, correct and wrong prediction, jump, `jr`, mul/div. Also checks the ALU/BRAM bank and the FP adder. |
| `tb_mips_core` | The pipeline alone, with random instruction- and data-side stalls at three densities, against the same reference model. |
| `tb_icache_ctrl`, `tb_dcache_ctrl` | Controller + cache + memory. Random traffic, data checked, miss penalties checked cycle-exactly, and memory checked after forced write-back. |
| `tb_icache`, `tb_dcache`, `tb_tag_cache`, `tb_main_memory` | Storage, replacement, dirty tracking and memory timing against models. |
| `tb_hazard_unit`, `tb_main_control`, `tb_rtype_control`, `tb_bht`, `tb_regfile`, `tb_pc_reg`, `tb_imm_extend`, `tb_alu`, `tb_muldiv` | Unit checks against independent reference code or tables. |
| `tb_bram_bank`, `tb_alu_reg_bank`, `tb_regbank_workload` | The BRAM bank. The last replays the register-bank experiment this design was first shown with: one ALU result (`FFFF_FFFE`) written to all eight BRAMs at eight different addresses and read back. |
| `tb_fp_add_dp` | 20 000 random and special-case additions and subtractions, compared bit-exactly with IEEE double arithmetic. |

The reference model in `mips_ref_pkg` runs one instruction at a time and is
written independently of the RTL. It is the main source of trust for the
processor: any forwarding, stall or cache bug changes a register or memory
word in one of the runs. Not covered by tests: self-modifying code (the
instruction cache does not see stores), and programs larger than the
256-byte memory.
