# CryptoManiac: a programmable cipher co-processor in SystemVerilog

Private-key ciphers such as Blowfish, 3DES, IDEA, RC4, RC6, Mars, Rijndael and
Twofish spend nearly all of their time in short kernels. These kernels do
little but table lookups (S-boxes), additions, rotates, XORs and the odd
multiply. A general-purpose processor runs them slowly. Its issue width and
functional units are the bottleneck, and every table lookup costs an address
computation plus a load. A fixed-function engine is fast but runs one cipher only.

CryptoManiac sits between the two. It is a small 4-wide, 32-bit VLIW processor
with an instruction set fitted to these kernels, and it is replicated inside
a co-processor that serves encryption requests. Its key idea is **instruction
combining**. Cipher operations come in two speeds:

* *tiny* operations (XOR, AND, sign extension) take a fraction of a cycle;
* *short* operations (add, subtract, rotate, S-box lookup) take most of a cycle.

Each instruction is triadic: it names three source registers. It runs two
dependent operations back to back in one cycle, as `(R1 op_a R2) op_b R3`. So
`Add-Xor R4,R1,R2,R3` computes `R4 = (R1 + R2) ^ R3`. The S-box lookup has no
adder in front of it: tables are 1 KB aligned, so the address is just a
concatenation of bits.

This repository gives RTL for the whole co-processor. That covers the system
around the processors (queues, request scheduler, keystore, result merging)
and the processing element with its pipeline, combining functional units,
S-box caches and pipelined multiplier. It also gives self-checking testbenches
that run real kernels on it.

## System organisation (`cryptomaniac`)

```
 requests ─► InQ ─► request scheduler ─┬─► req queue ─► cm_proc 0 ─┐
                                       ├─► req queue ─► cm_proc 1 ─┤
                                       ├─►     ...        ...      ├─► output arbiter ─► OutQ ─► results
                                       └─► req queue ─► cm_proc N-1┘
                        keystore ◄──── shared read port (round robin) ────►  every cm_proc
```

* **Requests.** A request is one header word followed by its data words. The
  header is `{id[31:24], session[23:16], action[15:8], len[7:0]}` (`cm_pkg::req_hdr_t`),
  where `len` counts the data words after it.
* **Request scheduler** (`cm_req_scheduler`). It takes a header from the head
  of InQ and chooses an element whose request queue is empty. The choice is
  round robin, starting after the element served last. The header and all
  `len` data words then go to that element, one word per cycle. A request is
  never split across elements.
* **Processing elements** (`cm_proc`). Every element runs the same program.
  The program reads words with `RECV`. It usually branches on the action
  field of the header.
* **Keystore** (`cm_keystore`). A shared key memory. The host writes it, and
  each element reads it with ordinary loads. A round-robin arbiter grants one
  reader per cycle. The word arrives one cycle after the grant.
* **Output arbiter** (`cm_out_arbiter`). Elements push result words with
  `SEND`, and mark the final word with `SENDL`. The arbiter gives OutQ to one
  element at a time and keeps it there until the last word has gone. Results
  from different elements are therefore never interleaved. They may finish
  out of request order, so match them by `id`.
* **Loading.** While `run` is low, the host writes the program (`imem_*`) and
  the data-memory image (`dmem_*`, the S-box tables and constants). Both
  writes go to every element at once. Keys go in through `key_*`.

## The processing element (`cm_proc`)

The processing element is a four-stage in-order pipeline:

| stage  | work |
|--------|------|
| IF     | read the bundle at `pc` from instruction memory (`cm_imem`); the branch target buffer (`cm_btb`) predicts the next `pc` |
| ID/RF  | read 12 operands (3 per slot) from the register file (`cm_regfile`, 32 x 32 bit, write-through) |
| EX/MEM | bypass from WB; four combining units (`cm_fu`); one data memory or keystore access; one branch resolved; queue handshakes |
| WB     | write up to four registers; multiplier and load results complete here |

**Bypassing.** WB results are forwarded into EX, and the register file's
write-through covers the distance-two case. Every bundle therefore sees all
results of the bundle before it, multiplies and loads included. No
load-use or multiply-use interlock exists. The cost is timing: the second
multiplier stage and the data-memory output sit on the bypass path.

**Stalls.** A stall holds the bundle in EX and everything behind it, and sends
a bubble to WB. There are four causes:

1. an S-box cache miss (see below);
2. `RECV` while the element's request queue is empty;
3. `SEND`/`SENDL` that the output arbiter does not accept;
4. a keystore load still waiting for its grant.

While a bundle is held, its operand registers keep taking the bypassed
values, so that a result forwarded in the first stall cycle is not lost.

**Branches.** `BEQ`/`BNE` compare R1 and R2 and jump to an absolute bundle
address held in the immediate. They resolve in EX. The BTB is direct-mapped
with 16 entries and 2-bit counters. A mispredict flushes the two younger
bundles, so a mispredicted branch costs 2 cycles. A counted loop whose branch
is predicted correctly has no branch penalty.

## Instructions

A bundle holds four slot instructions (`cm_pkg::inst_t`). Each has these
fields:

| field | bits | meaning |
|-------|------|---------|
| `kind` | 4 | `K_PAIR`, `K_LONG`, `K_LOAD`, `K_STORE`, `K_LDI`, `K_BEQ`, `K_BNE`, `K_RECV`, `K_SEND`, `K_SENDL`, `K_SBOXSYNC`, `K_NOP` |
| `t1`, `sh`, `t2` | 2, 4, 2 | tiny / short / tiny operations of a pair |
| `lg` | 1 | `L_MUL` or `L_MULMOD` |
| `rd`, `rs1`, `rs2`, `rs3` | 5 each | destination and three sources |
| `imm` | 16 | `LDI` value (zero-extended) or branch target |

Instructions in a bundle read their registers before any of them writes. A
register move is a `K_PAIR` whose three operations are all nop. If two slots
write the same register, the higher slot wins.

### Combining functional unit (`cm_fu`)

Each slot has one combining unit. Its operations form a chain, with the long
unit beside it:

```
 R1,R2 ─► tiny (XOR/AND/SEXT) ─► short (ADD/ADDINC/SUB, ROL/ROR, SBOX0..3) ─► tiny ─► y_chain
 R1,R2 ─► pipelined 32-bit multiplier (MUL, MULMOD) ─────────────────────────────────► y_long (one cycle later)
```

The instruction set allows these pairs: short-tiny, tiny-short, tiny-tiny and
long-nop. A single operation is also allowed. A stage whose operation is a nop
passes its first input through. The first active stage takes R1 and R2, and
the second takes the chain value and R3. For example:

| instruction | `t1` `sh` `t2` | result |
|-------------|----------------|--------|
| Add-Xor R4,R1,R2,R3 | NOP ADD XOR | `(R1 + R2) ^ R3` |
| And-Rol R4,R1,R2,R3 | AND ROL NOP | `(R1 & R2) rotl R3[4:0]` |
| And-Xor R4,R1,R2,R3 | AND NOP XOR | `(R1 & R2) ^ R3` |
| Sbox2-Xor R4,R1,R2,R3 | NOP SBOX2 XOR | `S[R2 table][R1[23:16]] ^ R3` |

An assertion rejects an instruction that uses all three stages.

* `ADDINC` is `a + b + 1`. `SUB` is `a - b`.
* `SEXT` sign-extends the low byte.
* Rotates take their amount from the low five bits.
* `MUL` gives the low 32 bits of the product.
* `MULMOD` multiplies the low 16 bits of both operands modulo 0x10001. As in
  IDEA, the value 0 stands for 2^16. The first multiplier stage forms the
  product. The second reduces it using 2^16 ≡ −1.

### S-box lookups and `SBOXSYNC`

`SBOXn idx, table` reads the 32-bit word at byte address
`{table[31:10], idx byte n, 2'b00}`. Table bases must therefore be 1 KB
aligned, and no adder is needed.

Each slot holds a 256 x 32-bit **S-box cache** (`cm_sbox_cache`), tagged with
`table[31:10]`. A lookup that hits returns its word within the cycle. On a
miss, the element stalls, and a refill engine in `cm_proc` copies the whole
1 KB table from data memory into that slot's cache. The copy moves one word
per cycle, about 258 cycles in all. The refill engine owns the data memory
port while it runs.

Stores do not update the caches, and `SBOXSYNC` invalidates all four of them.
So a store into a table becomes visible to `SBOX` only after `SBOXSYNC`, as
the instruction set requires. Each slot caches one table. A kernel that uses
four tables should put each table's lookups in the same slot every time. More
than four tables, or a table that moves between slots, causes refills.

### Memory, constants, queues

* `LOAD rd, [R1]` and `STORE [R1], R2` use a byte address. A bundle may hold
  only one memory operation.
* A load with address bit 31 set reads the keystore instead of data memory.
  Its word index is `addr[11:2]`.
* Data memory is 16 KB, with one synchronous port. There is no cache.
* `LDI rd, imm` loads a 16-bit constant. Wider constants are built with
  rotates and XOR, or loaded from memory.
* `RECV rd` pops a request word. `SEND R1` and `SENDL R1` push result words,
  and `SENDL` marks the last word of a result.
* **Programming rules, checked by assertions:**
  * at most one memory operation per bundle;
  * at most one branch per bundle;
  * at most one `RECV` per bundle;
  * at most one `SEND` per bundle;
  * no `SEND` in a bundle that also holds a keystore load.

### Example: the Blowfish round in four bundles

This is the loop body the tests run (`tb/cm_tb_prog_pkg.sv`). L is in `r1`,
R is in `r2`, and the table bases are in `r10..r13`:

```
LOOP: SBOX3 r3,r1,r10 | SBOX2 r4,r1,r11 | SBOX1 r5,r1,r12 | SBOX0 r6,r1,r13
      Add-Xor r7,r3,r4,r5 | LOAD r8,[r14] | ADD r14,r14,r15 | SUB r16,r16,r17
      Add-Xor r2,r7,r6,r2
      XOR r1,r2,r8 | MOV r2,r1 | BNE r16,r0,LOOP
```

Once the caches are warm, one round takes exactly four cycles.

## Kernel speed on one element

The testbenches run six complete ciphers on a single element. Each schedule
was written for this RTL. MB/s assumes the cycle time estimated for the
original four-wide combining design.

| cipher | block | bundles per round | cycles per block (warm) | MB/s at 2.78 ns |
|---|---|---|---|---|
| Blowfish, 16 rounds | 8 B | 4 | 76 | 38 |
| AES-128, 10 rounds | 16 B | 9 | 108 | 53 |
| IDEA, 8 rounds | 8 B | 11 | 101 | 28 |
| RC6, 20 rounds | 16 B | 5 | 112 | 51 |
| 3DES (EDE), 48 rounds | 8 B | 5 | 288 | 10 |
| RC4 | 4 B | 6 per byte | 27 | 53 |

The co-processor has four elements, which multiplies these rates as long as
requests keep all of them busy.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `cm_pkg` | `WIDTH` (slots) / `XLEN` | 4 / 32 | original design |
| `cm_pkg` | `NREGS` | 32 | chosen here |
| `cm_pkg` | `SBOX_ENTRIES` | 256 (1 KB) | original design |
| `cryptomaniac` | `NPROC` | 4 | chosen here |
| `cryptomaniac` | `INQ_DEPTH`, `OUTQ_DEPTH`, `PEQ_DEPTH` | 16 | chosen here |
| `cryptomaniac` | `KS_WORDS` | 1024 | chosen here |
| `cm_proc` | `IMEM_DEPTH` (bundles) | 256 | chosen here |
| `cm_proc` | `DMEM_WORDS` | 4096 (16 KB) | chosen here |
| `cm_proc` | `BTB_ENTRIES` | 16 | chosen here |

## What follows the original design and what does not

Taken from the original design:

* the 4-wide 32-bit VLIW element and its IF, ID/RF, EX/MEM and WB stages;
* the BTB, the instruction memory and the data memory with no cache;
* the keystore and queue interfaces;
* the combining unit (a tiny unit, then an adder, rotator or 1 KB S-box
  cache, then a second tiny unit, with a pipelined multiplier beside them);
* the operation classes;
* the S-box address concatenation and the `SBOXSYNC` rule;
* MULMOD modulo 0x10001;
* the system of InQ, request scheduler, several elements, keystore and OutQ.

Chosen here, because the original leaves them open:

* the binary encoding, and all memory, branch, constant and queue
  instructions;
* the register count and all memory sizes;
* the number of elements and the queue depths;
* the request framing;
* the scheduling and arbitration policies;
* the two-stage multiplier split and its bypass timing;
* the whole-table S-box refill;
* the BTB organisation;
* the IDEA zero convention of MULMOD;
* sign extension of a byte.

Not included:

* the narrower (2- and 3-wide), non-combining and 8-wide variants the
  original compares with;
* the XBOX bit-permutation instruction, which belongs to extensions of a
  general-purpose ISA;
* full cipher kernels beyond the test programs;
* any software scheduling tool.

The RTL has been linted with Verilator (`-Wall`) and elaborated with the
Yosys slang front end. It has not been taken through timing closure or
layout. The published cycle time (about 2.8 ns in 0.25 µm) was estimated for
a design whose exact pipeline registers are not known, so this RTL's critical
path may differ.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
a model written in the testbench, and ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_cm_logic_unit`, `tb_cm_adder`, `tb_cm_rotator`, `tb_cm_multiplier` test
  the arithmetic units on random and corner operands. The multiplier test also
  runs with pipeline stalls.
* `tb_cm_sbox_cache` covers fill, lookups of all four bytes, tag misses and
  invalidation. `tb_cm_fu` covers all pair forms against `(R1 a R2) b R3`, plus
  MUL/MULMOD and SBOX.
* `tb_cm_regfile`, `tb_cm_btb`, `tb_cm_imem`, `tb_cm_dmem` and `tb_cm_fifo`
  check their modules against reference models.
* `tb_cm_req_scheduler`, `tb_cm_keystore` and `tb_cm_out_arbiter` check that
  requests stay whole, that grants are fair, and that results are not
  interleaved.
* `tb_cm_proc` runs the three test kernels from `cm_tb_prog_pkg` on one
  element:
  * 16-round Blowfish with random tables;
  * a keystore read with MUL and MULMOD;
  * a table store with SBOX before and after `SBOXSYNC`.

  The environment is random: request words arrive with gaps, the result side
  applies back-pressure, and keystore grants come late. The test checks every
  result word, requires each stall kind, refills, mispredicts and bypasses to
  occur, and measures four cycles per warm loop round.
* `tb_cm_proc_blowfish`, `tb_cm_proc_aes`, `tb_cm_proc_idea`, `tb_cm_proc_rc6`,
  `tb_cm_proc_3des` and `tb_cm_proc_rc4` run six ciphers on one element. Each is checked
  against a reference model in the testbench and against the cipher's
  published example:
  * Blowfish uses the four-bundle round described above, with a 128-bit
    key. The testbench computes the initial tables from the hexadecimal
    digits of pi, and the host model runs the key schedule. A block takes
    76 cycles.
  * AES-128 uses four T-tables held in the S-box caches. The last round is
    built from the same tables with AND masks. A round is 9 bundles, and a
    warm block takes 108 cycles, which is about 53 MB/s per element at a
    2.78 ns cycle.
  * IDEA uses MULMOD and Add-And pairs for its modulo-2^16 additions. A round
    is 11 bundles, and a block takes 101 cycles.
  * RC6 runs with 20 rounds. It uses the 32-bit MUL and data-dependent ROL,
    with Rol-Xor pairs. The rounds are unrolled at 5 bundles each, and a
    block takes 112 cycles.
  * Triple DES (EDE) runs 48 rounds at 5 bundles each, and a block takes 288
    cycles. The trick is in the tables. Each slot's 256-word SBOX table
    holds two S-box tables that are merged with the P permutation. The two
    low index bits choose between them. A Ror-And pair clears those bits,
    and the key word sets them again through an Xor-Sbox pair. This keeps
    all eight S-boxes in the four caches. The initial and final
    permutations are sequences of masked bit-group swaps, at 15 bundles
    each.
  * RC4 keeps its changing state in data memory, one word per entry
    holding 4*S[x], so that indices are byte addresses. A byte takes three
    loads and two stores, or 6 bundles, and 4 bytes take 27 cycles.

  These schedules were written for this RTL. They are not the original
  hand-scheduled kernels.
* `tb_cryptomaniac` runs the full co-processor at its default size (four
  elements). It streams 120 mixed requests and matches results by id. It
  requires each of these to occur at least once: a full input queue, a full
  output queue, keystore contention, a result held by the output arbiter, the
  use of every element, S-box refills, `SBOXSYNC`, mispredicts, bypasses and
  multiplies.
* `tb_cryptomaniac_aes` runs AES-128 on the full co-processor at its default
  size. The AES program and reference model are in `cm_tb_aes_pkg`, which
  `tb_cm_proc_aes` also uses. The program takes each block as a request, and
  64 requests are streamed at full rate. Results are matched by id and
  checked against the model. Once the caches are warm, the four elements
  together return a block every 28 cycles. That is about 205 MB/s at a
  2.78 ns cycle, compared with 108 cycles per block for one element.

To run a testbench with Verilator 5, run this from the repository root:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/cm_pkg.sv rtl/*.sv tb/cm_tb_prog_pkg.sv tb/tb_cryptomaniac.sv \
  --top-module tb_cryptomaniac -Mdir obj && ./obj/Vtb_cryptomaniac
```

Replace the testbench name to run another one. The unit testbenches only need
`rtl/cm_pkg.sv` and the module under test. The AES testbenches also need
`tb/cm_tb_aes_pkg.sv` on the command line. The full system test finishes in a
few seconds.
