# CAPRA: an intelligent memory with associative processing and on-cell optical sensors

The design moves processing into the memory instead of moving data to a
processor. One flat address space holds three kinds of words:

* **RAM words**: ordinary storage.
* **CAM words**: storage that can also be searched associatively. Every word
  is compared with a search argument in the same clock cycle.
* **CAPRA words** (content-addressable processor/register array): every bit
  cell has a one-bit Boolean unit, an intermediate flip-flop and an activity
  flag. Every pair of bit cells shares an optical sensor with an A/D
  converter. Every 32-bit word has a 4-bit ALU slice connected to the ALUs of
  the words above and below it.

A host drives the memory with machine instructions. Each instruction acts on
all CAPRA words at once, or on a subset picked out by activity flags or by a
masked address. Image data can be captured by all sensors in parallel and
processed where it is stored. For example, a neighbourhood operation over a
whole image takes O(word length) instructions, however many rows (words) the
image has.

## Memory map and the masked decoder

`capra_system` places the segments one after another in an 8-bit address space:

| addresses (defaults) | segment | module |
|---|---|---|
| 0 .. 63   | RAM   | `ram_segment` |
| 64 .. 95  | CAPRA | `capra_array` |
| 96 .. 111 | CAM   | `cam_segment` |

Each segment has a `mask_decoder`. An instruction carries an address `addr`
and a mask `amask`. A mask bit of 1 makes that address bit "don't care", so a
single instruction selects every word whose address matches on the other
bits. `MWRITE` uses this to write one pattern into many words in one cycle,
and `SETALUF` uses it to set or clear the ALU activity flags of many words.
For these selections to work, each segment starts on a multiple of its
power-of-two size. For example, `addr = 64, amask = 31` selects all CAPRA
words, and `addr = 65, amask = 30` selects the odd ones. `WRITE` and `READ`
ignore the mask, and an assertion checks that a READ selects exactly one
word.

The segment sizes are parameters of `capra_system` (`RAM_WORDS`, `CAM_WORDS`,
`CAPRA_WORDS`). The architecture sizes them per application. The defaults
(64 / 16 / 32) are this implementation's choice. With 32 CAPRA words, a
32 × 32 binary image fits, one row per word.

## The extended bit cell (`capra_bitcell`)

This is the heart of the design. Each CAPRA bit has three flip-flops:

* **SF**, the storage flip-flop, which is the RAM bit;
* **IF**, the intermediate flip-flop, where results are held before they go anywhere;
* **AF**, the activity flag.

Data moves through the cell in two steps. First, something is loaded into IF:

| source | instruction | what IF receives |
|---|---|---|
| BOOL(SF, rw) | `BOOLOP`, `ASSOCOMP` | any of the 16 two-input functions of SF and the bit on the read/write line |
| sensor | `SCAN` | one digitised light bit |
| ALU | `REC` | one bit of the word's REGA (cells of the selected 4-bit segment only) |

Then IF is moved on:

| sink | instruction | condition |
|---|---|---|
| SF | `STORE` | UNCOND: every cell. COND: only cells with AF = 1 |
| ALU register REGA | `TOALU` | same COND/UNCOND rule, selected segment only |
| AF | `SETAF` | UNCOND: AF = IF. COND': only while AF is still 0, so AF accumulates (AF \|= IF) |

The Boolean function is given as a truth table `bool_fn[{SF, rw}]`. For
example, `4'b0110` is XOR, `4'b1000` is AND, `4'b1100` copies SF and
`4'b1010` copies the operand. For `BOOLOP` the read/write lines carry the
instruction's data field. For `ASSOCOMP` they carry the search argument
register SAR, and the function is forced to XNOR (or to 1 where the search
mask SMASK is set). After an `ASSOCOMP`, IF therefore holds a per-bit match
pattern. A following `SETAF` turns that pattern into an activity pattern, and
`STORE COND` then updates only the matching bits. This is how arbitrary
subsets of the bit array are selected and processed.

## The word cell and its ALU (`capra_word`, `capra_alu4`)

Each word has one 4-bit ALU slice. It works on segment `j` (bits 4j+3..4j) of
its own word, which is the first operand, called BUFFER(j). The second
operand is one of:

* `REGA`, the word's own 4-bit register;
* `REGB`, the REGA of the word above (i-1);
* `REGC`, the REGA of the word below (i+1);
* `SAR[3:0]`, a global operand.

The result goes back into segment `j` of the word or into REGA. `capra_alu4`
follows the classic TTL 4-bit ALU. Four select lines `S` and a mode line `M`
give 16 logic functions (M = 1) and 16 arithmetic functions (M = 0). The
header of `capra_alu4.sv` gives the two per-bit terms from which all 32
functions are built. Data are active high, and `cin = 1` adds one.

To work on a whole 32-bit word, you issue eight ALU OPs, one per segment.
A carry flip-flop `CY` passes the carry from one segment to the next (select
`CIN_CARRY`). A 32-bit addition in every word in parallel therefore takes 8
clock cycles. A left shift is `A + A` (`S = 1100`) with the carry chained the
same way. Multiplying by two, as the Sobel operator needs, is done this way.

Each word also has an **ALU activity flag**. A conditional ALU OP
(`cond = 1`) runs only in words whose flag is 1. The flag is set from outside
with `SETALUF` (address + mask). It can also be set from the result of an ALU
OP: its carry, F == 0 or F != 0 (`flag_upd`).

The neighbour links (`capra_array`) form a linear chain. Beyond the first
and the last word the missing neighbour reads as 0, and the chain does not
wrap around.

## Sensors and the cyclic A/D converter (`osc_adc`)

One sensor serves each pair of bit cells (2k+1, 2k), so a 32-bit word has 16
sensors. The real circuit is analog: a phototransistor, a sense amplifier and
a cyclic converter. `osc_adc` is a **behavioural model** of it. Light is
given as an 8-bit fraction of full scale. Each output bit takes three clock
phases: sample the residue, double it, compare with the reference (and
subtract the reference if it was reached). An m-bit conversion therefore
takes 3m cycles. The resolution `adc_res` can be set from 1 to 4, and the
result is `floor(light * 2^m / 256)`, left-aligned in 4 bits.

The converters run all the time. A 4-bit result reaches the two IFs of its
pair in two steps:

1. `SCAN` with `scan_hi = 0` puts result bits [1:0] into IF(2k+1), IF(2k) and
   freezes the result. A `STORE` then moves them into SF.
2. `SCAN` with `scan_hi = 1` delivers bits [3:2] of the same frozen result.
   A `SETAF` moves them into AF.

After these two steps, pixel k of a word is `{AF[2k+1], AF[2k], SF[2k+1], SF[2k]}`.
An image is loaded into every word in O(1) instructions, however large it is.

## Instruction set (`capra_ctrl`, `capra_pkg`)

One instruction is executed per clock (`instr_valid`, `instr`). There is no
stall. A READ places the word in the memory data register; `rdata` shows it
and `rvalid` is high in the following cycle. `instr_t` in `capra_pkg` is the
instruction word. Its field layout is this implementation's own.

| opcode | fields used | effect |
|---|---|---|
| `WRITE` | addr, data | write one word (any segment) |
| `READ` | addr | MDR ← word, visible next cycle |
| `MWRITE` | addr, amask, data | write all words selected by the mask |
| `LDSAR`, `LDSMASK` | data | load the search argument / search don't-care mask |
| `ASSOCOMP` | — | CAM: latch `cam_match`; CAPRA: IF ← XNOR(SF, SAR) per bit, latch `capra_match` |
| `BOOLOP` | bool_fn, data | IF ← BOOL(SF, data) in every CAPRA bit |
| `SCAN` | scan_hi | IF ← sensor bits |
| `STORE` | cond | SF ← IF |
| `SETAF` | cond | AF ← IF (cond = COND') |
| `TOALU` | seg, cond | REGA ← IF of segment j |
| `REC` | seg | IF of segment j ← REGA |
| `ALUOP` | seg, alu_s, alu_m, bsel, dst, cin, flag_upd, cond | one 4-bit ALU operation in every (or every flagged) CAPRA word |
| `SETALUF` | addr, amask, data[0] | set or clear the ALU flags of the selected CAPRA words |

`LDSAR` and `LDSMASK` are this implementation's register loads. So are
`TOALU` and `REC`, which make the bit cell's TRANSFER-to-ALU and REC control
lines available as instructions.

## Programs: neighbourhood comparison and the Sobel operator

The processing power comes from running one instruction on all words at
once. In the programs below, the instruction count depends only on the word
length, never on the number of image rows or columns held in the words.

**Comparing each pixel with its upper neighbour.** Store one binary image row
per CAPRA word. These 16 instructions then compare every pixel with the pixel
above it:

```
for j in 0..7:
  ALUOP seg=j, S=1111, M=1, dst=REGA           // REGA <- own segment j
  ALUOP seg=j, S=1001, M=1, bsel=REGB, dst=BUF // seg j <- XNOR(seg j, upper REGA)
```

The lower neighbour works the same way with `bsel=REGC`.

**Comparing each pixel with its left neighbour (bit j-1).** The bit cells
have no horizontal links, so the row is moved through the ALUs instead. The
program takes 14 instructions:

1. Copy the row into the activity flags: `BOOLOP copy`, then `SETAF`.
2. Shift the row left by one with eight `A+A` ALU OPs, chaining the carry.
3. `BOOLOP NOT`, then `STORE COND`. The AF pattern decides where the shifted
   row is inverted, which leaves shifted XOR original in SF.
4. `BOOLOP NOT`, then `STORE`.

**Sobel gradients on 4-bit pixels.** Here each word holds one image column.
Four 4-bit pixel rows sit in segments 0–3. Two 8-bit gradient results go to
segments 5:4 and 7:6. The horizontal neighbours are the neighbouring words,
reached through REGB and REGC. The vertical neighbours are other segments of
the same word. An 8-bit accumulator is built from two segments:

* To add a 4-bit operand, add it to the low segment (`S=1001`), then add the
  carry to the high segment (`S=0000`, `cin=CARRY`).
* To subtract, use `S=0110` with `cin=1` on the low segment, then
  `S=1111` with `cin=CARRY` on the high segment.

Gx = (x7 + 2x8 + x9) − (x1 + 2x2 + x3) takes 20 instructions per output row.
Gy takes 21. Both cover all 32 columns at once.

These programs are in `tb_capra_system`, `tb_capra_neighbourhood` and
`tb_capra_sobel`. Each testbench checks every result against a reference and
checks the exact cycle count. The full 8-neighbourhood (right neighbour and
diagonals) is not written out as a program.

## What follows the architecture and what was chosen here

The following come from the architecture: the word length of 32; the 4-bit
ALU slices with 16 + 16 functions selected by S3..S0 and M; the operand
choices REGA, REGB, REGC and SAR; the bit-cell flip-flops and their control
lines (BOOL, SCAN, REC, TRANSFER with GLOBAL/LOCAL, COND/UNCOND, SET FLAG
with COND'); one sensor per bit pair; 4-bit conversion in 3m cycles; the
masked decoder; the ALU activity flags with masked setting; and the
instruction list.

The following are this implementation's choices. They are also noted in
each file's header.

* The instruction encoding, one instruction per cycle, and the READ latency.
* The segment sizes and the address map.
* The search mask register for ASSOCOMP, and match results latched as a vector.
* BUFFER(j) is segment j of the word itself, read and written directly by the
  ALU. There is no separate buffer register.
* REGA is the ALU end of the TRANSFER and REC paths.
* The carry flip-flop for multi-segment arithmetic, and the choice of ALU
  flag updates (carry, zero, non-zero).
* Free-running converters, and the two-step SCAN hand-over.
* The chain ends read as 0.
* Wired-OR reads when several words are selected.
* The flip-flops of the CAPRA and CAM control state reset to 0. RAM and CAM
  contents are not reset.

Not included: the host processor, and any priority or responder logic that
would resolve several CAM matches. The match vectors are brought out as
ports instead.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/capra_pkg.sv \
    rtl/capra_system.sv tb/tb_capra_system.sv --top-module tb_capra_system
./obj_dir/Vtb_capra_system
```

For any other block, replace the module and testbench names; `capra_pkg.sv`
must always come first. `tb_capra_neighbourhood` and `tb_capra_sobel` are
built the same way as `tb_capra_system`. `tb_capra_system` runs the whole memory at its
default size (64 + 32 + 16 words, 512 sensor models). Building it takes
about a minute, and the simulation finishes in well under a second. It counts
15 mechanisms and fails if any of them was never exercised: masked writes,
CAM and CAPRA search hits, STORE COND, SET AF COND', SCAN at full and at
reduced A/D resolution, TOALU/REC,
neighbour exchange, multi-segment arithmetic, conditional ALU OPs, flags set
from results, and others.

Verilator simulates two-state logic. Every flip-flop that is read before it
is written is reset, except RAM and CAM contents, which the testbenches
write before they read them.
