# Compressed-instruction decoder with re-encoded don't-care bits

Embedded programs can be stored Huffman-compressed and expanded on the way
from memory to the CPU. Each compressed instruction is then a variable-length
code that indexes a *decoding table* holding the original 32-bit instruction
words. The decoding table can take a large share of the compressed program.
The scheme behind this design ("Instruction Re-encoding Facilitating Dense
Embedded Code", T. Bonny and J. Henkel) shrinks that table in two steps:

* Bits an instruction does not need are turned into don't-cares. Examples are
  unused register fields, opcode bits freed by giving the application's
  R-Type instructions a short new opcode, and the two always-zero bits of a
  MIPS jump target.
* Each table column is stored as the list of rows where its bit changes. This
  only pays off if a column changes rarely. So the rows are sorted, and every
  don't-care bit is set equal to the same bit in the row before. A column with
  too many changes is stored whole.

All of that happens off-line. The RTL here is the hardware half: a decoder
that reads the compressed stream, finds each code's length, rebuilds the
instruction from the compressed tables and puts it back into the processor's
own format (MIPS or ARM).

## Data flow

```
memory --32b--> word_register --> shift_register (L bits) --> length_detector
                                                                   | table, row
                         CPU <-- out reg <-- mips_restore / <-- decoding_tables
                                             arm_restore          (column_parity x32)
```

`code_decompressor` is the top. It contains:

| module            | role |
|-------------------|------|
| `word_register`   | 32-bit register. It holds the last word from memory and feeds its bits, MSB first, to the window. |
| `shift_register`  | L-bit window (`MAX_LEN`, the longest code). A decoded code's bits leave it, and it refills in the same cycle. |
| `length_detector` | One comparator per table. It yields the code length, the table and the row. |
| `decoding_tables` | Per-table headers, a shared word store for whole columns, and transition lists for compressed columns. |
| `column_parity`   | Rebuilds one compressed column bit from its transition list. |
| `mips_restore`, `arm_restore` | Undo the format changes (parameter `ISA` picks one). |
| `idec_pkg`        | Configuration record `cfg_t`, `cfg_kind_e` and `isa_e`. |

## The code and the length comparators

The codes are canonical Huffman codes: all codes of one length are consecutive
integers. There is one decoding table per code length, and the row is
`code - first_code_of_that_length`. This design assumes the usual canonical
order between lengths:

```
first[0]   = 0
first[t+1] = (first[t] + count[t]) << (len[t+1] - len[t])
```

Left-aligned to L bits, each length then owns one contiguous range of values,
and shorter codes come first. Tables must be numbered in increasing code
length. Table t's comparator fires when `window >= first[t] << (L - len[t])`.
The highest-numbered firing comparator gives the length. Bits in the window
beyond the valid count are zero. A code is decoded only once `code_len <=
count`. This check is sufficient: if the comparator result fits within the
valid bits, prefix-freeness makes it the true code.

## Decoding tables and compressed columns

This is the part that needs the most care when loading the decoder.

* **Header per table** (`CFG_LUT_LEN`, `CFG_LUT_MIN`, `CFG_LUT_BASE`): an
  in-use flag, the code length, the first code, and the first row of the table
  in the shared word store.
* **Column mode** (`CFG_COL_MODE`): a 32-bit mask per table. Bit c = 1 means
  column c is compressed.
* **Whole columns** are read from `word_store[base + row]` (`CFG_RAW`). Bits of
  compressed columns in that word are ignored.
* **Compressed columns** keep up to `MAX_TRANS` rows where the bit changes
  (`CFG_TRANS`, one slot per write, bit 31 = slot valid). The bit before row 0
  counts as 0, so a 1 in row 0 is a change at row 0. The column's bit at row r
  is the parity of the valid slots with `row_slot <= r`: odd gives 1, even
  gives 0. All slots are compared in parallel and XOR-reduced. Slot order does
  not matter, and unused slots must be marked invalid.

The off-line tool chooses a mode per column. Keep a column as transitions when
the number of changes times `IDX_W` is below the column height, and at most
`MAX_TRANS`. Otherwise store it whole. Setting don't-cares equal to the row
above is what keeps the number of changes low. The hardware does not care how
the rows were ordered.

A lookup registers the word-store row, the table's transition lists and its
mode mask on the clock edge (`rd_en`). The rebuilt `word` follows
combinationally in the next cycle and is held until the next lookup.

## Format restoration

Bits that were don't-cares come out of the table holding whatever the row
above held. The restore units put back the bits the CPU needs:

* **MIPS** (`mips_restore`):
  * A 64-entry map (`CFG_RT_MAP`, indexed by the major opcode) marks the new
    R-Type opcodes. On a hit, the opcode becomes `000000` and the stored
    function field is inserted.
  * J-Type (`00001x`): bits 1:0 are cleared.
  * Floating point (`010001`): the format field (25:21) is looked up from the
    function field (`CFG_FP_FMT`).
* **ARM** (`arm_restore`):
  * Bits 11:8 are cleared in Swap and in register-offset Halfword Data
    Transfer.
  * A Branch Exchange given a new 8-bit opcode in bits 27:20 (`CFG_BX_OP`) gets
    its fixed bits 27:4 = `0x12FFF1` back.

Unused register fields are passed through as they are. The CPU ignores them.

## Timing and handshakes

* Memory side: `mem_valid`/`mem_ready`/`mem_data`. A word is taken in the cycle
  the previous one runs out, so one word per cycle keeps the window full.
* CPU side: `instr_valid`/`instr_ready`/`instr`. At most one instruction per
  cycle. The output holds steady while it is not accepted (asserted).
* Latency: a code fully in the window appears on `instr` two clock edges
  later, one for the table read and one for the output register.
* Branch: pulse `branch` for one cycle while the memory switches to the target
  word. `branch_skip` gives the number of leading bits of that word to drop.
  All buffered bits and in-flight instructions are discarded. If memory is
  always ready, the first instruction appears 4 cycles after the branch cycle
  when its code lies within the first word, and 5 cycles when it spills into
  the second. This refill is where the decoder loses cycles.
* Reset: `rst_n` is synchronous and active low. It clears the buffers, the
  pipeline, the table in-use flags and the restore maps. Load all tables
  before streaming. Configuration writes are not meant to overlap decoding.

## Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `WORD_W`    | 32      | memory word and instruction width (from the scheme) |
| `MAX_LEN`   | 24      | L, longest code length, window width (own choice) |
| `NUM_LUTS`  | 16      | k, number of tables = distinct code lengths (own choice) |
| `IDX_W`     | 14      | row index width; 16,384-row word store shared by all tables (own choice) |
| `MAX_TRANS` | 16      | transition slots per compressed column (own choice) |
| `ISA`       | `ISA_MIPS` | restore unit |

`MAX_LEN` must not exceed `WORD_W`. At the defaults, synthesis gives about
650 kbit of memory: the word store plus the transition lists.

## Where this departs from, or adds to, the published scheme

* The scheme names the register, the window, the comparators and the tables.
  The following are this design's own: the handshakes, the branch port with a
  bit offset, the configuration port, the pipeline registers, and the
  shared-store layout with per-table base rows.
* The scheme stores any number of transitions per column. Here a column holds
  at most `MAX_TRANS`, and columns with more must be stored whole.
* The scheme only states that codes of one length are consecutive. The order
  between lengths is assumed as above.
* The scheme also shortens immediate and branch-offset fields by replacing a
  frequent high-order bit pattern with don't-cares. It does not say how the
  decoder gets the pattern back, so neither restore unit restores those fields.
* The ARM Branch Exchange replacement opcode's position and width (bits 27:20)
  are assumed.
* The scheme reports a 4 ns decoder on a Virtex-II FPGA. No cycle timing is
  given, so the two-stage pipeline above is this design's.

## How far it is verified

* Every module has its own test against an independent model:
  * the register and the window against bit queues;
  * the comparators against randomly drawn canonical codes with 1 to 16 lengths;
  * the column parity against random columns;
  * the tables against the compressor model;
  * the restore units against hand-written rules.
* Both end-to-end tests check every delivered instruction. Each test was also
  run against a copy of its module with a single deliberate bug, and it caught
  the bug.
* Not covered:
  * real programs and tables of real size (the tests use 566 rows across 16
    tables);
  * configuration writes during decoding;
  * the R-Type case where the new opcode has only 5 significant bits. Write the
    same function field into both map entries that the don't-care bit can
    select.
* The decoder needs an off-line tool to produce the table contents and the
  compressed stream. The test package shows the exact format it expects. The
  program memory and the CPU are outside this RTL.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/idec_tb_pkg.sv` models the off-line
compressor. It assigns canonical codes, finds column transitions, picks column
modes, produces the configuration writes and packs symbol streams.

* `tb_code_decompressor`: end to end with MIPS code at the default
  parameters. 3000 instructions of the R, J, floating-point and I kinds; memory
  gaps; CPU back-pressure; three branches, the first one timed. It counts every
  mechanism and fails if any never happens.
* `tb_code_decompressor_arm`: the same with `ISA_ARM`.

To run the end-to-end test with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/idec_pkg.sv tb/idec_tb_pkg.sv tb/tb_code_decompressor.sv \
  --top-module tb_code_decompressor
./obj_dir/Vtb_code_decompressor
```

For a unit test, replace the top module and testbench file. `-y` lets
Verilator find the other modules by file name. The packages go first on the
command line. `-Wno-fatal` keeps width warnings in the testbench code from
stopping the build.
