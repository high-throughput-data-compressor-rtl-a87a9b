# LZ77 compressor on a content addressable memory

LZ77 compression replaces a string that already occurred in the recent past
by a pointer to it. The costly part is the search: for every new symbol, every
position of the sliding window is a possible earlier occurrence. This design
makes that search free of loops. The window is held in a content addressable
memory (CAM) that compares the incoming symbol with all 2048 stored symbols
in one cycle, and a ring of small *match cells*, one per CAM cell, follows all
candidate strings in parallel. The encoder therefore takes one symbol per
clock cycle, whatever the data, with no stalls. The same CAM, read at random
addresses, serves as the window of the decoder.

The main configuration is a 2048-symbol window of 8-bit symbols, a maximum
match length of 32 and 16-bit codeword bodies. The window is organised as
64 rows of 32 cells for address generation.

## Codewords

A string of two or more symbols found in the window becomes a match codeword.
Any other symbol is sent as a literal:

| ID (1 bit) | body (16 bits, default sizes)                         |
|------------|-------------------------------------------------------|
| 0 (match)  | `{start address [10:0], length - 1 [4:0]}`            |
| 1 (literal)| `{8'h00, symbol [7:0]}`                               |

The start address is the CAM cell that holds the first symbol of the earlier
copy. The length, 2..32, is stored minus one so that 32 fits in five bits. A
single-symbol match is sent as a literal, because a pointer would be larger
than the symbol. The ID is a separate 17th bit next to the 16-bit body; it is
the `cw_id` output, typed `lz77_pkg::cw_id_e`.

## How the encoder follows a string

Symbols are written into the CAM cyclically. A ring counter gives the write
address, so consecutive input symbols sit in consecutive cells, wrapping from
cell 2047 to cell 0. An earlier copy of the current string therefore runs
through consecutive cells too. When the previous input symbol matched cell
*i − 1*, the string continues if the current symbol hits at cell *i*.

Every cycle the CAM compares the input symbol with all cells (`hit[i]`), and
then stores the symbol at the write address. The comparison sees the cell's
old content. Each match cell *i* holds two flip-flops that load from its left
neighbour *i − 1* (cell 0 from cell 2047):

* **permission**: the neighbour's `match` of the previous symbol, meaning "a
  string that is still alive ended at the cell to my left";
* **last hit**: the neighbour's `hit` of the previous symbol.

`match[i] = (mode ? last_hit : permission) & hit[i]`.

While a string is growing, `mode = 0`. A cell then matches only if the string
was alive one cell to its left one symbol ago, so the set of alive candidates
can only shrink. The OR of all `match` signals, the *global match*, says
whether any candidate survived.

The *length generator* keeps `length`, the number of symbols in the current
string up to the previous symbol. For each symbol it computes

    sync = !global_match || length >= max_len

When `sync` is high, the string ended before the current symbol. A codeword
for it is due, and the current symbol becomes the first symbol of the next
string: the counter loads 1. Otherwise the counter counts up. `mode` is
`sync` delayed by one symbol. On the symbol after a `sync`, the cells use
**last hit** instead of permission. `last_hit[i] & hit[i]` is true exactly
where the previous symbol (the first of the new string) and the current one
stand in two consecutive cells. That restarts the search with every two-symbol
candidate in the window, without a cycle lost. If nothing matches there
either, the new string has length 1 and is sent as a literal.

After reset, all permission flops are preset to 1 ("every cell is a
candidate"), `mode` is 0 and `length` is 0. A `sync` with length 0 sends
nothing. Every CAM cell has a valid bit, cleared by reset, so cells that were
never written do not hit.

Example: the window holds `a b c` in cells 10, 11 and 12, and the input is
`p a b c d`. The symbol `p` has just started a new string (so `mode` is 1 for
the next symbol), and `p a` does not occur in the window:

| symbol | mode | match cells            | global | length before | sync | codeword sent        |
|--------|------|------------------------|--------|---------------|------|----------------------|
| a      | 1    | none                   | 0      | 1             | 1    | (1, `p`)             |
| b      | 1    | 11 (a@10 then b@11)    | 1      | 1             | 0    | —                    |
| c      | 0    | 12                     | 1      | 2             | 0    | —                    |
| d      | 0    | none                   | 0      | 3             | 1    | (0, start 10, len 3) |

This greedy rule takes the longest string that starts at the current symbol
anywhere in the window, up to `max_len`. When several copies of that string
exist, the one whose last symbol has the lowest address wins.

## Position of the match: row/column partition and pipelining

The position generator finds the address of the lowest matching cell. A flat
2048-input priority encoder would lie on the critical path, so the match
signals are treated as 64 rows of 32:

* each row ORs its 32 matches into a row-match; the 64 row-matches are ORed
  into the global match, which goes straight back to the length generator
  (this is the one loop that cannot be pipelined);
* a row priority generator picks the lowest matching row; its one-hot output
  puts that row's 32 match signals on a shared column bus;
* pipeline registers hold the one-hot row choice (64 flops) and the column
  bus (32 flops), 96 flops in all instead of 2048 + 64;
* in the next cycle, a row encoder gives the high-order address bits, and a
  column priority generator with its encoder gives the low-order bits.

The position thus arrives one symbol after the matches it describes. That
delay fits the encoder's own timing. `sync` is raised on the symbol *after* a
string's last symbol, and in that cycle the registers hold the matches of that
last symbol. The output stage unit then computes

    start = position - (length - 1)   (modulo the window size)

and registers the codeword, so `cw_valid` rises one cycle after `sync`. For
a literal, the output stage sends the previous input symbol, which it keeps
in a register.

The pipeline registers load only on cycles that carry a symbol. A gap in the
input or a flush therefore does not lose the position.

## Decoding

With `mode_decode = 1`, the CAM acts as the decoder's window. The decoder
checks the ID of each codeword:

* a literal is sent out and written into the window in the same cycle;
* a match loads the start address into an incrementing read-address counter.
  For `length` cycles, the symbol at the read address is sent out and written
  at the window's write position.

The first symbol of a match is read in the cycle that accepts the codeword,
so the decoder also produces one symbol per cycle. `dcw_ready` is low while
the rest of a match is being copied. A read sees a cell's old content when the
same cell is written in that cycle. So copies that overlap their own output
(distance shorter than length, such as runs) decode correctly, and so do
copies from exactly one window back.

Encoder and decoder both start from an empty window after reset, and both
write one symbol per symbol, so their windows hold the same contents at the
same addresses.

## Top-level interface (`lz77_codec`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `mode_decode` | in | 1 | 0 encode, 1 decode; change only while in reset |
| `max_len` | in | 6 | maximum match length, 2..32, may be changed at run time |
| `in_valid`, `in_sym` | in | 1, 8 | input symbol (encode), accepted every cycle it is valid |
| `flush` | in | 1 | one cycle with `in_valid` low: send the pending string |
| `cw_valid`, `cw_id`, `cw_body` | out | 1, 1, 16 | codeword (encode) |
| `dcw_valid`, `dcw_ready`, `dcw_id`, `dcw_body` | in/out | | codeword in (decode), valid/ready |
| `out_valid`, `out_sym` | out | 1, 8 | decoded symbol |

The encoder has no back-pressure. It emits at most one codeword per input
symbol, plus one for a flush, and each codeword appears one cycle after the
symbol (or flush) that ended its string. `flush` also presets the match
cells, so data that follow a flush start a new string. They still use the
window that is already filled.

Concurrent assertions in `lz77_codec` and `lz77_decoder` check the interface
rules during simulation (with `--assert` in Verilator):

* `mode_decode` is stable out of reset;
* `flush` never comes together with `in_valid`;
* `max_len` is within 2..`MAX_LEN` while symbols arrive;
* an offered decoder codeword stays valid and unchanged until it is accepted.

Parameters (package `lz77_pkg` holds the defaults): `WINDOW` = 2048 (power of
two), `MAX_LEN` = 32, `ROW_W` = 32 (power of two dividing `WINDOW`), `SYM_W` =
8. The codeword body is `log2(WINDOW) + log2(MAX_LEN)` bits, and it must be at
least `SYM_W` bits wide.

## Module hierarchy

```
lz77_codec
├── cam                      window: byte cells, comparators, valid bits, ring counter, read port
├── match_logic_unit
│   ├── match_cell_array     ring of match_cell
│   │   └── match_cell       permission / last-hit flops, mode mux, AND
│   ├── position_generator   row ORs, global match, row/column priority, 64 + 32 pipeline flops
│   │   └── priority_encoder lowest index wins, one-hot and binary
│   └── length_generator     counter, max-length compare, sync, mode
├── output_stage_unit        codeword assembly, start address
└── lz77_decoder             ID check, read-address counter, copy sequencer
```

## What follows the original architecture and what was chosen here

These parts follow the published architecture:

* the three units CAM, match logic and output stage;
* the comparator per cell and cyclic (ring-counter) storage;
* the match cell made of two flops, a multiplexer and an AND gate, with the
  permission flop preset at start-up;
* the counter with a comparator against a programmable maximum length, and
  `mode` as `sync` delayed by one cycle;
* lower addresses winning the priority;
* the 64 × 32 partition with pipeline registers after the row priority
  generator and before the column priority generator;
* matches of one symbol sent as literals;
* the start address derived from position and length;
* decoding through random-access reads of the same memory.

These are this implementation's own choices:

* The 17-bit codeword: a separate ID bit, and the length stored minus one.
* The valid bit per CAM cell.
* The `flush` input, the input gaps (`in_valid`), and the decoder's
  valid/ready handshake.
* On a `sync` caused by the maximum length, the counter reloads to 1 even
  though a match is still present.
* The start address is computed as `position − (length − 1)`, because
  `position` is the cell of the string's *last* symbol.
* The tri-state row-select bus is an AND-OR multiplexer, so every net has
  one driver.
* Encoder and decoder share one CAM and are switched by `mode_decode`.
* Reset values other than the preset of the permission flops.

Not modelled: the transistor-level CAM bit cell and the read sense amplifier.
Their logic function is part of `cam`, which is a plain register array with
an asynchronous read. The original design reaches 50 MHz in a 0.8 µm CMOS
process. Nothing here checks clock speed. The testbenches check the cycle
behaviour: one symbol per cycle in both directions.

The flat memory and the per-cell comparators synthesise to about 23k
word-level cells and 6.3k flip-flops at the default size. In a real
implementation they would be a custom CAM macro.

## Verification

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_cam` | hit vector against a reference array with valid bits, read port, ring counter; no hits from old contents after reset |
| `tb_match_cell`, `tb_match_cell_array` | match outputs against a reference of the flops; the ring wrap from the last cell to cell 0 |
| `tb_length_generator` | sync, length and mode for random global-match patterns, flushes and a changing `max_len`; both string-end causes |
| `tb_priority_encoder` | lowest-index grant and index, all one-hot and random inputs |
| `tb_position_generator` | global match, lowest matching address one symbol later, holding over gaps |
| `tb_match_logic_unit` | the whole unit against a vector-level reference |
| `tb_output_stage_unit` | codeword contents and timing, including start addresses that wrap |
| `tb_lz77_decoder` | decoding of generated codewords, including overlapping and full-window copies, at one symbol per cycle |
| `tb_lz77_codec` | end to end with a 64-symbol window: codewords against a reference encoder (longest string, lowest-address tie break), then decoding back to the input; second pass with `max_len` = 4; the sentence "This is a book. That is a pen. Those books are mine." |
| `tb_lz77_codec_full` | the same at the default size (2048 window, length 32), 12000 symbols |
| `tb_lz77_sweep` | windows 128 to 2048 against `max_len` 4 to 64 on 50 000 bytes of generated text; every codeword stream decoded by a software model of the window and compared with the input; prints the compression-ratio table |
| `tb_lz77_workloads` | 200 KB of generated English-like text (`max_len` 32) and a generated 256 × 256 8-bit image (`max_len` 4), at the default size; exact round trip, one cycle per symbol |

The end-to-end testbenches count how often each mechanism occurs. A mechanism
that never occurs counts as a failure. The mechanisms are: literals, matches,
strings cut at the maximum length, symbols with no hit, ties between
candidates, overlapping copies, copies across the window wrap, input gaps,
decoder stalls, mode switches and flushes. On the generated workloads, the
encoder reaches a compression ratio of about 2.9 on the text and 1.36 on the
image, counting 17-bit codewords against 8-bit symbols. The sweep gives, for
the same kind of text (ratio; rows `max_len`, columns window size):

| max_len | 128 | 256 | 512 | 1024 | 2048 |
|---------|-----|-----|-----|------|------|
| 4       | 1.12 | 1.32 | 1.52 | 1.61 | 1.63 |
| 8       | 1.23 | 1.56 | 1.97 | 2.29 | 2.46 |
| 16      | 1.25 | 1.61 | 2.08 | 2.48 | 2.77 |
| 32      | 1.25 | 1.61 | 2.09 | 2.49 | 2.79 |
| 64      | 1.25 | 1.61 | 2.09 | 2.49 | 2.79 |

A larger window always helps. Beyond a certain maximum length, a longer limit
adds little, which is why 32 is a good choice for 2048 cells. The data are
synthetic, so these ratios say nothing about real files.

To simulate a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/lz77_pkg.sv tb/tb_lz77_codec.sv \
          --top-module tb_lz77_codec -Mdir obj && ./obj/Vtb_lz77_codec
```

The other modules are found in `rtl/` through `-I`/`-y rtl`. The default-size
testbenches take about a minute to compile and seconds to run.
