# xmatchpro32: a serial X-Match compressor and decompressor in SystemVerilog

Lossless compression is only worth putting in a network or storage path if it keeps up
with the link. X-Match does this by working on whole 32-bit words instead of single
bytes. Each incoming word, called a *tuple*, is compared in one clock against every
tuple in a small dictionary. Each byte is compared separately. The result is one of
three outcomes:

* **full match**: all four bytes equal a dictionary entry. Only the entry's location is
  sent.
* **partial match**: at least two bytes equal some entry. The location, a mask of the
  matching bytes and the bytes that differ are sent.
* **miss**: no entry shares two bytes with the tuple. The whole tuple is sent as a literal.

The dictionary is kept in most-recently-used order. A decompressor that applies the same
update rule to the tuples it rebuilds ends up with the same dictionary. It can therefore
turn each location back into data without any side information.

This RTL has three parts:

* a compressor that handles one tuple per clock;
* a decompressor that handles one code word per clock;
* a small control unit that starts both from an empty dictionary.

They are wired side by side in the top module `xmatchpro32`.

## The dictionary and its move-to-front rule

The dictionary (`xm_cam`) is a shift register of `DEPTH` tuples with a valid bit each.
Location 1 is the front. After reset or a clear it is empty. It grows by one entry for
every tuple that is not a full match, until it is full. From then on, every new entry
pushes the back entry out.

Every clock in which a tuple is processed updates the dictionary in one of two ways:

| outcome of the tuple  | dictionary update |
|-----------------------|-------------------|
| miss or partial match | Every entry moves one place back and the last one is dropped. The new tuple goes in at location 1. |
| full match at location p | Entries 1 .. p-1 move one place back. The matched tuple leaves location p and goes in at location 1. Entries behind p stay where they are. |

Here is an example. It uses the tuples 1 2 3 4 5 14 15 4 6 5 and sends only full
matches. After the seventh tuple the dictionary reads 15 14 5 4 3 2 1 from the front, so
the repeated 4 is found at location 4. It then moves to the front: 4 15 14 5 3 2 1. The 6
is inserted: 6 4 15 14 5 3 2 1. The repeated 5 is now at location 5.

Locations are 5 bits wide and count from 1, so the default dictionary holds 31 tuples.
Location 0 is never used.

Every entry has four 8-bit comparators. The `hit[i][b]` matrix they produce (entry i,
byte b, gated by the valid bit) is the CAM comparator's output. The same module also has
a read-by-location port, and the decompressor uses the module as plain storage through
it.

## Choosing the match (`xm_match_logic`)

For every entry, the match logic counts how many of the entry's four hit bits are set. It
keeps the entry with the highest count. When two entries have the same count, the one
nearer the front wins.

* If the count is below `MIN_MATCH`, the tuple is a miss.
* If the count is 4, it is a full match.
* Anything in between is a partial match. The 4-bit mask of matching bytes is its
  *match type*.

`MIN_MATCH` defaults to 2, the threshold of the X-Match algorithm.

**Why `MIN_MATCH = 4` also exists.** The published simulation runs of this system show
only full matches and misses. There, the tuples 1 and 2 are both coded as misses, even
though they share three zero bytes. With `MIN_MATCH = 4` the design reproduces those runs
exactly (`tb_xmatchpro32_fig`). With the default of 2, the second of those tuples becomes
a partial match instead.

## The code word

The compressor registers one code word per tuple:

| outcome | `matchhit` | `matchtype` | `addrout` | `dataout` |
|---------|:---------:|:-----------:|-----------|-----------|
| miss    | 0 | `4'h0` | Dictionary occupancy after the insert, 1..DEPTH. | The whole tuple. |
| partial | 0 | byte mask | Matched location. | The bytes that did not match, in their own lanes. Matched lanes are 0. |
| full    | 1 | `4'hF` | Matched location. | Unchanged: keeps the last literal. |

Two of these fields follow the published waveforms:

* On a miss, the address output shows the running occupancy (1, 2, 3, …).
* On a full match, the data output keeps its previous value.

The decompressor ignores both: it needs neither the address of a miss nor the data of a
full match.

Byte lane b is `data[8b+7:8b]`. It belongs to `matchtype[b]`.

The code word is left unpacked. There is no variable-length coding of match types or
locations, and no packing into a bit stream. A packing stage would sit behind the
compressor outputs and in front of the decompressor inputs.

## Compressor (`xm_compressor`)

The compressor is three stages:

1. **Input FIFO.** Tuples enter here with a valid/ready handshake.
2. **Search, decide and update, in one clock.** While `en` is high and the FIFO is not
   empty, the FIFO's head tuple is searched in the dictionary and the match logic decides.
   The dictionary is updated at the same clock edge. The next tuple is therefore compared
   against the updated dictionary, with no bubble.
3. **Output register** holding the code word.

Timing:

* A tuple accepted at clock edge k gives its code word, with `code_valid`, after edge
  k+1.
* That is two clocks of latency and one tuple per clock.
* The output has no back-pressure.
* While the control unit holds `en` low, tuples wait in the FIFO. When the FIFO is full,
  `udata_ready` falls.

## Decompressor (`xm_decompressor`)

The decompressor takes a code word (`cmatchhit`, `cmatchtype`, `caddrin`, `cdatain`) and
reads the entry at `caddrin`. It builds the tuple lane by lane: lanes whose mask bit is
set, or every lane on a full match, come from the entry; the other lanes come from
`cdatain`. The rebuilt tuple does two things in the same clock:

* it updates the dictionary with the rule above;
* it is pushed into the output FIFO.

Timing:

* A code word accepted at edge k can be read from `ddataout` right after edge k.
* That is one clock of latency and one word per clock.
* `cdata_ready` is low until the control unit has started the unit, and while the output
  FIFO is full.

## Control unit (`xm_control`)

After reset the control unit is idle. The compressor does not consume tuples, and the
decompressor does not accept code words. A `start` request works in two steps:

1. For one clock (CLEAR), both dictionaries are emptied.
2. Both engines run (RUN) until the next reset.

Later `start` pulses are ignored. Because both dictionaries are cleared by the same
start, the compressor and the decompressor begin identical. To begin a new independent
stream, reset the system and start it again.

## Top level (`xmatchpro32`)

```
 udata ──► [input FIFO] ─► [CAM comparator] ─► [match logic] ─► matchhit, matchtype,
                                ▲    │ move-to-front update        addrout, dataout
                    start ─► [control unit]
                                │ clear / run
 cmatchhit, cmatchtype, ──► [dictionary (xm_cam)] ─► [rebuild] ─► [output FIFO] ─► ddataout
 caddrin, cdatain
```

The compressor and decompressor halves have separate ports. Connect the code outputs to
the code inputs, or put a channel or a store between them. Port names `udata`,
`dataout`, `addrout` and `matchhit` follow the published signal names. The
valid/ready signals, the `matchtype` ports and `busy` belong to this implementation.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DEPTH` | 31 | Dictionary entries, 2..31. Limited by the 5-bit location. |
| `FIFO_DEPTH` | 16 | Depth of the input and output FIFOs. Must be a power of two. |
| `MIN_MATCH` | 2 | Matching bytes needed for a partial match, 2..4. Use 4 for full matches only. |

Shared widths and types are in `xm_pkg`: 32-bit tuples, 5-bit locations and 4-bit match
types. The location width bounds `DEPTH`.

## Where this RTL departs from the published design, or fills gaps

Taken from the published design:

* the algorithm (byte-wise matching, the two-byte threshold, move-to-front on full
  matches, insert at the front otherwise);
* the unit breakdown (FIFO, CAM comparator, match logic, decompressor with output FIFO,
  control unit);
* the 5-bit address, 1-bit match hit and 32-bit data ports;
* the address and data values seen in its simulation runs.

This implementation's own choices:

* FIFO depths, the handshakes and the reset style (synchronous, active high);
* the control unit's sequence;
* the tie-break between equal matches;
* accepting every byte mask with at least `MIN_MATCH` bytes as a match type;
* the lane layout of partial literals;
* the decompressor's internals.

Left out:

* The published design codes location addresses with a width that grows with the
  dictionary. Here they are always 5 bits, the width on its block diagram.
* The multi-compressor routing schemes and the FPGA figures (clock, area, power) that
  the original work reports are not modelled. At one tuple per clock, a clock of
  108.658 MHz would give 3.48 Gbit/s of input; this clock has not been checked by
  synthesis here.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each has a
watchdog. The testbench reference model (`tb/xm_ref_model.svh`) keeps its dictionary in a
SystemVerilog queue, independent of the shift-register RTL.

| testbench | what it covers |
|-----------|----------------|
| `tb_xm_fifo` | Order, flags, count and one-clock latency under random push and pop. |
| `tb_xm_cam` | Hit matrix, read port and occupancy against the queue model. Covers inserts, move-to-front, overflow and clear. |
| `tb_xm_match_logic` | Random hit matrices against a plain search. |
| `tb_xm_compressor` | The published 10-tuple run on a full-match-only instance. Input hold. A 3000-tuple random stream checked word by word, with exact two-clock latency. |
| `tb_xm_decompressor` | Code words from the model give back the original tuples. Covers start gating, back-pressure and one-clock latency. |
| `tb_xm_control` | The start sequence. |
| `tb_xmatchpro32` | End to end at the default sizes: 2 × 6000 random tuples through compressor, channel and decompressor. Counts and requires each mechanism: input hold, start, miss, partial, full, overflow, one-per-clock bursts, back-pressure, restart. |
| `tb_xmatchpro32_fig` | Both published simulation runs, with `MIN_MATCH = 4`, looped through the decompressor. |

With Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/xm_pkg.sv tb/tb_xmatchpro32.sv --top tb_xmatchpro32 -o sim
./obj_dir/sim
```

Every testbench here passes, including the end-to-end one at the top's default
parameters. That run takes a few seconds.
