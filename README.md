# Bitmap index creation accelerator

A bitmap index (BI) over one column of a table is a bit vector with one bit
per record: bit *i* is 1 when record *i* satisfies a condition. A query such as

    (Sale < 50) OR (Sale > 250) OR (Sale in [100, 200])

is answered by building one bitmap per condition and OR-ing them. Building
the bitmaps is the slow part of bitmap-indexed analytics, so this design
builds them in hardware. It holds N attribute values (N = 256 by default) in
registers and gives each one its own comparator. One condition (a *statement*)
is then checked against all N values in a single clock cycle. A command of K
statements (up to 64) therefore takes about **N + K cycles**: N to load the
values, one per cycle, and K to run the statements. Post-processing overlaps
with the next command.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) with no vendor
macros. The defaults (N = 256 records, 16-bit values, commands of up to
K = 64 statements) match a chip built in a 65 nm silicon-on-thin-box
process, which ran at 90 MHz at 1.2 V.

## Data flow

```
 external memory <--> bic_dmac ==words==> bic_pacmp --BI--> bic_pajoin --joined BI--> bic_psproc ==words==> bic_dmac --> memory
                                ==stmts==>  (N WORDs,        (N BIT regs,              (bic_mmpe | bic_buffer)
                                             N CMPs)          OR / OR-NOT)
                      \________________________ bic_accel _______________________________/
 bic_top = bic_dmac + bic_accel
```

Every link is a valid/ready stream: a word moves in a cycle where both are
high. Back-pressure anywhere stalls the chain back to the memory port.

### PACMP: parallel comparator (`bic_pacmp`, `bic_cmp`)

The N attribute words shift into a register chain, one per cycle. After N
pushes, the i-th word pushed sits in WORD *i* and owns bit *i* of every
bitmap. A statement is accepted only once all N WORDs are loaded. It is
broadcast to all N comparators, and their hit bits are registered as that
statement's BI, one cycle later. The registers take one statement per cycle.

A statement (`bic_pkg::stmt_t`) holds:

| field     | meaning |
|-----------|---------|
| `op`      | `CMP_EQ`, `NE`, `LT`, `LE`, `GT`, `GE` compare with `thr_lo`; `CMP_RANGE` tests `thr_lo <= x <= thr_hi`; `CMP_NONE` is never true |
| `join_op` | `JOIN_OR`: result \|= BI; `JOIN_ORNOT`: result \|= ~BI |
| `last`    | final statement of the command |
| `thr_lo`, `thr_hi` | thresholds (unsigned) |

All comparisons are unsigned. A command may use the loaded data set only
after the whole set is loaded. The first push after a command has run starts
a new data set. Several commands can run on the same data set, one after
another, without reloading. No push is taken while a command is open.

### PAJOIN: parallel joiner (`bic_pajoin`)

Each of the N units is a multiplexer choosing the BI bit or its inverse, an
OR gate and a one-bit register:
`BIT <= BIT | (ornot ? ~bi : bi)`. The first BI of a command is written
rather than ORed, which is the same as clearing the BITs at the start of
every command. The cycle after the `last` BI, the joined result is offered
to the post-processor. It is held there until taken. A three-statement
command gives its result three cycles after its first BI.

OR and OR-NOT are the only join operations. An AND of conditions can be
written with them by De Morgan's law, but only in part: OR-NOT inverts one
statement's bitmap, not the running result.

### PSPROC: post-processor (`bic_psproc`, `bic_mmpe`, `bic_buffer`)

The joined BI goes one of two ways, selected by `out_mode`. The mode is
sampled when the BI is accepted.

* **Position list (`OUT_POS`)**, produced by the multi-match priority
  encoder. It sends one 16-bit word per set bit, holding the record number,
  in ascending order. Bit 15 is set on the last word. A bitmap with no set
  bits gives the single word `16'hFFFF`. For example, a bitmap with records
  1, 5 and 6 set (`01000110` written from record 0) gives `0x0001`,
  `0x0005`, `0x8006`.
* **Raw bitmap (`OUT_RAW`)**, produced by the buffer. It sends a header
  `{8'hB1, seq}`, then N/16 words of the bitmap (word *j* holds records
  16j .. 16j+15, with the lowest record in bit 0), then a footer
  `{8'hE1, seq}`. `seq` is an 8-bit count of results since reset.

Both paths send one word per cycle. A new BI is accepted in the cycle the
previous result's last word leaves.

#### How the encoder finds one match per cycle

An N-input priority encoder that is re-run after clearing each match would
be slow for N = 256. `bic_mmpe` instead views the working copy of the
bitmap as a 2-D array of ROWS × COLS bits (16 × 16 for N = 256):

1. An OR of each row gives a ROWS-bit "row active" vector.
2. A ROWS-input priority encoder picks the first active row.
3. A multiplexer selects that row, and a COLS-input priority encoder picks
   its first set bit.
4. The output is `row * COLS + col`. That bit is cleared, and the next
   cycle finds the next match.

The critical path is two 16-input encoders and a 16:1 row multiplexer,
not one 256-input encoder. `out_last` is high when clearing the current
bit leaves the vector empty, so no extra cycle is spent on detecting the
end. ROWS defaults to `1 << ($clog2(N)/2)`, and N must be a power of two.

### DMA controller (`bic_dmac`) and system top (`bic_top`)

A job is described by `bic_pkg::dma_cfg_t` and launched with a one-cycle
`start`. The fields are read at `start`:

| field | use |
|-------|-----|
| `attr_base` | address of the N attribute words |
| `stmt_base` | address of the statements, three words each: `{12'b0, join_op, op}`, `thr_lo`, `thr_hi` |
| `n_stmt`    | number of statements, 1 .. 64; the last one is marked automatically |
| `dst_base`  | where the result words are written |
| `out_mode`  | result format |

The memory port is a simple request/grant port with 16-bit words and
16-bit word addresses. A request (`mem_req`, `mem_we`, `mem_addr`,
`mem_wdata`) is taken in a cycle with `mem_gnt` high. Read data come back
in request order on `mem_rvalid`/`mem_rdata`, with any latency. Up to
`MAX_OUT` (4) reads are in flight or buffered at once. Returned words wait
in a 4-deep FIFO, so a stalled accelerator never drops data. Result writes
have priority over reads.

At the end of a job, `done` pulses once and `result_words` gives the
number of words written. `data_loaded` shows that the accelerator holds a
full data set. One DMA job carries one command. The accelerator itself
(`bic_accel`) accepts commands back to back.

## Timing

| step | cycles |
|------|--------|
| load N words into the accelerator | N |
| K statements | K |
| last BI → joined result → first output word | 2 |
| output | 1 per word: popcount words (position list) or N/16 + 2 words (raw) |

At the accelerator's ports, the first result word leaves N + K + 2 cycles
after the first attribute word enters; `tb_bic_accel` checks this exactly.
Behind the DMA controller, statements cost three memory reads each. Reads
and writes share one port, so a job with a single-cycle memory takes about
N + 3K + (result words) + a few cycles. `tb_bic_top` prints the cycle count
of each job.

## Where this RTL makes its own choices

The structure (shift-in WORDs with one comparator each, NOT/MUX/OR/BIT
joiner units, a two-path post-processor with a 1-D to 2-D priority
encoder, and a DMA controller in front) and the sizes follow the
published design. The following are this implementation's own choices:

* The comparison set and its encoding, and unsigned comparisons. The
  published examples show only `<`, `>` and a closed range.
* The joiner's multiplexer is read as a "BI or NOT BI" select, which gives
  OR and OR-NOT joins.
* All handshakes, and the reset: active-low asynchronous `rst_n` on
  control state; data registers are not reset.
* The rules for when loads and statements may be accepted.
* The position-list word format, with the end flag in bit 15 and
  `16'hFFFF` for "no match".
* The header and footer contents of the raw format.
* The whole DMA interface: the memory port, the job descriptor and the
  three-word statement layout. Only the controller's role is given
  (moving data and results between external memory and the accelerator
  with low latency).
* The inside of the multi-match encoder beyond the row/column idea.

Not modelled, because they are not logic: back-gate biasing of the
transistors (used to trade speed against leakage), the standby mode where
the clock is simply stopped by its source, I/O pads, and the external
memory. A behavioural memory model for simulation is in
`tb/tb_ext_mem.sv`.

## Parameters

| where | name | default | meaning |
|-------|------|---------|---------|
| `bic_pkg` | `WORD_W` | 16 | attribute and memory word width |
| `bic_pkg` | `N_DEF` | 256 | records per data set (default of every module's `N`) |
| `bic_pkg` | `K_MAX` | 64 | largest command |
| `bic_pkg` | `ADDR_W_DEF` | 16 | memory word-address width |
| modules | `N` | `N_DEF` | records; power of two, multiple of 16, at most 32768 |
| `bic_mmpe` | `ROWS` | `1 << ($clog2(N)/2)` | rows of the 2-D view |
| `bic_dmac` | `MAX_OUT` | 4 | reads in flight; power of two |

For 32-bit attributes, change `WORD_W`. The raw-bitmap word order, the
header/footer layout and the statement layout scale with it. The position
words then carry the end flag in bit 31, but `bic_psproc` and
`tb_bic_ref_pkg` assume bit 15, so both must be adjusted.

## Files

| file | contents |
|------|----------|
| `rtl/bic_pkg.sv` | types, encodings, constants |
| `rtl/bic_cmp.sv` | one comparator |
| `rtl/bic_pacmp.sv` | WORD shift chain and N comparators |
| `rtl/bic_pajoin.sv` | N joiner units |
| `rtl/bic_prienc.sv` | lowest-index priority encoder |
| `rtl/bic_mmpe.sv` | multi-match priority encoder |
| `rtl/bic_buffer.sv` | raw bitmap with header and footer |
| `rtl/bic_psproc.sv` | post-processor |
| `rtl/bic_accel.sv` | PACMP → PAJOIN → PSPROC |
| `rtl/bic_dmac.sv` | DMA controller |
| `rtl/bic_top.sv` | system top |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/tb_bic_ref_pkg.sv` | software reference: comparisons, join, both output formats |
| `tb/tb_ext_mem.sv` | external memory model: random grant stalls, fixed read latency |

## Verification

Each testbench compares the RTL against values worked out on its own: a
software model of comparisons, joins and output formats in
`tb_bic_ref_pkg`. Each prints `TB_RESULT checks=<n> failures=<m>` and stops
itself through a watchdog if the design hangs.

* `tb_bic_top` runs at the default size (N = 256), with a memory that
  refuses about 15 % of requests. The jobs include:
  * the three-statement Sale query;
  * a full 64-statement command;
  * an empty result;
  * random commands that use every comparison, OR-NOT joins and both
    output formats.

  It counts each of these events, and memory stalls on both reads and
  writes, and fails if any never happened.
* `tb_bic_accel` checks the N + K + 2 indexing time, and back-to-back
  commands on a data set and reloads under output back-pressure.
* The block testbenches also check per-cycle rates: one BI per cycle, one
  position or word per cycle, and the joiner's K-cycle latency.
* Concurrent assertions in the RTL check the stream rules: stalled outputs
  hold their value, loads and statements never fire together, and the
  post-processor's two paths never drive the output at once.

All testbenches pass. Each one was also run against a copy of its block
with one deliberate bug, and each such run reported failures.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bic_pkg.sv tb/tb_bic_ref_pkg.sv tb/tb_bic_top.sv --top-module tb_bic_top
./obj_dir/Vtb_bic_top
```

Use the same form for any other testbench: `tb_bic_cmp`, `tb_bic_pacmp`,
`tb_bic_pajoin`, `tb_bic_mmpe`, `tb_bic_buffer`, `tb_bic_psproc`,
`tb_bic_accel` or `tb_bic_dmac`. For a lint-only check of the RTL, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/bic_pkg.sv rtl/bic_top.sv`.

Lint warnings that remain:

* `SYNCASYNCNET`: `rst_n` is both the asynchronous reset and the
  `disable iff` of the assertions.
* The package's unused constants in modules that do not need them.
* In `bic_dmac`, `mem_wdata` is wired straight from the result stream.
