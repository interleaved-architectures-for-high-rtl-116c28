# Interleaved synchronizing FIFO

A FIFO that carries words from one clock domain (the sender's `clk_put`) to
another (the receiver's `clk_get`). It can move one word per clock on both
sides. Its fall-through latency is the synchronizer depth plus one receiver
cycle. It is built from ordinary flip-flops, latches and gates, so it
synthesizes with a standard cell flow.

The design combines two known approaches:

- **Fast one-hot pointers.** Pointers are kept in unary (thermometer) code, so
  comparing the write and read positions costs one XNOR per storage word.
  There is no Gray-to-binary conversion.
- **Few synchronizers.** A plain unary FIFO needs one synchronizer per word and
  direction. Here the `N` words are arranged as `NV` rows of `NH` words, and
  each side's pointer is split into a row counter and a column counter.
  Status crosses between the clocks once per row, so `2*NV` synchronizers
  serve `NV*NH` words.
- **Interleaving.** Consecutive words go to consecutive rows. A row is touched
  at most once every `NV` cycles, and that gap hides the synchronizer latency.

The same interleaving gives the read path two buses, one for even rows and one
for odd rows. The data output is a register in the receiver's clock. It is
forced to zero whenever it holds no valid word, so no signal from the other
clock domain can ever reach the receiver's logic between clock edges.

This RTL is an independent implementation of the architecture published as
*"Interleaved Architectures for High-Throughput Synthesizable Synchronization
FIFOs"*. The section "Where this RTL departs from the published design" lists
every point where it differs or fills a gap.

## Interface

| port | dir | domain | meaning |
|---|---|---|---|
| `clk_put`, `rst_n_put` | in | put | sender clock, asynchronous active-low reset |
| `req_put` | in | put | put request |
| `data_in[WIDTH]` | in | put | word to insert |
| `spaceav` | out | put | a put requested on this cycle will be taken on the next rising edge |
| `clk_get`, `rst_n_get` | in | get | receiver clock, asynchronous active-low reset |
| `req_get` | in | get | release the current word and ask for the next one |
| `data_out[WIDTH]` | out | get | output word, all zeros while `datav` is low |
| `datav` | out | get | `data_out` holds a valid word |

**Put side.** A word is accepted on a rising `clk_put` edge where `req_put`
and `spaceav` are both high. If `spaceav` is low, the request is simply
ignored. The sender may therefore hold `req_put` high and treat `spaceav` as
the acknowledgement. `spaceav` is a few gates after flip-flops of the put
domain. It does not depend on `req_put` in the same cycle, so there is no
combinational path through the FIFO.

**Get side.** While `datav` is high, `data_out` is valid and stays unchanged
until a rising `clk_get` edge with `req_get` high.

- If the next word is already present at that edge, it replaces the current
  one and `datav` stays high.
- If it is not present, `datav` falls and `data_out` becomes zero. The next
  word is then loaded as soon as it arrives, without another request.

`req_get` can be held high, and `datav` then acts as the acknowledgement.

**Reset.** Reset both domains together. After reset, `spaceav` goes high
`SYNC_DEPTH` put cycles later, once the empty state has crossed the
synchronizers.

**Capacity.** The FIFO holds `NV*NH` words in its latches, plus the word in the
output register.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NV` | 4 | rows, which is also the number of synchronizers per direction. Must be even. Use `NV > SYNC_DEPTH` for one word per cycle. |
| `NH` | 4 | words per row. Must be even. |
| `WIDTH` | 8 | word width |
| `SYNC_DEPTH` | 2 | flip-flops per synchronizer, at least 2 |

The defaults form the 16-word configuration that the published design quotes
as its practical example. Full throughput needs `NV >= 4` and `NV*NH >= 12` when
`SYNC_DEPTH` is 2 or 3, and `NV*NH >= 16` when `SYNC_DEPTH` is 4. The defaults
are also in `rtl/sfifo_pkg.sv`.

## Pointers: two ring counters and one long thermometer code

Each side counts with a pair of ring counters (`therm_counter`). A ring
counter of `n` stages is kept in thermometer (Johnson) code. On each step it
shifts left and feeds the inverse of its top bit into bit 0, so it walks
through `2n` states: `0000, 0001, 0011, 0111, 1111, 1110, 1100, 1000, 0000, ...`.
Its count is the position of the single boundary between ones and zeros:
`count(q) = i` where `q[i] != q[i-1]`, and 0 when `q[n-1] == q[0]`.
Inverting every bit leaves the count unchanged, so the count runs modulo `n`.
The one-hot form of the count is the XOR of neighbouring bits, with an XNOR
for bit 0.

The vertical counter `qv` (NV stages) advances on every access. The
horizontal counter `qh` (NH stages) advances when `qv` wraps. The pair
therefore addresses word `count(qv) + NV*count(qh)`, which is row
`count(qv)` and column `count(qh)`.

To compare the two pointers, `therm_combine` turns each pair into the `N`-bit
thermometer code that a single `N`-stage counter would hold. Bit (row `i`,
column `j`) of that code is:

```
therm(i,j) = qh[j]      if qv[i] == j mod 2
           = qh[j-1]    otherwise         (~qh[NH-1] when j == 0)
```

This works because of how the two counters move together. The vertical
counter alternates between filling with ones and filling with zeros, and it
switches exactly when `count(qh)` changes parity. This needs `NH` to be even.
The columns below and above the current one read straight from `qh`. In the
current column, `qv[i]` decides whether row `i` has already been passed.

The result is one 2:1 selection per word, with no carry chain.
`tb_therm_combine` checks it exhaustively for 4x4, 2x6 and 6x2 arrays.

`slot_status` then compares the two codes. A word is **empty** where
`therm_put == therm_get` (one XNOR) and **full** otherwise (one inverter).

## Crossing the clocks: per-row indicators and the two-slot rule

This section is about how the sender learns about free space. The receiver
learns about data in the same way (`get_control`, using the `full` flags).

The `empty` flags change in two ways:

- They **fall** synchronously to `clk_put`, when the put pointer moves.
- They **rise** asynchronously, when the receiver frees a word.

The flags of each row are first reduced to one indicator, before any
synchronization. The indicator of row `i` is high when either:

- (a) the row is not being written this cycle (`!do_put || !ohv[i]`) and any
  of its words is empty, or
- (b) the row is being written this cycle, but a word other than the one being
  written (a different column, `~ohh`) is empty.

`do_put` is high in the cycle after an accepted request. That is the cycle in
which the word is written. The pointer moves at the end of that cycle.

Each indicator crosses into `clk_put` through `row_sync`, a chain of
`SYNC_DEPTH` flip-flops. A put to row `i` clears every flip-flop of the chain
except the first. The row then reads "no space" for `SYNC_DEPTH-1` cycles,
until a sample taken after the put has crossed the whole chain. This clear is
what makes a row's synchronized flag safe to trust. The flag can be late, but
it can never report space that a put has already used. The one exception is
the row being written in the current cycle: its flag may still count the word
now being filled.

The synchronized row flags are ORed separately over even rows and over odd
rows. Free words are always contiguous, starting at the put pointer.
Consecutive words lie in rows of opposite parity, so two free words always
include one in an even row and one in an odd row. This gives the rule:

```
spaceav = (even & odd) | (!do_put & (even | odd))
```

- With no put in progress, one free word anywhere is enough. That word cannot
  be stale.
- With a put in progress, the flag of the row being written may be stale.
  Space is offered again only if the other parity also shows a free word. The
  row written in the previous cycle has just been cleared, so that second
  flag is genuine.

A row is accessed at most once every `NV` cycles. When `NV > SYNC_DEPTH`, the
`SYNC_DEPTH-1` cycles during which a row's chain is cleared never stall a
continuous stream. When `NV <= SYNC_DEPTH`, the FIFO stalls on its own
synchronizers (see the efficiency table below).

The receiver side mirrors all of this. The row indicators are built from
`full`, the `row_sync` chains run on `clk_get`, and the even and odd ORs are
called `dv_even` and `dv_odd`.

## Write path: latch timing

`fifo_storage` holds the words in latches.

- `data_in` passes an input latch that is transparent while `clk_put` is low.
  It therefore holds the value present at the rising edge.
- The selected storage latch is transparent during the following high phase.
  It closes on the falling edge.

Together, the two latches act as a rising-edge flip-flop, and the word is in
its slot right after the edge.

The write select must be stable for the whole high phase. `put_control`
builds it from three latches that are transparent while `clk_put` is low:

- the one-hot row of the pointer value that will hold after the coming edge
  (`ohv_l`),
- the one-hot column of that value (`ohh_l`),
- the put decision `req_put & spaceav` (`put_l`).

Gating the storage latches with the `do_put` flip-flop instead would be
wrong. After an edge where `do_put` falls, the flip-flop would keep a latch
open for its clock-to-Q time. A rejected word could then overwrite the oldest
unread word of a full FIFO. Simulation of that variant corrupted data in
exactly this way.

The put pointer itself moves one edge after the write (post-increment). This
keeps `req_put` out of the counter's next-state logic.

## Read path: two buses and a glitch-blocking register

Reading any of the `N` latches within one cycle would put an `N`-way
multiplexer, and the fan-out of its selects, in the critical path. This design
uses two buses instead:

- even rows drive `data_even`;
- odd rows drive `data_odd`.

`get_control` keeps a registered one-hot copy (`nv`, `nh`) of the address of
the next word to load. It enables that latch and the one after it, which lie
in rows of opposite parity. Each bus therefore already carries its candidate
word a cycle before it may be needed.

A word has been in its latch for at least the synchronizer delay before it can
be read. Its value is therefore stable by the time it is selected.

A toggle `tgl` holds the parity of the next word. The selects are:

```
load     = req_get | !datav
sel_even = load & !tgl & dv_even
sel_odd  = load &  tgl & dv_odd
```

The parity is checked against `tgl` by an assertion. Two cases make this
safe:

- **No read in progress.** Full words are contiguous from the read pointer,
  so any genuine flag of the wanted parity means the next word is present.
- **A read in progress.** The wanted parity is the opposite of the row being
  read, and that flag cannot be stale.

`fifo_out_stage` is the output register. On an edge with `load` high it takes
the selected bus, or zeros when neither select is high. A bus that is not
selected is masked before the flip-flops. `data_out` therefore changes only
on `clk_get` edges, and it is zero whenever it holds no valid word.

This matters because synthesis may merge the receiver's own logic with the
multiplexer it expects downstream of `data_out`. If `data_out` could change
asynchronously while `datav` is low, that merged logic could glitch. The
price of this protection is one extra receiver cycle of latency.

## Timing and performance

**Latency.** A word accepted at a `clk_put` edge follows this path:

1. the pointer moves one `clk_put` cycle later;
2. the slot's `full` flag crosses `SYNC_DEPTH` flip-flops in `clk_get`;
3. the word is loaded into `data_out` on the next `clk_get` edge.

This totals `SYNC_DEPTH + 1` receiver cycles, plus the put cycle and the phase
between the clocks. `tb_latency_sweep` checks, for `SYNC_DEPTH` 2, 3 and 4
and widths 8, 16 and 32:

```
Tput + S*Tget < latency <= Tput + (S+1)*Tget
```

The published latency model is `L = (S+1)*Tget` plus a gate-delay term.

**Throughput.** `tb_efficiency_sweep` runs all 48 combinations of
`NV, NH in {2,4,6,8}` and `SYNC_DEPTH in {2,3,4}`. Both sides request on every
cycle and the two clocks run at equal frequency. The table shows words per
cycle as [min mean max] over `NH`, first as simulated and then as published:

| | S = 2 | S = 3 | S = 4 |
|---|---|---|---|
| NV = 2 | [0.57 0.64 0.67] / [0.48 0.50 0.50] | [0.44 0.49 0.50] / [0.38 0.47 0.50] | [0.36 0.39 0.40] / [0.33 0.38 0.40] |
| NV = 4 | [1.00 1.00 1.00] / [0.87 0.97 1.00] | [0.89 0.97 1.00] / [0.73 0.93 1.00] | [0.73 0.78 0.80] / [0.62 0.72 0.75] |
| NV = 6 | [1.00 1.00 1.00] / [1.00 1.00 1.00] | [1.00 1.00 1.00] / [1.00 1.00 1.00] | [1.00 1.00 1.00] / [0.95 0.98 1.00] |
| NV = 8 | [1.00 1.00 1.00] / [1.00 1.00 1.00] | [1.00 1.00 1.00] / [1.00 1.00 1.00] | [1.00 1.00 1.00] / [0.99 0.99 1.00] |

The testbench checks three things:

- every configuration with `NV > S` and `NH >= 4` reaches at least 0.99;
- every configuration with `NV <= S` stays below 0.85;
- every mean lies within 0.15 of the published mean.

The published figures come from gate-level simulation of the published design
under several traffic patterns. These runs use a single fixed clock phase. The
simulated numbers are the same as the published ones, or a little higher.
The largest gap is at `NV = 2, S = 2`, where this RTL sustains 2 words every 3
cycles against the published 1 in 2.

## Modules

| file | role |
|---|---|
| `rtl/interleaved_fifo.sv` | top level: wires the blocks below |
| `rtl/put_control.sv` | put pointer, write-select latches, row space indicators and synchronizers, `spaceav` |
| `rtl/get_control.sv` | get pointer, row data indicators and synchronizers, toggle, bus enables, `datav` |
| `rtl/therm_counter.sv` | ring counter in thermometer code, with one-hot outputs |
| `rtl/therm_combine.sv` | (row, column) counter pair to `N`-bit thermometer code |
| `rtl/slot_status.sv` | per-word empty/full flags |
| `rtl/row_sync.sv` | synchronizer whose last `S-1` flip-flops can be cleared |
| `rtl/fifo_storage.sv` | input latch, storage latches, even and odd read buses |
| `rtl/fifo_out_stage.sv` | zero-forcing output register |
| `rtl/sfifo_pkg.sv` | default sizes |

The latches are intentional: the input latch, the storage array and the three
write-select latches in `put_control`. The design contains no other latches.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`, and `failures=0` means it passed. For
example, to build and run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sfifo_pkg.sv tb/tb_interleaved_fifo.sv --top-module tb_interleaved_fifo
./obj_dir/Vtb_interleaved_fifo
```

For the other testbenches, replace the file and top name. `tb_efficiency_sweep`
also needs `tb/eff_harness.sv`: add `-y tb` to the command.

| testbench | what it shows |
|---|---|
| `tb_interleaved_fifo` | At the default parameters: scoreboard check of every word through five traffic patterns (always on, random, near empty, half full, near full) at six clock ratios; zero output while `datav` is low; throughput of at least 0.99 words per cycle at equal clocks; fall-through latency. It also counts that stalls, a full FIFO, the (b) indicators, the two-slot rule, both read buses and back-to-back transfers all occurred. |
| `tb_efficiency_sweep` | the throughput table above |
| `tb_latency_sweep` | latency bounds and data integrity for `S` in 2, 3, 4 and `WIDTH` in 8, 16, 32 |
| `tb_put_control`, `tb_get_control` | each controller against a modelled opposite side: no put into a full word, no read of an empty one, exact write selects and bus enables, counter states, one transfer per cycle when streaming |
| `tb_therm_counter`, `tb_therm_combine`, `tb_slot_status`, `tb_row_sync`, `tb_fifo_storage`, `tb_fifo_out_stage` | each block against an arithmetic reference |

The RTL also carries concurrent assertions, which `--assert` enables:

- a put writes only an empty word;
- a read takes only a full word;
- the toggle matches the parity of the next word;
- the two read selects are never high together.

## Where this RTL departs from the published design

- **Column-select equation.** The published formula for `therm(i,j)` is
  taken with its two conditions swapped: `qh[j]` when `qv[i]` equals the
  column parity, `qh[j-1]` otherwise. Read the other way round, it gives a
  non-zero count for the reset state. The version used here reproduces an
  `N`-stage thermometer counter for every count.
- **Write enable.** The storage-latch write enable is gated by a latched copy
  of the put decision, not by the `do_put` flip-flop. The reason is in
  "Write path: latch timing".
- **Read buses.** The buses are AND-OR multiplexers rather than tri-state
  drivers.
- **Bus enables.** The enables come from a registered one-hot copy of the next
  read address (row and column). The published text only says that a latch's
  driver is enabled while its predecessor is being read.
- **Toggle.** The even/odd toggle flips on every word loaded into the output
  register. The published text says it is "enabled by req_get". Here a word is
  also loaded without a request when the register is empty.
- **Reset.** Reset is asynchronous and active low, one per domain, and it
  clears the synchronizers to "no space / no data". The published design only
  states that reset zeroes the counters.
- **Throughput.** Throughput at `NV = 2` and `NV = 4, S = 2` is higher than
  the published figures; see the table above.
- **Not modelled.** Timing, area and power figures of the published design are
  not reproduced here. They are post-layout results of a 65 nm flow: about
  1.3 GHz for the default configuration, area dominated by the storage
  latches, and power dominated by the counters and synchronizers.
