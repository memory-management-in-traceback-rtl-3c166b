# Three-bank traceback Viterbi decoder

A Viterbi decoder has to remember, for every trellis state, which path
survived into it. Instead of carrying the whole survivor sequence of every
state along (register exchange), this decoder stores only the one-bit result
of each add-compare-select decision and recovers the information bits by
walking backwards through those decisions. The walk needs the memory of
decisions to be organised so that one pointer can find the right path
(traceback), a second pointer can read off the bits along it (decoding), and
the add-compare-select can keep writing new decisions, all at the rate of one
information bit per bit time. Here that is done with three memory banks, each
L branches long and 2^(K-1) states high, visited by the pointers in a fixed
rotation that repeats every six blocks of L bit times.

The RTL is parameterised in the constraint length K and the truncation length
L. Its defaults are a rate-1/2, K = 7 code with L = 100. The same RTL also
runs at K = 15, L = 170 (16384 states, about 1 Mbyte of decision memory) and
is simulated at that size as well.

## How a decision becomes a decoded bit

States are K-1 bits. A new information bit enters at the bottom (bit 0) of the
state and the oldest bit leaves from the top. State j can be reached from two
predecessors, i = j >> 1 and i | 2^(K-2); they differ only in the bit that just
left the encoder. The add-compare-select for state j computes

    L0 = M[i]            + d[c]
    L1 = M[i | 2^(K-2)]  + d[3-c]

where c is the two-bit code label of the branch from i into j and d[] are the
branch metrics of the received symbol pair. The smaller sum survives. The
decision bit, 1 when L1 < L0 and 0 otherwise (ties keep L0), is exactly the
top bit of the surviving predecessor. Stepping back from a state is therefore
just a shift: `prev = (state >> 1) | decision << (K-2)`. The bit shifted in at
the top is the information bit that entered the encoder K-1 branches before
the column read, so a backward walk delivers decoded bits directly, newest
first.

Using 3-c for the second predecessor relies on both generators tapping the
newest and the oldest bit of the encoder window; the ACS checks this at
elaboration.

## The three banks and their rotation

The memory is three banks, numbered 0, 1 and 2, of L columns each; one column
holds the decisions of all states for one bit time. Time is cut into blocks of
L bit times. In block b:

* the **traceback** pointer starts at state 0 and walks through bank b mod 3;
* the **decoding** pointer walks through bank (b+1) mod 3, starting from the
  state in which the traceback of block b-1 ended, and emits one decoded bit
  per step;
* each column the decoding pointer has just read is **rewritten** with the new
  decisions of the current bit time;
* the third bank is idle.

Within a block, step m (m = t mod L) uses column m1 = L-1-m in even blocks
(right to left) and m1 = m in odd blocks (left to right), for all three
operations. The direction has to flip: the bank traced in block b was written
during block b-1 in the opposite direction, so the traceback meets the newest
column first and walks back in time. The decoding bank of block b+1 is the
one written in block b-2; it continues the path exactly where the traceback of
block b left off. Three banks times two directions give a six-block cycle:

| block mod 6 | traceback bank | decode and write bank | column order |
|-------------|----------------|-----------------------|--------------|
| 0           | 0              | 1                     | L-1 down to 0 |
| 1           | 1              | 2                     | 0 up to L-1   |
| 2           | 2              | 0                     | L-1 down to 0 |
| 3           | 0              | 1                     | 0 up to L-1   |
| 4           | 1              | 2                     | L-1 down to 0 |
| 5           | 2              | 0                     | 0 up to L-1   |

Each traceback is at least L branches long before its end state is used, which
is what makes that state reliable without searching for the best metric. The
price is memory for 3L branches instead of L.

The decoded bits of a block come out in reverse order. A reversal buffer of
two L-bit halves fixes that: during block b, the bit decoded at step m is
stored at position m of half b mod 2, and the bit sent out at step m is
position L-1-m of the other half, filled during block b-1.

### Decoding delay

The first decoding pass over data that was actually written happens in block
3; the reversal adds one more block. The bit sent out in bit time t is the
information bit of bit time **t - (4L + K - 1)**, that is 406 bit times for
the defaults. The first 4L+K-1 outputs carry no information. (A rounder
figure of 4L + K is often quoted for this scheme; the exact offset with the
pointer arithmetic above is 4L + K - 1.)

## Hardware structure

```
                +---------------+       +------------------------------+
in_r0, in_r1 -->| branch metric |--d--->| NPROC add-compare-select     |<---> metric store
                +---------------+       | processors, S states each    |      (2 x 2^(K-1) metrics)
                                        +------------------------------+
                                                       | NPROC decisions per cycle
                                                       v
                                        +------------------------------+
                                        | NPROC local memories, each   |
                                        | holding its S rows of the    |
                                        | three banks                  |
                                        +------------------------------+
                                           ^ address bus          | data bus (1 bit)
                                           | (bank, column,       |
                                           |  state)              v
                          +----------------+  end state   +----------------+
                          | traceback unit |------------->| decoding unit  |--> reversal --> out_bit
                          +----------------+  each block  +----------------+     buffer
```

Both pointer units drive the address bus, one after the other, and both take
their bit from the data bus.

| module | role |
|--------|------|
| `tbvd_pkg` | defaults, `bank_t`, `strobes_t`, code-label function |
| `tbvd_bank_ctrl` | time pointer, block parity, bank numbers, column pointer, phase strobes, input handshake |
| `tbvd_branch_metric` | d[c] for the four labels from two soft symbols |
| `tbvd_acs` | add-compare-select of one state (one per processor) |
| `tbvd_metric_store` | ping-pong accumulated metrics shared by all processors |
| `tbvd_tb_memory` | the three banks, split into `tbvd_local_mem` per processor, plus the shared read bus |
| `tbvd_traceback_unit` | traceback pointer (restarts at state 0 every block) |
| `tbvd_decode_unit` | decoding pointer and decoded bit |
| `tbvd_out_reverse` | block order reversal |
| `tbvd_top` | everything wired together |

**Processors and local memories.** Writing the decisions is the heavy part:
2^(K-1) bits per bit time, against one bit per bit time for each read
pointer. The work is split among NPROC add-compare-select processors.
Processor p handles the S = 2^(K-1)/NPROC states p*S .. p*S+S-1, one per
cycle, and writes their decisions into its own local memory, which holds the
rows of those states in all three banks. Every processor can read any metric
of the previous bit time from the metric store, which plays the part of the
metric exchange network of a multi-chip decoder. The metric store has two
halves selected by the bit-time parity: the previous bit time's metrics are
read from one while the new ones go to the other.

**Shared bus.** The two read pointers use one address bus, broadcast to all
local memories as (bank, column, state), and one data bus carrying back the
bit of the memory that owns the state. Only two bits per bit time cross the
bus, independent of the number of states.

## One bit time, cycle by cycle

A bit time lasts S + 3 clock cycles (11 for the defaults, 259 for K = 15 with
64 processors):

| phase | action |
|-------|--------|
| 0 | at a block start: traceback pointer := 0, decoding pointer := old traceback state |
| 1 | decoding pointer on the address bus (bank dec, column m1) |
| 2 | decoding unit takes its bit and steps; traceback pointer on the bus (bank tb, column m1) |
| 3 .. S+2 | ACS steps 0..S-1, each writing NPROC decisions into column m1 of bank dec; in phase 3 the traceback unit also takes its bit |
| S+2 (last) | output bit taken from the reversal buffer; pointers advance |

The decoding read of column m1 always comes before the first write into that
column, so the column really is freed before it is reused. The traceback bank
is never the bank being written (there is an assertion for this).

## Interface of `tbvd_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | one symbol pair is taken when both are high |
| `in_r0`, `in_r1` | in | Q | soft symbols: 0 = confident '0', 2^Q-1 = confident '1' |
| `out_valid` | out | 1 | one-cycle pulse at the end of every bit time |
| `out_bit` | out | 1 | decoded bit (information bit of bit time t-(4L+K-1)) |
| `blk_start` | out | 1 | pulse when a block starts |
| `blk_par` | out | 1 | 0: right-to-left block, 1: left-to-right block |
| `bank_tb`, `bank_dec` | out | 2 | banks in use for traceback and decode/write |

`in_ready` is high while idle and in the last phase of a bit time, so a
continuous stream runs at one bit per S+3 cycles. The source may pause
between symbol pairs; the decoder then waits.

Parameters: `K` (7), `L` (100), `NPROC` (8, a power of two dividing
2^(K-1)), `Q` (3), `W` (16), `G0` ('o171), `G1` ('o133).

## Choices made in this implementation

These details are not fixed by the scheme itself and were chosen here:

* **Code.** Generators 171 and 133 (octal), the usual K = 7 rate-1/2 pair.
  Bit n of a generator taps window bit n, with the newest bit in bit 0. Code
  symbol 0 comes from G0. The K = 15 test uses 46321 and 51271 (octal).
* **Branch metric.** 3-bit soft decisions; d[c] is the sum over both symbols
  of the distance to the ideal value (0 or 7). Smaller means more likely.
* **Metric arithmetic.** Metrics are 16-bit and wrap around. The comparison
  uses the sign of the 16-bit difference, which is exact while all metrics lie
  within 2^15 of each other, so no renormalisation is needed.
* **Start-up.** Reset clears all metrics (all states equally likely), both
  pointers start at state 0, and the reversal buffer is cleared. The decision
  memory is not reset; nothing read from it before it has been written
  reaches a valid output.
* **Traceback start.** Every traceback starts from state 0, not from the
  state with the best metric. This is part of the scheme, and it is why a
  traceback must be a full L branches long.
* **Processor count and schedule.** NPROC = 8 and the S+3 cycle schedule.
  The processors split the states into contiguous ranges.
* **Memory.** The decision memory is an on-chip array with one write port
  and one synchronous read port per local memory. At K = 15 a real decoder
  would use external RAM; the RTL does not model external RAM chips or their
  timing.
* **Metric exchange.** A shared multi-ported register file stands in for a
  dedicated interconnection network between processors. Its structure (for
  example a network matched to the de Bruijn trellis) is not implemented.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

* `tb_tbvd_top` runs the default decoder over 14 blocks (1400 bits). It uses
  random data, random input pauses and a noisy stretch of three blocks. Every
  output from bit time 4L on is compared with a bit-exact software model of
  the algorithm (`tb/tbvd_ref_pkg.sv`, unbounded integer metrics). Outputs
  outside a margin around the noisy stretch are also compared with the
  transmitted bits. The test checks the S+3 cycle bit time and that all six
  block types, stalls, non-zero start-state hand-overs and channel errors
  occurred.
* `tb_tbvd_top_k15` does the same at K = 15, L = 170, NPROC = 64 for 9 blocks.
* `tb_tbvd_top_wrap` runs a K = 5 decoder with 8-bit metrics over a channel
  that is noisy throughout, for 40 blocks. The metrics wrap many times, and
  every output must still match the model with unbounded metrics.
* Unit tests: exhaustive branch metrics; ACS against unbounded arithmetic,
  including sums that wrap; controller pointers and strobes against the block
  formulas; metric store, traceback memory, both pointers and the reversal
  buffer against shadow models.

To simulate with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tbvd_pkg.sv tb/tbvd_ref_pkg.sv tb/tb_tbvd_top.sv --top-module tb_tbvd_top
./obj_dir/Vtb_tbvd_top
```

Use the same command with another testbench name for the other tests. Only
`tb_tbvd_top*` need `tb/tbvd_ref_pkg.sv`. Both top-level tests finish in
seconds.

## Changing the size

`K`, `L` and `NPROC` can be set on `tbvd_top`. Memory grows as
3 * L * 2^(K-1) bits, the metric store as 2 * 2^(K-1) * W flip-flops, and the
bit time as 2^(K-1)/NPROC + 3 cycles. Keep L at several times K (5K is a
common minimum, 10K is safer at low signal-to-noise ratio). Raise W if the
branch metrics are made much larger. A different code needs only `G0`/`G1`,
as long as both generators tap the first and last window bit.
