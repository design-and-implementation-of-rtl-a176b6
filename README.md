# Bloomier-filter content processor for a disk data stream

This is an exact string matcher that sits in the data path between a disk
and the host bus. Every byte of the stream advances a 32-byte window. Each
clock it answers one question: do the last 32 bytes equal one of up to
16384 stored strings, and if so, which one? The answer for the window ending
at byte *t* comes out a fixed 7 clocks after byte *t*. The bytes themselves
pass through unchanged.

The stored set is not held in a CAM and not compiled into state machines.
It lives in two ordinary RAMs, organised as a **Bloomier filter**:

* A **lookup table** of *m* = 4*n* words of log2(*n*) bits, here
  65536 x 14 bits.
* A **result table** of *n* entries of 32 bytes, here 16384 x 256 bits,
  with one extra "used" bit per entry.

Only the memories grow in proportion to the number of strings. The logic
grows only with its logarithm, through the pointer and hash widths. At the
default size the memories hold about 5.1 Mbit.

## How a lookup works

For a window *x* (256 bits), four universal hash functions give four
locations h1(x)..h4(x) in the lookup table. The four words stored there are
XORed:

    p = D[h1(x)] ^ D[h2(x)] ^ D[h3(x)] ^ D[h4(x)]

The host software fills the lookup table so that, for every stored string,
*p* is that string's address in the result table. The result table is then
read at *p*, and the string found there is compared with the window:

* **equal** (and the entry is in use): a match, and *p* is the string ID;
* **different**: a reject.

Every window gives some value of *p*, including windows that are not stored
strings. That is the Bloomier filter's false positive. The full-width
comparison with the stored string removes it, so a reported match is always
exact. Storing a pointer (log2 *n* bits) rather than the index of the hash
that was used (log2 *k* bits) makes each lookup word wider. In exchange,
the result table needs only *n* entries instead of *m* = 4*n*. At these
sizes that cuts the total memory to under a third.

### Hash functions (`h3_hash`)

Each hash is an H3 universal hash: every input bit *x_j* selects a constant
coefficient *d_j*, and the selected coefficients are XORed. The
coefficients are pseudo-random 16-bit constants (log2 *m* bits, never zero).
They are computed during elaboration by `cp_pkg::h3_coef(func, bit, seed)`,
a 32-bit integer mixer, so there is no coefficient table to load. The host
software must use the same function. The hash is pure XOR, so the sum can
be split freely. The unit forms one partial XOR per input byte in the first
pipeline stage and XORs the 32 partials in the second.

## The quad-port lookup table (`lut_quad_port`)

Four hashes need four random reads of the lookup table per clock. A block
RAM has only two ports, so the table runs on a second clock, `clk2x`. This
clock has twice the frequency of `clk`, and every other rising edge of
`clk2x` falls on a rising edge of `clk`. Each system cycle then has two
memory cycles:

| `clk2x` edge | memory port A | memory port B | output registers |
|---|---|---|---|
| middle of cycle *t* | read `rd_addr[0]` (or the setup write) | read `rd_addr[1]` | words 2, 3 of cycle *t*-1 |
| end of cycle *t* (on a `clk` edge) | read `rd_addr[2]` | read `rd_addr[3]` | words 0, 1 of cycle *t* |

The memory knows which slot it is in from a small phase detector: a flop on
`clk` toggles every cycle and a flop on `clk2x` copies it. The two differ
only at the mid-cycle edge.

Seen from the `clk` domain, addresses held during cycle *t* give four words
that a `clk` register samples at the end of cycle *t*+1. This is the
timing of a synchronous RAM with one cycle of latency followed by a
register. Two rules follow:

* The read addresses must come straight from `clk` registers, because they
  are used half a cycle in.
* `rd_data[2]` and `rd_data[3]` settle only in the middle of cycle *t*+1,
  so `rd_data` may feed registers only.

The phase detector aligns itself in the first `clk` cycle after reset. An
access in that cycle is lost. Setup writes reach the engine through a
register, so they cannot land in that cycle.

## Pipeline and timing

| cycle | stage |
|---|---|
| *t* | byte presented (`in_valid`, `in_byte`) |
| *t*+1 | window updated (`data_window`) |
| *t*+2 | per-byte partial hashes |
| *t*+3 | four hashes = lookup-table addresses |
| *t*+4 | four lookup words read |
| *t*+5 | pointer *p* (XOR of the words) |
| *t*+6 | result-table entry read; a 5-deep delay line brings the window here too |
| *t*+7 | verdict: `hit_valid` with `hit` or `hit_reject`, `hit_id`, `hit_pos` |

The pipeline never stalls. A cycle with `in_valid` low is a bubble that
flows through without a verdict. No verdicts are given until 32 bytes have
entered after reset. Throughput is one byte and one verdict per clock. At
150 MHz that is 1.2 Gbit/s. The clock rate is a property of the target
technology and has not been checked here.

## Interface of `content_processor` (the top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clk2x` | in | 1 | system clock; memory clock at 2x, edge-aligned |
| `rst_n` | in | 1 | asynchronous active-low reset (the memories are not reset) |
| `in_valid`, `in_byte` | in | 1, 8 | stream from the disk |
| `out_valid`, `out_byte` | out | 1, 8 | stream onward: the byte that left the window |
| `cfg_we`, `cfg_sel` | in | 1, `cfg_sel_e` | setup write; `CFG_LUT` or `CFG_RT` |
| `cfg_addr` | in | log2(4*N) | lookup-table location or result-table entry |
| `cfg_data`, `cfg_used` | in | 8*L, 1 | string and used flag (RT), or pointer in the low bits (LUT) |
| `hit_valid` | out | 1 | a verdict for a full window |
| `hit` / `hit_reject` | out | 1 | exact match / no match |
| `hit_id` | out | log2(N) | string ID (result-table address) |
| `hit_pos` | out | 32 | stream index (from 0) of the last byte of the window |

Byte order: a string's first character is in bits [7:0] of `cfg_data`. This
matches the window, whose oldest byte sits in bits [7:0].

## Setting up the tables (host software)

The tables are computed off-line by software on the host, then written
through the `cfg_*` port: every lookup-table word, and every result-table
entry, with `cfg_used = 0` for the empty ones. Setup and stream matching
are not meant to overlap. The algorithm is modelled in
`tb/bloomier_host_pkg.sv`:

1. Compute the four hash locations of every string.
2. **Peel**: find a location touched by exactly one (string, hash) pair.
   That string takes this location as its own, τ(x), and is removed from
   the count. Removing it may create new singletons; repeat. If strings
   remain at the end, setup has failed. With four hashes and *m*/*n* = 4
   this is very unlikely. If it happens, change `SEED` and try again.
3. **Encode** in the reverse of the peeling order:
   `D[τ(x)] = p(x) ^ (XOR of D at x's other three locations)`.
   Each string's own location is written after every location it reads. A
   later string never touches an earlier string's τ, so the earlier
   equations stay true.

If two of a string's hashes collide, their words cancel in the XOR. Both
the hardware and the encoder handle that the same way.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_STRINGS` | 16384 | result-table entries; pointer width log2(N) = 14 |
| `L_BYTES` | 32 | string and window length; every string has exactly this length |
| `K_HASH` | 4 | number of hash functions; must be 4 (quad-port table) |
| `M_RATIO` | 4 | lookup-table words per string (*m* = 4*n*) |
| `SEED` | 1 | selects the hash coefficients |
| `POS_W` | 32 | width of `hit_pos` |

The defaults are the configuration of the published architecture: 16K
strings of 32 bytes, four hashes, and a 4 x 16K x 14-bit lookup table. The
two tables give the same 4,992 kbit as quoted for it, plus 16 kbit of used
flags. Stored sizes follow from `kn·log2(n) + nL` bits. For example, 32K
strings of 32 bytes need 9.87 Mbit with *k* = 4. `N_STRINGS` and `L_BYTES`
can be changed freely as long as `N_STRINGS` is a power of two.

## What follows the published architecture, and what is added here

Taken from the architecture:

* the window, four H3 hashes, the XOR-to-pointer lookup table and the
  exact-compare result table;
* *k* = 4, *m*/*n* = 4, 14-bit pointers, 16K x 32-byte strings, one byte per
  clock;
* a quad-port table made by time-multiplexing a dual-port RAM on a faster
  second clock.

Chosen here, because the architecture leaves it open:

* the coefficient generator;
* the pipeline depths and the 7-clock latency;
* the phase detector and slot assignment of the quad-port table;
* the setup port;
* the used flag per result-table entry, so that an empty entry can never
  produce a match (for example against an all-zero window);
* the window-fill rule;
* the stream pass-through;
* the `hit_pos` output;
* asynchronous reset.

Not built:

* The disk/ATA and host-bus interface. Only its role is known, so the
  stream and the setup port are plain top-level ports.
* The clock generator for `clk2x`. It is an FPGA clock macro and is
  supplied from outside.
* The host setup software, which exists only as the testbench model.
* Other string lengths in the same engine, and the optional
  prefix/suffix grouping and bit-selection optimisations. The published
  basic architecture leaves these out as well.

## Files

`rtl/`: `cp_pkg` (coefficients, setup enum), `data_window`, `h3_hash`,
`lut_quad_port`, `pointer_xor`, `result_table`, `string_compare`,
`bloomier_engine` (hashes, tables, compare), `content_processor` (top).

`tb/`: one self-checking testbench per module, plus:

* `bloomier_host_pkg`, the setup model and reference lookup;
* `cp_stream_check`, the end-to-end stream test at any size;
* `content_processor_tb`, which runs that test at 64 strings;
* `content_processor_sizes_tb`, which runs it at 4096 strings of 16, 32,
  48 and 64 bytes;
* `content_processor_full_tb`, end to end at the default size: it loads
  16384 strings, writes all 81920 table words, and streams about 3,600
  bytes.

The end-to-end tests check every verdict at its exact cycle. They also
require that each of these happened at least once: hits, rejects, near
misses (one byte changed), two hits one byte apart, bubbles, the 31-byte
fill period, and pass-through bytes.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --top-module content_processor_full_tb \
        -y rtl -y tb +libext+.sv rtl/cp_pkg.sv tb/bloomier_host_pkg.sv \
        tb/content_processor_full_tb.sv
    obj_dir/Vcontent_processor_full_tb

Replace the top module and the last file to run any other testbench. Each
prints `TB_RESULT checks=N failures=M` and stops on its own. A watchdog
counts a failure if it hangs. Testbenches must generate the two clocks
edge-aligned, as in:

    forever begin
      #5 clk2x = 1; clk = 1;  #5 clk2x = 0;
      #5 clk2x = 1; clk = 0;  #5 clk2x = 0;
    end
