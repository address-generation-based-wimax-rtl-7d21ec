# Floor-free IEEE 802.16e (WiMAX) channel deinterleaver

A WiMAX transmitter interleaves every block of `Ncbps` coded bits before
mapping them onto QPSK, 16-QAM or 64-QAM symbols. The receiver has to undo this.
The standard defines the inverse permutation with two formulas that use
`floor`, a division and a modulo. Built literally, that means dividers, or a
table of up to 576 addresses for every mode. This design needs neither. For
every mode and depth, the deinterleaver address reduces to

    k = 16 * i' + j

Here `j` is a row counter, `i` is a column counter, and `i'` is `i` moved by
0, ±1 or ±2 columns. The move depends only on `i mod s` and `j mod s`. So the
address generator is two small counters, a few gates, one shared
incrementer/decrementer and one multiply-add. It produces one address per
clock.

The addresses are write addresses. Each received bit is written to a memory
at its original position. The memory is then read back in address order
0..Ncbps-1. Two memories work in ping-pong fashion, so one block is written
while the previous one is read out. This gives a streaming deinterleaver with
no gaps between blocks.

## Where `k = 16 i' + j` comes from

The standard's deinterleaver takes received bit `n` of a block of `N = Ncbps`
bits, with `d = 16` and `s = max(bits per symbol / 2, 1)` (QPSK 1, 16-QAM 2,
64-QAM 3). It applies:

    m = s*floor(n/s) + (n + floor(d*n/N)) mod s
    k = d*m - (N-1)*floor(d*m/N)

Arrange the block as a matrix of 16 rows and `C = N/16` columns, filled row by
row in arrival order:

    n = j*C + i        row j = 0..15, column i = 0..C-1

Then the terms simplify step by step:

* `floor(d*n/N) = floor(n/C) = j`, which is the row number.
* For every legal depth, `C` is a multiple of `s`. So `n` and `i` lie in the
  same group of `s` and have the same residue mod `s`. The first step gives
  `m = j*C + i'` with

      i' = s*floor(i/s) + (i + j) mod s

  In row `j`, each group of `s` columns is rotated by `j mod s` places.
* `d*m = j*N + 16*i'` and `16*i' < N`, so `floor(d*m/N) = j`. Then
  `k = 16*i' + j*N - (N-1)*j = 16*i' + j`.

The rotation, written as a move of the column index:

| modulation | `j mod s` | `i mod s` | `i'`  |
|------------|-----------|-----------|-------|
| QPSK (s=1) | 0         | 0         | i     |
| 16-QAM     | 0         | any       | i     |
| 16-QAM     | 1         | 0         | i + 1 |
| 16-QAM     | 1         | 1         | i − 1 |
| 64-QAM     | 0         | any       | i     |
| 64-QAM     | 1         | 0, 1      | i + 1 |
| 64-QAM     | 1         | 2         | i − 2 |
| 64-QAM     | 2         | 0         | i + 2 |
| 64-QAM     | 2         | 1, 2      | i − 1 |

Example, 64-QAM, N = 576 (C = 36). The first five addresses of rows 0..3:

    row 0:  0 16 32 48 64
    row 1: 17 33  1 65 81
    row 2: 34  2 18 82 50
    row 3:  3 19 35 51 67

`i'` always stays inside its own group of columns, so it never leaves
0..C-1. The unused result of the incrementer or decrementer may overflow; it
is never selected.

## Address generator datapath (`deint_addr_gen`)

```
             +----------------+  wrap  +-------------+
   en ------>| column_counter |------->| row_counter |
             |  i, i mod 3    |        |  j, j mod 3 |
             +----------------+        +-------------+
                |  |                        |  |
                |  +--> qam16_block <-------+  |     (i mod 2, j mod 2)
                |  +--> qam64_block <----------+     (i mod 3, j mod 3)
                |           |  op, step
                |     mod --+-> mux (QPSK: keep)
                |           v
                +-----> col_incdec  (i+step, i-step; step 1 or 2)
                |           |
                +---> mux keep/inc/dec ---> i'
                                            |
                               addr_mac: 16*i' + j ---> register ---> addr
```

* **Counters.** The column counter runs fastest. Its wrap advances the row
  counter, and both wraps together mark the last bit of the block. Each
  counter keeps a 2-bit mod-3 residue beside it, so no divider appears
  anywhere. The mod-2 residue is simply bit 0.
* **Modulation blocks.** `qam16_block` and `qam64_block` are small
  combinational decoders of the table above. They output an operation
  (keep / increment / decrement) and a step (1 or 2) as a
  `deint_pkg::col_ctl_t`. QPSK needs no block: its rule is the "keep" input
  of the modulation multiplexer.
* **Shared arithmetic.** All modulations share one incrementer/decrementer
  (`col_incdec`) and one multiply-add (`addr_mac`). The multiply is written
  as `* D`. With D = 16, synthesis can map it to a shift or to an embedded
  multiplier.
* **Configuration.** `start` loads `mod` and `ncbps`, and restarts the
  counters at bit 0. The column count is `ncbps >> 4`. Assertions reject any
  depth that is not a multiple of `16*s` or is larger than 576.
* **Timing.** `addr`, `addr_valid` and `addr_last` are registered. They
  appear on the clock edge that samples `en`. Blocks follow each other
  without a pause.

## Ping-pong memories (`bank_ctrl`, `bit_mem`)

Two `bit_mem` instances, M-1 and M-2, each 576 words of `DW` bits. `sel = 1`
sends writes to M-1 while M-2 is read; `sel = 0` does the opposite. When the
write carrying `addr_last` happens, `bank_ctrl` does three things:

* It flips `sel`.
* It starts a sequential read of the memory just filled, at addresses
  0..Ncbps-1, one per clock.
* From then on, it steers new writes to the other memory.

A block takes at least `Ncbps` clocks to arrive. So a read has always
finished, at the latest in the same cycle as the next block's last write. An
assertion checks that a swap never interrupts a read, and that the memory
being read is never the one being written. The memory read is synchronous
(block-RAM style).

## Top level: `wimax_deinterleaver`

| port                         | dir | width | meaning |
|------------------------------|-----|-------|---------|
| `clk`, `rst_n`               | in  | 1     | clock, asynchronous active-low reset |
| `start`                      | in  | 1     | one-cycle pulse: load `mod`/`ncbps`, flush the current block and any read; `in_valid` is ignored in this cycle |
| `mod`                        | in  | 2     | `deint_pkg::mod_e`: `MOD_QPSK`, `MOD_QAM16`, `MOD_QAM64` |
| `ncbps`                      | in  | 10    | block size in bits (16·s·c, at most 576) |
| `in_valid`, `in_data`        | in  | 1, DW | received bits in channel order; gaps allowed |
| `out_valid`, `out_data`      | out | 1, DW | deinterleaved bits, in order |
| `out_last`                   | out | 1     | last bit of a block |
| `sel`                        | out | 1     | 1 while M-1 is written |

Parameters: `D = 16` (rows), `NCBPS_MAX = 576` (memory depth) and `DW = 1`
(bits per word; raise it to carry soft decisions). The widths follow from
these.

Timing:

* The first output bit of a block is valid two clock edges after the edge
  that takes the block's last input bit. One edge is the address register;
  the other is the memory read register.
* The block then comes out at one bit per clock, with no gaps.
* Gap-free input therefore gives gap-free output, at a throughput of one bit
  per clock.
* There is no output backpressure.

Supported configurations: every modulation, code rate and depth of
IEEE 802.16e.

* QPSK: 96, 144, 192, 288, 384, 432, 480 and 576 bits.
* 16-QAM: 192, 288, 384 and 576 bits.
* 64-QAM: 288, 384, 432 and 576 bits.

The hardware accepts any `ncbps` that is a multiple of `16*s` up to 576.

## Design choices beyond the published architecture

The following points are this implementation's own choices:

* The valid/start handshake.
* The reset values. `sel` resets to 1, so the first block goes to M-1.
* The output register in the address generator.
* How the incrementer and decrementer are shared: one `i ± step` pair with a
  selectable step.
* The mod-3 side counters.
* The 1-bit default data width.
* The synchronous-read memories.
* Changing configuration only through `start`, which discards any block in
  flight.

The following points come from the published architecture:

* The address formula and its per-modulation rules.
* Sharing the counters, the multiplier, the adder and the
  incrementer/decrementer across modulations.
* The two-memory ping-pong structure, with `sel = 1` writing M-1.
* Generated write addresses with sequential reads.

Not included:

* The rest of the transceiver: randomizer, RS and convolutional coding,
  mapping, FFT/IFFT.
* The transmit-side interleaver. The end-to-end testbench computes it
  directly from the standard's formulas to create its stimulus.

## Files

| file | contents |
|------|----------|
| `rtl/deint_pkg.sv` | `D`, `NCBPS_MAX`, `mod_e`, `col_op_e`, `col_ctl_t` |
| `rtl/column_counter.sv`, `rtl/row_counter.sv` | counters with mod-3 residues |
| `rtl/qam16_block.sv`, `rtl/qam64_block.sv` | column rules |
| `rtl/col_incdec.sv`, `rtl/addr_mac.sv` | shared arithmetic |
| `rtl/deint_addr_gen.sv` | address generator |
| `rtl/bit_mem.sv`, `rtl/bank_ctrl.sv` | memory block, ping-pong control |
| `rtl/wimax_deinterleaver.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
to run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/deint_pkg.sv \
    tb/tb_wimax_deinterleaver.sv --top-module tb_wimax_deinterleaver
./obj_dir/Vtb_wimax_deinterleaver
```

For another test, replace the testbench name. The package must come first on
the command line, and `-y rtl` lets Verilator find the other modules.

## How it is verified

* **`tb_wimax_deinterleaver`** runs at the top's default parameters. It
  generates random source bits and interleaves them with the standard's
  transmit formulas, which are written with `floor` and are independent of
  the design. It feeds the result in and checks that the original bits come
  back in order.
  * It covers all 16 depth/modulation pairs, three blocks each, once without
  and once with random input gaps.
  * It checks `out_last` and the two-clock latency.
  * It checks that back-to-back blocks leave without a gap, that `start` in
  the middle of a block discards it, and that both swap directions happen.
* **`tb_deint_addr_gen`** compares every address with the standard's
  floor-based deinterleaver formulas, for every configuration. It also checks
  that each block is a permutation, the sample rows listed above, one-clock
  latency and one address per clock.
* **The unit testbenches** check the counters against integer models. They
  check the QAM blocks exhaustively against `i' = s*floor(i/s) + (i+j) mod s`,
  and the arithmetic exhaustively. They check the memory's latency and hold
  behaviour, and the ping-pong controller cycle by cycle.

Every testbench has been shown to fail when its module is broken in a
meaningful way. All files pass Verilator lint and the slang front end of
Yosys.
