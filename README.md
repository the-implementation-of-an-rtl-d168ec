# Zigzag scan by address mapping

In JPEG and MPEG encoders, each 8 x 8 block of quantized DCT coefficients must be
reordered before run-length coding. The new order is the *zigzag scan*. It walks the
block along its anti-diagonals, from the DC coefficient at the top left to the highest
frequency at the bottom right. This moves the many zero high-frequency coefficients to
the end of the sequence.

This design does the reordering with no comparisons and no arithmetic on the data.
Coefficients arrive one per clock in raster order (row by row). Each one is written
straight to the RAM address of its place in the zigzag sequence. A small ROM gives
that address from the raster index. The block is then read from addresses 0, 1, 2, …
in plain order, and so comes out in zigzag order. Two RAMs alternate: one is being
filled with block *k* while the other is read out with block *k−1*. The result is one
sample per clock, with no gap between blocks and a fixed latency of 64 clocks.

```
            +---------+ idx  +----------+ waddr
in_valid -->| counter |----->| zigzag   |----------+--------------+
            |         |  |   | addr ROM |          |              |
            +---------+  |   +----------+          v              v
               |  se     |  raddr = idx        +-------+      +-------+
               |         +-------------------->| RAM 1 |      | RAM 2 |<-- raddr
               v                               |       |      |       |
            +-------+  we1 ------------------->|       |      |       |
in_valid -->| demux |  we2 ---------------------------------->|       |
            +-------+                          +-------+      +-------+
data_in  ------------------------------------> wdata of both RAMs
                                                   | rdata1       | rdata2
                                                   v              v
                                        rd_sel --> +------ mux -------+ --> data_out
                                   (se, 1 clock late)
```

## The mapping

Let `idx = row*8 + col` be the raster index of an incoming sample. The ROM holds the
*inverse* zigzag table: `ROM[idx]` is the zigzag position of (row, col). The write
`mem[ROM[idx]] <= data_in` puts every sample in its final place as it arrives. The
later read `data_out <= mem[i]`, for i = 0 … 63, is plain sequential.

The table is not stored as a list of numbers. It is computed at elaboration by
`zz_pkg::zz_position(n, row, col)`, for an n x n block, from the diagonal `d = row + col`:

* Samples on earlier diagonals: `d(d+1)/2` if `d < n`. Otherwise it is
  `n² − (2n−1−d)(2n−d)/2`.
* Offset within the diagonal: the scan goes down (row rising) on odd diagonals and up
  (row falling) on even ones. The offset is therefore `row − rmin` on odd `d` and
  `rmax − row` on even `d`, where `rmin = max(0, d−n+1)` and `rmax = min(d, n−1)`.

For n = 8 this gives the standard JPEG sequence: 0, 1, 8, 16, 9, 2, 3, 10, … in raster
indices. The first step from DC goes to the right.

## Ping-pong timing

`zz_counter` holds `idx` (0 … 63) and the bank select `se`. On the clock that takes
sample 63 of a block, `idx` wraps to 0 and `se` toggles. In the same clock:

| `se` | written (scattered, address from ROM) | read (sequential, address `idx`) |
|------|---------------------------------------|----------------------------------|
| 0    | RAM 1                                  | RAM 2                            |
| 1    | RAM 2                                  | RAM 1                            |

`zz_demux` switches only the write strobe. Data and write address go to both RAMs.
Both RAMs have a registered read port, so the read data appears one clock after the
address. For this reason the output multiplexer `zz_mux` is driven by `se` delayed one
clock (`rd_sel`). Otherwise the first sample of each block would come from the wrong
bank.

While the first block is being written there is nothing to read. `out_valid` stays low
until the counter has wrapped once (`full`).

Cycle by cycle at the default size:

* Clock *t*: the first sample of block *k* is accepted.
* Clocks *t* … *t*+63: block *k* is written into one RAM. Meanwhile block *k−1* is read
  from the other RAM.
* Just after clock *t*+64: data_out holds zigzag sample 0 (DC) of block *k*, and
  `out_start` is high.
* Just after clock *t*+127: data_out holds the last sample of block *k*.

The latency is therefore 64 clocks. A 64-sample block takes 64 clocks, which is 256 ns
at a 250 MHz clock.

## Interface of `zigzag_scan`

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`       | in  | 1      | clock |
| `rst_n`     | in  | 1      | asynchronous, active-low reset of the counter and output flags |
| `in_valid`  | in  | 1      | `data_in` carries a sample; when it is low the whole pipeline holds |
| `data_in`   | in  | DATA_W | coefficient, raster order within the block |
| `out_valid` | out | 1      | `data_out` carries a zigzag-ordered sample |
| `out_start` | out | 1      | this is sample 0 (DC) of a block |
| `data_out`  | out | DATA_W | coefficient, zigzag order |

Parameters: `N = 8` (block side), `DATA_W = 8` (one byte per sample), and
`IDX_W = $clog2(N*N)`. Other block sizes work too, since the ROM is computed for any `N`.

The input and output run in lock step. Each accepted input sample moves the output by
one sample, so a block only leaves while the next one enters. To get the last block of
a stream out, feed 64 more samples of any value. Nothing else is buffered: the
upstream stage (DCT and quantizer) feeds `in_valid`/`data_in` directly, and the
downstream run-length/entropy coder takes `out_valid`/`out_start`/`data_out`.

## Files

| file | contents |
|------|----------|
| `rtl/zz_pkg.sv` | default sizes and `zz_position()` |
| `rtl/zz_addr_rom.sv` | zigzag address ROM (raster index → RAM address), combinational |
| `rtl/zz_counter.sv` | sample counter, bank select `se`, `full` flag |
| `rtl/zz_ram.sv` | one 64 x DATA_W buffer: write port plus registered read port |
| `rtl/zz_demux.sv` | write strobe distributor |
| `rtl/zz_mux.sv` | read data selector |
| `rtl/zigzag_scan.sv` | the complete scan unit |
| `tb/tb_*.sv` | one self-checking testbench per module |

After synthesis the top holds 11 flip-flops of control: the 6-bit counter, `se`,
`full`, `rd_sel`, `out_valid` and `out_start`. It also holds two 64 x 8 RAMs with 8-bit
output registers, and a 64 x 6 ROM.

## Choices made here, and where this RTL departs from the original design

* **Block period.** The original control counts from 1 while the count is below 65. It
  then spends one more clock resetting the count and flipping the bank, which would
  make each block 65 clocks long. The stated performance is a 64-clock latency and
  256 ns per block at 4 ns per sample. That matches 64 clocks per block, so here the
  bank flips on the last sample itself and blocks follow each other with no idle clock.
* **Bank alternation** is per block: one RAM is written for 64 samples while the other
  is read. The original description is ambiguous here. One passage can be read as
  consecutive samples alternating between the RAMs, which would not give a zigzag
  order. The per-block reading is the one its control code implements.
* **Handshake.** `in_valid`, `out_valid` and `out_start`, and the ability to pause, are
  additions. The original streams one sample every clock and has only a data input and
  a data output. With `in_valid` held high the data path behaves as the original,
  apart from the block period above.
* **No flush.** As in the original, a block is only read out while the next is written.
* **Reset** is this design's choice (asynchronous, active low). The RAMs are not reset.
* **Sample width** is 8 bits, following the original's "one byte per sample" figures.
  Quantized DCT coefficients are usually signed and wider, often 11 to 12 bits. For
  that, set `DATA_W`.
* **ROM.** The ROM is read combinationally in the write clock. Whether the original
  registered it is not known.
* **Implementation figures are not reproduced.** The original reports an FPGA result:
  250 MHz, 1 block RAM, 9 I/O pins. It gives two flip-flop/LUT counts, 18 FF / 33 LUT
  in its comparison table and 10 FF / 39 LUT in its text. This RTL has not been timed
  or mapped to an FPGA. Its port list is wider (21 pins) because of the handshake.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_zigzag_scan \
    rtl/zz_pkg.sv rtl/zz_addr_rom.sv rtl/zz_counter.sv rtl/zz_ram.sv \
    rtl/zz_demux.sv rtl/zz_mux.sv rtl/zigzag_scan.sv tb/tb_zigzag_scan.sv
./obj_dir/Vtb_zigzag_scan
```

For a single block, list `rtl/zz_pkg.sv`, the block's file and its testbench.

`tb_zigzag_scan` runs the unit at its default size with no parameter override:

* First, four random blocks back to back, then one more block to push the fourth out.
  This checks that the first output comes exactly 64 clocks after the first input, and
  that nothing comes out while the first block is written.
* Then seven more blocks with `in_valid` dropped at random. This checks that the output
  pauses with the input.

A scoreboard reorders each input block with its own zigzag walk, independent of the
ROM formula. It compares every output sample and every `out_start`. The test also
counts, and requires, reads from both RAMs and at least one pause.

The other testbenches check the pieces:

* The ROM and `zz_position` against the JPEG sequence, and `zz_position` against the
  walk for block sides 2 to 16.
* The counter against a counting model under random enables.
* The RAM against an array model, including reads and writes to the same address in
  one clock.
* The demultiplexer and multiplexer exhaustively or with random data.
