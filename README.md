# Parallel, collision-free interleaver for the WiMax duo-binary turbo decoder

A parallel turbo decoder splits a frame among M soft-in soft-out decoders
(SISOs), each with its own extrinsic-information memory. In the in-order half
iteration SISO-k only touches memory k. In the interleaved (scrambled) half
iteration the SISOs follow the interleaver, and two of them may want the same
memory in the same cycle (a *collision*). Collisions are usually handled with
extra buffering or a complex network.

This design avoids them by construction. The WiMax interleaver
`Pi(j) = (P0*j + K_j) mod Nc` is a *circular-shifting* permutation when the
parallelism M is chosen well for each block size. In that case the positions
read by the M SISOs at time j are

    Pi(j + k*Nc/M) = Pi(j) +/- k*Nc/M  (mod Nc),     k = 0..M-1

so they all sit at **the same address** `adx_j = Pi(j) mod (Nc/M)`. They are
in **M different memories**, `idx_j^k = (idx_j^0 +/- k) mod M`. One serial
address generator plus a small splitting stage therefore serves all SISOs.
Three 4x4 crossbars steer the data, and a LIFO replays the addresses for the
write-back. No collision can occur, so nothing needs to be buffered.

The RTL covers the whole interleaver (address generator, switches, LIFO) and the
four extrinsic memories, for all 17 WiMax block sizes (Nc = 24 ... 2400 couples)
and up to four SISOs. The SISOs themselves are not part of it: their ports are
outputs and inputs of the top module `parallel_interleaver`.

## Block sizes and parallelism

M is a power of two, so `Nc/M` is a shift and every `Nc/M` is even. M also
keeps each size collision free: Nc = 108 collides with M = 2 or 4, so it
runs with M = 1. W is the sliding-window length the SISOs use. `Nc/(M*W)`
windows per SISO is always an integer.

| Nc  | 24 | 36 | 48 | 72 | 96 | 108 | 120 | 144 | 180 | 192 | 216 | 240 | 480 | 960 | 1440 | 1920 | 2400 |
|-----|----|----|----|----|----|-----|-----|-----|-----|-----|-----|-----|-----|-----|------|------|------|
| M   | 1  | 1  | 1  | 1  | 1  | 1   | 2   | 2   | 2   | 2   | 2   | 2   | 2   | 4   | 4    | 4    | 4    |
| W   | 24 | 36 | 48 | 36 | 48 | 36  | 60  | 36  | 45  | 48  | 36  | 40  | 48  | 40  | 40   | 40   | 40   |
| windows/SISO | 1 | 1 | 1 | 2 | 2 | 3 | 1 | 2 | 2 | 2 | 3 | 3 | 5 | 6 | 9 | 12 | 15 |

The interleaver parameters P0..P3 of every size are the IEEE 802.16 CTC
values (`wimax_ctc_pkg::p_row`). The testbenches check that each one gives a
permutation. They also check that, at the M above, every SISO address set is
collision free.

The expected decoder throughput is `T = 2*Nc*f / (2*I*(Nc/M + 2W))`, with
I = 8 iterations and a SISO latency of 2W. At 200 MHz this reaches about
88 Mb/s for Nc = 2400. The interleaver supports it because it delivers one
address set, that is M triplets, per clock cycle.

## Address generation (`address_generator`)

### Serial interleaver: every modulo is one subtraction

`Pi(j)` is computed as `{[(P0*j) mod Nc] + (K_j mod Nc)} mod Nc`. In this form
both additions have operands below Nc, so each sum is below `2*Nc`. The
reduction is then a single subtract-and-select (`mod_sub`): compute `x - Nc`,
keep it if it does not borrow, otherwise keep `x`.

* `serial_interleaver` keeps an accumulator `acc = (P0*j) mod Nc`. Each step
  computes `acc <- (acc + P0) mod Nc`, so there is no multiplier.
* The two LSBs of the time counter `j` select `K_j mod Nc`. K_0 is always 1,
  and K_1..K_3 come from `param_lut`.
* A second `mod_sub` reduces `acc + K_j` to `Pi(j)`.

`param_lut` and `m_lut` are constant ROMs indexed by a 5-bit block-size index.
`param_lut` returns Nc, P0 and K_1..K_3 mod Nc; the K terms are computed at
elaboration from the standard's P1..P3. `m_lut` returns log2 M and W.

### From one address to M addresses

Only the first `L = Nc/M` values of j are generated.

* `adx_extract` forms `Pi - i*L` for i = 1..M-1. The multiples of L use
  adders only. The signs of these differences form a thermometer code, and
  its count is `idx^0 = Pi div L`. The same count selects
  `adx = Pi mod L`.
* `idx_gen` forms `idx^k = (idx^0 +/- k) mod M` with M-1 adders modulo M. The
  modulo is a bit mask because M is a power of two.

**Choosing the sign.** The sign comes from P0. Every WiMax P0 satisfies
`P0 = +/-1 (mod M)`. If `P0 mod M = 1`, then `Pi(j + kL) = Pi(j) + kL`. If
`P0 mod M = M-1`, then `Pi(j + kL) = Pi(j) - kL`. The two cases differ only
for M = 4: Nc = 960, 1440 and 1920 use '-', and Nc = 2400 uses '+'.

**The A/B swap.** The WiMax law also exchanges A and B of every couple at an
odd natural address. This step commutes with the permutation, so it is
applied on the fly with the LSB of `Pi(j)` as the flag. `Nc/M` is even, so
this LSB equals `adx[0]` and is the same for all SISOs.

In an in-order half iteration the same pipeline emits `adx = j`,
`idx^k = k` and no swap.

**Timing.** After a one-cycle `start`, the registered address sets appear two
cycles later. One set follows per cycle for exactly L cycles, and `last`
flags the final set.

## Data path (`parallel_interleaver`)

```
            address_generator ──adx──────────────► EI-MEM 0..3 read address (common)
                 │  idx^k, active                        │ triplets (1 cycle)
                 ├──► radx_switch ──radx (reg)──► rdata-switch ──► couple_swap ──► SISO-k
                 │    (fixed input k → output idx^k)
                 └──► window_lifo  (push adx, idx^0..3)
SISO-k write ──► couple_swap ──► wdata-switch (SISO-k → memory idx^k) ──► EI-MEM write at adx
                                   ▲ pop (newest first)
                             window_lifo
```

* **radx-switch** (`radx_switch`): a crossbar whose inputs are the constants
  0..3. Input k is routed to output `idx^k`, so output m names the SISO that
  reads memory m. An assertion enforces the collision-free rule.
* **EI-MEM** (`ei_mem`): four memories of 600 x 24 bits, which is 57.6 kbit.
  Memory m holds natural couples `m*L .. (m+1)*L-1`. Each has one
  synchronous read port and one write port, so one window can be written
  back while the next one is read.
* **rdata-switch / wdata-switch** (`data_switch`): both are the same 4x4
  crossbar of 24-bit triplets, `out[sel[i]] = in[i]`. The read instance is
  steered by the radx outputs, registered to match the memory latency. The
  write instance is steered by the `idx^k` popped from the LIFO.
* **Couple swap** (`couple_swap`): a triplet is `{l11, l10, l01}`, three
  8-bit LLRs relative to symbol 00. Swapping A and B exchanges `l01` and
  `l10`. The swap is its own inverse, so it is applied on read and again on
  write.

## The write-back contract with the SISOs

This is the part that needs care when the interleaver is connected to real
SISOs.

A sliding-window SISO returns each window's results in reverse order. The
address set used to read time j is therefore stored in `window_lifo` and
replayed newest first. The LIFO works window by window. It has two banks of
60 entries (the largest W), each entry holding `{adx, idx^0..idx^3}` in
18 bits, so the store is 2160 bits. Reading window w+1 fills one bank while
the SISOs empty window w from the other.

The read side never stops. The SISOs must therefore obey these rules:

1. Write one result set per `siso_wvalid` cycle, window by window, newest
   entry first, and only while `wr_ready` is high. `wr_ready` means a
   complete window is waiting.
2. Finish writing window w no later than the cycle in which window w+2
   starts to be read. A bank may be refilled in the same cycle as its last
   pop. In practice: start writing window w at most two cycles after its
   last read beat, and then write one set every cycle.
3. Breaking rule 2 drops address sets and pulses `lifo_overflow`. Writing
   without a complete window pulses `lifo_underflow`. Both are reports, not
   flow control.

If the SISOs need more slack than this, for example a write-back delayed by
a full window, raise `NBANK` of `window_lifo`. Each extra bank costs 60 x 18
bits.

`busy` stays high until every address set read in the half iteration has
been written back. `start` is ignored while `busy` is high.

## Top-level interface

| Port | Dir | Meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `size_idx[4:0]`, `scrambled` | in | start a half iteration of block size `size_idx` (0..16 for Nc = 24..2400); `scrambled` selects the interleaved order |
| `busy` | out | half iteration in progress, including the write-back |
| `cfg_active[3:0]`, `cfg_len`, `cfg_win` | out | SISOs in use, Nc/M and W, for the SISO control counters |
| `siso_rvalid`, `siso_rlast`, `siso_rdata[3:0]` | out | one triplet per SISO per cycle, from 3 cycles after `start`, for Nc/M cycles |
| `wr_ready`, `siso_wvalid`, `siso_wdata[3:0]` | out/in/in | write-back, see the contract above |
| `lifo_overflow`, `lifo_underflow` | out | write-back contract violated |

## Files

| File | Content |
|------|---------|
| `rtl/wimax_ctc_pkg.sv` | sizes, types (`triplet_t`, `lifo_entry_t`), the block-size tables |
| `rtl/parallel_interleaver.sv` | top: address generator, switches, LIFO, EI-MEMs |
| `rtl/address_generator.sv` | serial interleaver + adx/idx split + index generators |
| `rtl/serial_interleaver.sv`, `rtl/mod_sub.sv` | Pi(j) one per cycle; subtract-and-select modulo |
| `rtl/param_lut.sv`, `rtl/m_lut.sv` | Nc/P0/K ROM; M and W ROM |
| `rtl/adx_extract.sv`, `rtl/idx_gen.sv` | memory index and address; per-SISO memory index |
| `rtl/radx_switch.sv`, `rtl/data_switch.sv`, `rtl/couple_swap.sv` | crossbars and A/B swap |
| `rtl/window_lifo.sv`, `rtl/ei_mem.sv` | address LIFO; extrinsic memory |
| `tb/wimax_ref_pkg.sv` | reference model: the interleaver law in plain integer arithmetic, its own copy of the table |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every module has a testbench that compares it with values computed
independently from the standard's formula. Each testbench prints
`TB_RESULT checks=N failures=M`.

* `tb_serial_interleaver` runs a whole frame of every size and checks each
  `Pi(j)` and that every frame is a permutation.
* `tb_address_generator` checks, for every size, that every SISO's
  `idx^k*L + adx` equals `Pi(j + k*L)`. It also checks the swap flag, the
  rate of one set per cycle, the 2-cycle latency and the in-order mode.
* `tb_parallel_interleaver` runs the top at its only (full) size for all 17
  block sizes, with a behavioural SISO model. Each size gets three half
  iterations:
  1. In order, writing a known tag to every couple.
  2. Scrambled: each SISO checks it receives the correctly swapped couple
     `Pi(j + k*L)`, then writes back a modified value.
  3. In order again: each SISO checks the modified values landed at the
     right places.

  It also checks the read latency and rate and the configuration outputs.
  At the end it provokes a LIFO overflow. It counts, and requires at least
  once, each of these: M = 1/2/4, both modes, swaps on read and write,
  write-back overlapping the next window's read, a LIFO bank refilled as it
  empties, accumulator modulo corrections, and both index directions.

* `tb_wimax_throughput` runs one interleaved half iteration of every frame
  size through the full-size design. It measures the read cycles, which must
  be Nc/M without gaps, and converts them into the decoder throughput
  formula above with SISO latency 2W. The results must match the expected
  figures to 0.1 Mb/s, from 8.3 Mb/s at Nc = 24 to 88.2 Mb/s at Nc = 2400.
* `tb_window_lifo` also runs a three-bank LIFO with a write-back one window
  late.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/wimax_ctc_pkg.sv tb/wimax_ref_pkg.sv tb/tb_parallel_interleaver.sv \
    --top-module tb_parallel_interleaver -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each takes well under a
second.

Not verified: timing closure at 200 MHz and gate counts (no synthesis to a
standard-cell library was run), and operation with real SISOs.

## Design choices beyond the original description

* **Size selection.** A 5-bit size index selects the block size; Nc is not
  an input. `param_lut` returns P0, three 12-bit `K mod Nc` terms and Nc.
  The published design uses a 17 x 37-bit LUT whose field layout is not
  known, so the widths here differ.
* **Table values.** W is stored next to M in `m_lut`, so the LIFO knows the
  window length. The W values are those for which the windows-per-SISO
  count and the throughput formula agree with the published figures.
* **LIFO organisation.** The banked LIFO is this design's own choice, sized
  to the 2.2 kbit total: 2 banks x 60 entries x 18 bits. So are the
  overflow and underflow reports and the write-back contract above.
* **Memory ports.** The EI-MEMs are plain arrays with one read and one write
  port and read-before-write behaviour. A real chip would use SRAM macros.
* **In-order mode.** The in-order half iteration runs through the same
  datapath (`adx = j`, `idx^k = k`).
* **Index direction.** The sign of the index generators is derived from P0,
  as described under *Choosing the sign*.
* **Latencies.** The 3-cycle read latency and the register placement are
  this design's own.

## Changing the design

* **Block sizes.** Edit `nc_of`, `p_row`, `log2m_of` and `w_of` in
  `wimax_ctc_pkg`. M must stay a power of two, with `Nc/M` even and
  divisible by W, and must keep the interleaver collision free. Run
  `tb_address_generator`, which checks that last property directly.
* **LLR width.** Change `LLR_W`. The triplet, the crossbars and the memories
  follow it.
* **More slack for the SISOs.** Raise `NBANK` of `window_lifo`, where the
  top instantiates it.
