# Channel-tiled CNN accelerator with compressed extended partial sums

When a convolution layer is too large for on-chip memory, its input-channel
loop is split into *channel tiles*. The accumulator of every output then has
to be emptied after each tile and refilled before the next one. If the
partial sum (psum) is cut to the 8-bit feature-map width on the way out, two
errors are added each time:

* a **rounding error** – the low accumulator bits are dropped; small, but it
  happens to almost every output in every tile and adds up;
* an **exceeding error** – a psum that is temporarily larger than the 8-bit
  range is clipped, even though the final output would have been in range.

Keeping one extra fractional bit in every saved psum halves the rounding
error. It costs 12.5 % more psum storage, however, and a 9-bit word is awkward
on byte-wide memories. This design avoids both costs. It stores the sign and
the seven low bits of the 9-bit psum as an ordinary byte. It replaces the bit
under the sign by the same bit of the psum's **absolute value**, which is
almost always 0 because most psums are small. That bit plane is stored with
a **bit-level run-length code** next to the psum bytes.

This RTL implements the method described in *Y. Kang et al., "Analysis and
Solution of CNN Accuracy Reduction over Channel Loop Tiling"*. It wraps the
method in a small accelerator: a controller, six processing elements (PEs) of
eight multiply-accumulate units (MACs) each, one run-length encoder and
decoder, a double-buffered output buffer and a double-buffered operand
(ifmap/filter) buffer. The last section lists every
part that is this implementation's own choice.

## Number formats

All data use dynamic fixed point: a two's-complement integer whose fractional
length (FL) is chosen per layer.

| quantity             | width | fractional length            |
|----------------------|-------|------------------------------|
| ifmap, filter        | 8     | FL_i, FL_f                   |
| product              | 16    | FL_i + FL_f                  |
| accumulator          | 20    | FL_acc = FL_i + FL_f         |
| extended psum        | 9     | FL_p = FL_acc − `psum_shift` |
| OFMAP, bias          | 8     | FL_p − 1                     |

`psum_shift` is a run-time input, because fractional lengths change from
layer to layer. Moving between formats works like this:

* **Extraction** (accumulator → psum or OFMAP) drops `psum_shift` bits, or
  `psum_shift+1` bits for the OFMAP. It rounds half up, by adding half an
  output LSB and then shifting arithmetically. It then saturates to
  [−256, 255] for a psum or [−128, 127] for the OFMAP. `psum_extract` flags
  saturation (an exceeding error) and dropped non-zero bits (a rounding
  error).
* **Loading** (psum or bias → accumulator) is an arithmetic left shift by
  `psum_shift` for a psum, or by `psum_shift+1` for a bias.
* The accumulator wraps on overflow. Its 12 spare bits above the 8-bit data
  are what keep it from overflowing.

## The 8 + 1 split of an extended psum

Number the 9-bit psum `p[8:0]`, where `p[8]` is the sign and `p[0]` is the
extra fractional bit.

```
           p[8]  p[7]  p[6:0]
stored byte = { p[8],        p[6:0] }          -> psum region of the buffer
abs_msb     = bit 7 of |p|  (|p| computed 10 bits wide)  -> run-length encoder
```

Why the absolute value helps: for a small negative psum, `p[7]` copies the
sign, so about half of all psums have `p[7] = 1` and runs are short. Bit 7
of `|p|` is 1 only when |p| ≥ 128, which is rare.

`psum_merge` undoes the split. The stored byte gives the sign `s` and the
seven low bits `L`, and the decoder gives `m`:

* if `s = 0`, then `p[7] = m`;
* if `s = 1`, then |p| = ~p + 1. The +1 carries into bit 7 only when
  L = 0, so `p[7] = m` when `L == 0`, and `p[7] = ~m` otherwise.

The mapping is exact for all 512 values, including −256 (|p| = 256, so
`m = 0`). `tb_psum_split_merge` checks it exhaustively.

After the last tile the same path produces the OFMAP. An 8-bit value has
`p[8] = p[7]`, so `{p[8], p[6:0]}` is the OFMAP byte itself. Nothing is
encoded in that tile.

## Bit-level run-length code

The code word is `LEN_W` bits wide. The default is 16; 8 and 32 also work.
`tb_rle_encoder` checks all three side by side, together with a 4-bit word
that forces frequent run splits.

```
[LEN_W-1]    Run    : the repeated bit value
[LEN_W-2:0]  Length : number of repetitions minus one
```

The code word is exactly `LEN_W` bits so that it fills a byte-multiple
memory word. A run ends when:

* the bit changes,
* the run reaches 2^(LEN_W−1) bits, or
* the tile ends (`flush`).

Each bit of the stream is the `abs_msb` of one output. Outputs are taken in
(group, PE, MAC) order and the stream covers all groups of one tile.

* `rle_encoder` takes one bit per cycle. A code word appears for one cycle,
  the cycle after the bit or flush that closed the run. There is no
  back-pressure.
* `rle_decoder` has valid/ready on both sides. It passes the first bit of a
  code word straight through, so it delivers one bit per cycle with no gap
  between runs.

## Tile schedule

One operation computes `n_groups` groups of 48 outputs. In a group, PE `p`
works on output position `p` and MAC `m` on output channel `m`: a PE's eight
MACs share one ifmap byte, and the six PEs share each filter byte. The input
channels are split into `n_tiles` tiles of `n_steps` MAC steps each, where
one step is one (channel, kernel position) pair.

For tile `t` (0 … `n_tiles`−1) and each group, the controller runs:

1. **LOAD**
   * Tile 0: every accumulator takes its bias, in 1 cycle.
   * Other tiles: one accumulator per cycle takes the psum of tile t−1, in
     48 cycles. Each psum is rebuilt from its byte in the other bank and the
     next decoded bit.
2. **COMPUTE**: `n_steps` operand sets are taken from the operand buffer,
   one per cycle. If the chunk has not been written yet, the MACs stall.
3. **STORE**: one output per cycle, in 48 cycles. The output is extracted
   and its byte is written to bank `t % 2`. Except in the last tile, its
   `abs_msb` also goes to the encoder. The last tile stores the OFMAP.

After the last group of a tile that is not the final one, two cycles flush
the encoder and let its last code word land. Then the banks swap.

Cycles from `start` to `done`:

```
n_tiles                                    (tile set-up)
+ n_tiles * n_groups * (n_steps + 48)      (compute + store)
+ n_groups                                 (bias load, first tile)
+ (n_tiles - 1) * n_groups * 48            (psum reload)
+ 2 * (n_tiles - 1)                        (flush)
+ stall cycles
```

`done` pulses for one cycle. `result_bank` then names the bank that holds
the OFMAP.

## Operand buffer

The operand buffer holds the ifmap and filter data in two banks. Each bank
holds one *chunk*: the `n_steps` operand sets of one (tile, group) pair. An
operand set is what the MAC array consumes in one cycle: one ifmap byte per
PE and one filter byte per output channel.

* The host writes a chunk through `fill_valid` / `fill_ready`. It marks the
  chunk's last set with `fill_last`, which hands the bank to the array.
* The host can fill the other bank while the array computes. `fill_ready`
  drops only while both banks hold unread chunks.
* Each bank holds `OPB_DEPTH` = 1024 sets, so `n_steps` may be at most 1024.

The buffer stores ready-made operand sets. It has no address generator that
forms convolution windows out of an ifmap tile. Forming the sets, including
the reuse of ifmap values across kernel positions, is left to the writer.

## Output buffer

Each of the two banks holds two regions:

* a byte-wide psum region, `PSUM_DEPTH` = 4096 entries;
* a code word region, `RLE_DEPTH` = 256 words of `LEN_W` bits.

Output (g, p, m) is at byte address `g*48 + p*8 + m`, so one operation
covers at most 85 groups.

Tile t writes bank t%2 while the psums of tile t−1 are read from the other
bank. The code word region is cleared at the start of every tile. If it
fills, further words are dropped and the sticky `rle_overflow` output is set.
The reloaded psums of the next tile are then wrong; the overflow flag reports
this rather than preventing it. `start` clears the flag.

With 16-bit words the region stores 4096 bits of runs per bank: one bit per
psum, the same as storing the bit plane plainly. Overflow therefore needs
psum data whose bit plane breaks into very many runs.

The host reads results through `rd_bank`, `rd_addr` and `rd_data`. Both read
ports are combinational.

## Top-level interface (`cnn_accel_top`)

| port                                        | meaning |
|---------------------------------------------|---------|
| `clk`, `rst_n`                              | clock; asynchronous active-low reset |
| `start`                                     | starts an operation (when `busy` is low) |
| `n_tiles`, `n_steps`, `n_groups`            | operation size (`n_tiles`, `n_groups` ≥ 1) |
| `psum_shift`                                | FL_acc − FL_p |
| `bias[8]`                                   | one bias per output channel, OFMAP format |
| `fill_valid`, `fill_ready`, `fill_last`, `fill_ifmap[6]`, `fill_weight[8]` | operand buffer fill port: one set per write; `fill_last` ends a chunk |
| `busy`, `done`, `result_bank`               | status |
| `rd_bank`, `rd_addr`, `rd_data`             | output buffer read port |
| `rle_overflow`, `rle_words[2]`              | code word overflow; words held per bank |
| `sat_event`, `rnd_event`                    | a stored value was clipped / rounded this cycle |

Chunks are written in this order: for each tile, for each group, one chunk
of `n_steps` sets.

Parameters: `N_PE` = 6, `N_MAC` = 8, `PSUM_DEPTH` = 4096, `RLE_DEPTH` = 256,
`LEN_W` = 16, `OPB_DEPTH` = 1024.

## Files

| file | content |
|------|---------|
| `rtl/cnn_pkg.sv`       | widths, types, load-kind enum |
| `rtl/mac.sv`           | 8×8 → 20-bit MAC with bias/psum load |
| `rtl/psum_extract.sv`  | rounding and saturation to psum or OFMAP |
| `rtl/psum_split.sv`    | 9-bit psum → stored byte + \|psum\| bit 7 |
| `rtl/psum_merge.sv`    | inverse of the split |
| `rtl/pe.sv`            | 8 MACs with their extract/split paths |
| `rtl/rle_encoder.sv`, `rtl/rle_decoder.sv` | bit-level run-length codec |
| `rtl/output_buffer.sv` | two banks of psum bytes and code words |
| `rtl/operand_buffer.sv` | two banks of ifmap/filter operand sets |
| `rtl/controller.sv`    | tile sequencer |
| `rtl/cnn_accel_top.sv` | the accelerator |
| `tb/tb_*.sv`           | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself if it
hangs. For example:

```
verilator --binary --timing --assert -y rtl rtl/cnn_pkg.sv \
    tb/tb_cnn_accel_top.sv --top-module tb_cnn_accel_top
./obj_dir/Vtb_cnn_accel_top
```

To run another testbench, replace `tb_cnn_accel_top` with its name.

`tb_cnn_accel_top` runs the accelerator at its default size. Its reference
model repeats the arithmetic independently of the RTL. It runs five
operations. The operands are random and mostly small, and they are written
into the operand buffer with random gaps. Every OFMAP byte is compared with
the model. It also checks:

* the number of code words left by the last reloaded tile;
* the result bank;
* the cycle count.

It counts MAC stalls, a full operand buffer, clipped psums, rounded psums,
reloads, non-zero compressed bits and compression, and fails if any of them
never happens.

The model also computes two comparison results: the untiled convolution,
and tiling with plain 8-bit psums. In the 16-tile case of one run, the mean
squared OFMAP error against the untiled result was 11.3 LSB² with the
extended psum and 11.8 LSB² with plain 8-bit psums. Most of that error comes
from clipping, which the extra fractional bit does not address. The
testbench fails if the extended psum does not come out closer.

### Tile-count sweep

`tb_tile_sweep` runs the same block of 4 × 48 outputs, each a sum of 128
products with small operands. It splits the channel loop into 1, 2, 4, …,
128 tiles and checks every result bit-exactly against the model. It prints
the mean squared OFMAP error (in LSB²) against the untiled result, for the
extended psum and for plain 8-bit psums:

| tiles | 9-bit psum (this design) | 8-bit psum |
|------:|------:|------:|
| 1   | 0.00 | 0.00 |
| 2   | 0.14 | 0.33 |
| 4   | 0.24 | 0.42 |
| 8   | 0.28 | 0.67 |
| 16  | 0.48 | 1.50 |
| 32  | 0.66 | 2.32 |
| 64  | 1.84 | 5.16 |
| 128 | 5.78 | 10.56 |

The error grows with the number of tiles, and the extra bit keeps it at
roughly a third to a half. The testbench checks two things: one tile gives
no error, and the total over the sweep is lower with the extended psum.

## Choices made in this implementation

The method fixes the numeric behaviour: 8-bit operands, 20-bit
accumulation, one extra fractional psum bit, {sign, seven LSBs} storage,
run-length coding of the absolute-value bit, and 16-bit Length. The overall
size is also given: six PEs of eight MACs, a double-buffered output buffer.
The following are this design's own:

* **Dataflow**: the ifmap byte is shared within a PE and the filter byte
  across PEs, and the output is grouped as 6 positions × 8 channels.
* **Psum round trip**: psums move between tiles through the two on-chip
  banks. In a full system they would also travel to external memory, and
  the host read port is where that path would attach.
* **Operand buffer organization**: banks hold ready-made operand sets, not
  ifmap tiles with window addressing.
* **Rounding rule**: round half up. Saturation bounds are the two's-complement
  range.
* **Code word layout**: Run bit on top, Length−1 below, `LEN_W` bits in all.
  The split of over-long runs, flush at tile end, and the zero-bubble decoder
  are also choices.
* **Serial load and store**: one output per cycle, through one shared encoder
  and decoder.
* **Buffer sizes, overflow flag and read ports**: the output buffer holds
  4096 B and 256 words per bank, and the operand buffer 1024 sets per bank; on overflow words are dropped and a sticky flag is set;
  both read ports are combinational.
* **Bias format**: 8-bit, in OFMAP format.
* **`psum_shift`**: a run-time value, usable up to 11.
* **Reset**: asynchronous, active low.
* **Status outputs**: `sat_event`, `rnd_event`, `rle_words`.

The method's accuracy results come from trained networks on ImageNet; random
test data cannot reproduce them. The same holds for its compression ratios
and its 65 nm area and power figures.
