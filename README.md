# Dictionary, bitmask and Golomb coding of FPGA configuration bitstreams

An FPGA's configuration bitstream has to sit in memory and cross a memory
interface every time the device is configured. Compressing it saves memory
and shortens configuration, but only if the decompressor is cheap and fast.
This RTL implements three simple codes suited to a hardware decompressor,
together with an encoder and a run-time decompression engine for each:

* **Dictionary coding**: a symbol that equals one of a few dictionary
  entries is replaced by its index.
* **Bitmask coding**: a symbol that differs from a dictionary entry in only
  one small, aligned group of bits is stored as the index plus a bitmask.
  More symbols compress than with exact matches alone.
* **Golomb run-length coding**: a bit string is cut into runs of zeros, each
  closed by a one. Each run length is stored as a Golomb codeword.

All three produce variable-length codewords packed into bytes. The
decompression engine gets those bytes back from memory, aligns each codeword
in a shifting input buffer, and decodes it.

## Code formats

In every code, the first bit is transmitted first. It is also the most
significant bit of the first byte. Defaults: symbols of `SYM_W = 8` bits, a
dictionary of `DICT_D = 2` entries (so a 1-bit index), and 2-bit masks
(`MASK_W = 2`) at 4 positions.

**Dictionary mode** (`MODE_DICT`)

| code | length | meaning |
|---|---|---|
| `0` index | 1 + log2(D) = 2 | symbol = dictionary[index] |
| `1` symbol | 1 + SYM_W = 9 | symbol stored as is |

**Bitmask mode** (`MODE_BITMASK`)

| code | length | meaning |
|---|---|---|
| `0 1` index | 3 | symbol = dictionary[index] |
| `0 0` position mask index | 7 | symbol = dictionary[index] XOR mask placed at group `position` |
| `1` symbol | 9 | symbol stored as is |

The symbol is split into `SYM_W/MASK_W` groups of `MASK_W` bits. Group 0 is
the most significant. For example, with dictionary {`00000000`, `01000010`}:

* `10000010` becomes `0 0 00 11 1`. Entry 1 with mask `11` in group 0 gives
  `01000010 ^ 11000000`.
* `00000010` becomes `0 0 11 10 0`. Entry 0 with mask `10` in group 3.

A symbol that differs from every entry in more than one group is stored
uncompressed. Only one bitmask is used per code, and there is no field for a
mask count.

When several entries match, the encoder picks as follows:

* An exact match always wins over a bitmask match.
* Among matches of the same kind, the lowest index wins.

**Golomb mode** (`MODE_GOLOMB`, group size `GOLOMB_M = 4`)

A run of `L` zeros closed by a one has `L = q*m + r`. Its codeword has two
parts:

* **Prefix:** `q` ones, then a zero. Runs `0..3` get prefix `0`, runs `4..7`
  get `10`, and so on.
* **Tail:** `r`, written in log2(m) = 2 bits.

For example, the bit string `01 0000001 0001 000001 001 1` has runs
1, 6, 3, 5, 2 and 0. It is coded as `001 1010 011 1001 010 000`.

`m` must be a power of two, so that the tail is a fixed-width field. The
stream must end with a one: zeros after the last one are never coded.

## Decompression engine (`gbc_decompressor`)

```
 bytes ──► gbc_bit_buffer ──win/avail──► gbc_dict_decoder ────┐
              ▲                      ├─► gbc_bitmask_decoder ──┼─► symbol register ─► sym_*
              └──── consume ◄─ mux ◄─┴─► gbc_golomb_decoder ───┴──────────────────► bit_*
                                               ▲
                            gbc_dictionary ────┘ (entries to both symbol decoders)
```

The hard part of decoding variable-length codes is alignment. The next
codeword can start at any bit position. `gbc_bit_buffer` handles this:

* It holds up to `BUF_W = 32` bits. The oldest bit is always at the MSB.
* It shows the top `WIN_W = 16` bits as `win`, and the number of valid bits
  as `avail`.
* Each cycle the active decoder returns the length of the code it used
  (`consume`). The buffer shifts that many bits out.
* In the same cycle, it places a new byte just behind the remaining bits.

This takes two barrel shifters. They are the largest and slowest logic in
the engine. A byte is accepted only while at most `BUF_W-8` bits are held, so
`byte_ready` has no combinational path from the decoders.

The symbol decoders (`gbc_dict_decoder`, `gbc_bitmask_decoder`) are
combinational. From the first one or two bits of the window they find the
code length. Then they either look up the dictionary entry (XORing in the
mask for a bitmask code) or take the raw symbol. `ok` is raised once the whole
code is in the buffer.

**Symbol timing.** A code is decoded when both of these hold:

* it is complete in the buffer;
* the output register is empty or is being read in that cycle.

The symbol appears on `sym_data` the next cycle. With input bytes arriving
fast enough, the rate is one symbol per clock. Short dictionary codes
(2 bits) arrive at four per byte, so one byte per cycle keeps the engine busy.

**Golomb decoder** (`gbc_golomb_decoder`). This decoder is sequential:

1. In its decode state it counts the leading ones among the valid window
   bits.
2. If a closing zero and the full tail lie within both `avail` and the
   16-bit window, it consumes the whole codeword. The run length becomes
   `(q_so_far + ones)*m + tail`.
3. Otherwise it consumes the ones it sees and adds them to `q_so_far`. This
   covers a prefix longer than the window, or a codeword that would run past
   its end.

This way runs of any length up to 2^`RUN_W`-1 (65535) decode through a
16-bit window. The run then leaves on `bit_*` at one bit per accepted cycle:
`L` zeros, then a one. The next codeword is read in the cycle after the
closing one.

`flush` empties the buffer, drops a half-decoded Golomb code and clears the
output register. Change `mode` only together with a flush.

## Compression side (`gbc_compressor`)

This is the coding step only. Choosing dictionary entries and bitmask
patterns is an offline analysis of the bitstream, and it is not part of this
RTL. Once the dictionary is chosen and loaded:

* `gbc_symbol_encoder` codes one symbol per cycle (combinational).
* `gbc_golomb_encoder` counts zeros, one input bit per cycle. On each one it
  emits the codeword. Its input stalls while the codeword is sent. A prefix
  longer than `WIN_W-1-log2(m)` = 13 ones is sent in pieces of 13 ones first.
* `gbc_bit_packer` concatenates the codewords into bytes. It holds 32 bits
  and takes a codeword of up to 16 bits when at most 16 bits are pending.
  While `flush` is high it pads the last partial byte with zeros.

**Padding.** The decoder cannot tell padding from data. In dictionary mode,
pad bits `00` decode as entry 0. In Golomb mode, `000` decodes as an extra
one. The consumer must know how many symbols or bits the stream holds.

## Top level (`gbc_top`)

`gbc_top` puts the compressor (`c_*` ports) and the decompression engine
(`d_*` ports) side by side.

* The memory that would hold the compressed stream between them is not part
  of the design. `c_byte_*` and `d_byte_*` are separate ports.
* `mode` and the dictionary write port (`dict_we`, `dict_addr`,
  `dict_wdata`) go to both halves, so a stream compressed here decompresses
  here.
* All streams use valid/ready.
* Reset (`rst_n`) is asynchronous and active low, and clears the
  dictionaries to zero.

Types and defaults are in `gbc_pkg` (`mode_e`, `SYM_W`, `DICT_D`, `MASK_W`,
`GOLOMB_M`, `WIN_W`, `BUF_W`, `RUN_W`). All modules take these as
parameters. For bigger symbols or dictionaries, keep these rules:

* `DICT_D` is a power of two.
* `SYM_W` is a multiple of `MASK_W`.
* `WIN_W` is at least `SYM_W + 1` and at least `2 + log2(SYM_W/MASK_W) +
  MASK_W + log2(DICT_D)`.
* `BUF_W` is at least `WIN_W + 8`.

## What is and is not here

Built, as described above:

* the three code formats;
* their encoders and decoders;
* the byte packer;
* the barrel-shifted input buffer.

Choices made here that the code formats do not fix:

* bit order (MSB first);
* the tie-break order in the encoder;
* Golomb prefix chunking;
* the valid/ready interfaces, flush, padding and the mode input.

Not built:

* **Selection of dictionary entries and bitmask patterns.** This is offline
  software; load the result through the dictionary port.
* **Decode-aware placement.** This scheme stores the variable-length stream
  as several fixed-length streams in memory, so the decoder needs no barrel
  shifter. That layout, and a decoder reading it, are not part of this
  design: this engine uses the shifting input buffer instead. Expect that buffer to
  dominate area and critical path.
* **A combined bitmask + run-length format.** The three schemes are
  separate modes. They are not mixed inside one stream.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. They share
`tb/gbc_tb_pkg.sv`. That package holds a ten-symbol example data set, its
expected dictionary and bitmask codes, and a Golomb example with its codes.

| testbench | checks |
|---|---|
| `tb_gbc_dictionary` | reset, random writes |
| `tb_gbc_dict_decoder`, `tb_gbc_bitmask_decoder` | example codes and random codes; `ok` against every `avail` |
| `tb_gbc_symbol_encoder` | example codes; random symbols against a group-counting reference |
| `tb_gbc_golomb_encoder` / `_decoder` | example; random runs up to 400 zeros; prefix pieces; codeword timing; one bit per cycle output |
| `tb_gbc_bit_buffer`, `tb_gbc_bit_packer` | against queue models, with random stalls and flush |
| `tb_gbc_compressor`, `tb_gbc_decompressor` | examples in all three modes; random streams; back-pressure; one symbol per cycle |
| `tb_gbc_top` | end-to-end round trips at default sizes in all modes, see below |
| `tb_gbc_examples` | the three example data sets through `gbc_top`: 62, 54 and 20 compressed bits; ratio (compressed + 16 dictionary bits) / 80 of 97.5 % and 87.5 %; decoded back |

`tb_gbc_top` runs with all default parameters. It also counts how often each
of these happens, and fails if any count is zero:

* dictionary hits, raw words and bitmask hits;
* Golomb codes and Golomb prefix pieces;
* output stalls, input-buffer-full stalls and compressor back-pressure;
* flush padding;
* mode switches.

To run a testbench with Verilator 5, put the packages first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gbc_top \
    rtl/gbc_pkg.sv tb/gbc_tb_pkg.sv $(ls rtl/gbc_*.sv | grep -v gbc_pkg) tb/tb_gbc_top.sv
./obj_dir/Vtb_gbc_top
```

Every testbench finishes in a few seconds.
