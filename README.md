# Statistical-code scan vector decompressor

Testing a core through its scan chain normally means that the tester stores every bit of every
scan vector and shifts each one in over a slow tester channel. This design cuts both the tester
memory and the test time by the same factor. The tester stores the vectors compressed with a
statistical code, and a small on-chip decoder at the serial input of the scan chain expands them
again.

The key is the choice of code. It is a *selective* code, which a tiny finite-state machine can
decode. It is also chosen so that the decoder always keeps up with the tester. So decompression
adds no time: a vector compressed by a factor *c* loads *c* times faster.

```
 tester channel ──► channel_distributor ──► decoder[k] ══B══► serializer[k] ──► scan chain k
 (compressed bits,   (which decoder takes     (codeword →       (B bits out at the
  one per tester      this tester bit)          B-bit block)      scan clock rate)
  clock)
```

Everything is SystemVerilog in `rtl/`. Each block has a self-checking testbench in `tb/`.

## The selective code

The scan vectors are cut into fixed blocks of *b* bits. Each block is replaced by a codeword:

* **Coded blocks.** The *n* most frequent blocks get a `1` flag. The flag is followed by a Huffman
  code built over those *n* blocks only.
* **Raw blocks.** Every other block gets a `0` flag followed by its own *b* bits, so its codeword
  is *b*+1 bits.

So the decoder only needs to know *n* blocks. Every other block passes straight through. A
full Huffman decoder for *b*-bit blocks needs 2^b − 1 states. This decoder needs at most *n* + *b*.
On test sets of this kind, the selective code comes close to full Huffman compression.

The default configuration uses the worked example the design was derived from. That example has
4-bit blocks and three coded blocks:

| codeword | block |
|----------|-------|
| `10`     | `0010` |
| `110`    | `0100` |
| `111`    | `0110` |
| `0xxxx`  | `xxxx` (raw) |

The example test set has 60 blocks, 240 bits in all, applied here as five 48-bit vectors. Its frequencies are
22 × `0010`, 13 × `0100`, 7 × `0110` and 18 other blocks. It codes into
22·2 + 13·3 + 7·3 + 18·5 = **194 bits**, a 19 % reduction. A full Huffman code would reach 172 bits.
On larger ISCAS benchmark test sets with 6- and 8-bit blocks, the source reports reductions of
roughly 36–84 % for this code.

Bit order: within a block, the bit written first (the leftmost bit, `blk[B-1]` in the RTL) is
sent first and is also the first bit shifted into the scan chain. Raw blocks are sent in that same
order.

### The speed rule

Let *R* be the number of scan clocks for every bit the decoder receives. A codeword of *L* bits
takes *L*·*R* scan clocks to arrive. Emptying the serializer takes *B* scan clocks. So the
serializer is always empty when the next block arrives if

    shortest codeword length × R ≥ B

The code must be chosen to meet this rule. With the default code the shortest codeword is `10`
(2 bits) and R = 2, so 2 × 2 = 4 ≥ 4. `scan_decompressor` checks the rule at elaboration: its
`CLK_RATIO` parameter is *R*. There is no upper limit on codeword length. When codewords are long,
the serializer simply runs dry and holds the scan clock.

## Decoding FSM (`selective_decoder`)

This is the part that needs the closest reading. The decoder consumes one bit on every cycle where
`bit_en` is high. With the default code it is a 7-state Mealy machine:

```
            ┌──1──► b ──0 / Par 0010 ──► a
            │       └─1─► c ──0 / Par 0100 ──► a
  (root) a ─┤             └──1 / Par 0110 ──► a
            └──0──► d ─x/Ser─► e ─x/Ser─► f ─x/Ser─► g ─x/Ser + load {buffer,x}─► a
```

* **Root (`a`).** A `0` flag moves the FSM into the raw-bit states. A `1` flag starts a walk down
  the code tree.
* **Tree states (`b`, `c`).** The state is the path taken so far. After each bit the path is
  compared with the codeword table (`CODE`, `CODE_LEN`). On a match, the decoder pulses `par` and
  `blk_load` with the matching `PATTERN` entry on `blk`, and returns to the root.
* **Raw states (`d`…`g`).** Each raw bit pulses `ser` and is shifted into an internal *B*-bit
  buffer. On the *B*-th bit the completed block (buffer plus the current bit) goes out on `blk`
  with `blk_load`.

In the RTL the state is held as a mode (`S_ROOT`, `S_CODED`, `S_RAW`) plus a path/count register.
The reachable states are exactly the *n* + *b* states above, for any code given through the
parameters.

The outputs are Mealy outputs. `blk_load` is high in the **same cycle** as the last bit of a
codeword. The serializer captures the block at that clock edge, so decoding adds no latency.

Some codes have an incomplete tree, for example `10` and `110` only. If the path reaches `MAXLEN`
bits without a match, the decoder pulses `code_err` and restarts at the root.

Parameters:

* `B`: block size.
* `N`: number of coded blocks.
* `MAXLEN`: longest coded codeword, flag included.
* `CODE`, `CODE_LEN`, `PATTERN`: packed arrays. Entry *i* is codeword *i*, right-aligned with its
  first bit at position `CODE_LEN[i]-1`; its length; and its block.

The defaults, in `sdc_pkg`, are the table above. The smallest code, `N = 1` with codeword `1`,
also works (`MAXLEN = 1`).

## Serializer and the held scan clock (`serializer`)

The serializer is a *B*-bit shift register with a bit counter. A load copies `din` in whole. It
then shifts one bit per clock onto `scan_out`, MSB first, with `scan_en` high. When no bits are
left, `scan_en` goes low. This is the "hold the scan clock" state: the chain's clock gate should
be driven by `scan_en`.

A load is accepted in the cycle in which the last bit of the previous block leaves. So codewords
at exactly the minimum length keep the chain shifting without a gap. A load that comes while two
or more bits are still waiting would overwrite them. The new block is kept, and the sticky
`overrun` flag is set. If the speed rule holds, this never happens.

Timing: after a load at clock edge *t*, the block's bits are on `scan_out` in cycles *t*+1 … *t*+*B*.

## Making the scan chain faster than the decoder input

A block comes out faster than its codeword goes in, so each decoder's scan chain must shift *R*
times faster than that decoder receives bits. There are two set-ups, both built by
`scan_decompressor`:

1. **Fast scan clock** (`NUM_CHAINS = 1`, the default). The scan chain runs *R* times faster than
   the tester. The serializer takes a block in one slow cycle and shifts it out over *R* fast
   ones.
2. **One channel, several chains** (`NUM_CHAINS = n`). The chains run at the tester clock. The
   tester sends a bit every clock, and the channel rotates over *n* decoders, so decoder *k* takes
   the bits at positions *k*, *k*+*n*, *k*+2*n*, … of the stream. `channel_distributor` is the
   modulo-*n* phase counter behind this. It starts at decoder 0 after reset. Set `CLK_RATIO = n`.

The whole design runs on **one clock, the scan clock**. The tester clock appears as the
`tester_en` strobe, high for one scan clock per tester period. In set-up 1, `tester_en` is high one
cycle in *R*. In set-up 2 it is high every cycle.

## RAM-based decoder (`ram_decoder`, `code_ram`)

This variant restricts the code further so that a table lookup replaces the tree walk. Every
codeword is one of two sizes:

* `1` followed by an *A*-bit address. The block is read from a decode RAM at that address.
* `0` followed by the *B* raw bits.

The default is B = 8 and A = 4: 16 blocks get 5-bit codewords and the other 240 get 9-bit
codewords, decoded with a 16 × 8 RAM. The RAM (`code_ram`) has a synchronous write port and an
asynchronous read port. The `cfg_*` port loads it, so one decoder can serve different cores with
different tables.

The RAM may be larger than the code needs (`RAM_AW ≥ A`, `RAM_DW ≥ B`). The address is then
zero-extended and only the low `B` data bits are used. The FSM has 1 + A + B states. Its timing
and its `par`/`ser`/`blk_load` strobes are the same as those of `selective_decoder`.

In `scan_decompressor`, set `DECODER = DEC_RAM` to choose this decoder. The top-level default
`A = 2` suits `B = 4`. The speed rule then becomes (A+1)·R ≥ B.

## Top level (`scan_decompressor`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | scan clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `tester_en` | in | 1 | one pulse per tester clock: `tester_bit` is valid |
| `tester_bit` | in | 1 | compressed data from the tester channel |
| `cfg_we` | in | NUM_CHAINS | decode-RAM write enable per chain (DEC_RAM only) |
| `cfg_addr`, `cfg_data` | in | RAM_AW, RAM_DW | decode-RAM write address and data |
| `scan_out` | out | NUM_CHAINS | serial data into each scan chain |
| `scan_en` | out | NUM_CHAINS | scan clock enable of each chain |
| `par_load`, `ser_load` | out | NUM_CHAINS | decoder strobes (coded block decoded / raw bit taken) |
| `code_err` | out | NUM_CHAINS | codeword outside the code tree |
| `overrun` | out | NUM_CHAINS | sticky: the speed rule was violated |

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_CHAINS` | 1 | decoder/serializer pairs on the channel |
| `B` | 4 | block size |
| `CLK_RATIO` | 2 | scan clocks per decoder input bit (only checked) |
| `DECODER` | `DEC_FSM` | `DEC_FSM` or `DEC_RAM` |
| `N`, `MAXLEN`, `CODE`, `CODE_LEN`, `PATTERN` | table above | FSM decoder code |
| `A`, `RAM_AW`, `RAM_DW` | 2, 4, 8 | RAM decoder |

With `DECODER = DEC_FSM`, the `cfg_*` inputs are unused and lint reports them as such.

Size after generic synthesis, default configuration: about 110 word-level cells and 20 flip-flops.
The decoder accounts for 11 of the flip-flops and the serializer for 8.

## Where this RTL goes beyond or departs from the published scheme

* **One clock.** The source draws separate slow (tester) and fast (scan) clocks. Here both are
  one clock, with a tester-rate enable and a scan-clock enable output. To use two real clocks you
  need a synchronizer or a ratio-locked enable in front of `tester_en`.
* **Same-cycle hand-over of raw blocks.** The source describes raw bits going into an internal
  buffer that is then loaded into the serializer. Its state diagram shows no separate load step
  after the last raw bit. Here the completed buffer is handed over with that last bit.
* **Code as parameters.** The decoder is generic: any selective code is given through parameters
  instead of a hand-synthesized FSM. Deriving the code from a test set (finding the most frequent
  blocks, building the Huffman tree, filling don't-cares) is software and is not part of the RTL.
* **Additions.** `code_err`, `overrun`, the elaboration check of the speed rule, and the decode-RAM
  write port.
* **State counts in the evaluation.** Some of the evaluated 6-bit codes are reported with 5 FSM
  states. That is fewer than the *b* + 1 states that any decoder of this structure needs, so those
  entries cannot be reproduced as stated.

## Verification

| testbench | what it checks |
|-----------|----------------|
| `tb_selective_decoder` | every Mealy output, bit by bit, for 400 random skewed blocks with idle cycles; an incomplete code (`code_err`); the one-codeword code |
| `tb_serializer` | bit order, first bit in the cycle after the load, back-to-back loads, held clock, sticky `overrun` |
| `tb_code_ram` | writes and asynchronous reads, read-during-write |
| `tb_ram_decoder` | 16 × 8 table, two table loads, and an oversized 32 × 10 RAM |
| `tb_channel_distributor` | phase rotation over 3 decoders and the single-decoder case |
| `tb_scan_decompressor` | end to end: fast scan clock, two chains on one channel, RAM decoder with a reload; the last scan bit within B clocks of the last tester bit; each mechanism counted |
| `tb_scan_decompressor_full` | default top applying the 60-block example into a 48-bit scan-chain model: all five vectors land correctly, 194 tester clocks instead of 240 |
| `tb_scan_decompressor_wide` | 8-bit blocks with 13 coded blocks (21 states) and 6-bit blocks with 2 coded blocks, at R = 3 |

`tb/scan_chain_model.sv` is a behavioural shift register that stands in for the core's chain.

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sdc_pkg.sv tb/tb_scan_decompressor.sv --top-module tb_scan_decompressor
./obj_dir/Vtb_scan_decompressor
```

Every testbench finishes in well under a second.
