# Pipelined table-based CRC-32 engine

This is a CRC-32 engine that takes 16 bytes of message per clock cycle. It
handles messages of any length without knowing the length in advance. It has
no shift-register (LFSR) logic: all the arithmetic is done with small lookup
tables and XOR gates. Only one table lookup and one XOR sit in the feedback
loop, so the loop's timing stays the same when the parallelism grows.

## The idea

Read a byte string as a polynomial over GF(2), with the first byte's MSB as
the highest power. Two properties of the remainder modulo the generator G(x)
make the engine possible:

* **Linearity.** If A = A1 + A2 + ... then A mod G = (A1 mod G) ^ (A2 mod G) ^ ...
  A message can therefore be cut into 4-byte blocks. Each block, followed by
  the zero bytes that come after it in the message, is reduced separately.
  The results are XORed.
* **Substitution.** (x^k B) mod G = (x^k (B mod G)) mod G. The running
  remainder S of everything received so far can therefore stand in for the
  whole prefix.

One iteration folds 4·PAR new bytes D(PAR-1) … D0 into S. Here D0 is the
rightmost block, the one that comes last:

    S' = LUT_PAR(S) ^ LUT_(PAR-1)(D_(PAR-1)) ^ ... ^ LUT1(D1) ^ D0
    LUTk(B) = B(x) · x^(32k) mod G(x)     ("B followed by 4k zero bytes")

D0 needs no table: a 32-bit block is already its own remainder. A table
indexed by a whole 32-bit block would need 2^32 entries. By linearity, each
LUTk is instead four 256-entry × 32-bit byte tables, one per byte of the
block. Byte j of the block is followed by 4k + j zero bytes. The four table
outputs are XORed. Each byte table is 1 KB, so each LUTk is 4 KB and the
whole engine holds 4·PAR KB of tables (16 KB at PAR = 4).

The engine outputs **A(x) mod G(x)**, with no extra x^32 factor, no initial
value, no bit reflection and no final inversion. The generator defaults to
0x04C11DB7 (CRC-32).

* To get the usual CRC, A(x)·x^32 mod G(x) (a plain, non-reflected CRC-32
  with zero initial value), send the message followed by four zero bytes.
* A receiver that sends the message followed by its CRC gets zero when there
  is no error.

## Pipeline (`crc_pipelined`)

```
 in_data: [ blk PAR ][ blk PAR-1 ] ... [ blk 1 ][ blk 0 ]
              |R|           |             |        |
              |R|        MUX(PAR-1) ...  MUX1     MUX0
               |            |             |        |
               |          LUT(PAR-1) ... LUT1      |        stage 1
               |            |R|          |R|      |R|
               |             \____ XOR ____/______/         stage 2
               |                    |R|
    S --> MUX_PAR --> LUT_PAR -->  XOR  --> crc             stage 3
    ^                               |
    +------------ R (S) <-----------+
```

* **Stage 1.** MUX0 … MUX(PAR-1) choose, byte by byte, either the message
  data or bytes of S. LUT1 … LUT(PAR-1) look up their blocks, and the
  results are registered. The leftmost block goes into the first of two
  delay registers.
* **Stage 2.** All stage-1 results are XORed and the sum is registered.
* **Stage 3.** MUX_PAR chooses S, or in a first word the twice-delayed
  leftmost block. LUT_PAR looks it up. One XOR with the stage-2 sum gives
  the new remainder. That remainder is written into S and is also the
  `crc` output.

A new word can enter every cycle, so throughput is 4·PAR bytes per cycle.
The timing-critical loop is S → MUX_PAR → byte table → three XOR levels →
S. Its length does not depend on PAR. Only the stage-2 XOR tree grows with
PAR, and it is outside the loop.

## Message framing

`in_data` holds 4·PAR+4 bytes. Byte position p is at bits 8p+7:8p. Position 0
is the byte that comes last in message order.

| word | flags | contents |
|------|-------|----------|
| first | `in_first` | up to 4·PAR+4 bytes, right-aligned, with zero bytes in front |
| middle | – | 4·PAR bytes in positions 0 … 4·PAR-1; the top block is ignored |
| last | `in_last` | `in_size`+1 bytes (1 … 4·PAR) in the lowest positions; the bytes above them must be zero |
| single | `in_first` and `in_last` | a whole message of up to 4·PAR+4 bytes, right-aligned |

**First word.** It carries one block more than the others. That block goes
straight to LUT_PAR after the two delay registers. At that point S holds
nothing that belongs to the message, so the leftmost block can take its
place. Leading zero bytes do not change a remainder. A first word, and so a
whole short message, may therefore hold fewer bytes, padded with zeros at the
front. `in_size` is ignored on a first word.

**Last word.** A last word of L bytes must compute S·x^(8L) + D. The engine
does this by placing the four bytes of S directly above the L data bytes, at
positions L … L+3, with byte p−L of S at position p. That is the job of the
byte multiplexers:

* **MUX0.** Byte 0 always carries data, so only bytes 1 … 3 have a
  multiplexer. These can only receive the lower three bytes of S.
* **MUX1 … MUX(PAR-1).** They take bytes of S only in a last word.
* **MUX_PAR.** It takes all of S in every word except the first. In a last
  word of 4·PAR−3 … 4·PAR−1 bytes it takes only the upper bytes of S, with
  zeros above them.

`crc_sel_decode` turns (`in_first`, `in_last`, `in_size`) into these
per-byte selects. The size code follows the rule "0 means one byte". Put
another way, position k takes S exactly when the last size is between k−3
and k.

## Stall before the last word

MUX0 … MUX(PAR-1) are in stage 1. The remainder of the word before the last
one is only written into S at the end of stage 3. The last word therefore
cannot enter directly behind its predecessor. While an earlier word is still
in stage 2 or 3, `crc_pipelined` holds `in_ready` low for a last word that is
not also a first word. This stall lasts at most two cycles, once per
message:

* First and middle words never stall.
* The next message's first word may follow a last word in the very next
  cycle.
* S is updated only by valid words, so idle input cycles are harmless.

`in_ready` depends combinationally on `in_first` and `in_last`. The source
must hold a word stable while it waits; an assertion checks this.

## Timing summary

* Throughput: 4·PAR bytes per cycle on first and middle words. A first word
  carries 4·PAR+4 bytes.
* Latency: `crc_valid` pulses for one cycle, two cycles after the last word
  is accepted. `crc` is valid in that same cycle and comes combinationally
  from the final XOR.
* An N-word message (N ≥ 2) sent without gaps takes N+3 cycles from the
  first word's accept to `crc_valid`.
* Reset: `rst_n` is asynchronous and active low. It clears the valid flags
  and S. The data registers have no reset and are read only behind their
  valid flags.

## Files

| file | contents |
|------|----------|
| `rtl/crc_pkg.sv` | CRC width, default polynomial, constant functions that build the byte tables |
| `rtl/crc_byte_table.sv` | one 256 × 32 ROM: a byte followed by SHIFT_BYTES zero bytes |
| `rtl/crc_zero_block_lut.sv` | LUTk: four byte tables plus XOR, for a block followed by ZERO_BYTES zeros |
| `rtl/crc_sel_decode.sv` | byte selects of MUX0 … MUX_PAR from first / last / size |
| `rtl/crc_mux0.sv` | MUX0 (rightmost block) |
| `rtl/crc_mux_block.sv` | MUX1 … MUX_PAR |
| `rtl/crc_pipelined.sv` | the engine (top) |
| `tb/tb_crc_ref_pkg.sv` | bit-serial reference models (long division and LFSR form) |
| `tb/tb_crc_harness.sv` | message framing, drivers, checks and coverage counters for one engine |
| `tb/tb_crc_pipelined.sv` | end-to-end test at the default configuration |
| `tb/tb_crc_parallelism.sv` | end-to-end tests at PAR = 2, 8 and 16 |
| `tb/tb_crc_*.sv` (others) | unit tests of the LUT, the decoder and the two multiplexers |

Parameters of `crc_pipelined`:

* `PAR` (default 4) is the number of blocks per iteration. It sets
  throughput (4·PAR bytes per cycle), table size (4·PAR KB) and `in_size`
  width ($clog2(4·PAR)).
* `POLY` is the generator without its x^32 term.

The CRC width is fixed at 32 bits: one block equals the degree of G(x).

## Simulation

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/crc_pkg.sv tb/tb_crc_ref_pkg.sv rtl/*.sv tb/tb_crc_harness.sv \
  tb/tb_crc_pipelined.sv --top-module tb_crc_pipelined -Mdir obj -o sim
./obj/sim
```

Swap in `tb_crc_parallelism`, `tb_crc_zero_block_lut`, `tb_crc_sel_decode`,
`tb_crc_mux0` or `tb_crc_mux_block` for the other tests. The unit tests need
`tb_crc_ref_pkg.sv` only where they use the reference.

The end-to-end harness checks every output against a bit-serial division of
the same byte stream. The messages it sends are:

* every length from 1 to 53 bytes;
* random messages with random first-word lengths and random idle cycles;
* the usual-CRC form (message plus four zero bytes, compared with an LFSR
  model);
* the receiver check (message plus its CRC gives zero);
* a 500-byte stream that checks the N+3 cycle count.

It checks the two-cycle latency of every result. It also counts single-word
messages, short first words, stall cycles, last words of every size, S
spilling into MUX0 and into MUX_PAR, back-to-back messages and idle cycles,
and fails if any of them never happened. All tests run in well under a
second.

## How far to trust it, and where it departs

* **Verified.** Every result is compared with an independent bit-serial
  model at PAR = 2, 4, 8 and 16 (8, 16, 32 and 64 bytes per cycle).
  Synthesis at PAR = 4 infers 16 byte tables, 131,072 ROM bits (16 KB).
* **Not verified.** Clock frequency, area and the critical path. The
  reference design reports 878 MHz for the 64-bit (PAR = 2) version in a
  0.13 µm process, and a critical path of one table access plus five XOR
  levels at every parallelism. This RTL's loop has a byte multiplexer, one
  table access and three XOR levels. How the original counted its XORs is
  not known.
* **Remainder convention.** The original architecture feeds the rightmost
  block to the XOR without a table. That makes the result A mod G. The
  textbook definition A·x^32 mod G is reached by appending four zero bytes,
  as described above. The polynomial (0x04C11DB7) is the standard CRC-32 one
  and can be changed with `POLY`.
* **This design's own additions.** These are not part of the original
  description:
  * the valid/ready handshake and the stall before a last word;
  * first words shorter than 4·PAR+4 bytes, including single-word messages;
  * the `crc_valid` flag;
  * the reset;
  * zeroing the unused top block of non-first words inside the engine.
* **Generalisation.** The original drawing shows PAR = 4. It is generalised
  here to any PAR ≥ 2, with LUTk always meaning "followed by 4k zero bytes".
