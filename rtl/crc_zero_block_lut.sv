// crc_zero_block_lut: remainder of one 4-byte block followed by ZERO_BYTES
// zero bytes, i.e. blk(x) * x^(8*ZERO_BYTES) mod G(x).
//
// A single table indexed by the whole 32-bit block would need 2^32 entries.
// By linearity over GF(2) the block is instead split into its four bytes, and
// each byte j (j = 0 is the least significant) looks up its own 256 x 32 ROM
// holding byte * x^(8*(ZERO_BYTES + j)) mod G(x) - the byte followed by
// ZERO_BYTES + j zero bytes. The four table outputs are XORed. This is the
// four-table structure of the zero-block lookup; the engine uses one instance
// per block position with ZERO_BYTES = 4, 8, 12, 16 (LUT1..LUT4 for a
// parallelism of four). Table contents are computed at elaboration from POLY.
// The four-table split and XOR follow the published structure; the
// parameterisation by ZERO_BYTES is this design's.
//
// Interface: blk in, rem out. Purely combinational: one ROM read plus a
// two-level XOR.
module crc_zero_block_lut
  import crc_pkg::*;
#(
  parameter int unsigned ZERO_BYTES = 16,
  parameter crc_t        POLY       = CRC32_POLY
) (
  input  crc_t blk,
  output crc_t rem
);

  crc_t part [BLK_BYTES];

  for (genvar j = 0; j < BLK_BYTES; j++) begin : g_byte
    crc_byte_table #(
      .SHIFT_BYTES(ZERO_BYTES + j),
      .POLY       (POLY)
    ) u_table (
      .addr(blk[8*j +: 8]),
      .data(part[j])
    );
  end

  always_comb begin
    rem = '0;
    for (int j = 0; j < BLK_BYTES; j++) rem = rem ^ part[j];
  end

endmodule
