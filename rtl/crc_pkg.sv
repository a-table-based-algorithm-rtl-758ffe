// crc_pkg: shared types, constants and constant functions of the table-based
// pipelined CRC engine.
//
// The engine works on message blocks whose width equals the degree of the
// generator polynomial (32 bits for CRC-32), split into bytes for the lookup
// tables. Arithmetic is over GF(2): a message byte string is read as a
// polynomial with the first byte's MSB as the highest power. Every table of
// the design holds b(x) * x^(8*s) mod G(x) for one fixed byte shift s; the
// functions below compute those tables when the design is elaborated, so no
// table file is needed. The generator defaults to the CRC-32 polynomial
// 0x04C11DB7 (x^32 + x^26 + x^23 + ... + 1), without bit reflection, initial
// value or final inversion.
package crc_pkg;

  localparam int unsigned CRC_W     = 32;          // degree m of G(x)
  localparam int unsigned BLK_BYTES = CRC_W / 8;   // bytes in one block
  localparam logic [CRC_W-1:0] CRC32_POLY = 32'h04C1_1DB7;

  typedef logic [CRC_W-1:0] crc_t;
  typedef logic [7:0]       octet_t;
  // One byte lookup table: 256 entries of CRC_W bits (1 KiB for CRC-32).
  typedef crc_t [255:0]     byte_table_t;

  // r(x) * x mod G(x)
  function automatic crc_t mul_x(crc_t r, crc_t poly);
    return r[CRC_W-1] ? ((r << 1) ^ poly) : (r << 1);
  endfunction

  // x^n mod G(x)
  function automatic crc_t xpow_mod(int unsigned n, crc_t poly);
    crc_t r;
    r = crc_t'(1);
    for (int unsigned i = 0; i < n; i++) r = mul_x(r, poly);
    return r;
  endfunction

  // Table of b(x) * x^(8*shift_bytes) mod G(x) for all 256 byte values b,
  // i.e. the remainder of a byte followed by shift_bytes zero bytes.
  // Built from the eight basis remainders x^(8*shift_bytes + i) mod G(x).
  function automatic byte_table_t make_byte_table(int unsigned shift_bytes, crc_t poly);
    byte_table_t t;
    crc_t        basis [8];
    basis[0] = xpow_mod(8 * shift_bytes, poly);
    for (int i = 1; i < 8; i++) basis[i] = mul_x(basis[i-1], poly);
    for (int b = 0; b < 256; b++) begin
      t[b] = '0;
      for (int i = 0; i < 8; i++) if (b[i]) t[b] = t[b] ^ basis[i];
    end
    return t;
  endfunction

endpackage
