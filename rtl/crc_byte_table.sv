// crc_byte_table: one 256-entry x 32-bit lookup ROM (1 KiB for CRC-32).
//
// Entry b holds b(x) * x^(8*SHIFT_BYTES) mod G(x): the remainder of the byte b
// followed by SHIFT_BYTES zero bytes. The contents are a constant computed
// from POLY when the design is elaborated (crc_pkg::make_byte_table), so the
// ROM maps to logic or to a ROM macro in synthesis.
// The 1 KiB byte table is the published building block; generating its
// contents from the polynomial instead of loading a file is this design's
// choice.
//
// Interface: addr (the byte) in, data out. Combinational read.
module crc_byte_table
  import crc_pkg::*;
#(
  parameter int unsigned SHIFT_BYTES = 0,
  parameter crc_t        POLY        = CRC32_POLY
) (
  input  octet_t addr,
  output crc_t   data
);

  localparam byte_table_t TABLE = make_byte_table(SHIFT_BYTES, POLY);

  assign data = TABLE[addr];

endmodule
