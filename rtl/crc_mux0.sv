// crc_mux0: the multiplexer in front of the rightmost block (MUX0).
//
// The rightmost block is never sent through a lookup table: its remainder is
// the block itself. Its byte 0 always carries message data, because a last
// iteration holds at least one data byte. Bytes 1..3 each choose between the
// original data byte and a byte of the lower three bytes of the previous
// iteration's remainder; which of those bytes (idx) depends on the last block
// size and comes from crc_sel_decode. There are three
// byte multiplexers Sel1..Sel3 fed by the lower 3 bytes of the remainder and a
// direct path for byte 0.
// The three byte multiplexers and the fixed byte 0 follow the published
// structure; the idx input, which picks the remainder byte, is this design's
// way of placing the remainder right above the data.
//
// Combinational.
module crc_mux0 (
  input  logic [23:0]      iter_lo,  // lower 3 bytes of the previous remainder
  input  logic [31:0]      data,     // original data block
  input  logic [3:1]       sel,      // 1: take a remainder byte
  input  logic [3:1][1:0]  idx,      // which remainder byte (0..2)
  output logic [31:0]      out
);

  logic [2:0][7:0] iter_b;
  assign iter_b = iter_lo;

  always_comb begin
    out[7:0] = data[7:0];
    for (int p = 1; p < 4; p++) begin
      out[8*p +: 8] = sel[p] ? iter_b[(idx[p] > 2'd2) ? 2'd2 : idx[p]] : data[8*p +: 8];
    end
  end

endmodule
