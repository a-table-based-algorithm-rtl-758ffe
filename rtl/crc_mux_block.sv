// crc_mux_block: the multiplexer in front of a table-looked-up block
// (MUX1..MUX4).
//
// Each of the four byte positions chooses between the original data byte and
// one byte of the previous iteration's 4-byte remainder. For MUX1..MUX3 the
// remainder is only chosen in the last iteration of a message; MUX4 takes the
// whole remainder in every iteration except the first (where it passes the
// delayed leftmost data block) and part of it in a short last iteration.
// sel and idx come from crc_sel_decode.
// The four byte multiplexers follow the published structure; the idx
// input, which picks the remainder byte, is this design's own detail.
//
// Combinational.
module crc_mux_block (
  input  logic [31:0]      iter,   // previous iteration's remainder
  input  logic [31:0]      data,   // original data block
  input  logic [3:0]       sel,    // per byte: 1 takes a remainder byte
  input  logic [3:0][1:0]  idx,    // per byte: which remainder byte
  output logic [31:0]      out
);

  logic [3:0][7:0] iter_b;
  assign iter_b = iter;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      out[8*p +: 8] = sel[p] ? iter_b[idx[p]] : data[8*p +: 8];
    end
  end

endmodule
