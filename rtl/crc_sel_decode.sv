// crc_sel_decode: byte-select decoder for the input multiplexers MUX0..MUX4.
//
// An iteration loads NB = 4*PAR + 4 byte positions, numbered p = 0 (rightmost,
// last in message order) to NB-1. The previous iteration's remainder S must be
// placed directly above the L new data bytes of the iteration, at positions
// L .. L+3, with byte (p - L) of S at position p:
//   * first iteration of a message: S is not used, every position takes the
//     original data (the leftmost block goes to LUT4);
//   * other iterations that are not the last: L = 4*PAR, so S lands in the
//     leftmost block (MUX4) and MUX0..MUX3 pass data;
//   * last iteration with L = size + 1 bytes (1 .. 4*PAR): S lands at
//     positions L .. L+3, i.e. position p takes S when L is between p-3 and p.
// The size code follows the published encoding (0 means one byte). A first
// iteration that is also the last one simply carries the whole short message
// right-aligned, so size is ignored then.
// The selection rule is the published one; computing it in one separate
// decoder for all multiplexers is this design's choice.
//
// Outputs: sel[p] = 1 makes position p take byte idx[p] of S instead of data.
// Combinational.
module crc_sel_decode #(
  parameter int unsigned PAR = 4,
  localparam int unsigned NB  = 4 * PAR + 4,
  localparam int unsigned SZW = $clog2(4 * PAR)
) (
  input  logic                 first,
  input  logic                 last,
  input  logic [SZW-1:0]       size,
  output logic [NB-1:0]        sel,
  output logic [NB-1:0][1:0]   idx
);

  logic [SZW:0] len;   // L: number of new data bytes below S

  always_comb begin
    len = last ? ({1'b0, size} + 1'b1) : (SZW + 1)'(4 * PAR);
    for (int p = 0; p < NB; p++) begin
      sel[p] = !first && (p >= int'(len)) && (p <= int'(len) + 3);
      idx[p] = 2'(p - int'(len));
    end
  end

endmodule
