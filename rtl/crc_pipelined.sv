// crc_pipelined: pipelined, table-based CRC engine for messages of any length.
//
// Idea. A message A(x) is cut into 4-byte blocks. By linearity of the
// remainder over GF(2), A mod G is the XOR of the remainders of each block
// followed by the zeros that trail it in the message, and a remainder may be
// substituted for the polynomial it stands for before shifting further
// (R[x^k B] = R[x^k R[B]]). So each iteration folds 4*PAR new bytes into the
// running remainder S:
//     S' = LUT_PAR(S) ^ LUT_{PAR-1}(D_{PAR-1}) ^ ... ^ LUT1(D1) ^ D0
// where LUTk(B) = B(x) * x^(32k) mod G is built from four byte tables
// (crc_zero_block_lut) and the rightmost block D0 needs no table. Only the
// LUT_PAR lookup and one XOR sit in the feedback loop; the other blocks are
// looked up and XORed in two pipeline stages beforehand, so the loop timing
// does not grow with PAR.
//
// Pipeline (one word per cycle):
//   stage 1  MUX0 and MUX1..MUX(PAR-1) select data or remainder bytes,
//            LUT1..LUT(PAR-1) look up; results registered. The leftmost
//            block enters its first delay register.
//   stage 2  XOR of the stage-1 results, registered. Second delay register.
//   stage 3  MUX_PAR picks S (or, in a first iteration, the delayed leftmost
//            block), LUT_PAR looks it up, XOR with stage 2 gives the new
//            remainder; it is written into the feedback register S.
//
// Message framing on the input (in_data byte p sits at bits 8p+7:8p; p = 0
// is the byte that comes last in the message):
//   * first word (in_first): up to 4*PAR+4 bytes, right-aligned with leading
//     zero bytes. Leading zeros do not change a remainder, so a short message
//     is one word with in_first and in_last both set.
//   * middle words: 4*PAR bytes in bits 32*PAR-1:0; the leftmost block of
//     in_data is ignored.
//   * last word (in_last, not in_first): in_size+1 bytes (1..4*PAR) in the
//     lowest byte positions; the bytes above them must be zero.
// In a last word the previous remainder S is placed directly above the data
// bytes (MUX0..MUX_PAR, see crc_sel_decode), so S must already be final when
// that word enters stage 1. The engine therefore holds in_ready low while an
// earlier word of the message is still in stage 2 or 3: at most two stall
// cycles, only for the last word. First and middle words never stall, and a
// new message may start in the cycle after a last word.
//
// Output: crc_valid pulses for one cycle, two cycles after the last word is
// accepted, with crc = A(x) mod G(x) of the whole message, taken straight from
// the final XOR. The conventional CRC A(x)*x^32 mod G(x) is obtained by
// sending the message followed by four zero bytes; a receiver that sends
// message plus CRC gets zero when there is no error.
//
// Throughput 4*PAR bytes per cycle. Clock: clk, rising edge. Reset: rst_n,
// asynchronous, active low; clears the valid flags and S. The data registers
// are not reset: they are only read when their valid flag is set.
//
// Design choices beyond the source architecture: the valid/ready handshake
// and the stall before a last word, the right-aligned short first word, the
// output valid flag, and the reset.
module crc_pipelined
  import crc_pkg::*;
#(
  parameter int unsigned PAR  = 4,           // blocks per iteration (parallelism)
  parameter crc_t        POLY = CRC32_POLY,  // generator without the x^32 term
  localparam int unsigned NB  = 4 * PAR + 4, // byte positions of a first word
  localparam int unsigned SZW = $clog2(4 * PAR)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_first,
  input  logic               in_last,
  input  logic [SZW-1:0]     in_size,   // last word: number of bytes - 1
  input  logic [8*NB-1:0]    in_data,
  output logic               crc_valid,
  output crc_t               crc
);

  // ---------------------------------------------------------------- state
  crc_t s_q;                              // feedback register: remainder S

  logic          s1_valid, s1_last;
  crc_t          s1_blk0;                 // MUX0 output
  crc_t          s1_lut [PAR];            // LUT1..LUT(PAR-1) outputs (index 0 unused)
  crc_t          s1_left;                 // leftmost block, delay 1
  logic [3:0]       s1_sel4;
  logic [3:0][1:0]  s1_idx4;

  logic          s2_valid, s2_last;
  crc_t          s2_x;                    // XOR of the stage-1 results
  crc_t          s2_left;                 // leftmost block, delay 2
  logic [3:0]       s2_sel4;
  logic [3:0][1:0]  s2_idx4;

  // ------------------------------------------------------------- stage 1
  logic                accept;
  logic [NB-1:0]       sel;
  logic [NB-1:0][1:0]  idx;
  crc_t                mux_out [PAR];     // MUX0 .. MUX(PAR-1)
  crc_t                lut_out [PAR];

  assign in_ready = !(in_last && !in_first && (s1_valid || s2_valid));
  assign accept   = in_valid && in_ready;

  crc_sel_decode #(.PAR(PAR)) u_decode (
    .first(in_first),
    .last (in_last),
    .size (in_size),
    .sel  (sel),
    .idx  (idx)
  );

  crc_mux0 u_mux0 (
    .iter_lo(s_q[23:0]),
    .data   (in_data[31:0]),
    .sel    (sel[3:1]),
    .idx    (idx[3:1]),
    .out    (mux_out[0])
  );
  assign lut_out[0] = mux_out[0];

  for (genvar k = 1; k < PAR; k++) begin : g_blk
    crc_mux_block u_mux (
      .iter(s_q),
      .data(in_data[32*k +: 32]),
      .sel (sel[4*k +: 4]),
      .idx (idx[4*k +: 4]),
      .out (mux_out[k])
    );
    crc_zero_block_lut #(.ZERO_BYTES(4 * k), .POLY(POLY)) u_lut (
      .blk(mux_out[k]),
      .rem(lut_out[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
    end else begin
      s1_valid <= accept;
      s1_last  <= accept && in_last;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      s1_blk0 <= lut_out[0];
      for (int k = 1; k < PAR; k++) s1_lut[k] <= lut_out[k];
      s1_left <= in_first ? in_data[32*PAR +: 32] : '0;
      s1_sel4 <= sel[4*PAR +: 4];
      s1_idx4 <= idx[4*PAR +: 4];
    end
  end
  assign s1_lut[0] = '0;

  // ------------------------------------------------------------- stage 2
  crc_t xor_all;
  always_comb begin
    xor_all = s1_blk0;
    for (int k = 1; k < PAR; k++) xor_all = xor_all ^ s1_lut[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_last  <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      s2_last  <= s1_valid && s1_last;
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid) begin
      s2_x    <= xor_all;
      s2_left <= s1_left;
      s2_sel4 <= s1_sel4;
      s2_idx4 <= s1_idx4;
    end
  end

  // ------------------------------------------------------------- stage 3
  crc_t mux4_out, lut4_out, s_next;

  crc_mux_block u_mux_top (
    .iter(s_q),
    .data(s2_left),
    .sel (s2_sel4),
    .idx (s2_idx4),
    .out (mux4_out)
  );

  crc_zero_block_lut #(.ZERO_BYTES(4 * PAR), .POLY(POLY)) u_lut_top (
    .blk(mux4_out),
    .rem(lut4_out)
  );

  assign s_next = lut4_out ^ s2_x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        s_q <= '0;
    else if (s2_valid) s_q <= s_next;
  end

  assign crc_valid = s2_valid && s2_last;
  assign crc       = s_next;

  // ---------------------------------------------------------- assertions
  // A last word may only use S once no earlier iteration is still in flight.
  a_last_sees_final_s : assert property (@(posedge clk) disable iff (!rst_n)
    (accept && in_last && !in_first) |-> (!s1_valid && !s2_valid));

  // A stalled word must be held unchanged until it is accepted.
  a_hold_when_stalled : assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_data) && $stable(in_last)
                                 && $stable(in_first) && $stable(in_size)));

endmodule
