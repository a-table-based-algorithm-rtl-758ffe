// tb_crc_ref_pkg: bit-serial reference models used by the testbenches.
//
// They work one message bit at a time (long division over GF(2)), the way a
// serial shift-register CRC does, and share nothing with the table-based
// design under test:
//   ref_rem  : A(x) mod G(x)         - what the pipelined engine outputs
//   ref_crc  : A(x) * x^32 mod G(x)  - the conventional CRC of A
package tb_crc_ref_pkg;

  typedef logic [7:0] byte_q_t [$];

  function automatic logic [31:0] ref_rem(input byte_q_t m, input logic [31:0] poly);
    logic [31:0] r;
    logic        c;
    r = '0;
    foreach (m[i]) begin
      for (int b = 7; b >= 0; b--) begin
        c = r[31];
        r = {r[30:0], m[i][b]};
        if (c) r = r ^ poly;
      end
    end
    return r;
  endfunction

  function automatic logic [31:0] ref_crc(input byte_q_t m, input logic [31:0] poly);
    logic [31:0] r;
    logic        fb;
    r = '0;
    foreach (m[i]) begin
      for (int b = 7; b >= 0; b--) begin
        fb = r[31] ^ m[i][b];
        r  = r << 1;
        if (fb) r = r ^ poly;
      end
    end
    return r;
  endfunction

endpackage
