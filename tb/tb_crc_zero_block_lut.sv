// tb_crc_zero_block_lut: checks the zero-block lookup against bit-serial
// division. Two instances, followed by 16 and by 4 zero bytes (LUT4 and LUT1
// of the default engine), get single-bit, all-ones and random blocks; the
// expected value is the remainder of the block's four bytes followed by the
// zero bytes, computed one bit at a time.
`timescale 1ns/1ps
module tb_crc_zero_block_lut;
  import tb_crc_ref_pkg::*;

  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  logic        clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] blk, rem16, rem4;
  int          checks = 0, failures = 0;

  crc_zero_block_lut dut16 (.blk(blk), .rem(rem16));
  crc_zero_block_lut #(.ZERO_BYTES(4)) dut4 (.blk(blk), .rem(rem4));

  function automatic logic [31:0] expect_rem(logic [31:0] b, int zeros);
    byte_q_t m;
    for (int i = 3; i >= 0; i--) m.push_back(b[8*i +: 8]);
    repeat (zeros) m.push_back(8'h00);
    return ref_rem(m, POLY);
  endfunction

  task automatic check(logic [31:0] b);
    blk = b;
    @(posedge clk);
    checks += 2;
    if (rem16 !== expect_rem(b, 16)) begin
      failures++;
      $display("ERROR: LUT(16) of %h = %h, expected %h", b, rem16, expect_rem(b, 16));
    end
    if (rem4 !== expect_rem(b, 4)) begin
      failures++;
      $display("ERROR: LUT(4) of %h = %h, expected %h", b, rem4, expect_rem(b, 4));
    end
  endtask

  initial begin
    check(32'h0);
    check(32'hFFFF_FFFF);
    for (int i = 0; i < 32; i++) check(32'h1 << i);
    for (int i = 0; i < 300; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
