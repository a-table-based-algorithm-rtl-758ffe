// tb_crc_pipelined: end-to-end test of the CRC engine at its default
// configuration (parallelism 4: 20-byte first word, 16 bytes per cycle).
// Runs tb_crc_harness against one crc_pipelined instance and reports the
// result line. A watchdog ends the run with a failure if it hangs.
`timescale 1ns/1ps
module tb_crc_pipelined;

  logic        clk = 1'b0;
  logic        rst_n, in_valid, in_ready, in_first, in_last, crc_valid, done;
  logic [3:0]  in_size;
  logic [159:0] in_data;
  logic [31:0] crc;
  int          checks, failures;

  always #5 clk = ~clk;

  crc_pipelined dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_first, .in_last,
    .in_size, .in_data, .crc_valid, .crc
  );

  tb_crc_harness #(.PAR(4)) u_h (
    .clk, .rst_n, .in_valid, .in_ready, .in_first, .in_last,
    .in_size, .in_data, .crc_valid, .crc, .done, .checks, .failures
  );

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
