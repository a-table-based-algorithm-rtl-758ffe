// tb_crc_mux0: checks the rightmost-block multiplexer. For every last-word
// size from 1 to 3 (the only ones that put remainder bytes into this block)
// and for data-only operation, random remainder and data words are applied
// and the output is compared with the expected byte arrangement: the low
// `size` bytes are data, the bytes above them are remainder bytes 0, 1, ...
`timescale 1ns/1ps
module tb_crc_mux0;

  logic        clk = 1'b0;
  always #5 clk = ~clk;

  logic [23:0]     iter_lo;
  logic [31:0]     data, out, exp_out;
  logic [3:1]      sel;
  logic [3:1][1:0] idx;
  int              checks = 0, failures = 0;

  crc_mux0 dut (.iter_lo, .data, .sel, .idx, .out);

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int l = 1; l <= 4; l++) begin     // l = 4: no remainder byte here
        iter_lo = 24'($urandom);
        data    = $urandom;
        sel     = '0;
        idx     = '0;
        exp_out = data;
        for (int p = l; p < 4; p++) begin
          sel[p] = 1'b1;
          idx[p] = 2'(p - l);
          exp_out[8*p +: 8] = iter_lo[8*(p - l) +: 8];
        end
        @(posedge clk);
        checks++;
        if (out !== exp_out) begin
          failures++;
          $display("ERROR: size=%0d out=%h expected %h", l, out, exp_out);
        end
      end
    end
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
