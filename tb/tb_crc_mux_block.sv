// tb_crc_mux_block: checks a block multiplexer (MUX1..MUX4). The remainder's
// four bytes are placed at every offset from -3 to +4 relative to the block
// (what a last word of each size does to a block), plus random per-byte
// selects, and the output is compared byte by byte with the arrangement the
// selects ask for.
`timescale 1ns/1ps
module tb_crc_mux_block;

  logic        clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]     iter, data, out, exp_out;
  logic [3:0]      sel;
  logic [3:0][1:0] idx;
  int              checks = 0, failures = 0;

  crc_mux_block dut (.iter, .data, .sel, .idx, .out);

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int off = -3; off <= 4; off++) begin
        iter = $urandom;
        data = $urandom;
        sel  = '0;
        idx  = 8'($urandom);
        exp_out = data;
        for (int p = 0; p < 4; p++) begin
          if (p - off >= 0 && p - off < 4) begin
            sel[p] = 1'b1;
            idx[p] = 2'(p - off);
            exp_out[8*p +: 8] = iter[8*(p - off) +: 8];
          end
        end
        @(posedge clk);
        checks++;
        if (out !== exp_out) begin
          failures++;
          $display("ERROR: offset=%0d out=%h expected %h", off, out, exp_out);
        end
      end
      // arbitrary selects
      iter = $urandom;
      data = $urandom;
      sel  = 4'($urandom);
      idx  = 8'($urandom);
      for (int p = 0; p < 4; p++)
        exp_out[8*p +: 8] = sel[p] ? iter[8*idx[p] +: 8] : data[8*p +: 8];
      @(posedge clk);
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("ERROR: sel=%b idx=%h out=%h expected %h", sel, idx, out, exp_out);
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
