// tb_crc_sel_decode: exhaustive check of the byte-select decoder at
// parallelism 4 (20 byte positions). For every combination of first, last
// and the 4-bit size code, the expected selects are built by placing the four
// remainder bytes one by one above the data bytes: none in a first word, at
// positions 16..19 in a middle word, at positions L..L+3 (L = size + 1) in a
// last word. Also spot-checks the published rule that the k-th multiplexer
// takes the remainder when the last block size is between k-3 and k.
`timescale 1ns/1ps
module tb_crc_sel_decode;

  localparam int NB = 20;

  logic        clk = 1'b0;
  always #5 clk = ~clk;

  logic                first, last;
  logic [3:0]          size;
  logic [NB-1:0]       sel;
  logic [NB-1:0][1:0]  idx;
  int                  checks = 0, failures = 0;

  crc_sel_decode dut (.first, .last, .size, .sel, .idx);

  initial begin
    logic [NB-1:0]      esel;
    logic [NB-1:0][1:0] eidx;
    int                 base;
    for (int f = 0; f < 2; f++)
      for (int l = 0; l < 2; l++)
        for (int s = 0; s < 16; s++) begin
          first = f[0]; last = l[0]; size = s[3:0];
          @(posedge clk);
          esel = '0;
          eidx = '0;
          if (!f[0]) begin
            base = l[0] ? s + 1 : 16;
            for (int j = 0; j < 4; j++) begin
              if (base + j < NB) begin
                esel[base + j] = 1'b1;
                eidx[base + j] = j[1:0];
              end
            end
          end
          checks++;
          if (sel !== esel) begin
            failures++;
            $display("ERROR: first=%0d last=%0d size=%0d sel=%b expected %b", f, l, s, sel, esel);
          end
          for (int p = 0; p < NB; p++) begin
            if (esel[p]) begin
              checks++;
              if (idx[p] !== eidx[p]) begin
                failures++;
                $display("ERROR: size=%0d position %0d idx=%0d expected %0d", s, p, idx[p], eidx[p]);
              end
            end
          end
          // published rule: position k takes the remainder in a last word
          // exactly when the last size lies in k-3 .. k
          if (l[0] && !f[0]) begin
            for (int k = 1; k < NB; k++) begin
              checks++;
              if (sel[k] !== ((s + 1 >= k - 3) && (s + 1 <= k))) begin
                failures++;
                $display("ERROR: size=%0d position %0d sel=%0d", s + 1, k, sel[k]);
              end
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
