// tb_crc_parallelism: the engine at the other parallelism degrees of the
// evaluation: 2 (8 bytes per cycle, i.e. a 64-bit input), 8 (32 bytes per
// cycle) and 16 (64 bytes per cycle). Each instance gets the full harness
// (random messages, every last-word size, stalls, latency and throughput
// checks) and the results are summed into one report line.
`timescale 1ns/1ps
module tb_crc_parallelism;

  localparam int unsigned NP = 3;
  localparam int unsigned PARS [NP] = '{2, 8, 16};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    done_v [NP];
  int      checks_v [NP];
  int      failures_v [NP];

  for (genvar g = 0; g < NP; g++) begin : g_par
    localparam int unsigned P   = PARS[g];
    localparam int unsigned NB  = 4 * P + 4;
    localparam int unsigned SZW = $clog2(4 * P);
    logic           rst_n, in_valid, in_ready, in_first, in_last, crc_valid;
    logic [SZW-1:0] in_size;
    logic [8*NB-1:0] in_data;
    logic [31:0]    crc;

    crc_pipelined #(.PAR(P)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_first, .in_last,
      .in_size, .in_data, .crc_valid, .crc
    );

    tb_crc_harness #(.PAR(P), .N_RAND(60)) u_h (
      .clk, .rst_n, .in_valid, .in_ready, .in_first, .in_last,
      .in_size, .in_data, .crc_valid, .crc,
      .done(done_v[g]), .checks(checks_v[g]), .failures(failures_v[g])
    );
  end

  function automatic int sum(input int v [NP]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    #1;
    wait (done_v[0] && done_v[1] && done_v[2]);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks_v), sum(failures_v));
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks_v), sum(failures_v) + 1);
    $finish;
  end

endmodule
