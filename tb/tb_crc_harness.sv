// tb_crc_harness: stimulus and checking for one crc_pipelined instance.
//
// It frames messages into first / middle / last words as the engine expects,
// drives them with or without idle cycles, and checks every crc output
// against the bit-serial reference (tb_crc_ref_pkg), plus the two-cycle
// latency from the last accepted word to crc_valid and the one-word-per-cycle
// throughput. It counts how often each mechanism of the engine was exercised
// (single-word messages, short first words, stalls before a last word, a last
// word of every size, the remainder straddling into the top block, message
// starts right after a last word, idle cycles) and counts a failure for any
// that never happened. Also checks the conventional CRC (message + four zero
// bytes) and the receiver check (message + CRC gives zero).
module tb_crc_harness
  import tb_crc_ref_pkg::*;
#(
  parameter int unsigned PAR    = 4,
  parameter int unsigned N_RAND = 150,
  parameter logic [31:0] POLY   = 32'h04C1_1DB7,
  localparam int unsigned NB  = 4 * PAR + 4,
  localparam int unsigned MB  = 4 * PAR,
  localparam int unsigned SZW = $clog2(4 * PAR)
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              in_valid,
  input  logic              in_ready,
  output logic              in_first,
  output logic              in_last,
  output logic [SZW-1:0]    in_size,
  output logic [8*NB-1:0]   in_data,
  input  logic              crc_valid,
  input  logic [31:0]       crc,
  output logic              done,
  output int                checks,
  output int                failures
);

  logic [31:0] exp_q [$];         // expected crc values, in order
  longint      last_acc_q [$];    // cycle of each accepted last word
  longint      cycle;
  longint      last_valid_cycle;
  longint      last_accept_cycle; // any last word
  int          outstanding;

  // mechanism counters
  int n_single, n_short_first, n_stall, n_straddle, n_mux0_rem, n_b2b, n_gap, n_conv, n_rx_zero;
  bit [MB:1] size_seen;

  initial begin
    checks = 0; failures = 0; done = 0;
    cycle = 0; outstanding = 0; last_valid_cycle = -1; last_accept_cycle = -10;
    n_single = 0; n_short_first = 0; n_stall = 0; n_straddle = 0; n_mux0_rem = 0;
    n_b2b = 0; n_gap = 0; n_conv = 0; n_rx_zero = 0; size_seen = '0;
  end

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        if (in_first && cycle == last_accept_cycle + 1) n_b2b++;
        if (in_last) begin
          last_acc_q.push_back(cycle);
          last_accept_cycle = cycle;
        end
      end
      if (crc_valid) begin
        longint c0;
        logic [31:0] e;
        checks += 2;
        if (exp_q.size() == 0 || last_acc_q.size() == 0) begin
          failures += 2;
          $display("ERROR: unexpected crc_valid at cycle %0d", cycle);
        end else begin
          e  = exp_q.pop_front();
          c0 = last_acc_q.pop_front();
          if (crc !== e) begin
            failures++;
            $display("ERROR: crc %h expected %h (cycle %0d)", crc, e, cycle);
          end
          if (cycle != c0 + 2) begin
            failures++;
            $display("ERROR: crc_valid at cycle %0d, last word accepted at %0d", cycle, c0);
          end
        end
        outstanding--;
        last_valid_cycle = cycle;
      end
    end
  end

  // ----------------------------------------------------------------- driver
  task automatic idle();
    in_valid = 1'b0;
    in_first = $urandom;
    in_last  = $urandom;
    in_size  = SZW'($urandom);
    for (int i = 0; i < NB; i++) in_data[8*i +: 8] = 8'($urandom);
  endtask

  // Drive one word from the next falling edge on; returns at the rising edge
  // that accepts it, leaving the word on the inputs.
  task automatic drive_word(bit first, bit last, logic [SZW-1:0] size,
                            logic [8*NB-1:0] data, bit gaps, bit in_msg);
    while (gaps && ($urandom % 4 == 0)) begin
      @(negedge clk);
      idle();
      if (in_msg) n_gap++;
    end
    @(negedge clk);
    in_valid = 1'b1;
    in_first = first;
    in_last  = last;
    in_size  = size;
    in_data  = data;
    forever begin
      #1;
      if (in_ready) break;
      @(negedge clk);
    end
    @(posedge clk);   // accepted here; the next word or idle() follows
  endtask

  // Send message m with a first word of first_len bytes (1 .. min(len, NB)).
  task automatic send_msg(byte_q_t m, int first_len, bit gaps, logic [31:0] expected);
    int              len = m.size();
    int              pos;
    int              rest;
    int              chunk;
    logic [8*NB-1:0] d;
    exp_q.push_back(expected);
    outstanding++;
    // first word: right-aligned, leading zero bytes
    d = '0;
    for (int i = 0; i < first_len; i++) d[8*(first_len - 1 - i) +: 8] = m[i];
    if (first_len == len) n_single++;
    else if (first_len < NB) n_short_first++;
    drive_word(1'b1, first_len == len, SZW'($urandom), d, gaps, 1'b0);
    pos  = first_len;
    rest = len - first_len;
    while (rest > 0) begin
      chunk = (rest > MB) ? MB : rest;
      d = '0;
      for (int i = 0; i < chunk; i++) d[8*(chunk - 1 - i) +: 8] = m[pos + i];
      d[8*MB +: 32] = $urandom;            // top block is ignored after the first word
      if (rest > MB) begin
        drive_word(1'b0, 1'b0, SZW'($urandom), d, gaps, 1'b1);
      end else begin
        size_seen[chunk] = 1'b1;
        if (chunk >= MB - 3 && chunk < MB) n_straddle++;
        if (chunk <= 3) n_mux0_rem++;
        drive_word(1'b0, 1'b1, SZW'(chunk - 1), d, gaps, 1'b1);
      end
      pos  += chunk;
      rest -= chunk;
    end
  endtask

  function automatic byte_q_t rand_msg(int len);
    byte_q_t m;
    for (int i = 0; i < len; i++) m.push_back(8'($urandom));
    return m;
  endfunction

  task automatic wait_drained();
    int guard = 0;
    @(negedge clk);
    idle();
    while (outstanding != 0 && guard < 1000) begin
      @(posedge clk);
      guard++;
    end
  endtask

  initial begin
    byte_q_t m, m2;
    logic [31:0] c;
    int len, f;
    longint t0;
    int nwords;

    rst_n = 1'b0;
    idle();
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // 1. every length up to two middle words past a full first word,
    //    back to back, first word as full as possible
    for (len = 1; len <= NB + 2 * MB + 1; len++) begin
      m = rand_msg(len);
      f = (len < NB) ? len : NB;
      send_msg(m, f, 1'b0, ref_rem(m, POLY));
    end
    wait_drained();

    // 2. random lengths, random first-word length, random idle cycles
    for (int n = 0; n < N_RAND; n++) begin
      len = 1 + ($urandom % (8 * MB + 40));
      m = rand_msg(len);
      f = (len < NB) ? len : NB;
      if ($urandom % 2) f = 1 + ($urandom % f);
      send_msg(m, f, ($urandom % 2) == 1, ref_rem(m, POLY));
    end
    wait_drained();

    // 3. conventional CRC: message followed by four zero bytes;
    //    receiver check: message followed by its CRC leaves no remainder
    for (int n = 0; n < 20; n++) begin
      len = 1 + ($urandom % (3 * MB + 10));
      m = rand_msg(len);
      c = ref_crc(m, POLY);
      m2 = m;
      repeat (4) m2.push_back(8'h00);
      f = (m2.size() < NB) ? m2.size() : NB;
      send_msg(m2, f, 1'b0, c);
      n_conv++;
      m2 = m;
      for (int i = 3; i >= 0; i--) m2.push_back(c[8*i +: 8]);
      f = (m2.size() < NB) ? m2.size() : NB;
      send_msg(m2, f, 1'b0, 32'h0);
      n_rx_zero++;
    end
    wait_drained();

    // 4. throughput and latency: a 31-word message without gaps must finish
    //    (N-1) cycles of streaming + 2 stall cycles + 2 latency after its
    //    first word, i.e. crc_valid N+3 cycles after the first accept
    nwords = 31;
    m = rand_msg(NB + MB * (nwords - 1));
    repeat (3) @(posedge clk);
    t0 = cycle + 1;                 // the first word is accepted at the next edge
    send_msg(m, NB, 1'b0, ref_rem(m, POLY));
    wait_drained();
    checks++;
    if (last_valid_cycle - t0 != nwords + 3) begin
      failures++;
      $display("ERROR: %0d-word message took %0d cycles, expected %0d",
               nwords, last_valid_cycle - t0, nwords + 3);
    end
    repeat (5) @(posedge clk);

    // every output accounted for
    checks++;
    if (outstanding != 0 || exp_q.size() != 0) begin
      failures++;
      $display("ERROR: %0d results missing", outstanding);
    end

    // mechanism coverage
    checks += 10;
    if (n_single == 0)      begin failures++; $display("ERROR: no single-word message"); end
    if (n_short_first == 0) begin failures++; $display("ERROR: no short first word"); end
    if (n_stall == 0)       begin failures++; $display("ERROR: no stall before a last word"); end
    if (n_straddle == 0)    begin failures++; $display("ERROR: remainder never straddled into the top block"); end
    if (n_mux0_rem == 0)    begin failures++; $display("ERROR: remainder never entered MUX0"); end
    if (n_b2b == 0)         begin failures++; $display("ERROR: no back-to-back messages"); end
    if (n_gap == 0)         begin failures++; $display("ERROR: no idle cycle inside a message"); end
    if (n_conv == 0)        begin failures++; $display("ERROR: no conventional CRC run"); end
    if (n_rx_zero == 0)     begin failures++; $display("ERROR: no receiver check run"); end
    if (size_seen != '1)    begin failures++; $display("ERROR: last sizes not all seen: %b", size_seen); end
    $display("PAR=%0d: single=%0d short_first=%0d stall_cycles=%0d straddle=%0d mux0_rem=%0d back_to_back=%0d gaps=%0d conv=%0d rx_zero=%0d",
             PAR, n_single, n_short_first, n_stall, n_straddle, n_mux0_rem, n_b2b, n_gap, n_conv, n_rx_zero);
    done = 1'b1;
  end

endmodule
