// tb_par_bitrev_p2: end-to-end self-checking testbench of the parallel bit-reversal
// circuit, 2-parallel, 8..32768 points.
//
// The stimulus plays the part of a P-parallel pipelined FFT: in cycle t of a
// symbol it puts X(BR(P*t + p)) on path p, where each sample is encoded as
// {symbol number[15:0], k[15:0]}. The checker expects X(P*r + p) on path p in
// output cycle r, out_sop on r = 0, gap-free output inside a symbol, and the
// first output of a symbol exactly N/P - 2^beta + 1 (alpha even) or
// N/P - 2^(beta+1) + 1 (alpha odd) cycles after its first input.
//
// Sequence: every FFT length 2*P^2 .. 2^MMAX in turn, each as a burst of
// three back-to-back symbols (odd, even, odd); then a few bursts of random
// length, number of symbols and gap. A new burst is presented while the
// previous one is still draining, so in_ready low is exercised. For P = 8 the
// first burst is the 128-point example and the memory contents after cycles 15
// and 31 are compared with the worked example (bank rows of groups A and B).
// Mechanisms counted (each must occur): even-alpha schedule, odd-alpha
// schedule, odd- and even-symbol reads, back-to-back symbols, drain with
// in_ready low, change of FFT length, a cycle with one group written while the
// other is read.
module tb_par_bitrev_p2;
  import bitrev_pkg::*;

  localparam int unsigned P      = 2;
  localparam int unsigned MMAX   = 15;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned Q      = $clog2(P);
  localparam int unsigned MW     = $clog2(MMAX + 1);
  localparam int unsigned MMIN   = 2*Q + 1;
  localparam int unsigned WATCHDOG = 400000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [MW-1:0]     cfg_log2n = MW'(MMIN);
  logic              in_valid = 1'b0;
  logic              in_ready;
  logic [DATA_W-1:0] in_data [P];
  logic              out_valid, out_sop;
  logic [DATA_W-1:0] out_data [P];

  always #5 clk = !clk;

  par_bitrev #(.P(2), .MMAX(15)) dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_log2n_i(cfg_log2n),
    .in_valid_i (in_valid),
    .in_ready_o (in_ready),
    .in_data_i  (in_data),
    .out_valid_o(out_valid),
    .out_sop_o  (out_sop),
    .out_data_o (out_data)
  );

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- expected symbols, pushed by the driver
  typedef struct {
    int unsigned     id;
    int unsigned     m;
    longint unsigned first_in;
  } sym_t;
  sym_t exp_q[$];
  int unsigned sym_sent = 0, sym_done = 0;

  // mechanism counters
  int unsigned n_even_alpha = 0, n_odd_alpha = 0, n_odd_sym = 0, n_even_sym = 0;
  int unsigned n_chain = 0, n_backpressure = 0, n_len_change = 0, n_rw_overlap = 0;

  function automatic int unsigned lat_of(input int unsigned m);
    int unsigned a, b;
    a = m - 2*Q - 1;
    b = a / 2;
    return (1 << (m - Q)) - ((a % 2 == 1) ? (1 << (b + 1)) : (1 << b)) + 1;
  endfunction

  // ---------------- driver
  int unsigned last_m = 0;

  task automatic send_burst(input int unsigned m, input int unsigned nsym);
    int unsigned np;
    bit waited;
    np = 1 << (m - Q);
    for (int unsigned s = 0; s < nsym; s++) begin
      for (int unsigned t = 0; t < np; t++) begin
        @(negedge clk);
        cfg_log2n = MW'(m);
        in_valid  = 1'b1;
        for (int p = 0; p < P; p++)
          in_data[p] = {16'(sym_sent), 16'(rev_bits(word_t'(P*t + p), m))};
        waited = 0;
        while (!in_ready) begin
          waited = 1;
          @(negedge clk);
        end
        if (waited) n_backpressure++;
        if (t == 0) begin
          exp_q.push_back('{id: sym_sent, m: m, first_in: cycle});
          if (s > 0) n_chain++;
          if (s == 0 && last_m != 0 && last_m != m) n_len_change++;
          if (((m - 2*Q - 1) % 2) == 0) n_even_alpha++; else n_odd_alpha++;
        end
      end
      sym_sent++;
    end
    last_m = m;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // ---------------- output checker
  sym_t cur;
  bit   have_cur = 0;
  int unsigned r_cnt = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if ((dut.wr_en_a && dut.rd_en_b) || (dut.wr_en_b && dut.rd_en_a)) n_rw_overlap++;
      if (out_valid) begin
        if (out_sop) begin
          check(!have_cur, "sop before previous symbol complete");
          check(exp_q.size() > 0, "output without pending symbol");
          if (exp_q.size() > 0) begin
            cur = exp_q.pop_front();
            have_cur = 1;
            r_cnt = 0;
            check(cycle - cur.first_in == longint'(lat_of(cur.m)),
                  $sformatf("latency m=%0d got %0d exp %0d", cur.m, cycle - cur.first_in, lat_of(cur.m)));
          end
        end
        if (have_cur) begin
          for (int p = 0; p < P; p++)
            check(out_data[p] == {16'(cur.id), 16'(P*r_cnt + p)},
                  $sformatf("sym %0d m=%0d r=%0d path %0d: got %h", cur.id, cur.m, r_cnt, p, out_data[p]));
          r_cnt++;
          if (r_cnt == (1 << (cur.m - Q))) begin
            have_cur = 0;
            sym_done++;
            if (cur.id % 2 == 0) n_odd_sym++; else n_even_sym++;
          end
        end else begin
          check(0, "out_valid without a symbol in progress");
        end
      end else if (have_cur) begin
        check(0, "gap inside an output symbol");
      end
    end
  end

  // ---------------- memory snapshot of the 128-point, 8-parallel example
  if (P == 8) begin : g_example
    // rows of the worked example: group A banks 0 and 1, group B bank 7
    function automatic int unsigned row_k(input int row, input int addr);
      logic [DATA_W-1:0] w;
      case (row)
        0:       w = dut.u_group_a.g_bank[0].u_bank.mem[addr];
        1:       w = dut.u_group_a.g_bank[1].u_bank.mem[addr];
        default: w = dut.u_group_b.g_bank[7].u_bank.mem[addr];
      endcase
      return int'(w[15:0]);
    endfunction

    task automatic check_rows(input int unsigned after_cycle,
                              input int unsigned a0 [8], input int unsigned a1 [8],
                              input int unsigned b7 [8]);
      for (int a = 0; a < 8; a++) begin
        check(row_k(0, a) == a0[a], $sformatf("example c%0d group A bank 0 addr %0d", after_cycle, a));
        check(row_k(1, a) == a1[a], $sformatf("example c%0d group A bank 1 addr %0d", after_cycle, a));
        check(row_k(2, a) == b7[a], $sformatf("example c%0d group B bank 7 addr %0d", after_cycle, a));
      end
    endtask

    initial begin : probe
      longint unsigned t0;
      wait (rst_n);
      @(posedge clk iff (in_valid && in_ready));
      t0 = cycle;
      // after the write of cycle 15 (symbol 1 complete)
      while (cycle < t0 + 15) @(posedge clk);
      #1 check_rows(15, '{0, 20, 50, 38, 113, 101, 83, 71},
                        '{64, 84, 114, 102, 1, 21, 51, 39},
                        '{120, 108, 90, 78, 57, 45, 27, 15});
      // after the write of cycle 31 (symbol 2 complete)
      while (cycle < t0 + 31) @(posedge clk);
      #1 check_rows(31, '{0, 20, 38, 50, 71, 83, 101, 113},
                        '{1, 21, 39, 51, 64, 84, 102, 114},
                        '{15, 27, 45, 57, 78, 90, 108, 120});
    end
  end

  // ---------------- watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main sequence
  initial begin
    for (int p = 0; p < P; p++) in_data[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int unsigned m = MMIN; m <= MMAX; m++) send_burst(m, 3);
    for (int i = 0; i < 4; i++) begin
      int unsigned m;
      m = MMIN + ($urandom % (((MMAX - MMIN + 1) < 4) ? (MMAX - MMIN + 1) : 4));
      repeat ($urandom % 5) @(negedge clk);
      send_burst(m, 1 + $urandom % 3);
    end
    // wait for the last symbol to drain
    while (sym_done < sym_sent) @(posedge clk);
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0 && !have_cur, "symbols left unchecked");
    check(n_even_alpha > 0, "mechanism: even-alpha schedule never used");
    check(n_odd_alpha > 0, "mechanism: odd-alpha schedule never used");
    check(n_odd_sym > 0, "mechanism: odd symbol never read");
    check(n_even_sym > 0, "mechanism: even symbol never read");
    check(n_chain > 0, "mechanism: back-to-back symbols never sent");
    check(n_backpressure > 0, "mechanism: in_ready never low for a waiting burst");
    check(n_len_change > 0, "mechanism: FFT length never changed");
    check(n_rw_overlap > 0, "mechanism: write of one group never overlapped a read of the other");
    $display("symbols=%0d even_alpha=%0d odd_alpha=%0d odd_sym=%0d even_sym=%0d chain=%0d backpressure=%0d len_change=%0d rw_overlap=%0d",
             sym_done, n_even_alpha, n_odd_alpha, n_odd_sym, n_even_sym, n_chain,
             n_backpressure, n_len_change, n_rw_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
