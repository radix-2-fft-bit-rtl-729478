// tb_br_ctrl: self-checking testbench of the controller (schedule and flow).
//
// 8-parallel controller. Bursts of three back-to-back symbols at 128, 256, 512
// and 1024 points are offered, the second and later bursts while the previous
// one is still draining. Checked every cycle against this testbench's own
// schedule model:
//  - write group of cycle t of a symbol: runs of 2^beta (alpha even) or 2^beta
//    then 2^(beta+1) (alpha odd), starting with group A;
//  - the read of a symbol starts in its cycle N/P - L (L = 2^beta or
//    2^(beta+1)): cycle 15 at 128 points and cycle 30 at 256 points, as in the
//    worked examples; it then reads N/P consecutive cycles, each from the
//    group the schedule gives for the read counter;
//  - no group is read and written in the same cycle;
//  - out_valid / out_sop follow the reads by one cycle;
//  - in_ready is high inside a burst and low while a finished burst drains.
module tb_br_ctrl;
  localparam int unsigned P    = 8;
  localparam int unsigned MMAX = 15;
  localparam int unsigned Q    = 3;
  localparam int unsigned AW   = MMAX - Q - 1;
  localparam int unsigned MW   = $clog2(MMAX + 1);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [MW-1:0] cfg = MW'(7);
  logic          in_valid = 1'b0;
  logic          in_ready;
  logic          wr_en_a, wr_en_b, rd_en_a, rd_en_b, rd_sel_q, out_valid, out_sop;
  logic [AW-1:0] waddr [P];
  logic [AW-1:0] raddr [P];
  logic [Q-1:0]  wj, rj_q;

  always #5 clk = !clk;

  br_ctrl #(.P(P), .MMAX(MMAX)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_log2n_i(cfg), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .wr_en_a_o(wr_en_a), .wr_en_b_o(wr_en_b), .waddr_o(waddr), .wj_o(wj),
    .rd_en_a_o(rd_en_a), .rd_en_b_o(rd_en_b), .raddr_o(raddr),
    .rd_sel_q_o(rd_sel_q), .rj_q_o(rj_q), .out_valid_o(out_valid), .out_sop_o(out_sop)
  );

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit grp_ref(input int unsigned m, input int unsigned t);
    int unsigned alpha, beta;
    alpha = m - 2*Q - 1;
    beta  = alpha / 2;
    if (alpha % 2 == 0) return 1'((t >> beta) & 1);
    return 1'(((t + (1 << beta)) >> (beta + 1)) & 1);
  endfunction

  function automatic int unsigned rd_start_ref(input int unsigned m);
    int unsigned alpha, beta;
    alpha = m - 2*Q - 1;
    beta  = alpha / 2;
    return (1 << (m - Q)) - ((alpha % 2 == 1) ? (1 << (beta + 1)) : (1 << beta));
  endfunction

  // model state
  int unsigned wr_m, wr_t = 0, wr_syms = 0;
  bit          rd_on = 0;
  int unsigned rd_m, rd_r = 0, rd_syms = 0;
  int unsigned pending_starts = 0;
  bit          prev_rd = 0, prev_sop = 0;
  int unsigned n_drain_wait = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      bit wr, rd;
      wr = wr_en_a || wr_en_b;
      rd = rd_en_a || rd_en_b;
      check(!(wr_en_a && rd_en_a) && !(wr_en_b && rd_en_b), "group read and written together");
      check(!(wr_en_a && wr_en_b) && !(rd_en_a && rd_en_b), "both groups selected");
      // output flags follow the previous cycle's read
      check(out_valid == prev_rd, "out_valid not one cycle after read");
      check(out_sop == prev_sop, "out_sop not one cycle after first read");
      if (in_valid && in_ready) begin
        check(wr, "accepted set not written");
        check(wr_en_b == grp_ref(wr_m, wr_t), $sformatf("m=%0d write t=%0d group", wr_m, wr_t));
        if (wr_t == rd_start_ref(wr_m)) begin
          if (wr_m == 7) check(wr_t == 15, "128-point read not at cycle 15");
          if (wr_m == 8) check(wr_t == 30, "256-point read not at cycle 30");
          check(!rd_on, "read start while previous read active");
          rd_on = 1; rd_r = 0; rd_m = wr_m;
        end
        wr_t++;
        if (wr_t == (1 << (wr_m - Q))) begin
          wr_t = 0;
          wr_syms++;
        end
      end else begin
        check(!wr, "write without accepted set");
      end
      check(rd == rd_on, $sformatf("read enable mismatch (model %0d)", rd_on));
      prev_rd  = rd;
      prev_sop = rd && rd_on && rd_r == 0;
      if (rd_on) begin
        check(rd_en_b == grp_ref(rd_m, rd_r), $sformatf("m=%0d read r=%0d group", rd_m, rd_r));
        rd_r++;
        if (rd_r == (1 << (rd_m - Q))) begin
          rd_on = 0;
          rd_syms++;
        end
      end
      if (in_valid && !in_ready) n_drain_wait++;
      if (wr_t != 0) check(in_ready, "in_ready low inside a symbol");
    end
  end

  task automatic burst(input int unsigned m, input int unsigned nsym);
    @(negedge clk);
    cfg = MW'(m);
    wr_m = m;
    in_valid = 1;
    // wait for acceptance of the first set
    while (!in_ready) @(negedge clk);
    for (int unsigned i = 0; i < nsym * (1 << (m - Q)); i++) @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    burst(7, 3);
    burst(8, 3);
    burst(9, 3);
    burst(10, 3);
    while (rd_on || rd_syms < wr_syms) @(negedge clk);
    repeat (3) @(negedge clk);
    check(rd_syms == 12 && wr_syms == 12, $sformatf("symbols written %0d read %0d", wr_syms, rd_syms));
    check(n_drain_wait > 0, "in_ready never low while draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
