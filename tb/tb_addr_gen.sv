// tb_addr_gen: self-checking testbench of the address / pattern generator.
//
// 8-parallel, every FFT length 128 .. 32768, every counter value. Checked
// against values this testbench works out on its own:
//  - J(t) = BR(floor(t / (N/P^2))), reversal done bit by bit here;
//  - the group schedule: runs of 2^beta cycles alternating A, B (alpha even),
//    or 2^beta cycles of A and then runs of 2^(beta+1) alternating B, A
//    (alpha odd);
//  - odd symbols: one address for all banks, and within each group every
//    address 0 .. N/(2P)-1 used exactly once per symbol;
//  - even symbols: the sample written at counter t into bank b is X(BR(Pt+p)),
//    p the path routed to b; it must land in the same group, bank and address
//    where X(Pt+p) of an odd symbol was stored (the generator itself is asked
//    for that odd-symbol location);
//  - the worked examples: pattern 0 4 2 6 1 5 3 7 every two cycles at 128
//    points, group order A B B A A B B A ... at 256 points.
module tb_addr_gen;
  localparam int unsigned P    = 8;
  localparam int unsigned MMAX = 15;
  localparam int unsigned Q    = 3;
  localparam int unsigned CW   = MMAX - Q;
  localparam int unsigned AW   = MMAX - Q - 1;
  localparam int unsigned MW   = $clog2(MMAX + 1);

  logic [MW-1:0] m_i;
  logic [CW-1:0] cnt;
  logic          even;
  logic [AW-1:0] addr [P];
  logic [Q-1:0]  j;
  logic          grp;

  addr_gen #(.P(P), .MMAX(MMAX)) dut (
    .m_i(m_i), .cnt_i(cnt), .even_i(even), .addr_o(addr), .j_o(j), .grp_o(grp)
  );

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned brev(input int unsigned x, input int unsigned w);
    int unsigned r = 0;
    for (int unsigned i = 0; i < w; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned np, alpha, beta, exp_grp, t1, k, p1, bank1;
    int unsigned ex128 [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    bit ex256 [8] = '{0, 1, 1, 0, 0, 1, 1, 0};
    logic [AW-1:0] ea [P];
    logic          eg;
    int unsigned   jt;
    bit used [2][int unsigned];

    for (int unsigned m = 2*Q + 1; m <= MMAX; m++) begin
      np    = 1 << (m - Q);
      alpha = m - 2*Q - 1;
      beta  = alpha / 2;
      m_i   = MW'(m);
      used[0].delete();
      used[1].delete();
      for (int unsigned t = 0; t < np; t++) begin
        // odd-symbol view
        cnt = CW'(t); even = 0;
        #1;
        check(int'(j) == brev(t / (np / P), Q), $sformatf("m=%0d t=%0d J", m, t));
        if (alpha % 2 == 0) exp_grp = (t >> beta) & 1;
        else                exp_grp = ((t + (1 << beta)) >> (beta + 1)) & 1;
        check(grp == exp_grp[0], $sformatf("m=%0d t=%0d group", m, t));
        if (m == 7)  check(int'(j) == ex128[t / 2], $sformatf("128-point pattern t=%0d", t));
        if (m == 8 && t < 8) check(grp == ex256[t], $sformatf("256-point group t=%0d", t));
        for (int b = 1; b < P; b++)
          check(addr[b] == addr[0], $sformatf("m=%0d t=%0d odd address not uniform", m, t));
        check(int'(addr[0]) < np / 2, $sformatf("m=%0d t=%0d odd address range", m, t));
        check(!used[grp].exists(addr[0]), $sformatf("m=%0d t=%0d odd address reused", m, t));
        used[grp][addr[0]] = 1;
        // even-symbol view
        even = 1;
        #1;
        ea = addr; eg = grp; jt = int'(j);
        for (int unsigned b = 0; b < P; b++) begin
          int unsigned p2;
          p2    = (b + P - jt) % P;
          // X(BR(P t + p2)) goes where X(P t + p2) of the previous symbol was
          k     = brev(P*t + p2, m);   // odd-symbol input slot holding X(Pt+p2)
          t1    = k / P;
          p1    = k % P;
          bank1 = (p1 + brev(t1 / (np / P), Q)) % P;
          check(bank1 == b, $sformatf("m=%0d t=%0d bank %0d even bank", m, t, b));
          cnt = CW'(t1); even = 0;
          #1;
          check(grp == eg, $sformatf("m=%0d t=%0d bank %0d even group", m, t, b));
          check(addr[0] == ea[b], $sformatf("m=%0d t=%0d bank %0d even address", m, t, b));
          cnt = CW'(t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
