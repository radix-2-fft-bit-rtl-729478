// br_ctrl: controller of the parallel bit-reversal circuit.
//
// It runs two per-symbol cycle counters, one for writing the incoming
// bit-reversed sets and one for reading natural-order sets, and derives from
// them (through two addr_gen instances) the group selects, the per-bank
// addresses and the switching patterns of both commutators.
//
// Schedule (as in the reference architecture): with alpha = log2(N/(2P^2)) and
// beta = floor(alpha/2), writes alternate between groups A and B in runs of
// 2^beta cycles (alpha even) or 2^beta then 2^(beta+1) cycles (alpha odd).
// Reading a symbol starts in the same cycle as write number N/P - L of that
// symbol, L = 2^beta (alpha even) or 2^(beta+1) (alpha odd), and then runs for
// N/P consecutive cycles. The read therefore always touches the other group
// than the concurrent write, and the following symbol is written into the
// locations freed L cycles earlier, so the two groups act as a cycle-based
// ping-pong buffer of N words in total. Odd symbols (the first of a burst is
// symbol 1) are written with the plain addresses, even symbols with the
// bit-reversed-counterpart addresses.
//
// Flow control (this design's choice; the reference architecture assumes an endless
// continuous stream): a symbol, once started, must be delivered on N/P
// consecutive cycles (in_valid_i held high, checked by an assertion). A new
// symbol may follow the previous one back to back; if it does not, the
// circuit drains the last symbol and in_ready_o stays low until the read has
// finished. The FFT length cfg_log2n_i is sampled only while the circuit is
// idle and is held for the whole burst.
//
// Interface: write side wr_en_a/b_o, waddr_o[P], wj_o; read side rd_en_a/b_o,
// raddr_o[P]; rd_sel_q_o and rj_q_o are the group select and read pattern
// delayed by the one-cycle memory latency; out_valid_o / out_sop_o mark output
// sets and the first set of each symbol. Reset is synchronous, active low.
module br_ctrl
  import bitrev_pkg::*;
#(
  parameter int unsigned P    = 8,
  parameter int unsigned MMAX = 15,
  localparam int unsigned Q   = $clog2(P),
  localparam int unsigned CW  = MMAX - Q,
  localparam int unsigned AW  = MMAX - Q - 1,
  localparam int unsigned MW  = $clog2(MMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] cfg_log2n_i,
  input  logic          in_valid_i,
  output logic          in_ready_o,
  // write side
  output logic          wr_en_a_o,
  output logic          wr_en_b_o,
  output logic [AW-1:0] waddr_o [P],
  output logic [Q-1:0]  wj_o,
  // read side
  output logic          rd_en_a_o,
  output logic          rd_en_b_o,
  output logic [AW-1:0] raddr_o [P],
  // aligned with the memory read data
  output logic          rd_sel_q_o,
  output logic [Q-1:0]  rj_q_o,
  output logic          out_valid_o,
  output logic          out_sop_o
);
  // ---------------- state
  logic [MW-1:0] m_q;
  logic [CW-1:0] cw_q, cr_q;
  logic          wr_even_q, chain_q, rd_active_q, rd_even_q;

  // ---------------- derived per-length constants
  logic [MW-1:0] m_use;
  logic [CW-1:0] np_last, rd_start_cnt;
  int unsigned   alpha, beta;

  logic idle, fresh, wr_fire, wr_last, rd_start, rd_fire, rd_last;
  logic wr_even_cur, rd_even_cur;
  logic [CW-1:0] cr_use;
  logic wgrp, rgrp;
  logic [Q-1:0] rj;

  always_comb begin
    idle   = (cw_q == '0) && !chain_q && !rd_active_q;
    fresh  = (cw_q == '0) && !chain_q;
    m_use  = idle ? cfg_log2n_i : m_q;
    alpha  = int'(m_use) - 2*Q - 1;
    beta   = alpha >> 1;
    np_last = CW'((word_t'(1) << (int'(m_use) - Q)) - word_t'(1));
    // read of a symbol starts with write number N/P - L
    rd_start_cnt = alpha[0] ? (np_last + CW'(1) - (CW'(1) << (beta + 1)))
                            : (np_last + CW'(1) - (CW'(1) << beta));

    in_ready_o  = !fresh || chain_q || !rd_active_q;
    wr_fire     = in_valid_i && in_ready_o;
    wr_last     = wr_fire && (cw_q == np_last);
    wr_even_cur = fresh ? 1'b0 : wr_even_q;

    rd_start    = wr_fire && (cw_q == rd_start_cnt);
    rd_fire     = rd_active_q || rd_start;
    cr_use      = rd_active_q ? cr_q : '0;
    rd_even_cur = rd_active_q ? rd_even_q : wr_even_cur;
    rd_last     = rd_fire && (cr_use == np_last);
  end

  // ---------------- address generation, write side and read side
  addr_gen #(.P(P), .MMAX(MMAX)) u_wr_gen (
    .m_i   (m_use),
    .cnt_i (cw_q),
    .even_i(wr_even_cur),
    .addr_o(waddr_o),
    .j_o   (wj_o),
    .grp_o (wgrp)
  );

  // a symbol is read with the address formula of the symbol that follows it
  addr_gen #(.P(P), .MMAX(MMAX)) u_rd_gen (
    .m_i   (m_use),
    .cnt_i (cr_use),
    .even_i(!rd_even_cur),
    .addr_o(raddr_o),
    .j_o   (rj),
    .grp_o (rgrp)
  );

  assign wr_en_a_o = wr_fire && !wgrp;
  assign wr_en_b_o = wr_fire &&  wgrp;
  assign rd_en_a_o = rd_fire && !rgrp;
  assign rd_en_b_o = rd_fire &&  rgrp;

  // ---------------- sequential state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_q         <= MW'(MMAX);
      cw_q        <= '0;
      cr_q        <= '0;
      wr_even_q   <= 1'b0;
      chain_q     <= 1'b0;
      rd_active_q <= 1'b0;
      rd_even_q   <= 1'b0;
      rd_sel_q_o  <= 1'b0;
      rj_q_o      <= '0;
      out_valid_o <= 1'b0;
      out_sop_o   <= 1'b0;
    end else begin
      m_q     <= m_use;
      chain_q <= wr_last;
      if (wr_fire) begin
        cw_q      <= wr_last ? '0 : cw_q + CW'(1);
        wr_even_q <= wr_last ? !wr_even_cur : wr_even_cur;
      end
      if (rd_fire) begin
        rd_active_q <= !rd_last;
        cr_q        <= rd_last ? '0 : cr_use + CW'(1);
        rd_even_q   <= rd_even_cur;
      end
      rd_sel_q_o  <= rgrp;
      rj_q_o      <= rj;
      out_valid_o <= rd_fire;
      out_sop_o   <= rd_fire && (cr_use == '0);
    end
  end

  // ---------------- protocol checks
  // a started symbol must arrive on consecutive cycles
  a_whole_symbol: assert property (@(posedge clk) disable iff (!rst_n) (cw_q == '0) || in_valid_i)
    else $error("br_ctrl: in_valid_i dropped in the middle of a symbol");
  // the new read never overlaps the previous one
  a_read_order: assert property (@(posedge clk) disable iff (!rst_n) !(rd_start && rd_active_q))
    else $error("br_ctrl: read of a symbol started before the previous one ended");
  // supported FFT lengths: 2*P^2 .. 2^MMAX
  a_length: assert property (@(posedge clk) disable iff (!rst_n)
                             (idle && in_valid_i) |-> (int'(cfg_log2n_i) inside {[2*Q+1:MMAX]}))
    else $error("br_ctrl: cfg_log2n_i out of range");
endmodule
