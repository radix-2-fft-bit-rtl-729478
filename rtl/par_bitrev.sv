// par_bitrev: parallel bit-reversal circuit for continuous-flow P-parallel
// pipelined FFT processors (MDC / MDF).
//
// A P-parallel FFT delivers, in cycle t on path p, the output X(BR(P*t + p)),
// i.e. in bit-reversed order. This circuit returns the same samples in natural
// order, X(P*r) .. X(P*r + P - 1) in output cycle r, P samples per cycle, at
// full throughput, using only N words of single-port memory:
//
//   in_data_i -> CMT_WR (cmt_wr) -> memory group A / group B (mem_group, P
//   single-port banks of N/(2P) words each) -> group multiplexer (grp_mux)
//   -> CMT_RD (cmt_rd) -> out_data_o,
//
// all steered by the controller (br_ctrl) from two cycle counters. The
// structure, switching rule, schedule and addressing follow the reference architecture; the
// flow-control handshake, reset and the one-cycle memory latency are this
// design's own choices.
//
// Parameters: P parallel paths (power of two), MMAX = log2 of the largest FFT
// length, DATA_W bits per sample. Defaults are the reference 8-parallel,
// 128..32768-point, 32-bit realisation. The FFT length N = 2^cfg_log2n_i may be
// chosen per burst between 2*P^2 and 2^MMAX.
//
// Timing: the first natural-order set of a symbol leaves N/P - 2^beta + 1
// cycles (alpha even) or N/P - 2^(beta+1) + 1 cycles (alpha odd) after the
// first bit-reversed set of that symbol entered, alpha = log2(N/(2P^2)),
// beta = floor(alpha/2). out_sop_o marks the first set of every symbol.
// Handshake: see br_ctrl (whole symbols on consecutive cycles; in_ready_o low
// only while a finished burst drains).
module par_bitrev #(
  parameter int unsigned P      = 8,
  parameter int unsigned MMAX   = 15,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned Q     = $clog2(P),
  localparam int unsigned AW    = MMAX - Q - 1,
  localparam int unsigned DEPTH = 1 << AW,
  localparam int unsigned MW    = $clog2(MMAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MW-1:0]     cfg_log2n_i,
  input  logic              in_valid_i,
  output logic              in_ready_o,
  input  logic [DATA_W-1:0] in_data_i  [P],
  output logic              out_valid_o,
  output logic              out_sop_o,
  output logic [DATA_W-1:0] out_data_o [P]
);
  logic              wr_en_a, wr_en_b, rd_en_a, rd_en_b, rd_sel_q;
  logic [AW-1:0]     waddr [P];
  logic [AW-1:0]     raddr [P];
  logic [Q-1:0]      wj, rj_q;
  logic [DATA_W-1:0] wdata  [P];
  logic [DATA_W-1:0] rdata_a [P];
  logic [DATA_W-1:0] rdata_b [P];
  logic [DATA_W-1:0] rdata  [P];

  br_ctrl #(.P(P), .MMAX(MMAX)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_log2n_i(cfg_log2n_i),
    .in_valid_i (in_valid_i),
    .in_ready_o (in_ready_o),
    .wr_en_a_o  (wr_en_a),
    .wr_en_b_o  (wr_en_b),
    .waddr_o    (waddr),
    .wj_o       (wj),
    .rd_en_a_o  (rd_en_a),
    .rd_en_b_o  (rd_en_b),
    .raddr_o    (raddr),
    .rd_sel_q_o (rd_sel_q),
    .rj_q_o     (rj_q),
    .out_valid_o(out_valid_o),
    .out_sop_o  (out_sop_o)
  );

  cmt_wr #(.P(P), .W(DATA_W)) u_cmt_wr (
    .path_i(in_data_i),
    .j_i   (wj),
    .bank_o(wdata)
  );

  mem_group #(.P(P), .DEPTH(DEPTH), .W(DATA_W)) u_group_a (
    .clk    (clk),
    .wr_en_i(wr_en_a),
    .rd_en_i(rd_en_a),
    .waddr_i(waddr),
    .raddr_i(raddr),
    .wdata_i(wdata),
    .rdata_o(rdata_a)
  );

  mem_group #(.P(P), .DEPTH(DEPTH), .W(DATA_W)) u_group_b (
    .clk    (clk),
    .wr_en_i(wr_en_b),
    .rd_en_i(rd_en_b),
    .waddr_i(waddr),
    .raddr_i(raddr),
    .wdata_i(wdata),
    .rdata_o(rdata_b)
  );

  grp_mux #(.P(P), .W(DATA_W)) u_grp_mux (
    .sel_i(rd_sel_q),
    .a_i  (rdata_a),
    .b_i  (rdata_b),
    .y_o  (rdata)
  );

  cmt_rd #(.P(P), .W(DATA_W)) u_cmt_rd (
    .bank_i(rdata),
    .j_i   (rj_q),
    .path_o(out_data_o)
  );
endmodule
