// cmt_wr: write commutator (CMT_WR) of the parallel bit-reversal circuit.
//
// Under switching pattern J, the word arriving on path i is steered to
// memory bank mod(i + J, P); equivalently bank b takes path mod(b - J, P).
// It is built as the reference architecture draws it: one P-to-1 multiplexer per bank,
// whose input j is wired to path mod(b - j, P) and whose select is J.
// This makes the P words of one clock cycle land in P different banks, and
// the pattern J changes every N/P^2 cycles (computed by the controller).
// The same block also rotates the per-path address fields of the even-symbol
// address generator, as the reference architecture uses the write commutator there too.
//
// Interface: path_i[P] in, j_i (log2 P bits) in, bank_o[P] out.
// Timing: purely combinational. P must be a power of two (P >= 2).
module cmt_wr #(
  parameter int unsigned P = 8,
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         path_i [P],
  input  logic [$clog2(P)-1:0] j_i,
  output logic [W-1:0]         bank_o [P]
);
  localparam int unsigned Q = $clog2(P);

  for (genvar b = 0; b < P; b++) begin : g_bank
    // mux input j of bank b is path (b - j) mod P
    logic [W-1:0] mux_in [P];
    for (genvar j = 0; j < P; j++) begin : g_in
      assign mux_in[j] = path_i[(b + P - j) % P];
    end
    assign bank_o[b] = mux_in[j_i];
  end

  initial begin
    assert (P >= 2 && (1 << Q) == P) else $error("cmt_wr: P must be a power of two");
  end
endmodule
