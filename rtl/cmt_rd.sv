// cmt_rd: read commutator (CMT_RD) of the parallel bit-reversal circuit.
//
// Under switching pattern J, the word read from bank b is steered to output
// path mod(b + P - J, P); equivalently output path p takes bank mod(p + J, P).
// As in the reference drawing, each output path has a P-to-1 multiplexer whose
// input j is wired to bank mod(p + j, P) and whose select is J. During a
// natural-order read the P words X(Pr..Pr+P-1) sit in P distinct banks, rotated
// by the pattern J that was in force when they were written; this undoes it.
//
// Interface: bank_i[P] in, j_i (log2 P bits) in, path_o[P] out.
// Timing: purely combinational. P must be a power of two (P >= 2).
module cmt_rd #(
  parameter int unsigned P = 8,
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         bank_i [P],
  input  logic [$clog2(P)-1:0] j_i,
  output logic [W-1:0]         path_o [P]
);
  localparam int unsigned Q = $clog2(P);

  for (genvar p = 0; p < P; p++) begin : g_path
    logic [W-1:0] mux_in [P];
    for (genvar j = 0; j < P; j++) begin : g_in
      assign mux_in[j] = bank_i[(p + j) % P];
    end
    assign path_o[p] = mux_in[j_i];
  end

  initial begin
    assert (P >= 2 && (1 << Q) == P) else $error("cmt_rd: P must be a power of two");
  end
endmodule
