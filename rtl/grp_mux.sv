// grp_mux: memory-group multiplexers between the memory and the read
// commutator.
//
// Passes the P words read from group A (sel_i = 0) or group B (sel_i = 1) on
// to the read commutator. The select is rd_group_sel as seen at the memory
// output, i.e. the controller delays it by the one-cycle memory read latency.
//
// Interface: sel_i, a_i[P], b_i[P] in; y_o[P] out. Timing: combinational.
module grp_mux #(
  parameter int unsigned P = 8,
  parameter int unsigned W = 32
) (
  input  logic         sel_i,
  input  logic [W-1:0] a_i [P],
  input  logic [W-1:0] b_i [P],
  output logic [W-1:0] y_o [P]
);
  always_comb begin
    for (int i = 0; i < P; i++) y_o[i] = sel_i ? b_i[i] : a_i[i];
  end
endmodule
