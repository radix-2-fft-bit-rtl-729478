// mem_group: one memory group (A or B) of the parallel bit-reversal circuit.
//
// A group is P single-port banks of DEPTH = N/(2P) words. In any cycle the
// whole group is either written (wr_en_i), read (rd_en_i) or idle; the
// controller's schedule never asks for both, and an assertion checks that.
// Every bank has its own address: for each bank the address presented to the
// single port is the write address while writing and the read address
// otherwise, the multiplexing the reference architecture calls for because single-port
// memories are used.
//
// Interface: wr_en_i, rd_en_i, waddr_i[P], raddr_i[P], wdata_i[P] in;
// rdata_o[P] out. Timing: writes take effect at the clock edge; read data
// appears on rdata_o one cycle after rd_en_i (sp_ram latency).
module mem_group #(
  parameter int unsigned P     = 8,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en_i,
  input  logic          rd_en_i,
  input  logic [AW-1:0] waddr_i [P],
  input  logic [AW-1:0] raddr_i [P],
  input  logic [W-1:0]  wdata_i [P],
  output logic [W-1:0]  rdata_o [P]
);
  for (genvar b = 0; b < P; b++) begin : g_bank
    logic [AW-1:0] addr;
    assign addr = wr_en_i ? waddr_i[b] : raddr_i[b];

    sp_ram #(.DEPTH(DEPTH), .W(W)) u_bank (
      .clk    (clk),
      .en_i   (wr_en_i | rd_en_i),
      .we_i   (wr_en_i),
      .addr_i (addr),
      .wdata_i(wdata_i[b]),
      .rdata_o(rdata_o[b])
    );
  end

  // single-port rule: a group is never read and written in the same cycle
  always_ff @(posedge clk) begin
    assert (!(wr_en_i && rd_en_i))
      else $error("mem_group: read and write requested in the same cycle");
  end
endmodule
