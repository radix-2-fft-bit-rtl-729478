// sp_ram: one single-port synchronous memory bank.
//
// Stands for one single-port SRAM macro of the reordering memory (the
// reference 8-parallel, 32768-point realisation uses 16 such banks of
// 32-bit words). One access per cycle: when en_i is high, we_i = 1 writes
// wdata_i to addr_i, we_i = 0 reads addr_i. A read returns its word on rdata_o
// in the next cycle (registered output); rdata_o holds its value on cycles
// without a read. Written as an array so that synthesis maps it to a memory;
// the one-cycle read latency is this design's choice, matching a typical
// synchronous SRAM macro.
module sp_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en_i,
  input  logic          we_i,
  input  logic [AW-1:0] addr_i,
  input  logic [W-1:0]  wdata_i,
  output logic [W-1:0]  rdata_o
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_i) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end
endmodule
