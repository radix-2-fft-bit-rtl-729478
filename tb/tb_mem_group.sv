// tb_mem_group: self-checking testbench of one memory group.
//
// A 4-bank group of 16 words is written with a different random address per
// bank, then read back with other per-bank addresses; a reference model in the
// testbench predicts every word, which must appear one cycle after the read.
// Write, read and idle cycles are mixed at random (never write and read
// together, which the group forbids).
module tb_mem_group;
  localparam int unsigned P     = 4;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned W     = 32;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] waddr [P];
  logic [AW-1:0] raddr [P];
  logic [W-1:0]  wdata [P];
  logic [W-1:0]  rdata [P];
  logic [W-1:0]  ref_mem [P][DEPTH];
  logic [W-1:0]  expect_w [P];

  always #5 clk = !clk;

  mem_group #(.P(P), .DEPTH(DEPTH), .W(W)) dut (
    .clk(clk), .wr_en_i(wr_en), .rd_en_i(rd_en), .waddr_i(waddr), .raddr_i(raddr),
    .wdata_i(wdata), .rdata_o(rdata)
  );

  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < P; b++) begin
      waddr[b] = '0; raddr[b] = '0; wdata[b] = '0;
    end
    // fill: bank b gets address (a + 3b) mod DEPTH in step a
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; rd_en = 0;
      for (int b = 0; b < P; b++) begin
        waddr[b] = AW'(a + 3*b);
        raddr[b] = AW'($urandom);   // must be ignored while writing
        wdata[b] = $urandom;
        ref_mem[b][waddr[b]] = wdata[b];
      end
    end
    for (int i = 0; i < 2000; i++) begin
      int unsigned op;
      @(negedge clk);
      op = $urandom % 3;
      for (int b = 0; b < P; b++) begin
        waddr[b] = AW'($urandom);
        raddr[b] = AW'($urandom);
        wdata[b] = $urandom;
      end
      wr_en = (op == 0);
      rd_en = (op == 1);
      if (op == 0)
        for (int b = 0; b < P; b++) ref_mem[b][waddr[b]] = wdata[b];
      if (op == 1) begin
        for (int b = 0; b < P; b++) expect_w[b] = ref_mem[b][raddr[b]];
        @(negedge clk);
        wr_en = 0; rd_en = 0;
        for (int b = 0; b < P; b++) begin
          checks++;
          if (rdata[b] != expect_w[b]) begin
            failures++;
            if (failures <= 20) $display("FAIL: bank %0d read %h exp %h", b, rdata[b], expect_w[b]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
