// tb_sp_ram: self-checking testbench of the single-port memory bank.
//
// A reference array in the testbench mirrors every write. Random mixes of
// writes, reads and idle cycles are applied to a 64-word bank; each read must
// return the reference word exactly one cycle later, and the output must hold
// its value over write and idle cycles.
module tb_sp_ram;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned W     = 32;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  ref_mem [DEPTH];

  always #5 clk = !clk;

  sp_ram #(.DEPTH(DEPTH), .W(W)) dut (
    .clk(clk), .en_i(en), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata)
  );

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] held;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      int unsigned op;
      @(negedge clk);
      op = $urandom % 4;
      addr = AW'($urandom);
      if (op == 0) begin
        en = 1; we = 1; wdata = $urandom;
        ref_mem[addr] = wdata;
        held = rdata;
        @(negedge clk);
        en = 0; we = 0;
        check(rdata == held, "output changed on a write cycle");
      end else if (op == 1) begin
        en = 0; we = 0;
        held = rdata;
        @(negedge clk);
        check(rdata == held, "output changed on an idle cycle");
      end else begin
        en = 1; we = 0;
        @(negedge clk);
        en = 0;
        check(rdata == ref_mem[addr], $sformatf("read addr %0d", addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
