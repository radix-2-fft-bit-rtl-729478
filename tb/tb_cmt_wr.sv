// tb_cmt_wr: self-checking testbench of the write commutator.
//
// For P = 4 and P = 8 it applies random words on all paths under every
// switching pattern J and checks that path i lands on bank mod(i + J, P),
// computed here independently. It also checks the published example: with
// 4 paths and J = 3, path 2 goes to bank 1.
module tb_cmt_wr;
  localparam int unsigned W = 16;

  logic [W-1:0] p4_in [4];
  logic [W-1:0] p4_out [4];
  logic [1:0]   j4;
  logic [W-1:0] p8_in [8];
  logic [W-1:0] p8_out [8];
  logic [2:0]   j8;

  cmt_wr #(.P(4), .W(W)) dut4 (.path_i(p4_in), .j_i(j4), .bank_o(p4_out));
  cmt_wr #(.P(8), .W(W)) dut8 (.path_i(p8_in), .j_i(j8), .bank_o(p8_out));

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int j = 0; j < 4; j++) begin
        j4 = 2'(j);
        for (int i = 0; i < 4; i++) p4_in[i] = W'($urandom);
        #1;
        for (int i = 0; i < 4; i++)
          check(p4_out[(i + j) % 4] == p4_in[i], $sformatf("P=4 J=%0d path %0d", j, i));
      end
      for (int j = 0; j < 8; j++) begin
        j8 = 3'(j);
        for (int i = 0; i < 8; i++) p8_in[i] = W'($urandom);
        #1;
        for (int i = 0; i < 8; i++)
          check(p8_out[(i + j) % 8] == p8_in[i], $sformatf("P=8 J=%0d path %0d", j, i));
      end
    end
    // example: 4-parallel, J = 3, path 2 -> bank 1
    j4 = 2'd3;
    for (int i = 0; i < 4; i++) p4_in[i] = W'(16'hA000 + i);
    #1;
    check(p4_out[1] == 16'hA002, "example J=3 path 2 -> bank 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
