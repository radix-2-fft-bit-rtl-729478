// tb_cmt_rd: self-checking testbench of the read commutator.
//
// For P = 4 and P = 8 it applies random words on all banks under every
// switching pattern J and checks that bank b lands on output path
// mod(b + P - J, P), computed here independently. It also checks that the read
// commutator undoes the write example: with 4 paths and J = 3, bank 1 goes
// back to path 2.
module tb_cmt_rd;
  localparam int unsigned W = 16;

  logic [W-1:0] p4_in [4];
  logic [W-1:0] p4_out [4];
  logic [1:0]   j4;
  logic [W-1:0] p8_in [8];
  logic [W-1:0] p8_out [8];
  logic [2:0]   j8;

  cmt_rd #(.P(4), .W(W)) dut4 (.bank_i(p4_in), .j_i(j4), .path_o(p4_out));
  cmt_rd #(.P(8), .W(W)) dut8 (.bank_i(p8_in), .j_i(j8), .path_o(p8_out));

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
          check(p4_out[(i + 4 - j) % 4] == p4_in[i], $sformatf("P=4 J=%0d bank %0d", j, i));
      end
      for (int j = 0; j < 8; j++) begin
        j8 = 3'(j);
        for (int i = 0; i < 8; i++) p8_in[i] = W'($urandom);
        #1;
        for (int i = 0; i < 8; i++)
          check(p8_out[(i + 8 - j) % 8] == p8_in[i], $sformatf("P=8 J=%0d bank %0d", j, i));
      end
    end
    // example: 4-parallel, J = 3, bank 1 -> path 2
    j4 = 2'd3;
    for (int i = 0; i < 4; i++) p4_in[i] = W'(16'hA000 + i);
    #1;
    check(p4_out[2] == 16'hA001, "example J=3 bank 1 -> path 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
