// tb_grp_mux: self-checking testbench of the memory-group multiplexer.
//
// Random words on both groups; with sel = 0 every output must equal the group
// A word, with sel = 1 the group B word.
module tb_grp_mux;
  localparam int unsigned P = 8;
  localparam int unsigned W = 32;

  logic         sel;
  logic [W-1:0] a [P];
  logic [W-1:0] b [P];
  logic [W-1:0] y [P];

  grp_mux #(.P(P), .W(W)) dut (.sel_i(sel), .a_i(a), .b_i(b), .y_o(y));

  int unsigned checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 200; rep++) begin
      sel = 1'($urandom);
      for (int i = 0; i < P; i++) begin
        a[i] = $urandom;
        b[i] = $urandom;
      end
      #1;
      for (int i = 0; i < P; i++) begin
        checks++;
        if (y[i] != (sel ? b[i] : a[i])) begin
          failures++;
          $display("FAIL: rep %0d sel %0d lane %0d", rep, sel, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
