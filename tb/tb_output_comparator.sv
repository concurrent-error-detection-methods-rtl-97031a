// Testbench for output_comparator: exhaustive for the default width (N=2)
// and random vectors for N=7; mismatch must be 1 exactly when the words
// differ.
module tb_output_comparator;

  logic [1:0] a2, b2;
  logic [6:0] a7, b7;
  logic       m2, m7;
  int unsigned checks = 0, failures = 0;

  output_comparator dut2 (.a(a2), .b(b2), .mismatch(m2));
  output_comparator #(.N(7)) dut7 (.a(a7), .b(b7), .mismatch(m7));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      #1;
      check(m2 == (a2 != b2), "N=2 exhaustive");
    end
    for (int n = 0; n < 2000; n++) begin
      a7 = 7'($urandom);
      b7 = ($urandom_range(1, 0) == 0) ? a7 : a7 ^ (7'(1) << $urandom_range(6, 0));
      #1;
      check(m7 == (a7 != b7), "N=7 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
