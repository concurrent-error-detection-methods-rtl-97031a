// Testbench for berger_checker: every combination of information and check
// bits for R=2 (K=2) and for R=5 (K=3); noncode must be 1 exactly when the
// check symbol is not the complement of the number of 1s. Also checks that
// every unidirectional error pattern on a code word of R=5 is caught.
module tb_berger_checker;

  logic [1:0] i2, c2;
  logic [4:0] i5;
  logic [2:0] c5;
  logic       n2, n5;
  int unsigned checks = 0, failures = 0;

  berger_checker dut2 (.info(i2), .chk(c2), .noncode(n2));
  berger_checker #(.R(5), .K(3)) dut5 (.info(i5), .chk(c5), .noncode(n5));

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
    logic [7:0] word, bad;
    for (int i = 0; i < 16; i++) begin
      {i2, c2} = 4'(i);
      #1;
      check(n2 == (c2 != 2'(3 - $countones(i2))), "R=2 exhaustive");
    end
    for (int i = 0; i < 256; i++) begin
      {i5, c5} = 8'(i);
      #1;
      check(n5 == (c5 != 3'(7 - $countones(i5))), "R=5 exhaustive");
    end
    // unidirectional errors: only 1->0 flips of a code word
    for (int v = 0; v < 32; v++) begin
      word = {5'(v), 3'(7 - $countones(5'(v)))};
      for (int m = 1; m < 256; m++) begin
        if ((8'(m) & word) == 8'(m)) begin
          bad = word & ~8'(m);
          {i5, c5} = bad;
          #1;
          check(n5, "unidirectional 1->0 error detected");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
