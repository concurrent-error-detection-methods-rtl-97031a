// Testbench for change_detector: random changes on the monitored signals,
// checked against a history of the inputs kept by the testbench: Change_i
// must be 1 exactly while the signal differs from its value DELAY ticks
// earlier. Runs the default (N=4, DELAY=1) and a wider pulse (N=3, DELAY=3),
// and checks that an isolated change gives a pulse of exactly DELAY ticks.
module tb_change_detector;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] sig_a = '0;
  logic [2:0] sig_b = '0;
  logic [3:0] cb_a;
  logic [2:0] cb_b;
  logic       ch_a, ch_b;

  int unsigned checks = 0, failures = 0;
  logic [3:0] hist_a [$];
  logic [2:0] hist_b [$];

  change_detector dut_a (.clk, .rst_n, .sig(sig_a), .change_bit(cb_a), .change(ch_a));
  change_detector #(.N(3), .DELAY(3)) dut_b (.clk, .rst_n, .sig(sig_b), .change_bit(cb_b), .change(ch_b));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned width;
    for (int i = 0; i < 3; i++) begin hist_a.push_back('0); hist_b.push_back('0); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // change inputs just after a falling edge, check on the next one
      if ($urandom_range(2, 0) == 0) sig_a = sig_a ^ (4'(1) << $urandom_range(3, 0));
      if ($urandom_range(3, 0) == 0) sig_b = sig_b ^ (3'(1) << $urandom_range(2, 0));
      #1;
      check(cb_a == (sig_a ^ hist_a[hist_a.size()-1]), "DELAY=1 change bits");
      check(ch_a == |(sig_a ^ hist_a[hist_a.size()-1]), "DELAY=1 OR");
      check(cb_b == (sig_b ^ hist_b[hist_b.size()-3]), "DELAY=3 change bits");
      check(ch_b == |cb_b, "DELAY=3 OR");
      @(negedge clk);
      hist_a.push_back(sig_a);
      hist_b.push_back(sig_b);
    end
    // isolated change: pulse width
    repeat (5) @(negedge clk);
    sig_b[1] = ~sig_b[1];
    width = 0;
    repeat (8) begin
      #1;
      if (ch_b) width++;
      @(negedge clk);
    end
    check(width == 3, "DELAY=3 pulse is three ticks wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
