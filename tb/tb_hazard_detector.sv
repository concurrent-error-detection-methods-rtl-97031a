// Testbench for hazard_detector (N=2): directed cases (one transition per
// burst is clean, a second transition raises Hazard for one tick, the input
// change pulse clears the loop, a transition in the same tick as the input
// change still counts, the outputs are watched separately, a one-tick glitch
// is caught) and a random run against an event-count reference: a transition
// is a hazard if another transition on the same output happened since the
// last input change pulse (a transition in that pulse's tick included).
module tb_hazard_detector;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [1:0] mon = '0;
  logic       in_change = 1'b0;
  logic [1:0] hazard_bit;
  logic       hazard;

  int unsigned checks = 0, failures = 0, n_haz = 0;
  int unsigned cnt [2];
  logic [1:0] prev;

  hazard_detector dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: mon=%b inc=%b hz=%b", what, $time, mon, in_change, hazard_bit);
    end
  endtask

  // one tick: set the inputs, compare with the reference, advance
  task automatic tick(input logic [1:0] m, input logic inc);
    logic [1:0] tr, want;
    mon = m;
    in_change = inc;
    #1;
    tr = mon ^ prev;
    for (int i = 0; i < 2; i++) want[i] = tr[i] && cnt[i] > 0;
    check(hazard_bit == want, "hazard bits");
    check(hazard == |want, "hazard OR");
    if (hazard) n_haz++;
    for (int i = 0; i < 2; i++) cnt[i] = inc ? 32'(tr[i]) : cnt[i] + 32'(tr[i]);
    prev = mon;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt = '{0, 0};
    prev = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // clean burst: input change, one transition on output 0
    tick(2'b00, 1); tick(2'b01, 0); tick(2'b01, 0); tick(2'b01, 0);
    check(!hazard, "single transition is clean");
    // glitch on output 0 (back to 0 and up again)
    tick(2'b00, 0);
    check(n_haz == 1, "second transition raises hazard");
    tick(2'b01, 0);
    check(n_haz == 2, "third transition raises hazard again");
    // new burst clears the loop
    tick(2'b01, 1); tick(2'b01, 0); tick(2'b00, 0);
    check(n_haz == 2, "input change cleared the loop");
    // transition in the same tick as the input change, then another
    tick(2'b10, 1); tick(2'b10, 0); tick(2'b00, 0);
    check(n_haz == 3, "transition during the clear pulse still latches");
    // both outputs change once: no hazard
    tick(2'b00, 1); tick(2'b11, 0); tick(2'b11, 0);
    check(n_haz == 3, "one transition on each output is clean");
    // random run
    for (int n = 0; n < 4000; n++)
      tick(($urandom_range(3, 0) == 0) ? mon ^ 2'($urandom_range(3, 1)) : mon,
           ($urandom_range(4, 0) == 0));
    check(n_haz > 20, "random run produced hazards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
