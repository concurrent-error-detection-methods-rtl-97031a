// Testbench for abmm_example_invfree: the same random burst walk as for the
// original machine. After every burst the outputs must match the flow table
// and the state must be the inverter-free code (S0=0011, S1=0110, S2=1001);
// outputs are valid two ticks after the last input change and change at most
// once per burst. Then it checks the property the re-encoding exists for:
// an upset of a state gate only ever makes the outputs move in one direction
// (here S0 at 1000 with a Y2 upset turns x on while w stays on).
// It also checks the state code itself: every valid dichotomy (L; R) of the
// inverter-free encoding constraints (the critical-race constraint
// (S0 S2; S1), state-versus-state pairs for states with several bursts or a
// multi-bit burst, and transition-versus-state pairs) must be solved by a
// positive identifier: a state bit that is 1 in every state of L and 0 in
// every state of R.
module tb_abmm_example_invfree;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  burst_in_t          in_burst = '0;
  logic [INVF_NP-1:0] upset = '0;
  abmm_out_t          out;
  logic [3:0]         state;

  int unsigned checks = 0, failures = 0;
  sym_state_e  cur_s = ST_S0;

  abmm_example_invfree dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: in=%b out=%b state=%b", what, $time, in_burst, out, state);
    end
  endtask

  task automatic sample(inout logic [1:0] prev, inout int unsigned n0, inout int unsigned n1);
    @(negedge clk);
    if (out[0] != prev[0]) n0++;
    if (out[1] != prev[1]) n1++;
    prev = out;
  endtask

  task automatic do_burst(input logic [3:0] target);
    logic [3:0] todo;
    logic [1:0] start_out, prev, want;
    int unsigned n0, n1, nb, k;
    entry_t e1;
    e1 = flow(cur_s, target);
    want = flow(e1.nxt, target).xw;
    start_out = out; prev = out; n0 = 0; n1 = 0;
    todo = in_burst ^ target;
    nb = $countones(todo);
    while (todo != 0) begin
      do k = $urandom_range(3, 0); while (!todo[k]);
      todo[k] = 1'b0;
      in_burst[k] = target[k];
      nb--;
      repeat ((nb == 0) ? 1 : $urandom_range(3, 1)) sample(prev, n0, n1);
      if (nb != 0) check(out == start_out, "no output change inside a burst");
    end
    sample(prev, n0, n1);
    check(out == want, "outputs valid two ticks after burst completion");
    repeat (4) sample(prev, n0, n1);
    check(out == want, "final outputs");
    check(state == code_invf(e1.nxt), "inverter-free state code");
    check(n0 <= 1 && n1 <= 1, "each output changes at most once");
    cur_s = e1.nxt;
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a dichotomy as two state sets, bit i set = state Si in the group
  function automatic logic solved(logic [2:0] left, logic [2:0] right);
    for (int b = 0; b < 4; b++) begin
      logic ok;
      ok = 1'b1;
      for (int s = 0; s < 3; s++) begin
        if (left[s]  && !code_invf(sym_state_e'(s))[b]) ok = 1'b0;
        if (right[s] &&  code_invf(sym_state_e'(s))[b]) ok = 1'b0;
      end
      if (ok) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic check_dichotomies();
    logic [2:0] trans [4];
    // transitions of the flow table as state sets: S0->S1, S0->S2, S1->S0, S2->S0
    trans = '{3'b011, 3'b101, 3'b011, 3'b101};
    check(solved(3'b101, 3'b010), "dichotomy (S0 S2; S1)");
    // states with several bursts (S0, S1) or a multi-bit burst (S2) against the others
    for (int l = 0; l < 3; l++)
      for (int r = 0; r < 3; r++)
        if (l != r) check(solved(3'(1 << l), 3'(1 << r)), "state-versus-state dichotomy");
    // every transition against every state outside it
    for (int t = 0; t < 4; t++)
      for (int r = 0; r < 3; r++)
        if (!trans[t][r]) check(solved(trans[t], 3'(1 << r)), "transition-versus-state dichotomy");
  endtask

  initial begin
    check_dichotomies();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(out == 2'b00 && state == 4'b0011, "reset state S0 = 0011");
    for (int n = 0; n < 400; n++)
      do_burst(pick_target(cur_s, in_burst, $urandom));
    while (!(cur_s == ST_S0 && in_burst == 4'b1000))
      do_burst(pick_target(cur_s, in_burst, $urandom));
    check(out == 2'b01, "S0 at 1000 gives w");
    upset[6] = 1'b1;                 // Y2 gate a b c' d' turns on wrongly
    @(negedge clk);
    upset[6] = 1'b0;
    repeat (4) @(negedge clk);
    check(state == 4'b0111, "Y2 upset latches 0111");
    check(out == 2'b11, "error is unidirectional: x rises, w stays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
