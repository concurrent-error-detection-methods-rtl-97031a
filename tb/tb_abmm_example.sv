// Testbench for abmm_example: random walk over the legal input bursts of
// the flow table, bits of a multi-bit burst applied in random order with
// random gaps. Checks after every burst: final outputs and state code match
// the reference table, outputs valid two ticks after the last input change
// (one AND-gate delay plus one pass through the state feedback), every output
// changed at most once (hazard-free) and not before the burst was complete.
// Then checks that a one-tick upset of the only AND gate holding w makes a
// glitch on w without changing the state, and that an upset of a state gate
// moves the machine to a wrong state.
module tb_abmm_example;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  localparam int unsigned NBURST = 400;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  burst_in_t          in_burst = '0;
  logic [ORIG_NP-1:0] upset = '0;
  abmm_out_t          out;
  logic [1:0]         state;

  int unsigned checks = 0, failures = 0;
  sym_state_e  cur_s = ST_S0;

  abmm_example dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: in=%b out=%b state=%b", what, $time, in_burst, out, state);
    end
  endtask

  // Apply one burst; inputs change just after a falling edge, outputs are
  // sampled on falling edges.
  task automatic do_burst(input logic [3:0] target);
    logic [3:0] todo;
    logic [1:0] start_out, prev_out, want;
    int unsigned nchg [2];
    entry_t e1, e2;
    int unsigned nb, k;
    e1 = flow(cur_s, target);
    e2 = flow(e1.nxt, target);
    want = e2.xw;
    check(e1.ok && e2.ok && e1.xw == e2.xw, "reference burst legal");
    start_out = out;
    prev_out  = out;
    nchg = '{0, 0};
    todo = in_burst ^ target;
    nb = $countones(todo);
    while (todo != 0) begin
      do k = $urandom_range(3, 0); while (!todo[k]);
      todo[k] = 1'b0;
      in_burst[k] = target[k];
      nb--;
      repeat ((nb == 0) ? 1 : $urandom_range(3, 1)) begin
        @(negedge clk);
        for (int i = 0; i < 2; i++) if (out[i] != prev_out[i]) nchg[i]++;
        prev_out = out;
      end
      if (nb != 0) check(out == start_out, "no output change inside a burst");
    end
    // one tick has passed since the last bit
    @(negedge clk);
    for (int i = 0; i < 2; i++) if (out[i] != prev_out[i]) nchg[i]++;
    prev_out = out;
    check(out == want, "outputs valid two ticks after burst completion");
    repeat (4) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) if (out[i] != prev_out[i]) nchg[i]++;
      prev_out = out;
    end
    check(out == want, "final outputs");
    check(state == code2(e1.nxt), "state code");
    check(nchg[0] <= 1 && nchg[1] <= 1, "each output changes at most once");
    cur_s = e1.nxt;
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(out == 2'b00 && state == 2'b00, "reset state S0");
    for (int n = 0; n < NBURST; n++)
      do_burst(pick_target(cur_s, in_burst, $urandom));

    // Walk to S0 at 1000 (w = 1 held by one AND gate).
    while (!(cur_s == ST_S0 && in_burst == 4'b1000))
      do_burst(pick_target(cur_s, in_burst, $urandom));
    check(out == 2'b01, "S0 at 1000 gives w");
    begin
      int unsigned nw;
      logic pw;
      nw = 0; pw = out.w;
      upset[1] = 1'b1;            // transient on the AND gate of w
      @(negedge clk);
      upset[1] = 1'b0;
      if (out.w != pw) nw++;
      pw = out.w;
      repeat (4) begin
        @(negedge clk);
        if (out.w != pw) nw++;
        pw = out.w;
      end
      check(nw == 2, "upset on w gate gives a two-edge glitch");
      check(out == 2'b01 && state == S0_CODE, "glitch leaves state and final output intact");
    end
    // Upset of the Y1 gate a b c' d' Y0': machine latches S1 wrongly.
    upset[3] = 1'b1;
    @(negedge clk);
    upset[3] = 1'b0;
    repeat (4) @(negedge clk);
    check(state == S1_CODE && out == 2'b10, "state upset latches the wrong state");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
