// Testbench for berger_gen_example: random burst walk over the example flow
// table. After every burst the check symbol must be the Berger check symbol
// of the outputs the table gives (complement of the number of 1s in {x,w}),
// valid two ticks after the last input change, unchanged inside an
// incomplete burst, each bit changing at most once; the state lines must
// carry the original state code.
module tb_berger_gen_example;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  burst_in_t  in_burst = '0;
  logic [1:0] chk;
  logic [1:0] state;

  int unsigned checks = 0, failures = 0, n_sym [4];
  sym_state_e  cur_s = ST_S0;

  berger_gen_example dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: in=%b chk=%b state=%b", what, $time, in_burst, chk, state);
    end
  endtask

  task automatic sample(inout logic [1:0] prev, inout int unsigned n0, inout int unsigned n1);
    @(negedge clk);
    if (chk[0] != prev[0]) n0++;
    if (chk[1] != prev[1]) n1++;
    prev = chk;
  endtask

  task automatic do_burst(input logic [3:0] target);
    logic [3:0] todo;
    logic [1:0] start, prev, want;
    int unsigned n0, n1, nb, k;
    entry_t e1;
    e1 = flow(cur_s, target);
    want = berger_ref(flow(e1.nxt, target).xw);
    start = chk; prev = chk; n0 = 0; n1 = 0;
    todo = in_burst ^ target;
    nb = $countones(todo);
    while (todo != 0) begin
      do k = $urandom_range(3, 0); while (!todo[k]);
      todo[k] = 1'b0;
      in_burst[k] = target[k];
      nb--;
      repeat ((nb == 0) ? 1 : $urandom_range(3, 1)) sample(prev, n0, n1);
      if (nb != 0) check(chk == start, "no check-symbol change inside a burst");
    end
    sample(prev, n0, n1);
    check(chk == want, "check symbol valid two ticks after burst completion");
    repeat (4) sample(prev, n0, n1);
    check(chk == want, "final check symbol");
    check(state == code2(e1.nxt), "state code");
    check(n0 <= 1 && n1 <= 1, "each check bit changes at most once");
    n_sym[chk]++;
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
    n_sym = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(chk == 2'b11, "reset check symbol 11");
    for (int n = 0; n < 400; n++)
      do_burst(pick_target(cur_s, in_burst, $urandom));
    check(n_sym[3] > 0 && n_sym[2] > 0 && n_sym[1] > 0, "all three check symbols produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
