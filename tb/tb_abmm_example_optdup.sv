// Testbench for abmm_example_optdup: random burst walk over the example flow
// table. The testbench plays the part of the multiplexer control: `load` is
// 0 from each input change until one tick after the burst is complete, then
// 1. After every burst the outputs must match the table two ticks after the
// last input change and the state must be the original state code. Inside the
// multi-bit burst the outputs are don't-cares, but the held state must stay
// S2 although the cover's next state there is S0.
module tb_abmm_example_optdup;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  burst_in_t  in_burst = '0;
  logic       load = 1'b1;
  abmm_out_t  out;
  logic [1:0] state;

  int unsigned checks = 0, failures = 0, n_hold = 0;
  sym_state_e  cur_s = ST_S0;

  abmm_example_optdup dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: in=%b load=%b out=%b state=%b", what, $time, in_burst, load, out, state);
    end
  endtask

  task automatic do_burst(input logic [3:0] target);
    logic [3:0] todo;
    logic [1:0] want;
    int unsigned nb, k;
    entry_t e1;
    e1 = flow(cur_s, target);
    want = flow(e1.nxt, target).xw;
    todo = in_burst ^ target;
    nb = $countones(todo);
    while (todo != 0) begin
      do k = $urandom_range(3, 0); while (!todo[k]);
      todo[k] = 1'b0;
      in_burst[k] = target[k];
      load = 1'b0;
      nb--;
      repeat ((nb == 0) ? 1 : $urandom_range(3, 1)) begin
        @(negedge clk);
        if (nb != 0) begin
          check(state == code2(cur_s), "state held inside a burst");
          n_hold++;
        end
      end
    end
    load = 1'b1;
    @(negedge clk);
    check(out == want, "outputs valid two ticks after burst completion");
    repeat (4) @(negedge clk);
    check(out == want, "final outputs");
    check(state == code2(e1.nxt), "state code");
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
    for (int n = 0; n < 400; n++)
      do_burst(pick_target(cur_s, in_burst, $urandom));
    check(n_hold > 0, "held state observed inside a multi-bit burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
