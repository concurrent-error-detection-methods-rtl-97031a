// Testbench for tpf_example: random walk over the legal bursts of the
// example flow table with random bit order. One tick after every input
// change the TPF must equal the reference (0 only inside the multi-bit burst
// of S2, at columns 1000 and 1011; 1 everywhere else). Counts how often the
// TPF was seen low and requires both intermediate columns to be visited.
module tb_tpf_example;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  burst_in_t  in_burst = '0;
  logic       tpf;

  int unsigned checks = 0, failures = 0, n_low_1000 = 0, n_low_1011 = 0;
  sym_state_e  cur_s = ST_S0;

  tpf_example dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: in=%b tpf=%b", what, $time, in_burst, tpf);
    end
  endtask

  task automatic do_burst(input logic [3:0] target);
    logic [3:0] todo;
    int unsigned k;
    entry_t e1;
    e1 = flow(cur_s, target);
    todo = in_burst ^ target;
    while (todo != 0) begin
      do k = $urandom_range(3, 0); while (!todo[k]);
      todo[k] = 1'b0;
      in_burst[k] = target[k];
      @(negedge clk);                       // one gate delay later
      check(tpf == tpf_ref(cur_s, in_burst), "TPF one tick after an input change");
      if (!tpf && in_burst == 4'b1000) n_low_1000++;
      if (!tpf && in_burst == 4'b1011) n_low_1011++;
      repeat ($urandom_range(3, 0)) begin
        @(negedge clk);
        check(tpf == tpf_ref(cur_s, in_burst), "TPF steady between changes");
      end
    end
    cur_s = e1.nxt;
    repeat (4) @(negedge clk);
    check(tpf == 1'b1, "TPF high after a complete burst");
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
    @(negedge clk);
    check(tpf == 1'b1, "TPF high after reset");
    for (int n = 0; n < 500; n++)
      do_burst(pick_target(cur_s, in_burst, $urandom));
    check(n_low_1000 > 0, "TPF lowered with c falling first");
    check(n_low_1011 > 0, "TPF lowered with d rising first");
    $display("TPF lowered: %0d times at 1000, %0d times at 1011", n_low_1000, n_low_1011);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
