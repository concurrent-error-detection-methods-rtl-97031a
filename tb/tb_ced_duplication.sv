// Testbench for ced_duplication (duplication-based concurrent error detection).
//
// 1. Error-free run: a random walk over the legal bursts of the example flow
//    table, bits of multi-bit bursts in random order with random gaps. The
//    outputs must follow the table and the error output must never rise
//    (no false alarm from the asynchronous checking).
// 2. Hazard-only error: in S0 at 1000 the AND gate that alone holds w is
//    upset for one tick. The final values stay right; only the hazard
//    detector may flag it, within two ticks.
// 3. Latent functional error: in S0 at 1000 a state gate is upset, the
//    machine settles in a wrong state between bursts. The checker stays
//    silent until the next input change; then g1 flags it in that tick.
//    (The hazard detector may flag it earlier, when the wrong change hits an
//    output that already changed in this burst.)
// 4. Error inside a multi-bit burst: in S2 after the first bit of the burst
//    1010 -> 1001, a gate upset changes an output while the TPF is low;
//    g2 flags it.
// Each scenario runs several times from random points of the walk, with a
// reset between scenarios to bring the reference model back in step.
module tb_ced_duplication;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  localparam int unsigned NP    = ORIG_NP;
  localparam int unsigned IDX_W = 1;       // AND gate of w active in S0 at 1000
  localparam int unsigned IDX_L = 3;  // state gate, upset in S0 at 1000
  localparam int unsigned IDX_B = 7;  // gate upset inside the S2 burst

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  burst_in_t     in_burst = '0;
  logic [NP-1:0] upset = '0;
  abmm_out_t     out;
  ced_flags_t    flags;

  int unsigned checks = 0, failures = 0;
  int unsigned n_g1 = 0, n_g2 = 0, n_hz = 0, n_err = 0;
  sym_state_e  cur_s = ST_S0;

  ced_duplication dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk)
    if (rst_n && $test$plusargs("trace") && flags != 0)
      $display("%0t in=%b out=%b flags=%b", $time, in_burst, out, flags);

  // count flagged ticks
  always @(negedge clk) if (rst_n) begin
    if (flags.g1)     n_g1++;
    if (flags.g2)     n_g2++;
    if (flags.hazard) n_hz++;
    if (flags.error)  n_err++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: in=%b out=%b flags=%b", what, $time, in_burst, out, flags);
    end
  endtask

  task automatic do_burst(input logic [3:0] target, input logic expect_clean);
    logic [3:0] todo;
    int unsigned k, e0;
    entry_t e1;
    e1 = flow(cur_s, target);
    e0 = n_err;
    todo = in_burst ^ target;
    while (todo != 0) begin
      do k = $urandom_range(3, 0); while (!todo[k]);
      todo[k] = 1'b0;
      in_burst[k] = target[k];
      repeat ($urandom_range(3, 1)) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    if (expect_clean) begin
      check(out == flow(e1.nxt, target).xw, "outputs follow the flow table");
      check(n_err == e0, "no false alarm");
    end
    cur_s = e1.nxt;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_burst = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cur_s = ST_S0;
    repeat (2) @(negedge clk);
  endtask

  task automatic walk_to(input sym_state_e s, input logic [3:0] col, input int unsigned extra);
    for (int n = 0; n < extra; n++) do_burst(pick_target(cur_s, in_burst, $urandom), 1'b1);
    while (!(cur_s == s && in_burst == col))
      do_burst(pick_target(cur_s, in_burst, $urandom), 1'b1);
  endtask

  task automatic pulse_upset(input int unsigned idx);
    upset[idx] = 1'b1;
    @(negedge clk);
    upset[idx] = 1'b0;
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned h0, e0, f0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // 1. error-free
    for (int n = 0; n < 300; n++) do_burst(pick_target(cur_s, in_burst, $urandom), 1'b1);
    check(n_err == 0 && n_g1 == 0 && n_g2 == 0 && n_hz == 0, "error-free run raised no flag");

    for (int rep = 0; rep < 5; rep++) begin
      // 2. hazard-only error
      walk_to(ST_S0, 4'b1000, $urandom_range(5, 0));
      h0 = n_hz; e0 = n_err; f0 = n_g1 + n_g2;
      pulse_upset(IDX_W);
      repeat (3) @(negedge clk);
      check(n_hz > h0 && n_err > e0, "hazard-only error flagged by the hazard detector");
      check(n_g1 + n_g2 == f0, "hazard-only error not seen by the checker");
      check(out == 2'b01, "hazard leaves the final output right");
      do_reset();

      // 3. latent functional error, found when the next burst starts
      walk_to(ST_S0, 4'b1000, $urandom_range(5, 0));
      f0 = n_g1 + n_g2;
      pulse_upset(IDX_L);
      repeat (5) @(negedge clk);
      check(n_g1 + n_g2 == f0, "checker silent between bursts");
      check(out != 2'b01, "latent error changed the outputs");
      f0 = n_g1;
      in_burst.d = 1'b1;                       // next burst starts
      #1;
      check(flags.g1 && flags.error, "flagged in the tick of the input change");
      @(negedge clk);
      check(n_g1 > f0, "g1 counted the latent error");
      repeat (4) @(negedge clk);
      do_reset();

      // 4. error inside the multi-bit burst of S2
      walk_to(ST_S2, 4'b1010, $urandom_range(5, 0));
      f0 = n_g2;
      in_burst.c = 1'b0;                       // first bit: TPF goes low
      repeat (3) @(negedge clk);
      check(flags.error == 1'b0, "no flag after the first bit");
      pulse_upset(IDX_B);
      repeat (3) @(negedge clk);
      check(n_g2 > f0, "g2 flagged an output change inside the burst");
      do_reset();
    end
    $display("flagged ticks: G1=%0d G2=%0d hazard=%0d error=%0d", n_g1, n_g2, n_hz, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
