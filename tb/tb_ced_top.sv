// End-to-end testbench for ced_top, at its only configuration (the top has
// no parameters). The three CED methods watch the same input bursts.
//
// Phase 1, error-free: a random walk over all legal bursts of the example
// flow table (random bit order and gaps). All three machines must follow the
// table and no method may raise any flag.
// Phase 2, injected single-event transients, the same upset scenario applied
// to the machine of every method at once:
//   hazard-only glitch on w            -> hazard detector of every method
//   latent wrong state between bursts  -> dup G1, tt G2, Berger G1 at the
//                                         next input change
//   output change inside the burst     -> dup G2, tt G1, Berger G2
// Every mechanism of the design is counted and must have happened at least
// once: single- and multi-bit bursts (both bit orders), the TPF going low,
// the optimized duplicate holding its state through the multiplexers, every
// state visited, each flag of each method, and a Berger noncode word.
module tb_ced_top;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  burst_in_t          in_burst = '0;
  logic [ORIG_NP-1:0] upset_dup = '0;
  logic [ORIG_NP-1:0] upset_tt = '0;
  logic [INVF_NP-1:0] upset_bg = '0;
  abmm_out_t          out_dup, out_tt, out_bg;
  ced_flags_t         flags_dup, flags_tt, flags_bg;

  int unsigned checks = 0, failures = 0;
  sym_state_e  cur_s = ST_S0;

  // mechanism counters
  int unsigned m_single = 0, m_multi_cfirst = 0, m_multi_dfirst = 0;
  int unsigned m_tpf_low = 0, m_mux_hold = 0, m_noncode = 0;
  int unsigned m_visit [3];
  int unsigned f_cnt [3][4];      // [method][g1,g2,hazard,error]

  ced_top dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    if (!dut.u_dup.tpf)            m_tpf_low++;
    if (!dut.u_tt.load)            m_mux_hold++;
    if (dut.u_bg.noncode)          m_noncode++;
    for (int b = 0; b < 4; b++) begin
      if (flags_dup[3-b]) f_cnt[0][b]++;
      if (flags_tt[3-b])  f_cnt[1][b]++;
      if (flags_bg[3-b])  f_cnt[2][b]++;
    end
  end

  function automatic int unsigned total_flags();
    int unsigned t = 0;
    for (int m = 0; m < 3; m++) for (int b = 0; b < 4; b++) t += f_cnt[m][b];
    return t;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: in=%b out=%b/%b/%b flags=%b/%b/%b", what, $time, in_burst,
               out_dup, out_tt, out_bg, flags_dup, flags_tt, flags_bg);
    end
  endtask

  task automatic do_burst(input logic [3:0] target, input logic expect_clean);
    logic [3:0] todo;
    logic [1:0] want;
    int unsigned k, f0, nb;
    entry_t e1;
    e1 = flow(cur_s, target);
    want = flow(e1.nxt, target).xw;
    f0 = total_flags();
    todo = in_burst ^ target;
    nb = $countones(todo);
    if (nb == 1) m_single++;
    while (todo != 0) begin
      do k = $urandom_range(3, 0); while (!todo[k]);
      if (nb > 1 && todo == (in_burst ^ target)) begin
        if (k == 1) m_multi_cfirst++;
        if (k == 0) m_multi_dfirst++;
      end
      todo[k] = 1'b0;
      in_burst[k] = target[k];
      repeat ($urandom_range(3, 1)) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    if (expect_clean) begin
      check(out_dup == want && out_tt == want && out_bg == want, "outputs follow the flow table");
      check(total_flags() == f0, "no false alarm");
    end
    cur_s = e1.nxt;
    m_visit[cur_s]++;
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

  task automatic pulse(input int unsigned i_orig, input int unsigned i_invf);
    upset_dup[i_orig] = 1'b1;
    upset_tt[i_orig]  = 1'b1;
    upset_bg[i_invf]  = 1'b1;
    @(negedge clk);
    upset_dup = '0;
    upset_tt  = '0;
    upset_bg  = '0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned h [3], g [3][2];
    m_visit = '{0, 0, 0};
    for (int m = 0; m < 3; m++) f_cnt[m] = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // Phase 1
    for (int n = 0; n < 600; n++) do_burst(pick_target(cur_s, in_burst, $urandom), 1'b1);
    check(total_flags() == 0, "error-free run raised no flag");

    // Phase 2
    for (int rep = 0; rep < 8; rep++) begin
      // hazard-only
      walk_to(ST_S0, 4'b1000, $urandom_range(4, 0));
      for (int m = 0; m < 3; m++) h[m] = f_cnt[m][2];
      pulse(1, 1);
      repeat (3) @(negedge clk);
      for (int m = 0; m < 3; m++) check(f_cnt[m][2] > h[m], "hazard detector caught the glitch");
      check(out_dup == 2'b01 && out_tt == 2'b01 && out_bg == 2'b01, "glitch left outputs right");
      do_reset();

      // latent wrong state
      walk_to(ST_S0, 4'b1000, $urandom_range(4, 0));
      pulse(3, 6);
      repeat (5) @(negedge clk);
      for (int m = 0; m < 3; m++) begin g[m][0] = f_cnt[m][0]; g[m][1] = f_cnt[m][1]; end
      in_burst.d = 1'b1;
      #1;
      check(flags_dup.g1 && flags_tt.g2 && flags_bg.g1, "latent error flagged at the next input change");
      repeat (5) @(negedge clk);
      do_reset();

      // output change inside the multi-bit burst
      walk_to(ST_S2, 4'b1010, $urandom_range(4, 0));
      for (int m = 0; m < 3; m++) begin g[m][0] = f_cnt[m][0]; g[m][1] = f_cnt[m][1]; end
      in_burst.c = 1'b0;
      repeat (3) @(negedge clk);
      pulse(7, 8);
      repeat (3) @(negedge clk);
      check(f_cnt[0][1] > g[0][1], "duplication G2 inside the burst");
      check(f_cnt[1][0] > g[1][0], "transition-triggered G1 inside the burst");
      check(f_cnt[2][1] > g[2][1], "Berger G2 inside the burst");
      do_reset();
    end

    // every mechanism must have happened
    check(m_single > 0,        "single-bit bursts");
    check(m_multi_cfirst > 0,  "multi-bit burst, c first");
    check(m_multi_dfirst > 0,  "multi-bit burst, d first");
    check(m_tpf_low > 0,       "TPF lowered");
    check(m_mux_hold > 0,      "duplicate state held by the multiplexers");
    check(m_noncode > 0,       "Berger noncode word");
    for (int s = 0; s < 3; s++) check(m_visit[s] > 0, "state visited");
    for (int m = 0; m < 3; m++) for (int b = 0; b < 4; b++) check(f_cnt[m][b] > 0, "flag raised");
    $display("bursts: single=%0d multi(c first)=%0d multi(d first)=%0d; TPF low ticks=%0d mux hold ticks=%0d noncode ticks=%0d",
             m_single, m_multi_cfirst, m_multi_dfirst, m_tpf_low, m_mux_hold, m_noncode);
    $display("visits S0/S1/S2 = %0d/%0d/%0d", m_visit[0], m_visit[1], m_visit[2]);
    for (int m = 0; m < 3; m++)
      $display("method %0d flagged ticks G1=%0d G2=%0d hazard=%0d error=%0d", m,
               f_cnt[m][0], f_cnt[m][1], f_cnt[m][2], f_cnt[m][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
