// Exhaustive single-event-transient campaign on ced_top, at its only
// configuration.
//
// For every legal burst of the example flow table (both bit orders of the
// multi-bit burst), every AND gate of the monitored machine of each CED
// method, and every tick from three ticks before the burst to the end of its
// settling time, the gate output is flipped for one tick. The inputs then
// follow the error-free state path for three more bursts and the first bit of
// a fourth. Each run is compared with an error-free run of the same
// stimulus.
//
// A run whose monitored outputs behave differently from the error-free run is
// an observable error. Timing alone does not count, since a clockless
// circuit may answer later; per burst interval the settled values and the
// number of edges of each output are compared:
//   functional  - a settled output value is wrong (sampled just before each
//                 following burst starts);
//   hazard only - every settled value is right, but an output made extra
//                 edges (a glitch) or moved before its burst was complete.
// The checks follow the claim that the three methods together detect every
// functional error and every error-induced hazard: each observable error must
// raise the method's error output within the run. Runs without an observable
// error must raise nothing, and the error-free runs must raise nothing at
// all. An error that reaches the outputs only after the first bit of the last
// burst, and is flagged there, is counted as late.
//
// Timing: bits of a burst two ticks apart, six settling ticks per burst.
module tb_ced_campaign;
  import ced_pkg::*;
  import ced_tb_pkg::*;

  localparam int unsigned GAP     = 2;
  localparam int unsigned SETTLE  = 6;
  localparam int unsigned NFOLLOW = 3;
  localparam int unsigned PRE     = 3;
  localparam int unsigned LEN     = 64;
  localparam int unsigned NPOINT  = 7;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  burst_in_t          in_burst = '0;
  logic [ORIG_NP-1:0] upset_dup = '0;
  logic [ORIG_NP-1:0] upset_tt = '0;
  logic [INVF_NP-1:0] upset_bg = '0;
  abmm_out_t          out_dup, out_tt, out_bg;
  ced_flags_t         flags_dup, flags_tt, flags_bg;

  int unsigned checks = 0, failures = 0;

  ced_top dut (.*);

  always #5 clk = ~clk;

  // Stimulus window of one run, tick by tick.
  logic [3:0]  sched   [LEN];
  logic        settled [LEN];
  logic        lastbit [LEN];
  int unsigned win_len, probe_tick, burst_end;

  // Recorded outputs and flags of one run, per method.
  logic [1:0]  tr  [3][LEN];
  logic [1:0]  gtr [3][LEN];
  ced_flags_t  fl  [3][LEN];

  // Results per method.
  int unsigned n_runs [3], n_func [3], n_haz [3], n_quiet [3], n_latent [3];
  int unsigned n_by_g1 [3], n_by_g2 [3], n_by_hdc [3];

  // Stable points of the flow table and the bursts that reach them from reset.
  function automatic sym_state_e point_state(int unsigned p);
    unique case (p)
      0, 1, 2: return ST_S0;
      3, 4, 5: return ST_S1;
      default: return ST_S2;
    endcase
  endfunction

  function automatic logic [3:0] point_col(int unsigned p);
    unique case (p)
      0:       return 4'b0000;
      1:       return 4'b1000;
      2:       return 4'b1001;
      3:       return 4'b1100;
      4:       return 4'b1000;
      5:       return 4'b1001;
      default: return 4'b1010;
    endcase
  endfunction

  function automatic int unsigned prefix_len(int unsigned p);
    unique case (p)
      0:       return 0;
      1:       return 1;
      2, 3, 6: return 2;
      4:       return 3;
      default: return 4;
    endcase
  endfunction

  function automatic logic [3:0] prefix(int unsigned p, int unsigned i);
    logic [3:0] path [4];
    unique case (p)
      2:       path = '{4'b1000, 4'b1001, 4'b0000, 4'b0000};
      6:       path = '{4'b1000, 4'b1010, 4'b0000, 4'b0000};
      default: path = '{4'b1000, 4'b1100, 4'b1000, 4'b1001};
    endcase
    return path[i];
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Append one burst to the schedule: bits flip GAP ticks apart, in
  // ascending (order 0) or descending (order 1) bit index, then SETTLE ticks.
  function automatic void add_burst(ref int unsigned k, ref logic [3:0] cur,
                                    input logic [3:0] target, input bit order);
    logic [3:0] todo;
    int unsigned idx;
    todo = cur ^ target;
    while (todo != '0) begin
      for (int j = 0; j < 4; j++) begin
        idx = order ? 3 - j : j;
        if (todo[idx]) break;
      end
      todo[idx] = 1'b0;
      cur[idx]  = target[idx];
      lastbit[k] = (todo == '0);
      for (int g = 0; g < GAP; g++) begin
        sched[k] = cur;
        k++;
      end
    end
    for (int g = 0; g + 1 < SETTLE; g++) begin
      sched[k] = cur;
      k++;
    end
    sched[k]   = cur;
    settled[k] = 1'b1;
    k++;
  endfunction

  // Build the window for one scenario: the burst under test, NFOLLOW bursts
  // along the error-free path, and the first bit of one more.
  function automatic void build(int unsigned p, logic [3:0] target, bit order);
    int unsigned k;
    logic [3:0]  cur, t, probe;
    sym_state_e  s;
    for (int i = 0; i < LEN; i++) begin
      sched[i]   = '0;
      settled[i] = 1'b0;
      lastbit[i] = 1'b0;
    end
    cur = point_col(p);
    s   = point_state(p);
    k   = 0;
    for (int i = 0; i < PRE; i++) begin
      sched[k] = cur;
      k++;
    end
    add_burst(k, cur, target, order);
    burst_end = k;
    s = flow(s, target).nxt;
    for (int f = 0; f < NFOLLOW; f++) begin
      t = pick_target(s, cur, f);
      add_burst(k, cur, t, 1'b0);
      s = flow(s, t).nxt;
    end
    t     = pick_target(s, cur, NFOLLOW) ^ cur;
    probe = cur;
    for (int j = 0; j < 4; j++)
      if (t[j]) begin
        probe[j] = ~probe[j];
        break;
      end
    probe_tick = k;
    settled[k] = 1'b1;
    for (int g = 0; g < 3; g++) begin
      sched[k] = probe;
      k++;
    end
    win_len = k;
  endfunction

  task automatic apply_plain(input logic [3:0] target);
    logic [3:0] todo;
    todo = in_burst ^ target;
    for (int j = 0; j < 4; j++)
      if (todo[j]) begin
        @(negedge clk);
        in_burst[j] = target[j];
      end
    repeat (SETTLE) @(negedge clk);
  endtask

  // One run: reset, walk to the start point, then play the window with an
  // optional one-tick upset of gate `prod` of method `m` at window tick `tinj`.
  task automatic run(input int unsigned p, input bit inject, input int unsigned m,
                     input int unsigned prod, input int unsigned tinj);
    @(negedge clk);
    rst_n     = 1'b0;
    in_burst  = '0;
    upset_dup = '0;
    upset_tt  = '0;
    upset_bg  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < prefix_len(p); i++) apply_plain(prefix(p, i));
    for (int k = 0; k < win_len; k++) begin
      @(negedge clk);
      in_burst  = sched[k];
      upset_dup = '0;
      upset_tt  = '0;
      upset_bg  = '0;
      if (inject && k == tinj) begin
        if (m == 0) upset_dup[prod] = 1'b1;
        if (m == 1) upset_tt[prod]  = 1'b1;
        if (m == 2) upset_bg[prod]  = 1'b1;
      end
      #1;
      tr[0][k] = out_dup;
      tr[1][k] = out_tt;
      tr[2][k] = out_bg;
      fl[0][k] = flags_dup;
      fl[1][k] = flags_tt;
      fl[2][k] = flags_bg;
    end
    @(negedge clk);
    upset_dup = '0;
    upset_tt  = '0;
    upset_bg  = '0;
  endtask

  // Number of edges of output bit b of method m in ticks (from, to], in the
  // last run (golden = 0) or in the error-free run (golden = 1).
  function automatic int unsigned edges(int unsigned m, int unsigned b, int unsigned from,
                                        int unsigned to, bit golden);
    int unsigned n = 0;
    for (int unsigned k = from + 1; k <= to; k++)
      if (golden ? (gtr[m][k][b] != gtr[m][k-1][b]) : (tr[m][k][b] != tr[m][k-1][b])) n++;
    return n;
  endfunction

  // Classify the last run of method m against the error-free run. Timing is
  // not compared: a clockless circuit may answer later. Per burst interval
  // (ending at a settled tick) the settled value and the number of edges of
  // each output are compared, and no output may move before the last bit of
  // the burst is in.
  task automatic classify(input int unsigned m, input string tag);
    bit diff, diff_all, func, det, g1, g2, hz, early;
    int unsigned from;
    diff     = 1'b0;
    diff_all = 1'b0;
    func = 1'b0;
    det  = 1'b0;
    g1   = 1'b0;
    g2   = 1'b0;
    hz   = 1'b0;
    from = 0;
    early = 1'b1;
    for (int unsigned k = 0; k < win_len; k++) begin
      // before the last bit of a burst is in, outputs must hold
      if (early && k <= probe_tick && tr[m][k] != gtr[m][k]) begin
        diff     = 1'b1;
        diff_all = 1'b1;
      end
      if (lastbit[k]) early = 1'b0;
      if (settled[k] || k == win_len - 1) begin
        for (int unsigned b = 0; b < 2; b++)
          if (edges(m, b, from, k, 1'b0) != edges(m, b, from, k, 1'b1)) begin
            if (k <= probe_tick) diff = 1'b1;
            diff_all = 1'b1;
          end
        if (settled[k] && tr[m][k] != gtr[m][k]) begin
          func     = 1'b1;
          diff     = 1'b1;
          diff_all = 1'b1;
        end
        from  = k;
        early = 1'b1;
      end
    end
    for (int k = 0; k < win_len; k++) begin
      det |= fl[m][k].error;
      g1  |= fl[m][k].g1;
      g2  |= fl[m][k].g2;
      hz  |= fl[m][k].hazard;
    end
    n_runs[m]++;
    if (func)           n_func[m]++;
    else if (diff)      n_haz[m]++;
    else                n_quiet[m]++;
    if (!diff && det)   n_latent[m]++;
    if (g1) n_by_g1[m]++;
    if (g2) n_by_g2[m]++;
    if (hz) n_by_hdc[m]++;
    check(!diff || det, {"observable error detected: ", tag});
    check(diff_all || !det, {"no flag without an output effect: ", tag});
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  tgts [4];
    int unsigned ntg, np;
    bit          seen;
    string       tag;
    n_runs = '{0, 0, 0};   n_func = '{0, 0, 0};  n_haz = '{0, 0, 0};
    n_quiet = '{0, 0, 0};  n_latent = '{0, 0, 0};
    n_by_g1 = '{0, 0, 0};  n_by_g2 = '{0, 0, 0};  n_by_hdc = '{0, 0, 0};

    for (int unsigned p = 0; p < NPOINT; p++) begin
      // legal targets from this stable point
      ntg = 0;
      for (int unsigned r = 0; r < 4; r++) begin
        seen = 1'b0;
        for (int i = 0; i < ntg; i++) if (tgts[i] == pick_target(point_state(p), point_col(p), r)) seen = 1'b1;
        if (!seen) begin
          tgts[ntg] = pick_target(point_state(p), point_col(p), r);
          ntg++;
        end
      end
      for (int i = 0; i < ntg; i++)
        for (int unsigned order = 0; order < 2; order++) begin
          if (order == 1 && $countones(point_col(p) ^ tgts[i]) < 2) continue;
          build(p, tgts[i], order[0]);
          run(p, 1'b0, 0, 0, 0);
          for (int m = 0; m < 3; m++) begin
            for (int k = 0; k < win_len; k++) gtr[m][k] = tr[m][k];
            seen = 1'b0;
            for (int k = 0; k < win_len; k++) seen |= fl[m][k].error;
            check(!seen, "error-free run raises no flag");
          end
          check(gtr[0][burst_end - 1] == flow(flow(point_state(p), tgts[i]).nxt, tgts[i]).xw,
                "error-free run settles to the flow table");
          for (int unsigned m = 0; m < 3; m++) begin
            np = (m == 2) ? INVF_NP : ORIG_NP;
            for (int unsigned prod = 0; prod < np; prod++)
              for (int unsigned t = 0; t < burst_end; t++) begin
                run(p, 1'b1, m, prod, t);
                tag = $sformatf("method %0d point %0d target %b order %0d gate %0d tick %0d",
                                m, p, tgts[i], order, prod, t);
                classify(m, tag);
              end
          end
        end
    end

    for (int m = 0; m < 3; m++) begin
      $display("method %0d: runs=%0d functional=%0d hazard-only=%0d late=%0d no-effect=%0d; flagged by G1=%0d G2=%0d HDC=%0d",
               m, n_runs[m], n_func[m], n_haz[m], n_latent[m], n_quiet[m],
               n_by_g1[m], n_by_g2[m], n_by_hdc[m]);
      $display("method %0d: hazard-only errors = %0d.%01d%% of all injected upsets, %0d.%01d%% of observable ones", m,
               (1000 * n_haz[m] / n_runs[m]) / 10, (1000 * n_haz[m] / n_runs[m]) % 10,
               (1000 * n_haz[m] / (n_haz[m] + n_func[m])) / 10,
               (1000 * n_haz[m] / (n_haz[m] + n_func[m])) % 10);
      // every mechanism must have happened
      check(n_func[m] > 0,   "functional errors occurred");
      check(n_haz[m] > 0,    "hazard-only errors occurred");
      check(n_by_g1[m] > 0,  "G1 fired");
      check(n_by_g2[m] > 0,  "G2 fired");
      check(n_by_hdc[m] > 0, "hazard detector fired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
