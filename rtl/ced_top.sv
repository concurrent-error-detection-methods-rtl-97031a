// Top level: the three concurrent-error-detection methods for the example
// burst-mode machine, side by side.
//
// All three watch the same primary inputs {a,b,c,d}; each has its own copy of
// the monitored machine, its own fault-injection port and its own outputs
// and flags:
//   dup : duplication-based CED (identical hazard-free duplicate)
//   tt  : transition-triggered CED (optimized duplicate with state muxes)
//   bg  : Berger code-based CED (inverter-free machine, code generator,
//         checker)
// Each flags bundle is {G1, G2, hazard, error}; error is the method's error
// indication. Timing: clk is the time-step clock of the delay model (one tick
// per gate delay); the environment must apply input bursts in fundamental
// mode, i.e. wait until the machines have settled (a few ticks) before the
// next burst. Reset is active low and gives state S0 with inputs 0000.
module ced_top
  import ced_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  burst_in_t           in_burst,
  input  logic [ORIG_NP-1:0]  upset_dup,
  input  logic [ORIG_NP-1:0]  upset_tt,
  input  logic [INVF_NP-1:0]  upset_bg,
  output abmm_out_t           out_dup,
  output abmm_out_t           out_tt,
  output abmm_out_t           out_bg,
  output ced_flags_t          flags_dup,
  output ced_flags_t          flags_tt,
  output ced_flags_t          flags_bg
);

  ced_duplication u_dup (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .upset (upset_dup),
    .out (out_dup), .flags (flags_dup)
  );

  ced_transition_triggered u_tt (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .upset (upset_tt),
    .out (out_tt), .flags (flags_tt)
  );

  ced_berger u_bg (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .upset (upset_bg),
    .out (out_bg), .flags (flags_bg)
  );

endmodule
