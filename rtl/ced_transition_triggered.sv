// Transition-Triggered concurrent error detection for the example
// burst-mode machine.
//
// Like duplication, but the copy is an optimized duplicate without the
// hazard-removing redundancy and with don't-cares inside multi-bit bursts.
// Its state lines pass through multiplexers that take the next state only
// when load = TPF & ~in_change, i.e. once a burst is complete. A second
// change detector on the original's outputs shows when they actually change,
// which the TPF says they may:
//   G1 = out_change & ~TPF               an output moved inside a burst
//   G2 = mismatch & in_change & TPF      a new burst starts after a complete
//                                        one: both copies must agree
//   error = G3 = G1 | G2 | hazard
// The TPF term in G2 keeps the duplicate's don't-care outputs inside a
// multi-bit burst out of the comparison; this qualification is this design's
// reading of "the comparator result is needed only after a burst is
// complete".
//
// Timing: one tick of clk = one gate delay; flags are combinational from the
// blocks' flip-flops and are not held. `upset` injects transients into the
// original only.
module ced_transition_triggered
  import ced_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  burst_in_t           in_burst,
  input  logic [ORIG_NP-1:0]  upset,
  output abmm_out_t           out,
  output ced_flags_t          flags
);

  abmm_out_t dup_out;
  logic      tpf, in_change, out_change, mismatch, hazard, load;

  abmm_example u_orig (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .upset (upset),
    .out (out), .state ()
  );

  assign load = tpf & ~in_change;

  abmm_example_optdup u_dup (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .load (load),
    .out (dup_out), .state ()
  );

  tpf_example u_tpf (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .tpf (tpf)
  );

  change_detector #(.N(4), .DELAY(1)) u_cdc_in (
    .clk (clk), .rst_n (rst_n), .sig (in_burst), .change_bit (), .change (in_change)
  );

  change_detector #(.N(2), .DELAY(1)) u_cdc_out (
    .clk (clk), .rst_n (rst_n), .sig (out), .change_bit (), .change (out_change)
  );

  hazard_detector #(.N(2)) u_hdc (
    .clk (clk), .rst_n (rst_n), .mon (out), .in_change (in_change),
    .hazard_bit (), .hazard (hazard)
  );

  output_comparator #(.N(2)) u_cmp (
    .a (out), .b (dup_out), .mismatch (mismatch)
  );

  assign flags.g1     = out_change & ~tpf;
  assign flags.g2     = mismatch & in_change & tpf;
  assign flags.hazard = hazard;
  assign flags.error  = flags.g1 | flags.g2 | hazard;

endmodule
