// Duplication-based concurrent error detection for the example burst-mode
// machine.
//
// An identical, hazard-free copy of the machine runs beside the original and
// a comparator checks their outputs. With no clock the two copies may settle
// at different moments after a burst, so the comparison only counts when it
// is known to be meaningful:
//   G1 = mismatch & in_change   a new burst has started: the outputs of the
//                               previous burst must have settled and agree
//   G2 = mismatch & ~TPF        inside a multi-bit burst nothing may change
//   error = G3 = G1 | G2 | hazard
// TPF is the transition prediction function, in_change the pulse of the
// change detector on the primary inputs, and hazard the output of the hazard
// detector on the original's outputs (the duplicate does not talk to the
// environment and is not watched for hazards).
//
// Timing: one tick of clk = one gate delay. `error` is combinational from
// the flip-flops of the blocks and lasts as long as the condition; it is not
// held. `upset` injects single-event transients into the original only.
module ced_duplication
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
  logic      tpf, in_change, mismatch, hazard;

  abmm_example u_orig (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .upset (upset),
    .out (out), .state ()
  );

  abmm_example u_dup (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .upset ('0),
    .out (dup_out), .state ()
  );

  tpf_example u_tpf (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .tpf (tpf)
  );

  change_detector #(.N(4), .DELAY(1)) u_cdc (
    .clk (clk), .rst_n (rst_n), .sig (in_burst), .change_bit (), .change (in_change)
  );

  hazard_detector #(.N(2)) u_hdc (
    .clk (clk), .rst_n (rst_n), .mon (out), .in_change (in_change),
    .hazard_bit (), .hazard (hazard)
  );

  output_comparator #(.N(2)) u_cmp (
    .a (out), .b (dup_out), .mismatch (mismatch)
  );

  assign flags.g1     = mismatch & in_change;
  assign flags.g2     = mismatch & ~tpf;
  assign flags.hazard = hazard;
  assign flags.error  = flags.g1 | flags.g2 | hazard;

endmodule
