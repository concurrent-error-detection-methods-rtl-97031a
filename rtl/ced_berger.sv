// Berger code-based concurrent error detection for the example burst-mode
// machine.
//
// The monitored machine is the inverter-free re-encoding of the example, so
// any single fault moves its outputs in one direction only. A Berger code
// generator (itself a burst-mode machine with the same bursts) produces the
// check symbol of the expected outputs, and a Berger checker flags a noncode
// word. The checker is enabled exactly as the comparator of the duplication
// method:
//   G1 = noncode & in_change     a new burst starts: the previous outputs
//                                must form a code word
//   G2 = noncode & ~TPF          inside a multi-bit burst
//   error = G3 = G1 | G2 | hazard
//
// Timing: one tick of clk = one gate delay; flags are combinational from the
// blocks' flip-flops and are not held. `upset` injects transients into the
// inverter-free machine.
module ced_berger
  import ced_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  burst_in_t           in_burst,
  input  logic [INVF_NP-1:0]  upset,
  output abmm_out_t           out,
  output ced_flags_t          flags
);

  logic [1:0] chk;
  logic       tpf, in_change, noncode, hazard;

  abmm_example_invfree u_orig (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .upset (upset),
    .out (out), .state ()
  );

  berger_gen_example u_gen (
    .clk (clk), .rst_n (rst_n), .in_burst (in_burst), .chk (chk), .state ()
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

  berger_checker #(.R(2), .K(2)) u_chk (
    .info (out), .chk (chk), .noncode (noncode)
  );

  assign flags.g1     = noncode & in_change;
  assign flags.g2     = noncode & ~tpf;
  assign flags.hazard = hazard;
  assign flags.error  = flags.g1 | flags.g2 | hazard;

endmodule
