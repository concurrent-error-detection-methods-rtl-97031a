// Hazard detection circuit (HDC).
//
// A burst-mode machine may change each output at most once per input burst,
// and only after the burst is complete. A fault in the redundant logic that
// keeps the machine hazard-free can leave every final value right and still
// make an output glitch; the environment would read that glitch as a real
// change. The HDC watches every output for a second transition within one
// burst.
//
// For each monitored output a transition detector (the same delay-and-compare
// structure as the change detection circuit) gives a pulse on every change of
// that output. A feedback loop latches 1 on the first pulse:
//   fb_i <= Change_i | (fb_i & ~in_change)
// and a pulse that arrives while fb_i is already 1 is a second transition:
//   Hazard_i = fb_i & Change_i,   hazard = OR of all Hazard_i.
// `in_change` is the pulse of the change detector on the primary inputs; it
// clears the loops at the start of each new burst (a transition in the same
// tick still sets the loop). Hazard is a pulse, one tick per second
// transition, not a held flag.
//
// Timing: one tick = one gate delay on clk; fb_i is one flip-flop, so the
// AND sees the loop value from before the transition it is looking at.
module hazard_detector #(
  parameter int unsigned N = 2    // monitored outputs
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] mon,
  input  logic         in_change,
  output logic [N-1:0] hazard_bit,
  output logic         hazard
);

  logic [N-1:0] trans;
  logic [N-1:0] fb_q;

  change_detector #(.N(N), .DELAY(1)) u_trans (
    .clk        (clk),
    .rst_n      (rst_n),
    .sig        (mon),
    .change_bit (trans),
    .change     ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fb_q <= '0;
    else        fb_q <= trans | (fb_q & ~{N{in_change}});
  end

  assign hazard_bit = fb_q & trans;
  assign hazard     = |hazard_bit;

endmodule
