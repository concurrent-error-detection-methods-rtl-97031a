// Change detection circuit (CDC).
//
// For each of the N monitored signals, a delay line produces a delayed copy
// and the signal is compared with it; while the two differ - for DELAY ticks
// after every change - Change_i is 1. The per-bit pulses are ORed into
// `change`. On the primary inputs of a burst-mode machine this gives the short
// pulse after every input change that clears the hazard detector and marks
// the start of a new burst; on the outputs it shows that the machine has
// actually changed.
//
// The original circuit uses an inverter chain as the delay and a
// transmission-gate comparison; here the delay is DELAY flip-flops on the
// time-step clock (one tick per gate delay) and the comparison an XOR.
// Reset (active low) clears the delay line, so the signals should be 0 while
// reset is held.
module change_detector #(
  parameter int unsigned N     = 4,   // monitored signals
  parameter int unsigned DELAY = 1    // pulse width in ticks
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] sig,
  output logic [N-1:0] change_bit,
  output logic         change
);

  logic [N-1:0] dly_q [DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < DELAY; k++) dly_q[k] <= '0;
    end else begin
      dly_q[0] <= sig;
      for (int unsigned k = 1; k < DELAY; k++) dly_q[k] <= dly_q[k-1];
    end
  end

  assign change_bit = sig ^ dly_q[DELAY-1];
  assign change     = |change_bit;

endmodule
