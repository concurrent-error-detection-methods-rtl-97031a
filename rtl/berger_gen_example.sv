// Berger code generator for the example burst-mode machine.
//
// The generator is a burst-mode machine of its own with the same states and
// bursts as the monitored machine, but its outputs are the Berger check
// symbol {k1,k0}: the binary complement of the number of 1s in {x,w}
// (no 1s -> 11, one 1 -> 10, two 1s -> 01). Because it has the same input
// bursts and state transitions as the original, it inherits its hazard-free
// realizability. It may use complemented state lines.
//
// States and next-state logic are those of abmm_example (S0=00, S1=10,
// S2=01 on {Y1,Y0}). The check-symbol cover is this design's own and is
// hazard-free for every burst of the table:
//   k0 = a' + b + c + d + Y0       (0 only where exactly one of x,w is 1)
//   k1 = a' + b + c + d' + Y1'     (0 only where x = w = 1, S1 at 1001)
//
// Timing model: each AND gate (a single literal counts as one) is one tick of
// delay on clk, OR gates are zero delay, so the check symbol appears in the
// same tick as the outputs of the monitored machine. Reset (active low) gives
// S0 with inputs 0000, check symbol 11.
module berger_gen_example
  import ced_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  burst_in_t  in_burst,
  output logic [1:0] chk,        // {k1,k0}
  output logic [1:0] state       // {Y1,Y0}
);

  //   0..4 : k0 terms a', b, c, d, Y0
  //   5..9 : k1 terms a', b, c, d', Y1'
  //  10,11 : Y1 terms a b c' d' Y0', a Y1
  //  12..14: Y0 terms a b' c d', a b' c Y0, a b' d' Y0
  function automatic logic [BGEN_NP-1:0] and_plane(burst_in_t i, logic [1:0] s);
    and_plane[0]  = ~i.a;
    and_plane[1]  = i.b;
    and_plane[2]  = i.c;
    and_plane[3]  = i.d;
    and_plane[4]  = s[0];
    and_plane[5]  = ~i.a;
    and_plane[6]  = i.b;
    and_plane[7]  = i.c;
    and_plane[8]  = ~i.d;
    and_plane[9]  = ~s[1];
    and_plane[10] = i.a & i.b & ~i.c & ~i.d & ~s[0];
    and_plane[11] = i.a & s[1];
    and_plane[12] = i.a & ~i.b & i.c & ~i.d;
    and_plane[13] = i.a & ~i.b & i.c & s[0];
    and_plane[14] = i.a & ~i.b & ~i.d & s[0];
  endfunction

  logic [BGEN_NP-1:0] p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_q <= and_plane('0, S0_CODE);
    else        p_q <= and_plane(in_burst, state);
  end

  assign chk[0]   = |p_q[4:0];
  assign chk[1]   = |p_q[9:5];
  assign state[1] = p_q[10] | p_q[11];
  assign state[0] = p_q[12] | p_q[13] | p_q[14];

endmodule
