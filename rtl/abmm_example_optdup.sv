// Optimized duplicate of the example burst-mode machine, for
// Transition-Triggered concurrent error detection.
//
// The duplicate never talks to the environment, so it may have hazards and
// needs none of the redundant products of the original. Its flow table only
// defines the entries where a burst is complete and the next state or an
// output changes; the intermediate columns of a multi-bit burst (S2 at 1000
// and 1011) are don't-cares. To keep hazards off the fed-back state, each
// state line passes through a multiplexer that selects the freshly computed
// next state only when `load` is 1 and otherwise holds the current state.
// The parent drives `load` from the TPF and the input change detector, so the
// state moves only after a burst is complete.
//
// Cover (this design's own, using the don't-cares; states S0=00, S1=10,
// S2=01 on {Y1,Y0} as in the original):
//   x  = a b' Y1          w  = a b' c' d' Y1' + d Y1
//   Y1 = a b + a Y1       Y0 = c d'
//
// Timing: AND gates are one tick of delay on clk, OR gates and the
// multiplexer are zero delay; the held state is one flip-flop per state line.
// Reset (active low) gives S0 with inputs 0000.
module abmm_example_optdup
  import ced_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  burst_in_t  in_burst,
  input  logic       load,       // 1: take next state, 0: hold
  output abmm_out_t  out,
  output logic [1:0] state       // {Y1,Y0} after the multiplexers
);

  //   0: x  a b' Y1           3: Y1 a b
  //   1: w  a b' c' d' Y1'    4: Y1 a Y1
  //   2: w  d Y1              5: Y0 c d'
  function automatic logic [OPTD_NP-1:0] and_plane(burst_in_t i, logic [1:0] s);
    and_plane[0] = i.a & ~i.b & s[1];
    and_plane[1] = i.a & ~i.b & ~i.c & ~i.d & ~s[1];
    and_plane[2] = i.d & s[1];
    and_plane[3] = i.a & i.b;
    and_plane[4] = i.a & s[1];
    and_plane[5] = i.c & ~i.d;
  endfunction

  logic [OPTD_NP-1:0] p_q;
  logic [1:0]         next_state;
  logic [1:0]         held_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q    <= and_plane('0, S0_CODE);
      held_q <= S0_CODE;
    end else begin
      p_q    <= and_plane(in_burst, state);
      held_q <= state;
    end
  end

  assign next_state[1] = p_q[3] | p_q[4];
  assign next_state[0] = p_q[5];
  assign state         = load ? next_state : held_q;

  assign out.x = p_q[0];
  assign out.w = p_q[1] | p_q[2];

endmodule
