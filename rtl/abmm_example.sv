// Example asynchronous burst-mode machine (ABMM), the circuit monitored by
// the concurrent-error-detection methods of this design.
//
// Function: a three-state Huffman machine with inputs {a,b,c,d} and outputs
// {x,w}, following this flow table (entries are next state, then x w):
//
//   state | 0000   1000   1001   1010   1011   1100
//   ------+------------------------------------------
//    S0   | S0,00  S0,01  S0,00  S2,00   -     S1,00
//    S1   | S0,00  S1,10  S1,11   -      -     S1,00
//    S2   |  -     S2,00  S0,00  S2,00  S2,00   -
//
// All bursts are single-bit except the S2 burst 1010 -> 1001 (c falls, d
// rises, in either order); its intermediate columns 1000 and 1011 hold S2.
//
// Structure: a two-level AND-OR network with the two state lines fed back.
// States are encoded S0 = {Y1,Y0} = 00, S1 = 10, S2 = 01. The sum-of-products
// cover is this design's own, chosen so that every burst of the table is
// free of static and dynamic hazards (each 1->1 transition is held by one
// product, every product that changes during a burst changes only once):
//   x  = a b' Y1
//   w  = a b' c' d' Y1' Y0'  +  a b' d Y1
//   Y1 = a b c' d' Y0'       +  a Y1
//   Y0 = a b' c d'  +  a b' c Y0  +  a b' d' Y0
//
// Timing model: each AND gate is one unit delay (a flip-flop on clk, one tick
// per gate delay); the OR gates are zero delay. The outputs and the state
// lines respond one tick after an input change, the feedback loop is one tick
// long. The upset port XORs a mask into the AND-gate outputs for as long as it
// is held, modelling a single-event transient on a gate (a test access of this
// design). Reset (active low, asynchronous) puts the machine in S0 with the
// inputs assumed at 0000.
module abmm_example
  import ced_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  burst_in_t           in_burst,
  input  logic [ORIG_NP-1:0]  upset,
  output abmm_out_t           out,
  output logic [1:0]          state      // {Y1,Y0}
);

  // AND plane: product index -> function
  //   0: x   a b' Y1
  //   1: w   a b' c' d' Y1' Y0'
  //   2: w   a b' d Y1
  //   3: Y1  a b c' d' Y0'
  //   4: Y1  a Y1
  //   5: Y0  a b' c d'
  //   6: Y0  a b' c Y0
  //   7: Y0  a b' d' Y0
  function automatic logic [ORIG_NP-1:0] and_plane(burst_in_t i, logic [1:0] s);
    logic y1, y0;
    y1 = s[1];
    y0 = s[0];
    and_plane[0] = i.a & ~i.b & y1;
    and_plane[1] = i.a & ~i.b & ~i.c & ~i.d & ~y1 & ~y0;
    and_plane[2] = i.a & ~i.b & i.d & y1;
    and_plane[3] = i.a & i.b & ~i.c & ~i.d & ~y0;
    and_plane[4] = i.a & y1;
    and_plane[5] = i.a & ~i.b & i.c & ~i.d;
    and_plane[6] = i.a & ~i.b & i.c & y0;
    and_plane[7] = i.a & ~i.b & ~i.d & y0;
  endfunction

  logic [ORIG_NP-1:0] p_q;   // AND gate outputs, one gate delay after their inputs

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_q <= and_plane('0, S0_CODE);
    else        p_q <= and_plane(in_burst, state) ^ upset;
  end

  // OR plane
  assign out.x    = p_q[0];
  assign out.w    = p_q[1] | p_q[2];
  assign state[1] = p_q[3] | p_q[4];
  assign state[0] = p_q[5] | p_q[6] | p_q[7];

endmodule
