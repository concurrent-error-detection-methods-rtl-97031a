// Inverter-free implementation of the example burst-mode machine, the
// monitored circuit of Berger code-based concurrent error detection.
//
// A Berger code detects every unidirectional error, so a single fault must
// only be able to push the outputs all 0->1 or all 1->0. That holds when no
// inverter sits inside the logic, only on primary inputs. A Huffman machine
// has no state flip-flops with free complemented outputs, so the states are
// re-encoded to be told apart by 1-bits only (positive identifiers):
//   S0 = {Y3,Y2,Y1,Y0} = 0011  (identified by Y1 Y0)
//   S1 = 0110                  (identified by Y2)
//   S2 = 1001                  (identified by Y3)
// and no state literal is ever complemented. The flow table is the same as
// in abmm_example. The cover below is this design's own, hazard-free for
// every burst of that table:
//   x  = a b' Y2
//   w  = a b' c' d' Y1 Y0  +  a b' d Y2
//   Y3 = c d' + Y3 c + Y3 d'
//   Y2 = a b c' d' + a Y2
//   Y1 = Y1 c' + c' d
//   Y0 = Y0 b' + a'
//
// Timing model: each AND gate (a single literal counts as one) is one tick of
// delay on clk, OR gates are zero delay. `upset` XORs a mask into the AND gate
// outputs (single-event-transient injection, a test access of this design).
// Reset (active low) gives S0 = 0011 with inputs 0000.
module abmm_example_invfree
  import ced_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  burst_in_t           in_burst,
  input  logic [INVF_NP-1:0]  upset,
  output abmm_out_t           out,
  output logic [3:0]          state      // {Y3,Y2,Y1,Y0}
);

  //   0: x  a b' Y2            6: Y2 a b c' d'
  //   1: w  a b' c' d' Y1 Y0   7: Y2 a Y2
  //   2: w  a b' d Y2          8: Y1 Y1 c'
  //   3: Y3 c d'               9: Y1 c' d
  //   4: Y3 Y3 c              10: Y0 Y0 b'
  //   5: Y3 Y3 d'             11: Y0 a'
  function automatic logic [INVF_NP-1:0] and_plane(burst_in_t i, logic [3:0] s);
    and_plane[0]  = i.a & ~i.b & s[2];
    and_plane[1]  = i.a & ~i.b & ~i.c & ~i.d & s[1] & s[0];
    and_plane[2]  = i.a & ~i.b & i.d & s[2];
    and_plane[3]  = i.c & ~i.d;
    and_plane[4]  = s[3] & i.c;
    and_plane[5]  = s[3] & ~i.d;
    and_plane[6]  = i.a & i.b & ~i.c & ~i.d;
    and_plane[7]  = i.a & s[2];
    and_plane[8]  = s[1] & ~i.c;
    and_plane[9]  = ~i.c & i.d;
    and_plane[10] = s[0] & ~i.b;
    and_plane[11] = ~i.a;
  endfunction

  logic [INVF_NP-1:0] p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_q <= and_plane('0, S0_INVF);
    else        p_q <= and_plane(in_burst, state) ^ upset;
  end

  assign out.x    = p_q[0];
  assign out.w    = p_q[1] | p_q[2];
  assign state[3] = p_q[3] | p_q[4] | p_q[5];
  assign state[2] = p_q[6] | p_q[7];
  assign state[1] = p_q[8] | p_q[9];
  assign state[0] = p_q[10] | p_q[11];

endmodule
