// Transition Prediction Function (TPF) of the example burst-mode machine.
//
// The TPF tells the error checker when the monitored machine is allowed to
// be changing. It is 1 when the inputs seen so far complete a burst (the
// machine is expected to change state and/or outputs) and 0 while a burst
// with more than one bit change is only partly applied. For the example
// machine the only multi-bit burst is S2: 1010 -> 1001; the TPF falls at its
// first bit (intermediate column 1000 or 1011) and rises again when it is
// complete. Like the machine it watches, the TPF is itself a hazard-free
// burst-mode machine.
//
// The TPF flow table has the dummy states S3 and S4 for the two orders of
// the multi-bit burst. S0 and S1, and S2, S3 and S4, never disagree on next
// state or output, so after state reduction one feedback line V (set while
// the machine is in S2 or a dummy state) is enough. This reduction and the
// cover are this design's own:
//   TPF = V' + c d' + c' d
//   V   = a b' c d' + a b' d' V + a b' c V
//
// Timing model as in the rest of the design: each AND gate (a single literal
// counts as one) is one tick of delay on clk, OR gates are zero delay.
// Reset (active low) puts it in S0 with inputs 0000, where TPF = 1.
module tpf_example
  import ced_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  burst_in_t  in_burst,
  output logic       tpf
);

  //   0: V  a b' c d'     3: TPF  V'
  //   1: V  a b' d' V     4: TPF  c d'
  //   2: V  a b' c V      5: TPF  c' d
  function automatic logic [TPF_NP-1:0] and_plane(burst_in_t i, logic v);
    and_plane[0] = i.a & ~i.b & i.c & ~i.d;
    and_plane[1] = i.a & ~i.b & ~i.d & v;
    and_plane[2] = i.a & ~i.b & i.c & v;
    and_plane[3] = ~v;
    and_plane[4] = i.c & ~i.d;
    and_plane[5] = ~i.c & i.d;
  endfunction

  logic [TPF_NP-1:0] p_q;
  logic              v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_q <= and_plane('0, 1'b0);
    else        p_q <= and_plane(in_burst, v);
  end

  assign v   = p_q[0] | p_q[1] | p_q[2];
  assign tpf = p_q[3] | p_q[4] | p_q[5];

endmodule
