// Output comparator: 1 when the outputs of the monitored machine and of its
// duplicate differ in any bit. Purely combinational (bitwise XOR, then OR);
// when its result counts is decided outside, by the glue gates that combine
// it with the TPF and the change detectors.
module output_comparator #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         mismatch
);

  assign mismatch = |(a ^ b);

endmodule
