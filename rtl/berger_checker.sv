// Berger code checker.
//
// A Berger code word is R information bits followed by a K-bit check symbol
// equal to the binary complement of the number of 1s among the information
// bits, K = ceil(log2(R+1)). Any unidirectional error (only 0->1 or only
// 1->0 flips, in any number of bits) turns a code word into a noncode word.
// This checker counts the 1s, complements the count and compares it with the
// check symbol; `noncode` is 1 when they differ.
//
// Combinational, single-rail output. A self-checking two-rail checker is the
// usual choice in practice; its internals are not part of this design.
module berger_checker #(
  parameter int unsigned R = 2,
  parameter int unsigned K = $clog2(R + 1)
) (
  input  logic [R-1:0] info,
  input  logic [K-1:0] chk,
  output logic         noncode
);

  logic [K-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < R; i++) ones = ones + K'(info[i]);
  end

  assign noncode = (chk != ~ones);

endmodule
