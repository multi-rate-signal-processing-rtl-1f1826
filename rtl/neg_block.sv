// neg_block: the negation block N of the filters.
//
// Passes its operand unchanged when neg = 0 and inverts every bit when
// neg = 1 (one's complement, NOT gates selected by the sign bit). The +1 that
// completes a two's complement negation is not made here: the same sign bit
// drives the carry-in of the MBFA that takes this operand.
// Combinational.
module neg_block #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic         neg,
  output logic [W-1:0] y
);

  always_comb y = neg ? ~x : x;

endmodule
