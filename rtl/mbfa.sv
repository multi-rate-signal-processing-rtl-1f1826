// mbfa: multi-bit full adder (MBFA), a ripple chain of 1-bit full adders.
//
// s = a + b + cin, modulo 2^W, in two's complement. The carry-in of the least
// significant cell is brought out: the filters feed it with a sign bit B so
// that, together with a negation block that inverts the other operand, the
// MBFA subtracts (a + ~x + 1 = a - x). The carry out of the top cell is
// dropped; every sum in the filters is sized so that it cannot overflow.
// Combinational, no clock: the ripple settles within the cycle.
module mbfa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_cell
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

endmodule
