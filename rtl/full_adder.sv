// full_adder: 1-bit full adder cell.
//
// The cell from which every multi-bit full adder (MBFA) of the filter bank
// is chained. Purely combinational: sum = a ^ b ^ cin, carry out is the
// majority of the three inputs. In the transistor-level design these cells
// settle asynchronously; here they are ordinary logic.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
