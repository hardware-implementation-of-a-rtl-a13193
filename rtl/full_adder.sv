// full_adder: one-bit full adder, the cell every adder of the filter is built
// from.
//
// The sum is the exclusive-or of the three inputs (odd number of ones); the
// carry is set when two or more inputs are one, formed as (a & b) | (cin &
// (a ^ b)) so that the a ^ b term is shared with the sum. Purely
// combinational. The logic is the truth table of the published design.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;

  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (cin & p);
  end
endmodule
