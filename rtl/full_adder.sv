// full_adder: 1-bit full adder of the ALU, A + B + CIN.
//
// The ALU uses an existing transfer-gate full adder built from
// multiplexers, which is not drawn in detail. This module takes the usual
// multiplexer form of such an adder: the propagate signal p = A xor B
// chooses, for the sum, between CIN and its complement, and for the carry,
// between CIN (propagate) and A (when A == B the carry equals both). The
// multiplexer form is this design's choice; the function is the document's.
//
// Interface: sum and cout are combinational functions of a, b and cin.
// The sum goes to the ALU's result multiplexer, cout to the CARRYOUT pin.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;  // propagate: A differs from B

  always_comb begin
    p    = a ^ b;
    sum  = p ? ~cin : cin;
    cout = p ? cin : a;
  end

endmodule
