// inverter: standard two-transistor CMOS inverter, the NOT function of the
// ALU.
//
// The document keeps the ordinary complementary inverter here because it
// restores the full output swing. In the ALU it inverts operand A; the
// choice of operand is this design's, as the document does not say.
//
// Interface: y = NOT a, combinational.
module inverter (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
