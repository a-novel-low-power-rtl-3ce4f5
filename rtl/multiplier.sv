// multiplier: 1-bit multiplier of the ALU, the product A x B.
//
// The document names a multiplier among the ALU's function units but gives
// no circuit for it. For one-bit operands the product is a single partial
// product bit, A x B, with no carry; the ALU takes one output line from
// this unit. It is written here as the partial-product selection "B when A
// is 1, else 0", the simplest circuit for the function, which is this
// design's choice.
//
// Interface: p is a combinational function of a and b.
module multiplier (
  input  logic a,  // multiplicand bit
  input  logic b,  // multiplier bit
  output logic p   // product bit
);

  always_comb p = a ? b : 1'b0;

endmodule
