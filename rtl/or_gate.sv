// or_gate: two-transistor transfer-gate OR of the ALU.
//
// The gate is one pass-transistor 2-to-1 selection whose select line is
// tied to input IN1. When IN1 is 1 the selection passes IN1 itself, a 1;
// when IN1 is 0 it passes IN0. The output is therefore IN0 OR IN1 without
// any supply or ground connection. This follows the document; the
// electrical effect of the missing supply is not modelled.
//
// Interface: out is a combinational function of in0 and in1.
module or_gate (
  input  logic in0,  // IN0
  input  logic in1,  // IN1, also drives the select line
  output logic out   // IN0 OR IN1
);

  always_comb out = in1 ? in1 : in0;

endmodule
