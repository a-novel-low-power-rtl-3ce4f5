// and_gate: two-transistor transfer-gate AND of the ALU.
//
// The gate is one pass-transistor 2-to-1 selection whose select line is
// tied to input IN0. When IN0 is 1 the selection passes IN1; when IN0 is 0
// it passes IN0 itself, which is 0. The output is therefore IN0 AND IN1
// without any supply or ground connection. This follows the document; the
// electrical effect of having no supply (weaker levels) is not modelled in
// a two-valued RTL description.
//
// Interface: out is a combinational function of in0 and in1.
module and_gate (
  input  logic in0,  // IN0, also drives the select line
  input  logic in1,  // IN1
  output logic out   // IN0 AND IN1
);

  always_comb out = in0 ? in1 : in0;

endmodule
