// xnor_gate: four-transistor transfer-gate XNOR of the ALU.
//
// The document's gate is two transistor pairs, both controlled by B, with a
// GND connection and no supply. Its exact wiring is not recoverable as a
// logic form, so this module models it as one selection controlled by B:
// A is passed unchanged when B is 1 and complemented when B is 0, which is
// A XNOR B. The function is the document's; the selection form is this
// design's choice.
//
// Interface: y is a combinational function of a and b.
module xnor_gate (
  input  logic a,
  input  logic b,  // control of both transfer stages
  output logic y   // A XNOR B
);

  always_comb y = b ? a : ~a;

endmodule
