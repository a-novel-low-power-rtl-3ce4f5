// alu_pkg: shared definitions of the 1-bit low-power ALU.
//
// The ALU has eight function units whose results reach an 8-to-1
// multiplexer, and three select lines choose which result drives RESULT.
// The design names the units and the three select lines but gives no code
// table; the codes below follow the order in which the units are drawn in
// the block diagram, top to bottom. That numbering is this design's choice.
package alu_pkg;

  // Function chosen by the three select lines.
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,  // full adder, A + B + CIN (sum on RESULT)
    OP_AND  = 3'd1,  // A AND B
    OP_OR   = 3'd2,  // A OR B
    OP_XNOR = 3'd3,  // A XNOR B
    OP_XOR  = 3'd4,  // A XOR B
    OP_INV  = 3'd5,  // NOT A
    OP_MUL  = 3'd6,  // 1-bit product A x B
    OP_INC  = 3'd7   // incrementor, A + 1 (sum on RESULT)
  } alu_op_e;

  localparam int unsigned NUM_OPS = 8;

endpackage
