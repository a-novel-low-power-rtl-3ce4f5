// alu1: low-power 1-bit ALU built from transfer-gate function units.
//
// Eight function units work on operands A, B and carry-in CIN at the same
// time: a full adder (A + B + CIN), AND, OR, XNOR, XOR, an inverter (NOT
// A), a 1-bit multiplier (A x B) and an incrementor (A + 1). Their results
// enter an 8-to-1 multiplexer and the three select lines pick the one that
// drives RESULT; for the adder and the incrementor that is the sum bit. The
// two carries do not pass through the multiplexer: the adder's carry drives
// CARRYOUT and the incrementor's carry drives CARRYINC at all times,
// whatever the select lines say. The units, the multiplexer and the carry
// pins follow the document. The select codes (alu_pkg::alu_op_e, the order
// of the units in the block diagram) and the choice of A as the operand of
// the inverter are this design's own.
//
// Interface: a, b, cin, sel in; result, carryout, carryinc out.
// Timing: purely combinational, no clock and no state.
module alu1
  import alu_pkg::*;
(
  input  logic    a,
  input  logic    b,
  input  logic    cin,
  input  alu_op_e sel,       // the three select lines
  output logic    result,    // selected function result
  output logic    carryout,  // carry of A + B + CIN
  output logic    carryinc   // carry of A + 1
);

  logic fa_sum, and_y, or_y, xnor_y, xor_y, inv_y, mul_y, inc_sum;
  logic [NUM_OPS-1:0] mux_in;

  full_adder  u_fa   (.a(a), .b(b), .cin(cin), .sum(fa_sum), .cout(carryout));
  and_gate    u_and  (.in0(a), .in1(b), .out(and_y));
  or_gate     u_or   (.in0(a), .in1(b), .out(or_y));
  xnor_gate   u_xnor (.a(a), .b(b), .y(xnor_y));
  xor_gate    u_xor  (.a(a), .b(b), .y(xor_y));
  inverter    u_inv  (.a(a), .y(inv_y));
  multiplier  u_mul  (.a(a), .b(b), .p(mul_y));
  incrementor u_inc  (.a(a), .result(inc_sum), .carryinc(carryinc));

  always_comb begin
    mux_in          = '0;
    mux_in[OP_ADD]  = fa_sum;
    mux_in[OP_AND]  = and_y;
    mux_in[OP_OR]   = or_y;
    mux_in[OP_XNOR] = xnor_y;
    mux_in[OP_XOR]  = xor_y;
    mux_in[OP_INV]  = inv_y;
    mux_in[OP_MUL]  = mul_y;
    mux_in[OP_INC]  = inc_sum;
  end

  mux8 u_mux (.d(mux_in), .sel(sel), .y(result));

endmodule
