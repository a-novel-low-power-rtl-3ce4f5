// incrementor: four-transistor 1-bit incrementor of the ALU, A + 1.
//
// Adding 1 to a single bit gives sum NOT A and carry A. Following the
// document, the carry comes from a transfer gate controlled by A that
// passes either the supply (A = 1) or ground (A = 0) to CARRYINC, and the
// sum from a standard CMOS inverter on A, which also gives RESULT a full
// swing. The standard two-AND-gate incrementor the document compares with
// is not used.
//
// Interface: result (sum, to the ALU's multiplexer) and carryinc (to the
// CARRYINC pin) are combinational functions of a.
module incrementor (
  input  logic a,
  output logic result,    // sum bit of A + 1
  output logic carryinc   // carry of A + 1
);

  logic vdd;
  logic gnd;

  always_comb begin
    vdd      = 1'b1;
    gnd      = 1'b0;
    carryinc = a ? vdd : gnd;  // transfer gate between the rails
    result   = ~a;             // CMOS inverter
  end

endmodule
