// mux8: 8-to-1 multiplexer at the output of the 1-bit ALU.
//
// All eight function units of the ALU work at once; this multiplexer passes
// the one chosen by the three select lines to RESULT. It is written as a
// tree of 2-to-1 selections, select bit 0 at the leaves and bit 2 at the
// root, which is the shape a pass-transistor multiplexer takes. The design
// gives only the function of this multiplexer; the tree form is this
// design's choice.
//
// Interface: d[k] is passed when sel == k. Purely combinational, no clock.
module mux8 (
  input  logic [7:0] d,    // the eight function results
  input  logic [2:0] sel,  // select lines
  output logic       y     // selected result
);

  logic [3:0] lvl1;  // after select bit 0
  logic [1:0] lvl2;  // after select bit 1

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      lvl1[i] = sel[0] ? d[2*i+1] : d[2*i];
    end
    for (int i = 0; i < 2; i++) begin
      lvl2[i] = sel[1] ? lvl1[2*i+1] : lvl1[2*i];
    end
    y = sel[2] ? lvl2[1] : lvl2[0];
  end

endmodule
