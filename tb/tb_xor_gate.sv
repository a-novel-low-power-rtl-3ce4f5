// tb_xor_gate: self-checking testbench of xor_gate (A XOR B).
//
// Applies every combination of the two inputs several times in a shuffled
// order and compares the output with a truth table written out here
// (bit {a,b} of TRUTH), independent of the circuit form inside the module.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_xor_gate;

  localparam logic [3:0] TRUTH = 4'b0110;  // index {a,b}
  localparam int unsigned ROUNDS = 8;

  logic a, b, y;
  int checks = 0;
  int failures = 0;

  xor_gate dut (.a(a), .b(b), .y(y));

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROUNDS; r++) begin
      for (int k = 0; k < 4; k++) begin
        logic [1:0] v;
        v = (r == 0) ? 2'(k) : 2'($urandom_range(3));
        {a, b} = v;
        #1;
        checks++;
        if (y !== TRUTH[v]) begin
          failures++;
          $display("FAIL a=%0b b=%0b y=%0b expected %0b", a, b, y, TRUTH[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
