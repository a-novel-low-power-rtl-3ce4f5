// tb_inverter: self-checking testbench of the inverter.
//
// Drives both input values several times and checks y = 1 - a, worked out
// by arithmetic rather than by the NOT operator. A watchdog ends the run
// with a failure if it has not finished in time.
module tb_inverter;

  logic a, y;
  int checks = 0;
  int failures = 0;

  inverter dut (.a(a), .y(y));

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      int expected;
      a = k[0];
      #1;
      expected = 1 - int'(k[0]);
      checks++;
      if (int'(y) != expected) begin
        failures++;
        $display("FAIL a=%0b y=%0b expected %0d", a, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
