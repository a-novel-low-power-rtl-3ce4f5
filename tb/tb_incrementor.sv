// tb_incrementor: self-checking testbench of the 1-bit incrementor.
//
// Drives both values of A several times and checks {carryinc, result}
// against the integer sum A + 1. A watchdog ends the run with a failure if
// it has not finished in time.
module tb_incrementor;

  logic a, result, carryinc;
  int checks = 0;
  int failures = 0;

  incrementor dut (.a(a), .result(result), .carryinc(carryinc));

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      int total;
      a = k[0];
      #1;
      total = int'(k[0]) + 1;
      checks += 2;
      if (int'(result) != total % 2) begin
        failures++;
        $display("FAIL a=%0b result=%0b expected %0d", a, result, total % 2);
      end
      if (int'(carryinc) != total / 2) begin
        failures++;
        $display("FAIL a=%0b carryinc=%0b expected %0d", a, carryinc, total / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
