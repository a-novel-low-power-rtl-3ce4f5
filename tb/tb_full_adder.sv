// tb_full_adder: self-checking testbench of the 1-bit full adder.
//
// Applies all eight input combinations, then random ones, and checks
// {cout, sum} against the integer sum A + B + CIN. A watchdog ends the run
// with a failure if it has not finished in time.
module tb_full_adder;

  logic a, b, cin, sum, cout;
  int checks = 0;
  int failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 40; k++) begin
      logic [2:0] v;
      int total;
      v = (k < 8) ? 3'(k) : 3'($urandom_range(7));
      {a, b, cin} = v;
      #1;
      total = int'(v[2]) + int'(v[1]) + int'(v[0]);
      checks += 2;
      if (int'(sum) != total % 2) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b sum=%0b expected %0d", a, b, cin, sum, total % 2);
      end
      if (int'(cout) != total / 2) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b cout=%0b expected %0d", a, b, cin, cout, total / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
