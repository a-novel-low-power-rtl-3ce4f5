// tb_mux8: self-checking testbench of the 8-to-1 multiplexer.
//
// For every select value it applies one-hot, one-cold and random data
// words and checks that the output equals the selected data bit. The
// one-hot and one-cold words show that no other input leaks through. A
// watchdog ends the run with a failure if it has not finished in time.
module tb_mux8;

  logic [7:0] d;
  logic [2:0] sel;
  logic       y;
  int checks = 0;
  int failures = 0;

  mux8 dut (.d(d), .sel(sel), .y(y));

  task automatic check(input logic [7:0] data, input logic [2:0] s);
    d   = data;
    sel = s;
    #1;
    checks++;
    if (y !== (((data >> s) & 8'd1) != 0)) begin
      failures++;
      $display("FAIL d=%b sel=%0d y=%0b", data, s, y);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int j = 0; j < 8; j++) begin
        check(8'(1 << j), 3'(s));
        check(~8'(1 << j), 3'(s));
      end
      for (int r = 0; r < 8; r++) check(8'($urandom), 3'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
