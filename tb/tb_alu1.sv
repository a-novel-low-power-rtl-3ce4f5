// tb_alu1: end-to-end self-checking testbench of the 1-bit ALU.
//
// Runs every select code with every combination of A, B and CIN, then a
// stream of random operations, all at the default configuration of the
// ALU. Each RESULT is compared with a reference worked out by integer
// arithmetic on the operands, and CARRYOUT and CARRYINC are checked on
// every vector, whatever function is selected, since both carry pins are
// wired around the multiplexer. The testbench counts how often each of the
// eight functions was selected and how often each carry pin went high,
// also while another function was selected, and counts a failure for any
// of these that never happened. A watchdog ends the run with a failure if
// it has not finished in time.
module tb_alu1;
  import alu_pkg::*;

  localparam int unsigned RANDOM_VECTORS = 2000;

  logic    a, b, cin;
  alu_op_e sel;
  logic    result, carryout, carryinc;

  int checks = 0;
  int failures = 0;
  int op_count [NUM_OPS];
  int carryout_high = 0, carryout_high_other_op = 0;
  int carryinc_high = 0, carryinc_high_other_op = 0;

  alu1 dut (.a(a), .b(b), .cin(cin), .sel(sel),
            .result(result), .carryout(carryout), .carryinc(carryinc));

  // Reference RESULT from integer arithmetic on the operand values.
  function automatic int ref_result(int op, int ia, int ib, int ic);
    case (op)
      0: return (ia + ib + ic) % 2;         // sum of A + B + CIN
      1: return ia * ib;                    // AND
      2: return (ia + ib > 0) ? 1 : 0;      // OR
      3: return (ia == ib) ? 1 : 0;         // XNOR
      4: return (ia + ib) % 2;              // XOR
      5: return 1 - ia;                     // NOT A
      6: return ia * ib;                    // product A x B
      default: return (ia + 1) % 2;         // sum of A + 1
    endcase
  endfunction

  task automatic apply(input int op, input logic [2:0] v);
    int ia, ib, ic, exp_r, exp_co, exp_ci;
    sel = alu_op_e'(3'(op));
    {a, b, cin} = v;
    #1;
    ia = int'(v[2]); ib = int'(v[1]); ic = int'(v[0]);
    exp_r  = ref_result(op, ia, ib, ic);
    exp_co = (ia + ib + ic) / 2;
    exp_ci = (ia + 1) / 2;
    op_count[op]++;
    checks += 3;
    if (int'(result) != exp_r) begin
      failures++;
      $display("FAIL op=%0d a=%0b b=%0b cin=%0b result=%0b expected %0d",
               op, a, b, cin, result, exp_r);
    end
    if (int'(carryout) != exp_co) begin
      failures++;
      $display("FAIL op=%0d a=%0b b=%0b cin=%0b carryout=%0b expected %0d",
               op, a, b, cin, carryout, exp_co);
    end
    if (int'(carryinc) != exp_ci) begin
      failures++;
      $display("FAIL op=%0d a=%0b carryinc=%0b expected %0d", op, a, carryinc, exp_ci);
    end
    if (carryout) begin
      carryout_high++;
      if (op != int'(OP_ADD)) carryout_high_other_op++;
    end
    if (carryinc) begin
      carryinc_high++;
      if (op != int'(OP_INC)) carryinc_high_other_op++;
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (op_count[i]) op_count[i] = 0;
    for (int op = 0; op < int'(NUM_OPS); op++)
      for (int v = 0; v < 8; v++) apply(op, 3'(v));
    for (int n = 0; n < int'(RANDOM_VECTORS); n++)
      apply(int'($urandom_range(NUM_OPS - 1)), 3'($urandom_range(7)));

    for (int op = 0; op < int'(NUM_OPS); op++) begin
      $display("function %s selected %0d times", alu_op_e'(3'(op)), op_count[op]);
      checks++;
      if (op_count[op] == 0) begin
        failures++;
        $display("FAIL function %0d never selected", op);
      end
    end
    $display("CARRYOUT high %0d times (%0d with another function selected)",
             carryout_high, carryout_high_other_op);
    $display("CARRYINC high %0d times (%0d with another function selected)",
             carryinc_high, carryinc_high_other_op);
    checks += 2;
    if (carryout_high == 0 || carryout_high_other_op == 0) begin
      failures++;
      $display("FAIL carry out of the adder never seen on its pin");
    end
    if (carryinc_high == 0 || carryinc_high_other_op == 0) begin
      failures++;
      $display("FAIL carry of the incrementor never seen on its pin");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
