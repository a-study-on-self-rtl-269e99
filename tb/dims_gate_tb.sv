// Testbench for dims_gate in both uses of the design: the two-input AND gate
// (default truth table) and the half adder of the DIMS counter (outputs sum
// and carry). For every valid input pair it checks the decoded outputs against
// the function worked out here; it also checks input completeness: with one
// input valid and the other at the spacer the outputs stay at the spacer, and
// after a valid word the outputs return to the spacer only when both inputs
// have.
module dims_gate_tb;
  import dr_pkg::*;

  logic       rst = 1'b1;
  dr_t [1:0]  a;
  dr_t [0:0]  y_and;
  dr_t [1:0]  y_ha;
  int         checks = 0;
  int         failures = 0;

  dims_gate u_and (.rst(rst), .a(a), .y(y_and));
  dims_gate #(.N(2), .M(2), .TABLE(8'b10_01_01_00)) u_ha (.rst(rst), .a(a), .y(y_ha));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    a = '0;
    #1 rst = 1'b0;
    for (int r = 0; r < 50; r++) begin
      logic x0, x1;
      x0 = 1'($urandom);
      x1 = 1'($urandom);
      // First input only: nothing may fire.
      a[0] = dr_enc(x0);
      #1;
      check(y_and == '0 && y_ha == '0, "outputs wait for both inputs");
      a[1] = dr_enc(x1);
      #1;
      check(y_and[0] == dr_enc(x0 & x1), "AND value");
      check(y_ha[0] == dr_enc(x0 ^ x1), "half adder sum");
      check(y_ha[1] == dr_enc(x0 & x1), "half adder carry");
      // One input back to spacer: outputs hold.
      a[0] = DR_NULL;
      #1;
      check(y_and[0] == dr_enc(x0 & x1) && y_ha[0] == dr_enc(x0 ^ x1), "outputs hold until both inputs are spacer");
      a[1] = DR_NULL;
      #1;
      check(y_and == '0 && y_ha == '0, "outputs return to spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
