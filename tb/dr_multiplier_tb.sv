// Testbench for dr_multiplier at its default width. Each operation drives
// both operands valid, waits, checks every product bit is valid with exactly
// one rail, that the decoded product equals a*b computed here, and that cd is
// high; then drives the spacer and checks every product bit and cd return to
// zero. Corner operands come first, then random ones. A half-valid step
// (a valid, b spacer) checks that cd rises early only on a product that is
// already complete and final.
module dr_multiplier_tb;
  import dr_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned NC = 2 * W;

  logic          rst = 1'b1;
  dr_t [W-1:0]   a, b;
  dr_t [NC-1:0]  p;
  logic          cd;
  int            checks = 0;
  int            failures = 0;
  int            half_early = 0;

  dr_multiplier #(.W(W)) dut (.rst(rst), .a(a), .b(b), .p(p), .cd(cd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic dr_t [W-1:0] enc(logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  task automatic op(input logic [W-1:0] x, input logic [W-1:0] y, input bit half);
    logic [NC-1:0] got, want;
    bit ok;
    want = NC'(x) * NC'(y);
    if (half) begin
      // NCL-X gates are not input-complete: with b still at the spacer some
      // product bits may already be valid (a zero operand decides them). cd
      // may rise only if every monitored bit is valid and already final.
      a = enc(x);
      #5;
      ok = 1;
      for (int i = 2; i < NC; i++)
        if (!(p[i].t ^ p[i].f) || p[i].t != want[i]) ok = 0;
      check(!cd || ok, "cd high only with a complete, final product");
      if (cd) half_early++;
    end
    a = enc(x);
    b = enc(y);
    #5;
    ok = 1;
    for (int i = 0; i < NC; i++) begin
      if (p[i].t == p[i].f) ok = 0;
      got[i] = p[i].t;
    end
    check(ok, "all product bits valid");
    check(got == want, $sformatf("%0d*%0d gave %0d", x, y, got));
    check(cd == 1'b1, "cd high");
    a = '0;
    b = '0;
    #5;
    check(p == '0, "product back to spacer");
    check(cd == 1'b0, "cd low");
  endtask

  initial begin
    a = '0;
    b = '0;
    #2 rst = 1'b0;
    #2;
    op('0, '0, 0);
    op('1, '1, 0);
    op('1, 1, 0);
    op(1, '1, 1);
    op(8'h80, 8'h80, 0);
    for (int n = 0; n < 3000; n++)
      op(W'($urandom), W'($urandom), (n % 7) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
