// Testbench for dims_latch: walks the latch through its four-phase cycle.
// With en high a valid word is taken and cd rises; with en low the word is
// held while the input stays valid; with en low each bit whose input is at
// the spacer clears, and cd falls only when all have;
// with en high again a spacer input keeps it empty.
module dims_latch_tb;
  import dr_pkg::*;

  localparam int unsigned W = 4;

  logic        rst = 1'b1;
  logic        en = 1'b1;
  dr_t [W-1:0] d = '0;
  dr_t [W-1:0] q;
  logic        cd;
  int          checks = 0;
  int          failures = 0;

  dims_latch #(.W(W)) dut (.rst(rst), .en(en), .d(d), .q(q), .cd(cd));

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

  initial begin
    #1 rst = 1'b0;
    #1;
    check(q == '0 && cd == 1'b0, "empty after reset");
    for (int r = 0; r < 100; r++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      en = 1'b1;
      d = enc(v);
      #1;
      check(q == enc(v) && cd, "word taken with en high");
      en = 1'b0;
      #1;
      d = '0;
      #1;
      check(q == '0 && !cd, "cleared with en low and spacer input");
      en = 1'b1;
      #1;
      check(q == '0 && !cd, "stays empty with spacer input");
      // Hold: take a word, drop en, remove part of the input.
      d = enc(v);
      #1;
      en = 1'b0;
      #1;
      check(q == enc(v) && cd, "word held with en low and input valid");
      d[0] = DR_NULL;
      #1;
      check(q[0] == DR_NULL && q[W-1:1] == enc(v)[W-1:1] && cd,
            "only the bit whose input is spacer clears, cd holds");
      d = '0;
      #1;
      en = 1'b1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
