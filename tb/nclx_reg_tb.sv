// Testbench for nclx_reg: loads random words through load, checks that the
// stored word and full follow, that the output to the next stage shows the
// word only while send is high (spacer otherwise), that the word is held after
// the input returns to the spacer, and that clr empties the register.
module nclx_reg_tb;
  import dr_pkg::*;

  localparam int unsigned W = 4;

  logic        rst = 1'b1;
  logic        load = 1'b0;
  logic        clr = 1'b0;
  logic        send = 1'b0;
  dr_t [W-1:0] d = '0;
  dr_t [W-1:0] q, y;
  logic        full;
  int          checks = 0;
  int          failures = 0;

  nclx_reg #(.W(W)) dut (.rst(rst), .load(load), .clr(clr), .send(send),
                         .d(d), .q(q), .y(y), .full(full));

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
    check(q == '0 && !full, "empty after reset");
    for (int r = 0; r < 100; r++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      d = enc(v);
      #1;
      check(q == '0 && !full, "no load without load");
      load = 1'b1;
      #1;
      check(q == enc(v) && full, "loaded");
      check(y == '0, "output spacer while send low");
      load = 1'b0;
      d = '0;
      #1;
      check(q == enc(v), "held after input spacer");
      send = 1'b1;
      #1;
      check(y == enc(v), "output word while send high");
      send = 1'b0;
      #1;
      check(y == '0, "output spacer again");
      clr = 1'b1;
      #1;
      check(q == '0 && !full, "cleared");
      clr = 1'b0;
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
