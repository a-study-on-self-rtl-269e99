// Testbench for completion_detector with W = 6 and the two low bits masked
// out. It makes the monitored bits valid one at a time in random order and
// checks that cd rises only with the last of them, whatever the masked bits do;
// then returns them to the spacer one at a time and checks that cd falls only
// with the last.
module completion_detector_tb;
  import dr_pkg::*;

  localparam int unsigned W = 6;
  localparam logic [W-1:0] MASK = 6'b111100;

  logic        rst = 1'b1;
  dr_t [W-1:0] d = '0;
  logic        cd;
  int          checks = 0;
  int          failures = 0;

  completion_detector #(.W(W), .MASK(MASK)) dut (.rst(rst), .d(d), .cd(cd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int order [4];
    #1 rst = 1'b0;
    for (int r = 0; r < 100; r++) begin
      for (int i = 0; i < 4; i++) order[i] = i + 2;
      order.shuffle();
      // Masked bits change freely.
      d[0] = dr_enc(1'($urandom));
      d[1] = (r % 2) ? DR_NULL : dr_enc(1'b1);
      for (int i = 0; i < 4; i++) begin
        d[order[i]] = dr_enc(1'($urandom));
        #1;
        check(cd == (i == 3), $sformatf("set phase step %0d cd=%b", i, cd));
      end
      order.shuffle();
      d[0] = DR_NULL;
      for (int i = 0; i < 4; i++) begin
        d[order[i]] = DR_NULL;
        #1;
        check(cd == (i != 3), $sformatf("reset phase step %0d cd=%b", i, cd));
      end
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
