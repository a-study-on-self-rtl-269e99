// Testbench for c_element with three inputs: drives random input vectors and
// compares the output against a reference state kept here (rise when all
// inputs are 1, fall when all are 0, otherwise hold), and checks reset.
module c_element_tb;
  localparam int unsigned N = 3;

  logic         rst = 1'b1;
  logic [N-1:0] in = '0;
  logic         out;
  logic         ref_q;
  int           checks = 0;
  int           failures = 0;

  c_element #(.N(N)) dut (.rst(rst), .in(in), .out(out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    in = '1;
    #1;
    check(out == 1'b0, "reset holds output low");
    rst = 1'b0;
    ref_q = 1'b0;
    #1;
    ref_q = 1'b1;
    check(out == 1'b1, "all ones after reset release");
    for (int n = 0; n < 2000; n++) begin
      // Bias towards the all-equal vectors so that both edges happen often.
      case ($urandom_range(0, 3))
        0: in = '0;
        1: in = '1;
        default: in = N'($urandom);
      endcase
      #1;
      if (in == '1) ref_q = 1'b1;
      else if (in == '0) ref_q = 1'b0;
      check(out == ref_q, $sformatf("in=%b out=%b expected %b", in, out, ref_q));
    end
    rst = 1'b1;
    #1;
    check(out == 1'b0, "reset clears output");
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
