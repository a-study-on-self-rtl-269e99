// Testbench for nclx_and: applies all nine combinations of spacer, 0 and 1 on
// the two inputs and checks each output rail against the dual-rail AND worked
// out here: valid 1 only when both inputs are valid 1, valid 0 as soon as one
// input is valid 0, spacer otherwise.
module nclx_and_tb;
  import dr_pkg::*;

  dr_t a, b, y;
  int  checks = 0;
  int  failures = 0;

  nclx_and dut (.a(a), .b(b), .y(y));

  // 0 = spacer, 1 = valid 0, 2 = valid 1
  function automatic dr_t sym(int s);
    case (s)
      1:       return '{t: 1'b0, f: 1'b1};
      2:       return '{t: 1'b1, f: 1'b0};
      default: return DR_NULL;
    endcase
  endfunction

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 3; i++) begin
        for (int j = 0; j < 3; j++) begin
          dr_t want;
          a = sym(i);
          b = sym(j);
          #1;
          if (i == 2 && j == 2)      want = sym(2);
          else if (i == 1 || j == 1) want = sym(1);
          else                       want = DR_NULL;
          checks++;
          if (y != want) begin
            failures++;
            $display("FAIL a=%0d b=%0d y=%b%b", i, j, y.t, y.f);
          end
        end
      end
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
