// Width sweep of dr_multiplier: operand widths 4, 5, 6 and 7 (8 is the
// default width, covered by the block's own testbench). For each width,
// exhaustive operands for W = 4 and random ones above, each operation goes
// valid then spacer; the product must equal a*b, cd must be high with the
// data and low with the spacer.
module dr_multiplier_widths_tb;
  import dr_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar gw = 4; gw <= 7; gw++) begin : g_w
    dr_t [gw-1:0]   a = '0, b = '0;
    dr_t [2*gw-1:0] p;
    logic           cd;
    logic           rst = 1'b1;
    logic           done = 1'b0;

    dr_multiplier #(.W(gw)) dut (.rst(rst), .a(a), .b(b), .p(p), .cd(cd));

    initial begin
      int n;
      #1 rst = 1'b0;
      n = (gw == 4) ? 256 : 800;
      for (int k = 0; k < n; k++) begin
        logic [gw-1:0]   x, y;
        logic [2*gw-1:0] got;
        bit              ok;
        if (gw == 4) begin
          x = gw'(k);
          y = gw'(k >> 4);
        end else begin
          x = gw'($urandom);
          y = gw'($urandom);
        end
        for (int i = 0; i < gw; i++) begin
          a[i] = dr_enc(x[i]);
          b[i] = dr_enc(y[i]);
        end
        #1;
        ok = 1;
        for (int i = 0; i < 2*gw; i++) begin
          if (!(p[i].t ^ p[i].f)) ok = 0;
          got[i] = p[i].t;
        end
        check(ok && cd, $sformatf("W=%0d product complete", gw));
        check(got == (2*gw)'(x) * (2*gw)'(y), $sformatf("W=%0d %0d*%0d gave %0d", gw, x, y, got));
        a = '0;
        b = '0;
        #1;
        check(p == '0 && !cd, $sformatf("W=%0d spacer", gw));
      end
      done = 1'b1;
    end
  end

  initial begin
    wait (g_w[4].done && g_w[5].done && g_w[6].done && g_w[7].done);
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
