// Testbench for nclx_counter: acts as the four-phase observer of the count.
// After reset with a preset value it reads a run of counts and checks that
// they rise by one with wrap-around, that cnt_full follows the data and spacer
// phases, that no bit ever shows both rails high, and that the counter stalls
// while the acknowledge is withheld. A second reset checks a new preset load.
module nclx_counter_tb;
  import dr_pkg::*;

  localparam int unsigned W = 4;

  logic         rst = 1'b1;
  logic [W-1:0] preset;
  dr_t  [W-1:0] cnt;
  logic         cnt_full;
  logic         out_ack = 1'b0;
  int           checks = 0;
  int           failures = 0;

  nclx_counter #(.W(W)) dut (.rst(rst), .preset(preset), .cnt(cnt),
                             .cnt_full(cnt_full), .out_ack(out_ack));

  function automatic bit all_valid(dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!(v[i].t ^ v[i].f)) return 0;
    return 1;
  endfunction

  function automatic bit all_null(dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (v[i].t | v[i].f) return 0;
    return 1;
  endfunction

  function automatic logic [W-1:0] decode(dr_t [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = v[i].t;
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Both rails high is never allowed.
  always @(cnt) begin
    for (int i = 0; i < W; i++)
      if (cnt[i].t & cnt[i].f) check(0, "both rails high");
  end

  task automatic read_counts(input logic [W-1:0] start, input int n);
    logic [W-1:0] expv;
    expv = start;
    for (int k = 0; k < n; k++) begin
      while (!all_valid(cnt)) #1;
      #1;
      check(cnt_full == 1'b1, "full with data");
      check(decode(cnt) == expv, $sformatf("count %0d expected %0d", decode(cnt), expv));
      if (k == 3) begin
        // Withhold the acknowledge: the count must not move.
        #50;
        check(all_valid(cnt) && decode(cnt) == expv, "stall without acknowledge");
      end
      #3 out_ack = 1'b1;
      while (!all_null(cnt)) #1;
      #1;
      check(cnt_full == 1'b0, "empty with spacer");
      #3 out_ack = 1'b0;
      expv = expv + 1'b1;
    end
  endtask

  initial begin
    preset = 4'd13;
    #10 rst = 1'b0;
    read_counts(4'd13, 40);
    // Restart from another preset.
    #5 rst = 1'b1;
    preset = 4'd2;
    #10 rst = 1'b0;
    read_counts(4'd2, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
