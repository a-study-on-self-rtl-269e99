// End-to-end testbench of async_subthreshold_top at its default parameters.
// Two observer processes read the NCL-X and the DIMS counter concurrently
// with different, randomly varying response times, and a third process runs
// products through the multiplier; all three share the reset. Checked: the
// counts start at the presets and rise by one with wrap-around, the
// completion/full flags follow the data and spacer phases, a withheld
// acknowledge stalls a counter, every product equals a*b, and the product and
// mul_cd return to the spacer. After a second reset with new presets the
// counters restart. Each mechanism is counted (preset load, wrap-around,
// stall, completed product, early completion on an incomplete operand pair)
// and a mechanism that never happened counts as a failure.
module async_subthreshold_top_tb;
  import dr_pkg::*;

  localparam int unsigned W  = 4;
  localparam int unsigned MW = 8;

  logic            rst = 1'b1;
  logic [W-1:0]    nclx_preset, dims_preset;
  dr_t  [W-1:0]    nclx_cnt, dims_cnt;
  logic            nclx_cnt_full, dims_cnt_cd;
  logic            nclx_ack = 1'b0, dims_ack = 1'b0;
  dr_t  [MW-1:0]   mul_a = '0, mul_b = '0;
  dr_t  [2*MW-1:0] mul_p;
  logic            mul_cd;

  int checks = 0, failures = 0;
  int n_preset = 0, n_wrap = 0, n_stall = 0, n_product = 0, n_early = 0;

  async_subthreshold_top dut (
    .rst(rst),
    .nclx_preset(nclx_preset), .nclx_cnt(nclx_cnt),
    .nclx_cnt_full(nclx_cnt_full), .nclx_ack(nclx_ack),
    .dims_preset(dims_preset), .dims_cnt(dims_cnt),
    .dims_cnt_cd(dims_cnt_cd), .dims_ack(dims_ack),
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p), .mul_cd(mul_cd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit all_valid(dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!(v[i].t ^ v[i].f)) return 0;
    return 1;
  endfunction

  function automatic logic [W-1:0] decode(dr_t [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = v[i].t;
    return r;
  endfunction

  function automatic dr_t [MW-1:0] enc(logic [MW-1:0] v);
    dr_t [MW-1:0] r;
    for (int i = 0; i < MW; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction

  // Observer of one counter; sel 0 = NCL-X, 1 = DIMS.
  task automatic observe(input int sel, input logic [W-1:0] start, input int n);
    logic [W-1:0] expv;
    dr_t  [W-1:0] c;
    logic         flag;
    expv = start;
    for (int k = 0; k < n; k++) begin
      do begin
        #1;
        c = sel ? dims_cnt : nclx_cnt;
      end while (!all_valid(c));
      #1;
      c    = sel ? dims_cnt : nclx_cnt;
      flag = sel ? dims_cnt_cd : nclx_cnt_full;
      check(flag, $sformatf("counter %0d flag with data", sel));
      check(decode(c) == expv, $sformatf("counter %0d count %0d expected %0d", sel, decode(c), expv));
      if (k == 0 && decode(c) == start) n_preset++;
      if (k > 0 && expv == '0) n_wrap++;
      if (k % 11 == 5) begin
        #40;
        c = sel ? dims_cnt : nclx_cnt;
        check(decode(c) == expv && all_valid(c), $sformatf("counter %0d stalls", sel));
        n_stall++;
      end
      #($urandom_range(1, 6));
      if (sel) dims_ack = 1'b1; else nclx_ack = 1'b1;
      do begin
        #1;
        c = sel ? dims_cnt : nclx_cnt;
      end while (c != '0);
      #1;
      flag = sel ? dims_cnt_cd : nclx_cnt_full;
      check(!flag, $sformatf("counter %0d flag low with spacer", sel));
      #($urandom_range(1, 6));
      if (sel) dims_ack = 1'b0; else nclx_ack = 1'b0;
      expv = expv + 1'b1;
    end
  endtask

  task automatic products(input int n);
    for (int k = 0; k < n; k++) begin
      logic [MW-1:0]   x, y;
      logic [2*MW-1:0] got;
      bit              ok;
      x = (k % 9 == 0) ? '0 : MW'($urandom);
      y = MW'($urandom);
      mul_a = enc(x);
      #2;
      if (mul_cd) n_early++;
      mul_b = enc(y);
      #2;
      ok = 1;
      for (int i = 0; i < 2*MW; i++) begin
        if (!(mul_p[i].t ^ mul_p[i].f)) ok = 0;
        got[i] = mul_p[i].t;
      end
      check(ok && mul_cd, "product valid and complete");
      check(got == (2*MW)'(x) * (2*MW)'(y), $sformatf("%0d*%0d gave %0d", x, y, got));
      n_product++;
      mul_a = '0;
      mul_b = '0;
      #2;
      check(mul_p == '0 && !mul_cd, "product back to spacer");
    end
  endtask

  initial begin
    nclx_preset = 4'd9;
    dims_preset = 4'd14;
    #10 rst = 1'b0;
    fork
      observe(0, 4'd9, 40);
      observe(1, 4'd14, 40);
      products(400);
    join
    #5 rst = 1'b1;
    nclx_preset = 4'd0;
    dims_preset = 4'd7;
    #10 rst = 1'b0;
    fork
      observe(0, 4'd0, 20);
      observe(1, 4'd7, 20);
    join
    check(n_preset  == 4, $sformatf("preset loads %0d", n_preset));
    check(n_wrap    >  0, $sformatf("wrap-arounds %0d", n_wrap));
    check(n_stall   >  0, $sformatf("stalls %0d", n_stall));
    check(n_product >  0, $sformatf("products %0d", n_product));
    check(n_early   >  0, $sformatf("early completions %0d", n_early));
    $display("mechanisms: preset=%0d wrap=%0d stall=%0d product=%0d early_cd=%0d",
             n_preset, n_wrap, n_stall, n_product, n_early);
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
