// pid_top_tb: end-to-end test of both controllers at full size, in a closed
// loop. The conventional controller's (limited) output drives a first-order
// plant whose quantised position is the ADC word a[n] of both controllers.
// Every control period both outputs are checked against a reference model
// of the incremental PID law. The run includes set-point steps up and down,
// a gain change with a reload of the DA look-up tables, both output limits,
// errors of both signs (so the DA sign-bit subtraction acts) and a reset in
// mid-run; each is counted, and one that never happened is a failure.
// The loop must also settle: after the last set-point step the position
// must be within 2 ADC counts of the set point.
module pid_top_tb;
  import pid_ref_pkg::*;
  logic clk = 0, rst_n = 0, coef_load = 0, start = 0;
  logic [7:0] a;
  logic [11:0] step = 12'd256;             // s = 1.0
  logic signed [23:0] pd = '0;
  logic signed [15:0] k0, k1, k2;
  logic signed [47:0] up_bound, low_bound, conv_u, da_u;
  logic signed [31:0] conv_outputi, da_outputi;
  logic [15:0] conv_outputf, da_outputf;
  logic conv_hi_clip, conv_lo_clip, da_busy, da_done;
  logic signed [23:0] da_e;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_neg = 0, n_pos = 0, n_reload = 0, n_reset = 0, n_step = 0;

  pid_top dut (.*);
  plant_model plant (.clk, .rst_n, .step_en(start), .u(conv_u), .step, .adc(a));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Gains in Q.8: kp, ki, kd -> k0 = kp+ki+kd, k1 = -kp-2kd, k2 = kd.
  task automatic set_gains(int kp, int ki, int kd);
    k0 <= 16'(kp + ki + kd); k1 <= 16'(-kp - 2 * kd); k2 <= 16'(kd);
    coef_load <= 1;
    @(posedge clk);
    coef_load <= 0;
    n_reload++;
  endtask

  initial begin
    longint e0, e1, e2, uc, ud, lo, hi, kk0, kk1, kk2;
    int sp[6] = '{200, 30, 240, 120, 60, 150};
    int lat;
    lo = longint'(40) << 16;  hi = longint'(230) << 16;   // 40 .. 230 counts
    up_bound = 48'(hi); low_bound = 48'(lo);
    k0 = '0; k1 = '0; k2 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    set_gains(128, 32, 32);                 // kp 0.5, ki 0.125, kd 0.125
    e1 = 0; e2 = 0; uc = 0; ud = 0;
    for (int t = 0; t < 6 * 80; t++) begin
      if (t % 80 == 0) begin
        pd <= 24'(sp[t / 80] <<< 8);
        n_step++;
      end
      if (t == 200) set_gains(256, 26, 64); // kp 1.0, ki 0.1, kd 0.25
      if (t == 300) begin                   // reset in mid-run
        rst_n <= 0;
        repeat (2) @(posedge clk);
        rst_n <= 1;
        #1;
        check(longint'(conv_u), 0, "conv u after reset");
        check(longint'(da_u), 0, "da u after reset");
        @(posedge clk);
        set_gains(256, 26, 64);             // the tables are cleared by reset
        e1 = 0; e2 = 0; uc = 0; ud = 0;
        n_reset++;
      end
      kk0 = longint'(k0); kk1 = longint'(k1); kk2 = longint'(k2);
      @(posedge clk);
      #1;
      e0 = ref_err(longint'(a), longint'(step), longint'(pd));
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 1;
      forever begin
        #1;
        lat++;
        if (da_done) break;
        @(posedge clk);
      end
      check(lat, 35, "DA start-to-done clocks");
      @(posedge clk);
      #1;
      uc = wrap48(uc + ref_incr(kk0, kk1, kk2, e0, e1, e2));
      if (uc > hi) n_hi++;
      if (uc < lo) n_lo++;
      uc = clamp(uc, lo, hi);
      ud = wrap48(ud + ref_incr(kk0, kk1, kk2, e0, e1, e2));
      e2 = e1; e1 = e0;
      if (e0 < 0) n_neg++;
      if (e0 > 0) n_pos++;
      check(longint'(da_e), e0, $sformatf("DA e[n] period %0d", t));
      check(longint'(conv_u), uc, $sformatf("conv u period %0d", t));
      check(longint'(da_u), ud, $sformatf("DA u period %0d", t));
    end
    checks++;
    if ((longint'(a) - 150) > 2 || (longint'(a) - 150) < -2) begin
      failures++;
      $display("FAIL loop did not settle: a=%0d", a);
    end
    $display("mechanisms: upper limit %0d, lower limit %0d, e<0 %0d, e>0 %0d, table reloads %0d, resets %0d, set-point steps %0d",
             n_hi, n_lo, n_neg, n_pos, n_reload, n_reset, n_step);
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_neg == 0 || n_pos == 0 || n_reload < 2 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
