// da_incr_side_tb: drives the incremental-equation side with the control
// sequence of one period (err_load, ERR_BITS err_shift clocks with err_sign
// on the last, update) for random P, Pd and gains, and checks e[n] and
// u[n] = u[n-1] + k0 e[n] + k1 e[n-1] + k2 e[n-2] against a reference model.
// Both signs of the error and the extreme gains are exercised.
module da_incr_side_tb;
  import pid_ref_pkg::*;
  logic clk = 0, rst_n = 0, coef_load = 0, err_load = 0, err_shift = 0, err_sign = 0, update = 0;
  logic signed [15:0] k0 = '0, k1 = '0, k2 = '0;
  logic [19:0] p = '0;
  logic signed [23:0] pd = '0, e_n;
  logic signed [47:0] u;
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  da_incr_side dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  initial begin
    longint e0, e1, e2, um, kk0, kk1, kk2;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    e1 = 0; e2 = 0; um = 0;
    for (int t = 0; t < 400; t++) begin
      if (t % 50 == 0) begin
        kk0 = longint'($signed(16'($urandom))); kk1 = longint'($signed(16'($urandom)));
        kk2 = longint'($signed(16'($urandom)));
        if (t == 50) begin kk0 = -32768; kk1 = -32768; kk2 = -32768; end
        if (t == 100) begin kk0 = 32767; kk1 = 32767; kk2 = 32767; end
        k0 <= 16'(kk0); k1 <= 16'(kk1); k2 <= 16'(kk2); coef_load <= 1;
        @(posedge clk);
        coef_load <= 0; k0 <= '0; k1 <= '0; k2 <= '0;
      end
      p  <= 20'($urandom);
      pd <= 24'($urandom_range(0, 1 << 21)) - 24'(1 << 20);
      if (t == 7) pd <= -24'sh7fffff;      // most negative error
      err_load <= 1;
      @(posedge clk);
      err_load <= 0;
      e0 = ref_err(longint'(p) , 1, longint'(pd));
      if (e0 < 0) n_neg++; else n_pos++;
      p <= 20'($urandom); pd <= 24'($urandom);   // inputs only matter at err_load
      for (int b = 0; b < 24; b++) begin
        err_shift <= 1; err_sign <= (b == 23);
        @(posedge clk);
      end
      err_shift <= 0; err_sign <= 0; update <= 1;
      @(posedge clk);
      update <= 0;
      um = wrap48(um + ref_incr(kk0, kk1, kk2, e0, e1, e2));
      e2 = e1; e1 = e0;
      #1;
      check(longint'(e_n), e0, $sformatf("e[n] period %0d", t));
      check(longint'(u), um, $sformatf("u period %0d", t));
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
