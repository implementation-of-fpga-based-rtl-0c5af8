// conv_pid_tb: drives the conventional controller with random ADC words,
// step sizes, set points and gains over many control periods and checks
// u[n] = Bounded(u[n-1] + k0 e[n] + k1 e[n-1] + k2 e[n-2]), e = Pd - a*s,
// against a reference model, one clock after each strobe (the document's
// one-edge update). Checks reset to zero, holding between strobes, the
// integer/fraction split and that both limits acted.
module conv_pid_tb;
  import pid_ref_pkg::*;
  logic clk = 0, rst_n = 0, ctrl = 0;
  logic [7:0] a = '0;
  logic [11:0] step = '0;
  logic signed [23:0] pd = '0;
  logic signed [15:0] k0 = '0, k1 = '0, k2 = '0;
  logic signed [47:0] up_bound = '0, low_bound = '0, u;
  logic signed [31:0] outputi;
  logic [15:0] outputf;
  logic hi_clip, lo_clip;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  conv_pid dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    longint e0, e1, e2, um, lo, hi;
    repeat (2) @(posedge clk);
    #1 check(longint'(u), 0, "reset");
    rst_n <= 1;
    e1 = 0; e2 = 0; um = 0;
    for (int t = 0; t < 2000; t++) begin
      if (t % 100 == 0) begin
        k0 = 16'($urandom); k1 = 16'($urandom); k2 = 16'($urandom);
        step = 12'($urandom);
      end
      a  = 8'($urandom);
      pd = 24'($urandom_range(0, 1 << 20)) - 24'(1 << 19);
      if (t % 7 == 3) begin lo = -(longint'(1) << 30); hi = longint'(1) << 30; end
      else            begin lo = -(longint'(1) << 44); hi = longint'(1) << 44; end
      up_bound = 48'(hi); low_bound = 48'(lo);
      ctrl = 1;
      e0 = ref_err(a, step, pd);
      um = clamp(wrap48(um + ref_incr(k0, k1, k2, e0, e1, e2)), lo, hi);
      #1;
      n_hi += int'(hi_clip); n_lo += int'(lo_clip);
      @(posedge clk);
      #1 ctrl = 0;
      e2 = e1; e1 = e0;
      check(longint'(u), um, $sformatf("u period %0d", t));
      check(longint'($signed({outputi, outputf})), um, "integer/fraction fields");
      if (t % 5 == 0) begin
        a = 8'($urandom); pd = 24'($urandom);
        @(posedge clk);
        #1 check(longint'(u), um, "hold without strobe");
      end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL limits not exercised hi=%0d lo=%0d", n_hi, n_lo);
    end
    $display("limits: upper %0d lower %0d", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
