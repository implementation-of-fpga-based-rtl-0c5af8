// da_pid_tb: runs the distributed-arithmetic controller through many control
// periods with random ADC words, set points, step sizes and gains and checks
// u[n] and e[n] against a reference model, the latency of
// ADC_W + E_W + 3 = 35 clocks from the start clock to done, that start is
// ignored while busy, and that changing the inputs after start does not
// disturb the period (a[n] and Pd are sampled with start).
module da_pid_tb;
  import pid_ref_pkg::*;
  logic clk = 0, rst_n = 0, coef_load = 0, start = 0;
  logic [7:0] a = '0;
  logic [11:0] step = '0;
  logic signed [23:0] pd = '0, e_n;
  logic signed [15:0] k0 = '0, k1 = '0, k2 = '0;
  logic signed [47:0] u;
  logic signed [31:0] outputi;
  logic [15:0] outputf;
  logic busy, done;
  int checks = 0, failures = 0;

  da_pid dut (.*);

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
    longint e0, e1, e2, um, kk0, kk1, kk2, ss;
    int lat;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    e1 = 0; e2 = 0; um = 0;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      if (t % 40 == 0) begin
        kk0 = longint'($signed(16'($urandom))); kk1 = longint'($signed(16'($urandom)));
        kk2 = longint'($signed(16'($urandom))); ss = longint'($urandom_range(0, 4095));
        k0 <= 16'(kk0); k1 <= 16'(kk1); k2 <= 16'(kk2); step <= 12'(ss); coef_load <= 1;
        @(posedge clk);
        coef_load <= 0;
      end
      a <= 8'($urandom);
      pd <= 24'($urandom_range(0, 1 << 21)) - 24'(1 << 20);
      start <= 1;
      @(posedge clk);
      e0 = ref_err(longint'(a), ss, longint'(pd));
      start <= (t % 3 == 0);               // extra start while busy: ignored
      a <= 8'($urandom); pd <= 24'($urandom);
      lat = 1;
      forever begin
        #1;
        lat++;
        if (done) break;
        @(posedge clk);
        start <= 0;
      end
      check(lat, 35, "start-to-done clocks");
      start <= 0;
      @(posedge clk);
      um = wrap48(um + ref_incr(kk0, kk1, kk2, e0, e1, e2));
      e2 = e1; e1 = e0;
      #1;
      check(longint'(e_n), e0, $sformatf("e[n] period %0d", t));
      check(longint'(u), um, $sformatf("u period %0d", t));
      check(longint'($signed({outputi, outputf})), um, "integer/fraction fields");
      check(longint'(busy), 0, "idle after done");
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
