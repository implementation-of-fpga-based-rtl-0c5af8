// da_ctrl_tb: checks the DA sequencer's timing: after a start pulse,
// one adc_load, N_ADC adc_shift clocks, one err_load, N_ERR err_shift clocks
// with err_sign on the last, one update = done, N_ADC + N_ERR + 3 clocks
// from start to done, busy in between, and that start is ignored while busy.
module da_ctrl_tb;
  localparam int unsigned N_ADC = 8, N_ERR = 24;
  logic clk = 0, rst_n = 0, start = 0;
  logic adc_load, adc_shift, err_load, err_shift, err_sign, update, busy, done;
  int checks = 0, failures = 0;

  da_ctrl #(.N_ADC(N_ADC), .N_ERR(N_ERR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int n_al, n_as, n_el, n_es, n_sg, n_up, lat, sign_at, el_at, last_as;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      n_al = 0; n_as = 0; n_el = 0; n_es = 0; n_sg = 0; n_up = 0;
      lat = 1; sign_at = -1; el_at = -1; last_as = -1;
      start <= 1;
      #1 n_al += int'(adc_load);
      check(int'(busy), 0, "idle before start");
      @(posedge clk);
      start <= (t % 2 == 1);            // a held start must not restart
      forever begin
        #1;
        lat++; // lat counts clocks, the start clock being 1
        n_as += int'(adc_shift); n_el += int'(err_load); n_es += int'(err_shift);
        n_al += int'(adc_load);
        if (adc_shift) last_as = lat;
        if (err_load) el_at = lat;
        if (err_sign) begin n_sg++; sign_at = n_es; end
        if (!busy) begin failures++; $display("FAIL busy low at %0d", lat); end
        if (done) begin n_up += int'(update); break; end
        @(posedge clk);
      end
      start <= 0;
      @(posedge clk);
      check(lat, N_ADC + N_ERR + 3, "start-to-done clocks");
      check(n_al, 1, "adc_load count");
      check(n_as, N_ADC, "adc_shift count");
      check(n_el, 1, "err_load count");
      check(el_at, last_as + 1, "err_load follows the ADC pass");
      check(n_es, N_ERR, "err_shift count");
      check(n_sg, 1, "err_sign count");
      check(sign_at, N_ERR, "err_sign on the last bit");
      check(n_up, 1, "update with done");
      #1 check(int'(busy), start ? 1 : 0, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
