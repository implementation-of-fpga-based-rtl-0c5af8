// da_adc_side_tb: loads random step sizes into LUT1 and random ADC words,
// runs the ADC_BITS shift clocks and checks P = a*s, including a = 255 and
// s at its maximum, and that P holds without shifts.
module da_adc_side_tb;
  logic clk = 0, rst_n = 0, coef_load = 0, load = 0, shift = 0;
  logic [11:0] step = '0;
  logic [7:0] a = '0;
  logic [19:0] p;
  int checks = 0, failures = 0;

  da_adc_side dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] s;
    logic [7:0] av;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      if (t % 10 == 0) begin
        s = (t == 0) ? 12'hfff : 12'($urandom);
        step <= s; coef_load <= 1;
        @(posedge clk);
        coef_load <= 0; step <= 12'($urandom);   // LUT1 keeps s
      end
      av = (t == 0) ? 8'hff : 8'($urandom);
      a <= av; load <= 1;
      @(posedge clk);
      load <= 0; a <= 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        shift <= 1;
        @(posedge clk);
      end
      shift <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (p != 20'(av) * 20'(s)) begin
        failures++;
        $display("FAIL a=%0d s=%0d: P=%0d expected %0d", av, s, p, av * s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
