// dalut_tb: fills the three-input DA look-up table from random gains and
// checks all eight words against the table 0, k2, k1, k1+k2, k0, k0+k2,
// k0+k1, k0+k1+k2 (address MSB = first coefficient). Also checks that the
// words hold when the coefficient inputs change without a load.
module dalut_tb;
  localparam int unsigned K = 3, A_W = 16, L_W = 18;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [K-1:0][A_W-1:0] coef;
  logic [K-1:0] addr = '0;
  logic signed [L_W-1:0] word;
  int checks = 0, failures = 0;

  dalut #(.K(K), .A_W(A_W), .L_W(L_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [A_W-1:0] k0, k1, k2;
    longint exp;
    coef = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 40; t++) begin
      k0 = A_W'($urandom); k1 = A_W'($urandom); k2 = A_W'($urandom);
      if (t == 0) begin k0 = 16'sh7fff; k1 = 16'sh7fff; k2 = 16'sh7fff; end
      if (t == 1) begin k0 = -16'sh8000; k1 = -16'sh8000; k2 = -16'sh8000; end
      coef <= {k0, k1, k2}; load <= 1;
      @(posedge clk);
      load <= 0;
      coef <= {A_W'($urandom), A_W'($urandom), A_W'($urandom)};
      @(posedge clk);
      for (int a = 0; a < 8; a++) begin
        addr <= 3'(a);
        #1;
        exp = (a[2] ? longint'(k0) : 0) + (a[1] ? longint'(k1) : 0) + (a[0] ? longint'(k2) : 0);
        checks++;
        if (longint'(word) != exp) begin
          failures++;
          $display("FAIL addr %0d: got %0d expected %0d", a, word, exp);
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
