// da_sop_tb: generic DA sum of products with K=4 inputs of B=8 bits.
// Random coefficients and inputs; after B shift clocks y must equal
// sum_k A_k * x_k, with the inputs read as two's complement when the last
// clock is marked sign_bit and as unsigned when it is not. Also checks that
// y holds after the pass.
module da_sop_tb;
  localparam int unsigned K = 4, B = 8, A_W = 12, L_W = 14;
  logic clk = 0, rst_n = 0, coef_load = 0, load = 0, shift = 0, sign_bit = 0;
  logic signed [K-1:0][A_W-1:0] coef = '0;
  logic [K-1:0][B-1:0] x = '0;
  logic signed [L_W+B-1:0] y;
  int checks = 0, failures = 0;

  da_sop #(.K(K), .B(B), .A_W(A_W), .L_W(L_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c[K], v[K], exp;
    logic sgn;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      if (t % 10 == 0) begin
        for (int k = 0; k < K; k++) begin
          c[k] = longint'($signed(A_W'($urandom)));
          coef[k] <= A_W'(c[k]);
        end
        coef_load <= 1;
        @(posedge clk);
        coef_load <= 0;
      end
      sgn = t[0];
      exp = 0;
      for (int k = 0; k < K; k++) begin
        x[k] <= B'($urandom);
        if (t == 2) x[k] <= 8'h80;
        if (t == 3) x[k] <= 8'hff;
      end
      load <= 1;
      @(posedge clk);
      load <= 0;
      for (int k = 0; k < K; k++) begin
        v[k] = sgn ? longint'($signed(x[k])) : longint'(x[k]);
        exp += c[k] * v[k];
      end
      x <= '0;
      for (int b = 0; b < B; b++) begin
        shift <= 1; sign_bit <= sgn && (b == B - 1);
        @(posedge clk);
      end
      shift <= 0; sign_bit <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y) != exp) begin
        failures++;
        $display("FAIL pass %0d signed=%0b: y=%0d expected %0d", t, sgn, y, exp);
      end
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y) != exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
