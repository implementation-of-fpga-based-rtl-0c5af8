// scaling_acc_tb: feeds the scaling accumulator B random words, one per
// clock, subtracting the last, and checks the result against
// sum_{b<B-1} w_b 2^b - w_{B-1} 2^{B-1}. Also checks clear and that a clock
// without enable holds the value.
module scaling_acc_tb;
  localparam int unsigned L_W = 18, B = 24;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, sub = 0;
  logic signed [L_W-1:0] din = '0;
  logic signed [L_W+B-1:0] acc;
  int checks = 0, failures = 0;

  scaling_acc #(.L_W(L_W), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    logic signed [L_W-1:0] w;
    longint exp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 40; t++) begin
      clear <= 1; en <= 1;
      @(posedge clk);
      clear <= 0;
      #1 check(longint'(acc), 0, "clear");
      exp = 0;
      for (int b = 0; b < B; b++) begin
        w = L_W'($urandom);
        if (t == 0) w = -(1 <<< (L_W - 1));
        din <= w; en <= 1; sub <= (b == B - 1);
        exp += (b == B - 1) ? -(longint'(w) <<< b) : (longint'(w) <<< b);
        @(posedge clk);
      end
      en <= 0; sub <= 0;
      @(posedge clk);
      #1 check(longint'(acc), exp, $sformatf("sum %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
