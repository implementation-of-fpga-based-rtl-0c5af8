// psr_tb: loads random words into a parallel-in serial-out register and
// checks that the bits come out LSB first, one per shift clock, that a clock
// without shift holds the bit and that load overrides shift.
module psr_tb;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, sbit;
  logic [W-1:0] din = '0;
  int checks = 0, failures = 0;

  psr #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] w;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      w = W'($urandom);
      din <= w; load <= 1; shift <= 1;   // load wins over shift
      @(posedge clk);
      load <= 0; shift <= 0;
      for (int i = 0; i < W; i++) begin
        #1 check(sbit, w[i], $sformatf("bit %0d of %h", i, w));
        if (i == 3) begin                // a clock without shift holds the bit
          @(posedge clk);
          #1 check(sbit, w[i], "hold");
        end
        shift <= 1;
        @(posedge clk);
        shift <= 0;
      end
      #1 check(sbit, 1'b0, "zero fill");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
