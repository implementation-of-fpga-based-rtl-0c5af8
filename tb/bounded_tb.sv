// bounded_tb: random values and ranges through the limiter, checked against
// min(max(x, low), up), with both limits and the pass-through case forced.
module bounded_tb;
  localparam int unsigned W = 48;
  logic signed [W-1:0] x, up_bound, low_bound, y;
  logic hi_clip, lo_clip;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_mid = 0;

  bounded #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lo, hi, v, exp;
    for (int t = 0; t < 3000; t++) begin
      lo = longint'($signed($urandom)) * 1000;
      hi = lo + longint'($urandom_range(0, 100000)) * 1000;
      case (t % 3)
        0: v = hi + $urandom_range(1, 5000);
        1: v = lo - $urandom_range(1, 5000);
        default: v = lo + (hi - lo) / 2;
      endcase
      x = W'(v); up_bound = W'(hi); low_bound = W'(lo);
      #1;
      exp = v > hi ? hi : (v < lo ? lo : v);
      checks++;
      if (longint'(y) != exp || hi_clip != (v > hi) || lo_clip != (v < lo)) begin
        failures++;
        $display("FAIL x=%0d lo=%0d hi=%0d: y=%0d hi_clip=%0b lo_clip=%0b", v, lo, hi, y, hi_clip, lo_clip);
      end
      n_hi += int'(hi_clip); n_lo += int'(lo_clip); n_mid += int'(!hi_clip && !lo_clip);
    end
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_mid == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
