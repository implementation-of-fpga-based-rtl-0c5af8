// bounded: value limiter of the conventional controller.
//
// Keeps the control output inside the user range: y = up_bound when x is
// above it, low_bound when x is below it, x otherwise. Purely combinational.
// hi_clip / lo_clip report which limit acted. The caller keeps
// low_bound <= up_bound; if not, the upper limit wins. The limiter and its
// two user bounds come from the conventional design; building it as two
// comparators and a multiplexer is the simplest form of that function.
module bounded #(
  parameter int unsigned W = 48
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] up_bound,
  input  logic signed [W-1:0] low_bound,
  output logic signed [W-1:0] y,
  output logic                hi_clip,
  output logic                lo_clip
);

  always_comb begin
    hi_clip = x > up_bound;
    lo_clip = !hi_clip && (x < low_bound);
    if (hi_clip)      y = up_bound;
    else if (lo_clip) y = low_bound;
    else              y = x;
  end

endmodule
