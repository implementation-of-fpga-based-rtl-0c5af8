// da_adc_side: ADC side of the distributed-arithmetic controller, P = a * s
// without a multiplier.
//
// The ADC word a[n] sits in a PSR that presents one bit per clock, LSB
// first. The bit addresses LUT1, whose two words are 0 and the step size s;
// the word goes to the scaling accumulator, which halves its previous value
// and adds. After ADC_BITS shift clocks the accumulator holds a*s exactly.
// The ADC word is unsigned, so no clock subtracts.
// The PSR, LUT1 and accumulator are an instance of the generic DA unit
// da_sop with one input.
// Controls: `coef_load` writes s into LUT1 (s need not stay on its input);
// `load` takes a new a[n] and clears the accumulator; `shift` advances one
// bit. `p` is valid the clock after the ADC_BITS-th shift and holds until the
// next load. The structure (PSR, LUT1 = Table {0, s}, adder, accumulator,
// 2^-1 feedback) is the document's; the widths are this design's. The
// accumulator's top bit is its sign, always 0 here, and is left unused.
module da_adc_side
  import pid_pkg::*;
#(
  parameter int unsigned ADC_BITS  = ADC_W,
  parameter int unsigned STEP_BITS = S_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            coef_load,
  input  logic [STEP_BITS-1:0]            step,
  input  logic                            load,
  input  logic                            shift,
  input  logic [ADC_BITS-1:0]             a,
  output logic [ADC_BITS+STEP_BITS-1:0]   p
);

  localparam int unsigned LW = STEP_BITS + 1;   // s as a signed word

  logic signed [LW+ADC_BITS-1:0]   acc;

  // LUT1 = {0, s}; the ADC word is unsigned, so no clock subtracts.
  da_sop #(.K(1), .B(ADC_BITS), .A_W(LW), .L_W(LW)) u_sop (
    .clk, .rst_n, .coef_load, .coef({1'b0, step}),
    .load, .shift, .sign_bit(1'b0), .x(a), .y(acc)
  );

  assign p = acc[ADC_BITS+STEP_BITS-1:0];

endmodule
