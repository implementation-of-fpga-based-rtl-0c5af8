// da_sop: distributed-arithmetic sum of products, y = sum_k A_k * x_k.
//
// K parallel-in/serial-out registers (psr) hold the B-bit inputs x_k and
// present one bit of each per clock, LSB first. Those K bits address a
// 2^K-word table (dalut) holding every partial sum of the coefficients A_k;
// the word goes to the scaling accumulator (scaling_acc), which halves its
// previous value and adds the word, or subtracts it on the clock marked
// `sign_bit` when the inputs are two's complement. After B shift clocks y
// holds the exact sum of products. This is the generic DA unit: the ADC side
// of the PID controller uses it with K=1 and unsigned input, the
// incremental-equation side with K=3 and signed inputs.
// Controls: `coef_load` precomputes the table from `coef` (held afterwards);
// `load` takes new inputs and clears the accumulator; `shift` advances one
// bit; `sign_bit` (with the last shift of a signed word) subtracts. y is
// valid the clock after the B-th shift and holds until the next load.
// Input x[k] goes with coef[k]. The block structure (PSRs, DALUT of 2^K
// words, scaling accumulator with 2^-1 feedback) follows the document; the
// exact-width accumulator and the control signals are this design's.
module da_sop #(
  parameter int unsigned K   = 3,               // number of inputs
  parameter int unsigned B   = 8,               // input word length
  parameter int unsigned A_W = 16,              // coefficient width (signed)
  parameter int unsigned L_W = A_W + $clog2(K)  // table word width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         coef_load,
  input  logic signed [K-1:0][A_W-1:0] coef,
  input  logic                         load,
  input  logic                         shift,
  input  logic                         sign_bit,
  input  logic [K-1:0][B-1:0]          x,
  output logic signed [L_W+B-1:0]      y
);

  logic [K-1:0]          bits;
  logic signed [L_W-1:0] word;

  for (genvar k = 0; k < K; k++) begin : g_psr
    psr #(.W(B)) u_psr (
      .clk, .rst_n, .load, .shift, .din(x[k]), .sbit(bits[k])
    );
  end

  dalut #(.K(K), .A_W(A_W), .L_W(L_W)) u_lut (
    .clk, .rst_n, .load(coef_load), .coef, .addr(bits), .word
  );

  scaling_acc #(.L_W(L_W), .B(B)) u_acc (
    .clk, .rst_n, .clear(load), .en(shift), .sub(sign_bit), .din(word), .acc(y)
  );

endmodule
