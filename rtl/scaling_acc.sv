// scaling_acc: the DA scaling accumulator (adder/subtractor, accumulator
// register and 2^-1 feedback).
//
// Each clock with `en` the accumulator becomes (acc * 2^-1) + din * 2^(B-1),
// or minus din when `sub` marks the sign-bit clock of two's-complement
// inputs. After B clocks fed with the words for bits 0..B-1 (LSB first) acc
// equals sum_b din_b * 2^b exactly: the B low bits of the register keep the
// fraction bits a plain right shift would drop, so nothing is rounded.
// `clear` (priority over en) zeroes the register before a new word.
// Synchronous active-low reset. The result is valid the clock after the
// last enabled clock.
module scaling_acc #(
  parameter int unsigned L_W = 18,  // width of the LUT words (signed)
  parameter int unsigned B   = 24   // serial word length
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      en,
  input  logic                      sub,
  input  logic signed [L_W-1:0]     din,
  output logic signed [L_W+B-1:0]   acc
);

  logic signed [L_W+B-1:0] term;

  assign term = (L_W+B)'(din) <<< (B-1);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) acc <= '0;
    else if (en)         acc <= (acc >>> 1) + (sub ? -term : term);
  end

endmodule
