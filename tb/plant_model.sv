// plant_model: behavioural stand-in for the controlled device, its sensor
// and the 8-bit A/D converter, used only by testbenches to close the loop.
//
// The device is a first-order lag: on every `step_en` clock its position
// moves one eighth of the way towards the commanded position u[n] * 2^-K_FRAC
// (both carry S_FRAC fraction bits). The sensor/ADC quantises the position
// to adc = round(pos / s), limited to 0..255. Reset puts the device at rest
// at position 0.
module plant_model #(
  parameter int unsigned U_SHIFT = 8   // K_FRAC: u fraction bits beyond S_FRAC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step_en,
  input  logic signed [47:0] u,
  input  logic [11:0]        step,
  output logic [7:0]         adc
);
  longint pos;

  always_ff @(posedge clk) begin
    if (!rst_n)       pos <= 0;
    else if (step_en) pos <= pos + (((longint'(u) >>> U_SHIFT) - pos) >>> 3);
  end

  always_comb begin
    longint q;
    q = (step == 0) ? 0 : (pos + longint'(step) / 2) / longint'(step);
    if (q < 0) q = 0;
    if (q > 255) q = 255;
    adc = 8'(q);
  end
endmodule
