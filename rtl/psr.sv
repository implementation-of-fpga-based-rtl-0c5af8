// psr: parallel-in, serial-out shift register for distributed arithmetic.
//
// A word is loaded in parallel with `load`; every clock with `shift` it moves
// one place towards the LSB, so `sbit` presents bit 0, bit 1, ... bit W-1 of
// the loaded word on successive clocks (least significant bit first, as the
// DA scheme requires). `load` has priority over `shift`. The vacated MSB is
// filled with zero. Synchronous active-low reset to zero.
// Timing: sbit equals bit i of the loaded word after i shift clocks.
// LSB-first serial output is the DA scheme's; load priority and zero fill
// are this design's choice.
module psr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic         sbit
);

  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {1'b0, sr[W-1:1]};
  end

  assign sbit = sr[0];

endmodule
