// pid_top: the two incremental PID controllers side by side.
//
// Both controllers take the same 8-bit ADC word, step size, set point and
// gains. The conventional controller (conv_pid, three multipliers, output
// limited to [low_bound, up_bound]) finishes a control period one clock
// after `start`; the distributed-arithmetic controller (da_pid, look-up
// tables and bit-serial accumulation) needs ADC_W + E_W + 3 clocks and
// signals `da_done`. `coef_load` fills the DA look-up tables from step and
// k0..k2; the conventional controller reads the gains directly. With wide
// bounds both give bit-identical outputs for the same sample sequence.
// The ADC, the plant and its sensor are outside: a[n] comes in, u[n] goes out.
module pid_top
  import pid_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_load,
  input  logic                 start,
  input  logic [ADC_W-1:0]     a,
  input  logic [S_W-1:0]       step,
  input  logic signed [E_W-1:0] pd,
  input  logic signed [K_W-1:0] k0,
  input  logic signed [K_W-1:0] k1,
  input  logic signed [K_W-1:0] k2,
  input  logic signed [U_W-1:0] up_bound,
  input  logic signed [U_W-1:0] low_bound,
  output logic signed [U_W-1:0] conv_u,
  output logic signed [U_W-U_FRAC-1:0] conv_outputi,
  output logic [U_FRAC-1:0]    conv_outputf,
  output logic                 conv_hi_clip,
  output logic                 conv_lo_clip,
  output logic signed [U_W-1:0] da_u,
  output logic signed [U_W-U_FRAC-1:0] da_outputi,
  output logic [U_FRAC-1:0]    da_outputf,
  output logic signed [E_W-1:0] da_e,
  output logic                 da_busy,
  output logic                 da_done
);

  conv_pid u_conv (
    .clk, .rst_n, .ctrl(start), .a, .step, .pd, .k0, .k1, .k2,
    .up_bound, .low_bound,
    .u(conv_u), .outputi(conv_outputi), .outputf(conv_outputf),
    .hi_clip(conv_hi_clip), .lo_clip(conv_lo_clip)
  );

  da_pid u_da (
    .clk, .rst_n, .coef_load, .start, .a, .step, .pd, .k0, .k1, .k2,
    .u(da_u), .outputi(da_outputi), .outputf(da_outputf), .e_n(da_e),
    .busy(da_busy), .done(da_done)
  );

endmodule
