// da_pid: incremental PID controller in distributed arithmetic (no
// multipliers): the ADC side (da_adc_side), the incremental-equation side
// (da_incr_side) and their sequencer (da_ctrl).
//
// `coef_load` precomputes both look-up tables from s and k0..k2; it must not
// coincide with a running period. A `start` pulse while idle samples a[n]
// and Pd and runs one control period: ADC_BITS clocks to form P = a*s, one
// clock to form and load e[n], ERR_BITS clocks to form E, one clock to
// update u. `done` pulses on the update clock; u[n] is on `u` the clock after
// and holds until the next period (latency ADC_BITS + ERR_BITS + 3 clocks
// from start to done). `busy` is high from the clock after start to done.
// The output is not limited; the document gives the limiter only for the
// conventional controller. Formats as in pid_pkg; outputi / outputf are the
// integer and fraction fields of u.
module da_pid
  import pid_pkg::*;
#(
  parameter int unsigned ADC_BITS  = ADC_W,
  parameter int unsigned STEP_BITS = S_W,
  parameter int unsigned FRAC_BITS = S_FRAC,
  parameter int unsigned ERR_BITS  = E_W,
  parameter int unsigned GAIN_BITS = K_W,
  parameter int unsigned GAIN_FRAC = K_FRAC,
  parameter int unsigned OUT_BITS  = U_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          coef_load,
  input  logic                          start,
  input  logic [ADC_BITS-1:0]           a,
  input  logic [STEP_BITS-1:0]          step,
  input  logic signed [ERR_BITS-1:0]    pd,
  input  logic signed [GAIN_BITS-1:0]   k0,
  input  logic signed [GAIN_BITS-1:0]   k1,
  input  logic signed [GAIN_BITS-1:0]   k2,
  output logic signed [OUT_BITS-1:0]    u,
  output logic signed [OUT_BITS-FRAC_BITS-GAIN_FRAC-1:0] outputi,
  output logic [FRAC_BITS+GAIN_FRAC-1:0] outputf,
  output logic signed [ERR_BITS-1:0]    e_n,
  output logic                          busy,
  output logic                          done
);

  localparam int unsigned PW = ADC_BITS + STEP_BITS;

  logic                       adc_load, adc_shift, err_load, err_shift, err_sign, update;
  logic [PW-1:0]              p;
  logic signed [ERR_BITS-1:0] pd_q;

  da_ctrl #(.N_ADC(ADC_BITS), .N_ERR(ERR_BITS)) u_ctrl (
    .clk, .rst_n, .start,
    .adc_load, .adc_shift, .err_load, .err_shift, .err_sign, .update,
    .busy, .done
  );

  // The set point is sampled with a[n].
  always_ff @(posedge clk) begin
    if (!rst_n)        pd_q <= '0;
    else if (adc_load) pd_q <= pd;
  end

  da_adc_side #(.ADC_BITS(ADC_BITS), .STEP_BITS(STEP_BITS)) u_adc_side (
    .clk, .rst_n, .coef_load, .step, .load(adc_load), .shift(adc_shift), .a, .p
  );

  da_incr_side #(
    .P_BITS(PW), .ERR_BITS(ERR_BITS), .GAIN_BITS(GAIN_BITS), .OUT_BITS(OUT_BITS)
  ) u_incr_side (
    .clk, .rst_n, .coef_load, .k0, .k1, .k2, .p, .pd(pd_q),
    .err_load, .err_shift, .err_sign, .update, .e_n, .u
  );

  // The tables must not change under a running period.
  a_coef_load_idle: assert property (@(posedge clk) disable iff (!rst_n) !(coef_load && busy))
    else $error("coef_load while a control period is running");

  assign outputi = u[OUT_BITS-1:FRAC_BITS+GAIN_FRAC];
  assign outputf = u[FRAC_BITS+GAIN_FRAC-1:0];

endmodule
