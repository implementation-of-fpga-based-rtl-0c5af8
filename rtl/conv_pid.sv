// conv_pid: incremental PID controller built the conventional way, with
// three multipliers and adders.
//
// Each clock with `ctrl` high is one control period:
//   P     = a * s                        (ADC word times step size)
//   e[n]  = Pd + Pneg, Pneg = ~P + 1     (fraction fields added first, their
//                                         carry goes into the integer fields)
//   P0 = k0*e[n], P1 = k1*e[n-1], P2 = k2*e[n-2]
//   S1 = P0 + P1, S2 = P2 + u[n-1], u[n] = Bounded(S1 + S2)
// and on that edge reg1 <= e[n], reg3 <= e[n-1] (= reg1), reg4 <= u[n].
// The output u is reg4, so it changes one clock after the strobe and holds
// until the next one. Reset zeroes all registers, giving u = 0.
// The decomposition, the register names and the limiter follow the
// document. The number formats (pid_pkg) and the choice that reg4 keeps the
// limited value (so the integral cannot run past the bounds) are this
// design's own. Arithmetic is full precision; u wraps only if it exceeds U_W.
// Interface: a unsigned; s unsigned, S_FRAC fraction bits; pd signed,
// S_FRAC fraction bits; k0..k2 signed, K_FRAC fraction bits; u, up_bound,
// low_bound signed, U_FRAC fraction bits. outputi / outputf are the integer
// and fraction fields of u.
module conv_pid
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
  input  logic                          ctrl,
  input  logic [ADC_BITS-1:0]           a,
  input  logic [STEP_BITS-1:0]          step,
  input  logic signed [ERR_BITS-1:0]    pd,
  input  logic signed [GAIN_BITS-1:0]   k0,
  input  logic signed [GAIN_BITS-1:0]   k1,
  input  logic signed [GAIN_BITS-1:0]   k2,
  input  logic signed [OUT_BITS-1:0]    up_bound,
  input  logic signed [OUT_BITS-1:0]    low_bound,
  output logic signed [OUT_BITS-1:0]    u,
  output logic signed [OUT_BITS-FRAC_BITS-GAIN_FRAC-1:0] outputi,
  output logic [FRAC_BITS+GAIN_FRAC-1:0] outputf,
  output logic                          hi_clip,
  output logic                          lo_clip
);

  localparam int unsigned PW = ADC_BITS + STEP_BITS;
  localparam int unsigned IW = ERR_BITS - FRAC_BITS;   // integer field of e
  localparam int unsigned MW = ERR_BITS + GAIN_BITS;   // product width

  logic [PW-1:0]              p;
  logic [ERR_BITS-1:0]        p_neg;
  logic [FRAC_BITS:0]         e_frac_sum;   // fraction field plus carry
  logic [IW-1:0]              e_int;
  logic signed [ERR_BITS-1:0] e_n, reg1, reg3;
  logic signed [MW-1:0]       p0, p1, p2;
  logic signed [OUT_BITS-1:0] s1, s2, u_sum, u_lim, reg4;

  // Position and its two's complement.
  assign p     = a * step;
  assign p_neg = ~ERR_BITS'(p) + 1'b1;

  // Error: fraction fields first, their carry into the integer fields.
  assign e_frac_sum = {1'b0, pd[FRAC_BITS-1:0]} + {1'b0, p_neg[FRAC_BITS-1:0]};
  assign e_int      = pd[ERR_BITS-1:FRAC_BITS] + p_neg[ERR_BITS-1:FRAC_BITS]
                    + IW'(e_frac_sum[FRAC_BITS]);
  assign e_n        = {e_int, e_frac_sum[FRAC_BITS-1:0]};

  // Products and sums of the incremental equation.
  assign p0    = MW'(k0) * MW'(e_n);
  assign p1    = MW'(k1) * MW'(reg1);
  assign p2    = MW'(k2) * MW'(reg3);
  assign s1    = OUT_BITS'(p0) + OUT_BITS'(p1);
  assign s2    = OUT_BITS'(p2) + reg4;
  assign u_sum = s1 + s2;

  bounded #(.W(OUT_BITS)) u_bound (
    .x(u_sum), .up_bound(up_bound), .low_bound(low_bound),
    .y(u_lim), .hi_clip(hi_clip), .lo_clip(lo_clip)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg3 <= '0;
      reg4 <= '0;
    end else if (ctrl) begin
      reg1 <= e_n;
      reg3 <= reg1;
      reg4 <= u_lim;
    end
  end

  assign u       = reg4;
  assign outputi = reg4[OUT_BITS-1:FRAC_BITS+GAIN_FRAC];
  assign outputf = reg4[FRAC_BITS+GAIN_FRAC-1:0];

endmodule
