// da_incr_side: incremental-equation side of the distributed-arithmetic
// controller, u[n] = u[n-1] + k0 e[n] + k1 e[n-1] + k2 e[n-2].
//
// On `err_load` the error e[n] = Pd + Pneg (Pneg = two's complement of P) is
// captured in e_reg, and three PSRs are loaded with e[n], e[n-1] (reg1) and
// e[n-2] (reg2); the scaling accumulator is cleared. Each `err_shift` clock
// the three PSRs give one bit each, LSB first; together they address LUT2
// (Table: 0, k2, k1, k1+k2, k0, k0+k2, k0+k1, k0+k1+k2, with e[n] as the
// address MSB), and the scaling accumulator adds the word, or subtracts it
// on the clock marked `err_sign`, which carries the two's-complement sign
// bits. After ERR_BITS clocks the accumulator holds E exactly. On `update`
// reg3 <= reg3 + E (u[n]), reg1 <= e[n], reg2 <= reg1. u is reg3.
// `coef_load` precomputes LUT2 from k0..k2. Reset zeroes every register, so
// the first period sees e[n-1] = e[n-2] = 0 and u[n-1] = 0.
// The PSRs, LUT2 and accumulator are the generic DA unit da_sop with three
// inputs. The structure follows the document; the control clocks and widths are
// this design's. u wraps only if it exceeds OUT_BITS.
module da_incr_side
  import pid_pkg::*;
#(
  parameter int unsigned P_BITS    = P_W,
  parameter int unsigned ERR_BITS  = E_W,
  parameter int unsigned GAIN_BITS = K_W,
  parameter int unsigned OUT_BITS  = U_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        coef_load,
  input  logic signed [GAIN_BITS-1:0] k0,
  input  logic signed [GAIN_BITS-1:0] k1,
  input  logic signed [GAIN_BITS-1:0] k2,
  input  logic [P_BITS-1:0]           p,
  input  logic signed [ERR_BITS-1:0]  pd,
  input  logic                        err_load,
  input  logic                        err_shift,
  input  logic                        err_sign,
  input  logic                        update,
  output logic signed [ERR_BITS-1:0]  e_n,
  output logic signed [OUT_BITS-1:0]  u
);

  localparam int unsigned LW = GAIN_BITS + 2;      // LUT2 word: sum of 3 gains
  localparam int unsigned AW = LW + ERR_BITS;      // accumulator width

  logic signed [ERR_BITS-1:0] p_neg, e_new, e_reg, reg1, reg2;
  logic signed [OUT_BITS-1:0] reg3;
  logic signed [AW-1:0]       e_acc;

  assign p_neg = ~ERR_BITS'(p) + 1'b1;
  assign e_new = pd + p_neg;

  // Three PSRs, LUT2 (e[n] on the address MSB) and the scaling accumulator.
  da_sop #(.K(3), .B(ERR_BITS), .A_W(GAIN_BITS), .L_W(LW)) u_sop (
    .clk, .rst_n, .coef_load, .coef({k0, k1, k2}),
    .load(err_load), .shift(err_shift), .sign_bit(err_sign),
    .x({e_new, reg1, reg2}), .y(e_acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_reg <= '0;
      reg1  <= '0;
      reg2  <= '0;
      reg3  <= '0;
    end else begin
      if (err_load) e_reg <= e_new;
      if (update) begin
        reg1 <= e_reg;
        reg2 <= reg1;
        reg3 <= reg3 + OUT_BITS'(e_acc);
      end
    end
  end

  assign e_n = e_reg;
  assign u   = reg3;

endmodule
