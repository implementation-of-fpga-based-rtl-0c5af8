// dalut: distributed-arithmetic look-up table, 2^K words of L_W bits.
//
// Word `addr` holds the sum of the coefficients coef[k] whose address bit
// addr[k] is 1, i.e. the bracketed partial sums of the DA expansion. With
// K=1 and coef = s it is the two-entry table {0, s} of the ADC side; with
// K=3, addr = {e[n], e[n-1], e[n-2]} and coef = {k0, k1, k2} it is the
// eight-entry table of the incremental equation (0, k2, k1, k1+k2, k0, ...).
// The contents are precomputed from `coef` in one clock when `load` is high
// and then held, so the coefficients need not stay on the inputs. Reads are
// combinational. Synchronous active-low reset clears all words.
module dalut #(
  parameter int unsigned K   = 3,               // number of DA inputs
  parameter int unsigned A_W = 16,              // coefficient width (signed)
  parameter int unsigned L_W = A_W + $clog2(K)  // word width (signed)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic signed [K-1:0][A_W-1:0] coef,
  input  logic [K-1:0]                addr,
  output logic signed [L_W-1:0]       word
);

  localparam int unsigned N = 2 ** K;

  logic signed [L_W-1:0] mem [N];
  logic signed [L_W-1:0] sums [N];

  // Partial sum for every address.
  always_comb begin
    for (int a = 0; a < N; a++) begin
      sums[a] = '0;
      for (int k = 0; k < K; k++)
        if (a[k]) sums[a] = sums[a] + L_W'(signed'(coef[k]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int a = 0; a < N; a++) mem[a] <= '0;
    end else if (load) begin
      for (int a = 0; a < N; a++) mem[a] <= sums[a];
    end
  end

  assign word = mem[addr];

endmodule
