// const_cmat_mult: product of a complex N-vector with a constant complex
// N x N matrix, y[j] = sum_i x[i] * C[i][j], all N outputs in parallel.
//
// The matrix is one of the two FFT stage matrices of fft_pkg (the radix-R
// butterfly matrix T_R (x) I_{N/R}, or the twiddle diagonal D_N), selected by
// KIND and computed while the design elaborates. Each output column is a
// const_cdot, which instantiates multipliers only for the non-zero entries
// of its column, so a sparse stage matrix costs only what its entries need;
// multiplications by +-1 and +-j are left to synthesis to reduce to
// wiring and negation.
//
// Timing: 3 cycles from x to y (5 with LUT_ONLY), one vector per cycle.
// Synchronous, active-high reset.
//
// Computing a stage as a constant matrix product follows the source design;
// generating the constants in the RTL instead of reading them from a file is
// this design's choice.
module const_cmat_mult #(
  parameter int                 W        = 18,
  parameter int                 FRAC     = 12,
  parameter int                 CW       = W,
  parameter int                 CFRAC    = FRAC,
  parameter int                 N        = 4,
  parameter fft_pkg::mat_kind_e KIND     = fft_pkg::MAT_KRON,
  parameter int                 R        = 2,
  parameter bit                 INVERSE  = 1'b0,
  parameter bit                 LUT_ONLY = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x_re [N],
  input  logic signed [W-1:0] x_im [N],
  output logic signed [W-1:0] y_re [N],
  output logic signed [W-1:0] y_im [N]
);
  for (genvar j = 0; j < N; j++) begin : g_col
    const_cdot #(
      .W(W), .FRAC(FRAC), .CW(CW), .CFRAC(CFRAC), .N(N), .KIND(KIND), .NPTS(N), .R(R),
      .INVERSE(INVERSE), .COL(j), .LUT_ONLY(LUT_ONLY)
    ) u_dot (
      .clk, .rst,
      .x_re, .x_im,
      .y_re(y_re[j]), .y_im(y_im[j])
    );
  end
endmodule
