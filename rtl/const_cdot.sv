// const_cdot: one column of a constant complex matrix product, i.e. the dot
// product y = sum_i x[i] * C[i][COL] of an N-element complex vector with a
// column of constants.
//
// The column is taken from fft_pkg (matrix kind KIND of an NPTS-point,
// radix-R stage). Rows whose constant quantises to zero get no multiplier
// at all; the remaining K rows each get a const_cmult, and their truncated
// W-bit products are summed in a balanced binary adder tree (a heap of
// 2*KP nodes, KP = K rounded up to a power of two, unused leaves tied to
// zero), which keeps the add path at log2(K) adders instead of K-1. Sums
// wrap at W bits, as the datapath keeps a constant word length.
//
// Timing: the const_cmult latency (2 cycles, or 4 with LUT_ONLY) plus one
// output register after the adder tree: 3 (or 5) cycles from x to y, one
// new vector per cycle. Synchronous, active-high reset.
//
// Skipping zero multiplications and the adder tree follow the source design;
// the single output register is this design's choice.
module const_cdot #(
  parameter int                W        = 18,
  parameter int                FRAC     = 12,
  parameter int                CW       = W,
  parameter int                CFRAC    = FRAC,
  parameter int                N        = 4,
  parameter fft_pkg::mat_kind_e KIND     = fft_pkg::MAT_KRON,
  parameter int                NPTS     = 4,
  parameter int                R        = 2,
  parameter bit                INVERSE  = 1'b0,
  parameter int                COL      = 0,
  parameter bit                LUT_ONLY = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x_re [N],
  input  logic signed [W-1:0] x_im [N],
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);
  import fft_pkg::*;

  localparam int K  = count_nonzero(KIND, NPTS, R, INVERSE, COL, CFRAC, N);
  localparam int KP = pow2_ceil(K);

  // Heap-ordered adder tree: node n = node 2n + node 2n+1, leaves at KP..2KP-1.
  logic signed [W-1:0] t_re [1:2*KP-1];
  logic signed [W-1:0] t_im [1:2*KP-1];

  for (genvar i = 0; i < N; i++) begin : g_row
    if (coef_nonzero(KIND, NPTS, R, INVERSE, i, COL, CFRAC)) begin : g_mul
      localparam int SLOT = count_nonzero(KIND, NPTS, R, INVERSE, COL, CFRAC, i);
      const_cmult #(
        .W       (W),
        .FRAC    (FRAC),
        .CW      (CW),
        .CFRAC   (CFRAC),
        .C_RE    (coef_re(KIND, NPTS, R, INVERSE, i, COL, CFRAC)),
        .C_IM    (coef_im(KIND, NPTS, R, INVERSE, i, COL, CFRAC)),
        .LUT_ONLY(LUT_ONLY)
      ) u_mul (
        .clk, .rst,
        .a_re(x_re[i]), .a_im(x_im[i]),
        .p_re(t_re[KP+SLOT]), .p_im(t_im[KP+SLOT])
      );
    end
  end

  for (genvar s = K; s < KP; s++) begin : g_pad
    assign t_re[KP+s] = '0;
    assign t_im[KP+s] = '0;
  end

  for (genvar n = 1; n < KP; n++) begin : g_tree
    assign t_re[n] = t_re[2*n] + t_re[2*n+1];
    assign t_im[n] = t_im[2*n] + t_im[2*n+1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_re <= '0;
      y_im <= '0;
    end else begin
      y_re <= t_re[1];
      y_im <= t_im[1];
    end
  end
endmodule
