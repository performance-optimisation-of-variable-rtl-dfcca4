// fft_stage: one level of the recursive parallel FFT, and through
// self-instantiation all the levels below it.
//
// For a level of N points whose stage list continues with M = N/R points,
// the transform is factorised as T_N = P * (I_R (x) T_M) * D * (T_R (x) I_M):
//   1. s1: multiply by the radix-R butterfly matrix T_R (x) I_M
//          (a[k*M+m] = sum_i W_R^(i*k) x[i*M+m]);
//   2. s2: multiply by the twiddle diagonal D (b[k*M+m] = W_N^(k*m) a[k*M+m]);
//   3. R instances of fft_stage, one per block k, each computing the M-point
//      transform of b[k*M .. k*M+M-1] with the rest of the stage list;
//   4. the output permutation P, pure wiring: X[q*R+k] = c_k[q].
// When the stage list ends at this level, the level is a leaf: a single
// constant matrix product with the full N-point DFT matrix.
//
// Interface: x_re/x_im, N signed fixed-point samples (W bits, FRAC
// fractional bits) in natural order; X_re/X_im, the N transform bins in
// natural order. No handshake: a new input vector every clock.
// Timing: each constant matrix product takes MAT_LAT = 3 cycles (5 with
// LUT_ONLY); a non-leaf level adds 2*MAT_LAT, a leaf MAT_LAT, so the
// latency is MAT_LAT * (2*L - 1) for a stage list of L levels.
//
// The factorisation, the recursion and the wiring permutation follow the
// source design; stage lists encoded as a packed parameter are this
// design's choice.
//
// Lint note: when this module is linted on its own as the top, Verilator
// reports sc_re/sc_im as undriven and SUB/sx_re/sx_im as unused in the
// topmost instance. Those signals are connected to the recursive `conquer`
// instance, which Verilator resolves only below the top; linted through
// fft_parallel (or any parent) the warnings do not appear, and simulation
// checks every output bin of every level.
module fft_stage #(
  parameter int                   W        = 18,
  parameter int                   FRAC     = 12,
  parameter int                   CW       = W,
  parameter int                   CFRAC    = FRAC,
  parameter fft_pkg::stage_list_t STAGES   = fft_pkg::STAGES_64_R2,
  parameter bit                   INVERSE  = 1'b0,
  parameter bit                   LUT_ONLY = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x_re [STAGES[0]],
  input  logic signed [W-1:0] x_im [STAGES[0]],
  output logic signed [W-1:0] X_re [STAGES[0]],
  output logic signed [W-1:0] X_im [STAGES[0]]
);
  import fft_pkg::*;

  localparam int N    = int'(STAGES[0]);
  localparam int NEXT = int'(STAGES[1]);

  if (NEXT == 0) begin : g_leaf
    const_cmat_mult #(
      .W(W), .FRAC(FRAC), .CW(CW), .CFRAC(CFRAC), .N(N), .KIND(MAT_KRON), .R(N),
      .INVERSE(INVERSE), .LUT_ONLY(LUT_ONLY)
    ) s1 (
      .clk, .rst, .x_re, .x_im, .y_re(X_re), .y_im(X_im)
    );
  end else begin : g_split
    localparam int M = NEXT;
    localparam int R = N / M;
    localparam stage_list_t SUB = STAGES >> 16;

    if (N % M != 0 || M >= N) begin : g_bad_list
      $error("fft_stage: stage size %0d does not divide %0d", M, N);
    end

    logic signed [W-1:0] a_re [N], a_im [N];
    logic signed [W-1:0] b_re [N], b_im [N];

    const_cmat_mult #(
      .W(W), .FRAC(FRAC), .CW(CW), .CFRAC(CFRAC), .N(N), .KIND(MAT_KRON), .R(R),
      .INVERSE(INVERSE), .LUT_ONLY(LUT_ONLY)
    ) s1 (
      .clk, .rst, .x_re, .x_im, .y_re(a_re), .y_im(a_im)
    );

    const_cmat_mult #(
      .W(W), .FRAC(FRAC), .CW(CW), .CFRAC(CFRAC), .N(N), .KIND(MAT_DIAG), .R(R),
      .INVERSE(INVERSE), .LUT_ONLY(LUT_ONLY)
    ) s2 (
      .clk, .rst, .x_re(a_re), .x_im(a_im), .y_re(b_re), .y_im(b_im)
    );

    for (genvar k = 0; k < R; k++) begin : g_sub
      logic signed [W-1:0] sx_re [M], sx_im [M];
      logic signed [W-1:0] sc_re [M], sc_im [M];

      for (genvar m = 0; m < M; m++) begin : g_wire
        assign sx_re[m] = b_re[k*M + m];
        assign sx_im[m] = b_im[k*M + m];
        // Output permutation: bin q*R + k comes from sub-transform k, bin q.
        assign X_re[m*R + k] = sc_re[m];
        assign X_im[m*R + k] = sc_im[m];
      end

      fft_stage #(
        .W(W), .FRAC(FRAC), .CW(CW), .CFRAC(CFRAC), .STAGES(SUB), .INVERSE(INVERSE),
        .LUT_ONLY(LUT_ONLY)
      ) conquer (
        .clk, .rst, .x_re(sx_re), .x_im(sx_im), .X_re(sc_re), .X_im(sc_im)
      );
    end
  end
endmodule
