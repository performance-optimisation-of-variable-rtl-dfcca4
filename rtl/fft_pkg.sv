// fft_pkg: shared types, constants and constant functions of the parallel
// FFT.
//
// A parallel N-point DFT is computed as a chain of products of the sample
// vector with constant complex matrices (y[j] = sum_i x[i] * C[i][j]). Only
// two kinds of constant matrix occur:
//   MAT_KRON : T_R (x) I_M, the radix-R butterfly matrix, M = N/R. Entry
//              (i*M+m', k*M+m) is W_R^(i*k) when m' == m and zero otherwise.
//              With R == N (M == 1) it is the plain DFT matrix T_N, used at
//              the leaves of the recursion.
//   MAT_DIAG : the twiddle diagonal D_N^(R). Entry (j, j), j = k*M+m, is
//              W_N^(k*m).
// W_N = exp(-2*pi*i/N) (exp(+2*pi*i/N) for the inverse transform). The
// entries are computed here while the design elaborates, and quantised to
// signed fixed point by the modules that use them, so no coefficient file is
// needed.
//
// A stage list names the sizes of the successive recursion levels, e.g.
// 64, 32, 16, 8, 4, 2: a 64-point transform split with radix 2 down to 2-point
// leaves. Element 0 is the transform size; a zero ends the list; the radix
// of a level is its size divided by the next size.
package fft_pkg;

  localparam int MAX_STAGES = 8;

  // Stage list: element [0] is the size of this level, [1] the next, ...
  typedef logic [MAX_STAGES-1:0][15:0] stage_list_t;

  // 64-point radix-2 decomposition (64 32 16 8 4 2).
  localparam stage_list_t STAGES_64_R2 =
      {16'd0, 16'd0, 16'd2, 16'd4, 16'd8, 16'd16, 16'd32, 16'd64};

  typedef enum logic [0:0] {
    MAT_KRON = 1'b0,
    MAT_DIAG = 1'b1
  } mat_kind_e;

  localparam real PI = 3.14159265358979323846;

  // Whether the matrix has an entry (before quantisation) at row i, column j.
  function automatic bit coef_present(input mat_kind_e kind, input int n,
                                      input int r, input int i, input int j);
    int m_sz;
    m_sz = n / r;
    if (kind == MAT_KRON) return (i % m_sz) == (j % m_sz);
    else                  return i == j;
  endfunction

  // Angle (radians) of the coefficient in row i, column j: the entry is
  // exp(+-j*angle), with the minus sign for the forward transform.
  function automatic real coef_angle(input mat_kind_e kind, input int n,
                                     input int r, input bit inverse,
                                     input int i, input int j);
    int m_sz;
    real a;
    m_sz = n / r;
    if (kind == MAT_KRON)
      a = 2.0 * PI * real'(((i / m_sz) * (j / m_sz)) % r) / real'(r);
    else
      a = 2.0 * PI * real'(((j / m_sz) * (j % m_sz)) % n) / real'(n);
    return inverse ? a : -a;
  endfunction

  // Real part of C[i][j], quantised to `frac` fractional bits.
  function automatic longint coef_re(input mat_kind_e kind, input int n,
                                     input int r, input bit inverse,
                                     input int i, input int j, input int frac);
    if (!coef_present(kind, n, r, i, j)) return 64'sd0;
    return longint'($cos(coef_angle(kind, n, r, inverse, i, j)) * (2.0 ** frac));
  endfunction

  // Imaginary part of C[i][j], quantised to `frac` fractional bits.
  function automatic longint coef_im(input mat_kind_e kind, input int n,
                                     input int r, input bit inverse,
                                     input int i, input int j, input int frac);
    if (!coef_present(kind, n, r, i, j)) return 64'sd0;
    return longint'($sin(coef_angle(kind, n, r, inverse, i, j)) * (2.0 ** frac));
  endfunction

  function automatic bit coef_nonzero(input mat_kind_e kind, input int n,
                                      input int r, input bit inverse,
                                      input int i, input int j, input int frac);
    return (coef_re(kind, n, r, inverse, i, j, frac) != 0) ||
           (coef_im(kind, n, r, inverse, i, j, frac) != 0);
  endfunction

  // Number of non-zero entries in rows 0 .. upto-1 of column j.
  function automatic int count_nonzero(input mat_kind_e kind, input int n,
                                       input int r, input bit inverse,
                                       input int j, input int frac,
                                       input int upto);
    int c;
    c = 0;
    for (int i = 0; i < upto; i++)
      if (coef_nonzero(kind, n, r, inverse, i, j, frac)) c++;
    return c;
  endfunction

  function automatic int pow2_ceil(input int v);
    int p;
    p = 1;
    while (p < v) p = p * 2;
    return p;
  endfunction

  // Number of recursion levels of a stage list (entries before the first 0).
  function automatic int stage_count(input stage_list_t s);
    int c;
    c = 0;
    for (int k = 0; k < MAX_STAGES; k++) begin
      if (s[k] == 16'd0) break;
      c++;
    end
    return c;
  endfunction

endpackage
