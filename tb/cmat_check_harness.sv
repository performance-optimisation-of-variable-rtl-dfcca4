// cmat_check_harness: drives one const_cmat_mult configuration with random
// complex vectors (one per clock) and compares every output vector, exactly
// LATENCY clocks later, with an integer model of the same arithmetic:
// coefficients round(cos/sin(angle) * 2^FRAC) of the stage matrix written
// out from its definition (butterfly matrix T_R (x) I_{N/R}, or twiddle
// diagonal), each product truncated (floor) to W bits, sums wrapping at W
// bits.
module cmat_check_harness #(
  parameter int                 W        = 18,
  parameter int                 FRAC     = 12,
  parameter int                 N        = 8,
  parameter fft_pkg::mat_kind_e KIND     = fft_pkg::MAT_KRON,
  parameter int                 R        = 2,
  parameter bit                 INVERSE  = 1'b0,
  parameter bit                 LUT_ONLY = 1'b0,
  parameter int                 NVEC     = 40
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam real PI  = 3.14159265358979323846;
  localparam int  LAT = LUT_ONLY ? 5 : 3;

  logic signed [W-1:0] x_re [N], x_im [N], y_re [N], y_im [N];
  longint h_re [NVEC][N], h_im [NVEC][N];

  const_cmat_mult #(
    .W(W), .FRAC(FRAC), .N(N), .KIND(KIND), .R(R), .INVERSE(INVERSE),
    .LUT_ONLY(LUT_ONLY)
  ) dut (.*);

  // Entry (i, j) of the stage matrix, quantised; ok = 0 where it is empty.
  task automatic coef(input int i, input int j, output longint cr,
                      output longint ci);
    int  m;
    real a;
    bit  ok;
    m = N / R;
    if (KIND == fft_pkg::MAT_KRON) begin
      ok = (i % m) == (j % m);
      a  = 2.0 * PI * real'((i / m) * (j / m)) / real'(R);
    end else begin
      ok = (i == j);
      a  = 2.0 * PI * real'((j / m) * (j % m)) / real'(N);
    end
    if (!INVERSE) a = -a;
    cr = ok ? longint'($cos(a) * (2.0 ** FRAC)) : 0;
    ci = ok ? longint'($sin(a) * (2.0 ** FRAC)) : 0;
  endtask

  function automatic longint wrap(input longint v);
    return longint'($signed(W'(v)));
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin x_re[i] = '0; x_im[i] = '0; end
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int v = 0; v < NVEC + LAT; v++) begin
      if (v < NVEC) begin
        for (int i = 0; i < N; i++) begin
          h_re[v][i] = longint'($urandom_range(0, 16000)) - 8000;
          h_im[v][i] = longint'($urandom_range(0, 16000)) - 8000;
          if (v == 0) begin h_re[v][i] = 8000; h_im[v][i] = -8000; end
          x_re[i] = W'(h_re[v][i]);
          x_im[i] = W'(h_im[v][i]);
        end
      end
      @(negedge clk);
      if (v - LAT + 1 >= 0 && v - LAT + 1 < NVEC) begin
        int k;
        k = v - LAT + 1;
        for (int j = 0; j < N; j++) begin
          longint sr, si, cr, ci;
          sr = 0; si = 0;
          for (int i = 0; i < N; i++) begin
            coef(i, j, cr, ci);
            if (cr != 0 || ci != 0) begin
              sr = wrap(sr + wrap((h_re[k][i] * cr - h_im[k][i] * ci) >>> FRAC));
              si = wrap(si + wrap((h_re[k][i] * ci + h_im[k][i] * cr) >>> FRAC));
            end
          end
          checks++;
          if (longint'(y_re[j]) != sr || longint'(y_im[j]) != si) begin
            failures++;
            if (failures < 8)
              $display("FAIL N=%0d kind=%0d col %0d vec %0d: got (%0d,%0d) exp (%0d,%0d)",
                       N, KIND, j, k, y_re[j], y_im[j], sr, si);
          end
        end
      end
    end
    done = 1'b1;
  end

  initial begin checks = 0; failures = 0; done = 1'b0; end
endmodule
