// fft_check_harness: drives one fft_parallel configuration with a stream of
// random complex vectors (a new vector every clock), and checks every
// transform against a direct O(N^2) DFT evaluated in double precision.
//
// For each output vector it checks: the bin error of every bin (at most
// TOL_LSB units of the last place), the signal-to-noise ratio of the whole
// vector (at least MIN_SNR_DB), and that out_valid rises exactly LATENCY
// clocks after in_valid. Inputs are uniform in +-AMP (a fraction of 1.0)
// so that the unscaled transform cannot overflow the integer bits.
module fft_check_harness #(
  parameter int                   W        = 18,
  parameter int                   FRAC     = 12,
  parameter int                   CW       = W,
  parameter int                   CFRAC    = FRAC,
  parameter fft_pkg::stage_list_t STAGES   = fft_pkg::STAGES_64_R2,
  parameter bit                   INVERSE  = 1'b0,
  parameter bit                   LUT_ONLY = 1'b0,
  parameter int                   LATENCY  = 33,
  parameter int                   NVEC     = 24,
  parameter real                  AMP      = 0.3,
  parameter int                   TOL_LSB  = 64,
  parameter real                  MIN_SNR_DB = 50.0
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int N = int'(STAGES[0]);
  localparam real PI = 3.14159265358979323846;
  localparam real SCALE = real'(1 << FRAC);

  logic                in_valid;
  logic signed [W-1:0] x_re [N], x_im [N];
  logic                out_valid;
  logic signed [W-1:0] X_re [N], X_im [N];

  int hx_re [NVEC][N];
  int hx_im [NVEC][N];

  fft_parallel #(
    .W(W), .FRAC(FRAC), .CW(CW), .CFRAC(CFRAC), .STAGES(STAGES), .INVERSE(INVERSE), .LUT_ONLY(LUT_ONLY)
  ) dut (.*);

  // Inputs are driven and outputs sampled at falling edges; `cycle` counts
  // falling edges.
  int in_cycle [NVEC];
  int cycle = 0;
  always @(negedge clk) cycle++;

  // Stimulus: NVEC consecutive vectors.
  initial begin
    in_valid = 1'b0;
    for (int i = 0; i < N; i++) begin x_re[i] = '0; x_im[i] = '0; end
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int v = 0; v < NVEC; v++) begin
      for (int i = 0; i < N; i++) begin
        int amp_lsb;
        amp_lsb = int'(AMP * SCALE);
        if (v == 0) begin
          // a single tone in bin 1 (of amplitude AMP spread over the bins)
          hx_re[v][i] = int'(AMP * SCALE / 2.0 * $cos(2.0 * PI * i / N));
          hx_im[v][i] = int'(AMP * SCALE / 2.0 * $sin(2.0 * PI * i / N));
        end else if (v == 1) begin
          hx_re[v][i] = (i == 0) ? amp_lsb : 0;   // impulse
          hx_im[v][i] = 0;
        end else begin
          hx_re[v][i] = $urandom_range(0, 2 * amp_lsb) - amp_lsb;
          hx_im[v][i] = $urandom_range(0, 2 * amp_lsb) - amp_lsb;
        end
        x_re[i] = W'(hx_re[v][i]);
        x_im[i] = W'(hx_im[v][i]);
      end
      in_valid = 1'b1;
      in_cycle[v] = cycle;
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  // Checker.
  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int v = 0; v < NVEC; v++) begin
      real sig, noise, max_err, snr;
      @(negedge clk);
      while (!out_valid) @(negedge clk);
      checks++;
      if (cycle - in_cycle[v] != LATENCY) begin
        failures++;
        $display("FAIL N=%0d vec %0d: latency %0d, expected %0d", N, v,
                 cycle - in_cycle[v], LATENCY);
      end
      sig = 0.0; noise = 0.0; max_err = 0.0;
      for (int k = 0; k < N; k++) begin
        real ref_re, ref_im, er, ei, a;
        ref_re = 0.0; ref_im = 0.0;
        for (int n = 0; n < N; n++) begin
          a = 2.0 * PI * real'((n * k) % N) / real'(N);
          if (!INVERSE) a = -a;
          ref_re += real'(hx_re[v][n]) * $cos(a) - real'(hx_im[v][n]) * $sin(a);
          ref_im += real'(hx_re[v][n]) * $sin(a) + real'(hx_im[v][n]) * $cos(a);
        end
        er = real'(X_re[k]) - ref_re;
        ei = real'(X_im[k]) - ref_im;
        sig   += ref_re * ref_re + ref_im * ref_im;
        noise += er * er + ei * ei;
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        checks++;
        if (er > TOL_LSB || ei > TOL_LSB) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d vec %0d bin %0d: got (%0d, %0d), exp (%0.1f, %0.1f)",
                     N, v, k, X_re[k], X_im[k], ref_re, ref_im);
        end
      end
      snr = 10.0 * $log10(sig / (noise + 1.0e-9));
      checks++;
      if (snr < MIN_SNR_DB) begin
        failures++;
        $display("FAIL N=%0d vec %0d: SNR %0.1f dB", N, v, snr);
      end
      if (v == NVEC - 1)
        $display("N=%0d stages=%h inverse=%0d lut_only=%0d W=%0d CW=%0d: last SNR %0.1f dB, max bin error %0.1f LSB",
                 N, STAGES, INVERSE, LUT_ONLY, W, CW, snr, max_err);
    end
    done = 1'b1;
  end
endmodule
