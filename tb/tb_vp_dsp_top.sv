// tb_vp_dsp_top: end-to-end test of the whole design at its default sizes
// (no parameter overrides), all three engines running at once.
//
//  FFT   : 20 back-to-back 64-point transforms (a tone, an impulse, random
//          vectors), one per clock; each is compared with a direct DFT in
//          double precision (bin error and SNR) and must appear exactly 33
//          clocks after it entered.
//  MATRIX: 8 back-to-back 9 x 9 complex matrix products, compared element
//          by element with integer matrix products, 4 clocks latency. Half
//          of them use full-range operands, which must make a packed
//          multiplier carry (its cross-product sum reaching 2^18); those are
//          compared with the packed multipliers' documented wrap.
//  PI    : the controller closes a loop around a first-order process model
//          y[k+1] = y[k] + (u[k] - y[k]) / 8. The set point steps up, then
//          down; every controller output is compared with the difference
//          equation driven by the same measurements, 6 clocks later, and the
//          process must settle within 2% of each set point.
// Every mechanism named above (back-to-back streaming, tone and impulse
// transforms, carry wrap, set-point step up and down, settling) is counted
// and a mechanism that never happened counts as a failure.
module tb_vp_dsp_top;
  localparam int  NF = 64, FW = 18, FRAC = 12, FFT_LAT = 33, NFV = 20;
  localparam int  MW = 9, MN = 9, MOW = 23, MAT_LAT = 4, NMV = 8;
  localparam int  PW = 16, NPID = 1200;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks = 0, failures = 0;
  int cycle = 0;

  // DUT ports
  logic                  fft_in_valid, fft_out_valid;
  logic signed [FW-1:0]  fft_x_re [NF], fft_x_im [NF], fft_X_re [NF], fft_X_im [NF];
  logic                  mat_in_valid, mat_out_valid;
  logic [MW-1:0]         mat_a_re [MN][MN], mat_a_im [MN][MN];
  logic [MW-1:0]         mat_b_re [MN][MN], mat_b_im [MN][MN];
  logic signed [MOW-1:0] mat_c_re [MN][MN], mat_c_im [MN][MN];
  logic signed [PW-1:0]  pid_y, pid_sp, pid_a0, pid_a1, pid_a2, pid_u;

  vp_dsp_top dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  // mechanism counters
  int n_fft_frames = 0, n_fft_tone = 0, n_fft_impulse = 0, n_fft_b2b = 0;
  int n_mat_frames = 0, n_mat_carry = 0, n_mat_b2b = 0;
  int n_sp_up = 0, n_sp_down = 0, n_settled = 0, n_pid_checks = 0;
  bit fft_done = 0, mat_done = 0, pid_done = 0;

  initial begin : watchdog
    repeat (NPID + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- FFT
  int fx_re [NFV][NF], fx_im [NFV][NF];
  int f_in_cycle [NFV];

  localparam int AMP = int'(0.3 * (1 << FRAC));

  initial begin
    int amp;
    amp = AMP;
    fft_in_valid = 0;
    for (int i = 0; i < NF; i++) begin fft_x_re[i] = 0; fft_x_im[i] = 0; end
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int v = 0; v < NFV; v++) begin
      for (int i = 0; i < NF; i++) begin
        if (v == 0) begin
          fx_re[v][i] = int'(amp / 2.0 * $cos(2.0 * PI * 5 * i / NF));
          fx_im[v][i] = int'(amp / 2.0 * $sin(2.0 * PI * 5 * i / NF));
        end else if (v == 1) begin
          fx_re[v][i] = (i == 0) ? amp : 0;
          fx_im[v][i] = 0;
        end else begin
          fx_re[v][i] = $urandom_range(0, 2 * amp) - amp;
          fx_im[v][i] = $urandom_range(0, 2 * amp) - amp;
        end
        fft_x_re[i] = FW'(fx_re[v][i]);
        fft_x_im[i] = FW'(fx_im[v][i]);
      end
      fft_in_valid = 1;
      f_in_cycle[v] = cycle;
      @(negedge clk);
    end
    fft_in_valid = 0;
  end

  initial begin
    int last_out;
    last_out = -10;
    for (int v = 0; v < NFV; v++) begin
      real sig, noise, snr, max_err;
      @(negedge clk);
      while (!fft_out_valid) @(negedge clk);
      n_fft_frames++;
      if (cycle == last_out + 1) n_fft_b2b++;
      last_out = cycle;
      checks++;
      if (cycle - f_in_cycle[v] != FFT_LAT) begin
        failures++;
        $display("FAIL fft vec %0d latency %0d", v, cycle - f_in_cycle[v]);
      end
      sig = 0; noise = 0; max_err = 0;
      for (int k = 0; k < NF; k++) begin
        real rr, ri, er, ei, a;
        rr = 0; ri = 0;
        for (int n = 0; n < NF; n++) begin
          a = -2.0 * PI * real'((n * k) % NF) / NF;
          rr += fx_re[v][n] * $cos(a) - fx_im[v][n] * $sin(a);
          ri += fx_re[v][n] * $sin(a) + fx_im[v][n] * $cos(a);
        end
        er = fft_X_re[k] - rr;
        ei = fft_X_im[k] - ri;
        sig += rr * rr + ri * ri;
        noise += er * er + ei * ei;
        checks++;
        if ((er > 64.0) || (er < -64.0) || (ei > 64.0) || (ei < -64.0)) begin
          failures++;
          if (failures < 10) $display("FAIL fft vec %0d bin %0d: (%0d,%0d) vs (%0.1f,%0.1f)",
                                      v, k, fft_X_re[k], fft_X_im[k], rr, ri);
        end
      end
      snr = 10.0 * $log10(sig / (noise + 1e-9));
      checks++;
      if (snr < 50.0) begin
        failures++;
        $display("FAIL fft vec %0d SNR %0.1f dB", v, snr);
      end
      if (v == 0) begin
        // the tone must land in bin 5 and nowhere else
        checks++;
        if (fft_X_re[5] < 0.9 * 0.15 * 4096 * 64) begin
          failures++;
          $display("FAIL fft tone bin 5 = %0d", fft_X_re[5]);
        end else n_fft_tone++;
      end
      if (v == 1) begin
        bit flat;
        flat = 1;
        for (int k = 0; k < NF; k++) if (fft_X_re[k] != AMP || fft_X_im[k] != 0) flat = 0;
        checks++;
        if (!flat) begin failures++; $display("FAIL fft impulse not flat"); end
        else n_fft_impulse++;
      end
      if (v == NFV - 1) $display("fft: %0d transforms, last SNR %0.1f dB", NFV, snr);
    end
    fft_done = 1;
  end

  // ------------------------------------------------------------- matrix
  longint me_re [NMV][MN][MN], me_im [NMV][MN][MN];
  int m_in_cycle [NMV];
  bit m_carry [NMV];

  initial begin
    mat_in_valid = 0;
    mat_a_re = '{default: '{default: '0}}; mat_a_im = '{default: '{default: '0}};
    mat_b_re = '{default: '{default: '0}}; mat_b_im = '{default: '{default: '0}};
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int v = 0; v < NMV; v++) begin
      int lim;
      lim = (v % 2 == 0) ? 255 : 511;
      m_carry[v] = 0;
      for (int i = 0; i < MN; i++)
        for (int j = 0; j < MN; j++) begin
          mat_a_re[i][j] = MW'($urandom_range(0, lim)); mat_a_im[i][j] = MW'($urandom_range(0, lim));
          mat_b_re[i][j] = MW'($urandom_range(0, lim)); mat_b_im[i][j] = MW'($urandom_range(0, lim));
        end
      for (int i = 0; i < MN; i++)
        for (int j = 0; j < MN; j++) begin
          me_re[v][i][j] = 0; me_im[v][i][j] = 0;
          for (int k = 0; k < MN; k++) begin
            longint ra, ia, rb, ib, xs, pr, m;
            ra = mat_a_re[i][k]; ia = mat_a_im[i][k]; rb = mat_b_re[k][j]; ib = mat_b_im[k][j];
            m  = 64'sd1 <<< (2 * MW);
            xs = ra * ib + ia * rb;
            if (xs >= m) m_carry[v] = 1;
            // packed-multiplier result: exact below 2^(W-1), wraps above
            pr = (ra * rb - ia * ib + (xs >= m ? 1 : 0)) & (m - 1);
            if (pr >= m / 2) pr -= m;
            me_re[v][i][j] += pr;
            me_im[v][i][j] += xs % m;
          end
        end
      mat_in_valid = 1;
      m_in_cycle[v] = cycle;
      @(negedge clk);
    end
    mat_in_valid = 0;
  end

  initial begin
    int last_out;
    last_out = -10;
    for (int v = 0; v < NMV; v++) begin
      @(negedge clk);
      while (!mat_out_valid) @(negedge clk);
      n_mat_frames++;
      if (cycle == last_out + 1) n_mat_b2b++;
      last_out = cycle;
      if (m_carry[v]) n_mat_carry++;
      checks++;
      if (cycle - m_in_cycle[v] != MAT_LAT) begin
        failures++;
        $display("FAIL mat %0d latency %0d", v, cycle - m_in_cycle[v]);
      end
      for (int i = 0; i < MN; i++)
        for (int j = 0; j < MN; j++) begin
          checks++;
          if (longint'(mat_c_re[i][j]) != me_re[v][i][j] || longint'(mat_c_im[i][j]) != me_im[v][i][j]) begin
            failures++;
            if (failures < 10) $display("FAIL mat %0d [%0d][%0d]: (%0d,%0d) vs (%0d,%0d)", v, i, j,
                                        mat_c_re[i][j], mat_c_im[i][j], me_re[v][i][j], me_im[v][i][j]);
          end
        end
    end
    mat_done = 1;
  end

  // ------------------------------------------------------------- PI loop
  localparam longint A0 = 64, A1 = 60;   // Kp = 0.25, T/Ti = 1/16, 8 fraction bits
  longint ph_y [NPID], ph_sp [NPID], ph_e [NPID], ph_u [NPID];

  function automatic longint wr16(input longint v);
    return longint'($signed(16'(v)));
  endfunction

  initial begin
    longint y, sp;
    pid_a0 = 16'(A0); pid_a1 = 16'(A1); pid_a2 = 0;
    pid_y = 0; pid_sp = 0;
    y = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int n = 0; n < NPID; n++) begin
      sp = (n < 50) ? 0 : (n < 650 ? 8000 : 2000);
      if (n == 50) n_sp_up++;
      if (n == 650) n_sp_down++;
      pid_sp = 16'(sp);
      pid_y  = 16'(y);
      ph_y[n] = y; ph_sp[n] = sp;
      ph_e[n] = wr16(sp - y);
      ph_u[n] = wr16(((n > 0) ? ph_u[n-1] : 0) +
                     wr16(wr16((A0 * ph_e[n]) >>> 8) - wr16((A1 * ((n > 0) ? ph_e[n-1] : 0)) >>> 8)));
      @(negedge clk);
      // controller output now holds sample n - 5 (6-clock latency)
      if (n >= 5) begin
        n_pid_checks++;
        checks++;
        if (longint'(pid_u) != ph_u[n - 5]) begin
          failures++;
          if (failures < 10) $display("FAIL pi sample %0d: u %0d vs %0d", n - 5, pid_u, ph_u[n - 5]);
        end
      end
      // process model driven by the controller output
      y = y + ((longint'(pid_u) - y) >>> 3);
      if (n == 649 || n == NPID - 1) begin
        longint err;
        err = y - sp;
        if (err < 0) err = -err;
        checks++;
        if (err * 50 > sp) begin
          failures++;
          $display("FAIL pi loop did not settle: y %0d, set point %0d", y, sp);
        end else n_settled++;
      end
    end
    pid_done = 1;
  end

  // ------------------------------------------------------------- summary
  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    wait (fft_done && mat_done && pid_done);
    $display("mechanisms: fft frames %0d (back-to-back %0d, tone %0d, impulse %0d); matrix frames %0d (back-to-back %0d, with carry wrap %0d); pi set-point up %0d down %0d settled %0d checked outputs %0d",
             n_fft_frames, n_fft_b2b, n_fft_tone, n_fft_impulse, n_mat_frames, n_mat_b2b,
             n_mat_carry, n_sp_up, n_sp_down, n_settled, n_pid_checks);
    checks += 10;
    if (n_fft_frames != NFV) failures++;
    if (n_fft_b2b == 0)      failures++;
    if (n_fft_tone == 0)     failures++;
    if (n_fft_impulse == 0)  failures++;
    if (n_mat_frames != NMV) failures++;
    if (n_mat_b2b == 0)      failures++;
    if (n_mat_carry == 0)    failures++;
    if (n_sp_up == 0)        failures++;
    if (n_sp_down == 0)      failures++;
    if (n_settled != 2)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
