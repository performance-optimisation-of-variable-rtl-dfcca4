// tb_qam36: Fourier synthesis of 36-QAM symbols with the inverse 36-point
// transform, and their recovery with the forward one.
//
// A frame carries one 36-QAM point on each of the 36 bins (levels -5, -3,
// -1, 1, 3, 5 on each axis, times a step of 2^-8). The first frame holds the
// whole constellation, point p on bin p; the following frames hold random
// points. The inverse transform (stage list 36 12 4, 36 bits per part with
// 24 fraction bits) turns each frame into 36 time samples; these are
// checked against a direct inverse DFT in double precision, and fed
// straight into a forward transform of the same kind. The forward output is
// 36 times the sent frame: every bin is sliced back to the nearest
// constellation point and must give the point that was sent. One frame
// enters per clock; the latency of each transform (15 clocks) and of the
// pair (30 clocks) is checked.
module tb_qam36;
  import fft_pkg::*;

  localparam int N     = 36;
  localparam int W     = 36;
  localparam int FRAC  = 24;
  localparam int LAT   = 15;
  localparam int NF    = 10;
  localparam stage_list_t ST = {16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd4, 16'd12, 16'd36};
  localparam real PI   = 3.14159265358979323846;
  localparam longint STEP = 64'sd1 <<< (FRAC - 8);

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  logic                in_valid, mid_valid, out_valid;
  logic signed [W-1:0] s_re [N], s_im [N];
  logic signed [W-1:0] t_re [N], t_im [N];
  logic signed [W-1:0] r_re [N], r_im [N];

  fft_parallel #(.W(W), .FRAC(FRAC), .STAGES(ST), .INVERSE(1'b1)) u_synth (
    .clk, .rst, .in_valid, .x_re(s_re), .x_im(s_im),
    .out_valid(mid_valid), .X_re(t_re), .X_im(t_im));
  fft_parallel #(.W(W), .FRAC(FRAC), .STAGES(ST), .INVERSE(1'b0)) u_anal (
    .clk, .rst, .in_valid(mid_valid), .x_re(t_re), .x_im(t_im),
    .out_valid(out_valid), .X_re(r_re), .X_im(r_im));

  // sent symbols, as level indices 0..5 per axis
  int sym_i [NF][N];
  int sym_q [NF][N];
  int in_cycle [NF];

  function automatic longint level(input int idx);
    return longint'(2 * idx - 5) * STEP;
  endfunction

  // nearest level index of a value scaled by N
  function automatic int slice(input longint v);
    longint best_d, d;
    int best;
    best = 0; best_d = -1;
    for (int i = 0; i < 6; i++) begin
      d = v - longint'(N) * level(i);
      if (d < 0) d = -d;
      if (best_d < 0 || d < best_d) begin best_d = d; best = i; end
    end
    return best;
  endfunction

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  initial begin
    in_valid = 1'b0;
    for (int k = 0; k < N; k++) begin s_re[k] = '0; s_im[k] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int k = 0; k < N; k++) begin
        if (f == 0) begin sym_i[f][k] = k % 6; sym_q[f][k] = k / 6; end
        else begin sym_i[f][k] = $urandom_range(0, 5); sym_q[f][k] = $urandom_range(0, 5); end
        s_re[k] = W'(level(sym_i[f][k]));
        s_im[k] = W'(level(sym_q[f][k]));
      end
      in_valid = 1'b1;
      in_cycle[f] = cycle;
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  // synthesised waveform against a direct inverse DFT
  initial begin
    for (int f = 0; f < NF; f++) begin
      real noise, sig;
      @(negedge clk);
      while (!mid_valid) @(negedge clk);
      checks++;
      if (cycle - in_cycle[f] != LAT) begin
        failures++;
        $display("FAIL frame %0d: synthesis latency %0d", f, cycle - in_cycle[f]);
      end
      noise = 0.0; sig = 0.0;
      for (int n = 0; n < N; n++) begin
        real er, ei, a;
        er = 0.0; ei = 0.0;
        for (int k = 0; k < N; k++) begin
          a = 2.0 * PI * real'((k * n) % N) / real'(N);
          er += real'(level(sym_i[f][k])) * $cos(a) - real'(level(sym_q[f][k])) * $sin(a);
          ei += real'(level(sym_i[f][k])) * $sin(a) + real'(level(sym_q[f][k])) * $cos(a);
        end
        sig   += er * er + ei * ei;
        noise += (real'(t_re[n]) - er) ** 2 + (real'(t_im[n]) - ei) ** 2;
      end
      checks++;
      if (10.0 * $log10(sig / (noise + 1.0e-9)) < 60.0) begin
        failures++;
        $display("FAIL frame %0d: synthesis SNR %0.1f dB", f,
                 10.0 * $log10(sig / (noise + 1.0e-9)));
      end
      if (f == 0)
        $display("frame 0 synthesis SNR %0.1f dB", 10.0 * $log10(sig / (noise + 1.0e-9)));
    end
  end

  // recovered constellation points
  initial begin
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!out_valid) @(negedge clk);
      checks++;
      if (cycle - in_cycle[f] != 2 * LAT) begin
        failures++;
        $display("FAIL frame %0d: round-trip latency %0d", f, cycle - in_cycle[f]);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (slice(longint'(r_re[k])) != sym_i[f][k] || slice(longint'(r_im[k])) != sym_q[f][k]) begin
          failures++;
          $display("FAIL frame %0d bin %0d: recovered (%0d, %0d), sent (%0d, %0d)",
                   f, k, slice(longint'(r_re[k])), slice(longint'(r_im[k])),
                   sym_i[f][k], sym_q[f][k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
