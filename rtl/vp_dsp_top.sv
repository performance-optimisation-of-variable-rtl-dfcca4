// vp_dsp_top: three variable-precision DSP engines side by side, sharing
// only clock and reset:
//   - u_fft : fft_parallel, a fully parallel 64-point FFT (radix-2 stage
//             list 64 32 16 8 4 2, 18-bit parts with 12 fractional bits),
//             one transform per clock, 33 clocks latency;
//   - u_mat : packed_cmat_mult, a 9 x 9 by 9 x 9 complex matrix product of
//             unsigned 9-bit numbers, one matrix product per clock, 4 clocks
//             latency, built from single-multiplier packed complex
//             multipliers;
//   - u_pid : pid_pipelined, a 16-bit pipelined PI controller, one sample
//             per clock, 6 clocks latency.
// The engines are independent; each has its own ports, named with its
// prefix. The parameters below only select sizes; their defaults are the
// main configuration of each engine.
module vp_dsp_top #(
  parameter int                   FFT_W      = 18,
  parameter int                   FFT_FRAC   = 12,
  parameter fft_pkg::stage_list_t FFT_STAGES = fft_pkg::STAGES_64_R2,
  parameter int                   MAT_W      = 9,
  parameter int                   MAT_M      = 9,
  parameter int                   MAT_N      = 9,
  parameter int                   MAT_P      = 9,
  parameter int                   MAT_OW     = 2 * MAT_W + $clog2(MAT_N) + 1,
  parameter int                   PID_WIDTH  = 16,
  parameter int                   PID_FRAC   = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  // FFT
  input  logic                        fft_in_valid,
  input  logic signed [FFT_W-1:0]     fft_x_re [FFT_STAGES[0]],
  input  logic signed [FFT_W-1:0]     fft_x_im [FFT_STAGES[0]],
  output logic                        fft_out_valid,
  output logic signed [FFT_W-1:0]     fft_X_re [FFT_STAGES[0]],
  output logic signed [FFT_W-1:0]     fft_X_im [FFT_STAGES[0]],
  // complex matrix multiplier
  input  logic                        mat_in_valid,
  input  logic [MAT_W-1:0]            mat_a_re [MAT_M][MAT_N],
  input  logic [MAT_W-1:0]            mat_a_im [MAT_M][MAT_N],
  input  logic [MAT_W-1:0]            mat_b_re [MAT_N][MAT_P],
  input  logic [MAT_W-1:0]            mat_b_im [MAT_N][MAT_P],
  output logic                        mat_out_valid,
  output logic signed [MAT_OW-1:0]    mat_c_re [MAT_M][MAT_P],
  output logic signed [MAT_OW-1:0]    mat_c_im [MAT_M][MAT_P],
  // PI controller
  input  logic signed [PID_WIDTH-1:0] pid_y,
  input  logic signed [PID_WIDTH-1:0] pid_sp,
  input  logic signed [PID_WIDTH-1:0] pid_a0,
  input  logic signed [PID_WIDTH-1:0] pid_a1,
  input  logic signed [PID_WIDTH-1:0] pid_a2,
  output logic signed [PID_WIDTH-1:0] pid_u
);
  fft_parallel #(
    .W(FFT_W), .FRAC(FFT_FRAC), .STAGES(FFT_STAGES)
  ) u_fft (
    .clk, .rst,
    .in_valid(fft_in_valid), .x_re(fft_x_re), .x_im(fft_x_im),
    .out_valid(fft_out_valid), .X_re(fft_X_re), .X_im(fft_X_im)
  );

  packed_cmat_mult #(
    .W(MAT_W), .M(MAT_M), .N(MAT_N), .P(MAT_P), .OW(MAT_OW)
  ) u_mat (
    .clk, .rst,
    .in_valid(mat_in_valid),
    .a_re(mat_a_re), .a_im(mat_a_im), .b_re(mat_b_re), .b_im(mat_b_im),
    .out_valid(mat_out_valid), .c_re(mat_c_re), .c_im(mat_c_im)
  );

  pid_pipelined #(
    .WIDTH(PID_WIDTH), .FRAC(PID_FRAC)
  ) u_pid (
    .clk, .rst,
    .y(pid_y), .sp(pid_sp), .a0(pid_a0), .a1(pid_a1), .a2(pid_a2),
    .u(pid_u)
  );
endmodule
