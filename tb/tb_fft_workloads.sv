// tb_fft_workloads: runs the parallel FFT in further stage lists of the
// published result tables, each against a direct double-precision DFT (see
// fft_check_harness), and checks each latency (3 clocks per constant-matrix
// product in the DSP build, 5 in the LUT-only build):
//   36 12 4 inverse    the inverse 36-point transform used to synthesise
//                      36-QAM symbols, 18-bit parts, 15 clocks
//   16 8 4 2 LUT-only  16-bit parts with 11 fraction bits (5 integer bits),
//                      the reference format of the LUT-only designs, 35 clocks
//   32 8 2             radix 4 then 4-point leaves, 15 clocks
//   48 12 3            radix 4 then radix 4, 3-point leaves, 15 clocks
//   15 3               radix 5 then 3-point leaves, 9 clocks
//   27 9 3             radix 3 throughout, 15 clocks
//   128 32 8 2         the largest transform of the tables, 21 clocks
//   32 8 2 LUT-only    16-bit samples (11 fraction bits) with 18-bit
//                      coefficients (16 fraction bits), 25 clocks
// Each configuration receives a tone, an impulse and random vectors, one
// vector per clock.
module tb_fft_workloads;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks, failures;

  localparam int NH = 8;
  int c [NH];
  int f [NH];
  bit d [NH];

  always #5 clk = ~clk;

  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd4, 16'd12, 16'd36}),
    .INVERSE(1'b1), .LATENCY(15), .NVEC(12), .TOL_LSB(24)) h36i (
    .clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  fft_check_harness #(
    .W(16), .FRAC(11),
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd2, 16'd4, 16'd8, 16'd16}),
    .LUT_ONLY(1'b1), .LATENCY(35), .NVEC(12), .TOL_LSB(12)) h16l (
    .clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd2, 16'd8, 16'd32}),
    .LATENCY(15), .NVEC(12), .TOL_LSB(24)) h32 (
    .clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd3, 16'd12, 16'd48}),
    .LATENCY(15), .NVEC(12), .TOL_LSB(32)) h48 (
    .clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd3, 16'd15}),
    .LATENCY(9), .NVEC(12), .TOL_LSB(16)) h15 (
    .clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd3, 16'd9, 16'd27}),
    .LATENCY(15), .NVEC(12), .TOL_LSB(24)) h27 (
    .clk, .rst, .checks(c[5]), .failures(f[5]), .done(d[5]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd2, 16'd8, 16'd32, 16'd128}),
    .LATENCY(21), .NVEC(8), .AMP(0.2), .TOL_LSB(64)) h128 (
    .clk, .rst, .checks(c[6]), .failures(f[6]), .done(d[6]));
  fft_check_harness #(
    .W(16), .FRAC(11), .CW(18), .CFRAC(16),
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd2, 16'd8, 16'd32}),
    .LUT_ONLY(1'b1), .LATENCY(25), .NVEC(12), .TOL_LSB(16)) h32c (
    .clk, .rst, .checks(c[7]), .failures(f[7]), .done(d[7]));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6] && d[7]);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
