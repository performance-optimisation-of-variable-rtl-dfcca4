// tb_fft_parallel: runs the parallel FFT in several configurations at once
// and checks each against a direct DFT (see fft_check_harness):
//   64 32 16 8 4 2  radix 2, DSP build (the default configuration)
//   12 4            one radix-3 split, 4-point leaves
//   18 6 2          mixed radix 3 / 3
//   16 4            radix 4, LUT-only (signed-digit) multipliers
//   8 4 2           radix 2, inverse transform
//   9 3             radix 3, 3-point leaves
// and checks the stated latency of 3 clocks per matrix product (5 LUT-only).
module tb_fft_parallel;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks, failures;

  localparam int NH = 6;
  int c [NH];
  int f [NH];
  bit d [NH];

  always #5 clk = ~clk;

  fft_check_harness #(.LATENCY(33)) h64 (
    .clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd4, 16'd12}),
    .LATENCY(9), .TOL_LSB(16)) h12 (
    .clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd2, 16'd6, 16'd18}),
    .LATENCY(15), .TOL_LSB(24)) h18 (
    .clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd4, 16'd16}),
    .LUT_ONLY(1'b1), .LATENCY(15), .TOL_LSB(24)) h16 (
    .clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd2, 16'd4, 16'd8}),
    .INVERSE(1'b1), .LATENCY(15), .TOL_LSB(12)) h8i (
    .clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));
  fft_check_harness #(
    .STAGES({16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd3, 16'd9}),
    .LATENCY(9), .TOL_LSB(12)) h9 (
    .clk, .rst, .checks(c[5]), .failures(f[5]), .done(d[5]));

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
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
