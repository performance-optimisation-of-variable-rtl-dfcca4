// tb_const_cmat_mult: checks the constant complex matrix multiplier for the
// stage matrices an FFT uses: radix-2 and radix-3 butterfly matrices, the
// twiddle diagonals (also in the LUT-only build and for the inverse
// transform), and a full 5-point DFT matrix. Every output is compared
// bit-exactly, at the stated latency, with an integer model
// (see cmat_check_harness).
module tb_const_cmat_mult;
  import fft_pkg::*;

  localparam int NH = 6;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks, failures;
  int c [NH];
  int f [NH];
  bit d [NH];

  always #5 clk = ~clk;

  cmat_check_harness #(.N(8),  .KIND(MAT_KRON), .R(2)) h0 (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  cmat_check_harness #(.N(8),  .KIND(MAT_DIAG), .R(2)) h1 (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  cmat_check_harness #(.N(6),  .KIND(MAT_KRON), .R(3)) h2 (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  cmat_check_harness #(.N(5),  .KIND(MAT_KRON), .R(5)) h3 (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  cmat_check_harness #(.N(16), .KIND(MAT_DIAG), .R(4), .LUT_ONLY(1'b1)) h4 (.clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));
  cmat_check_harness #(.N(12), .KIND(MAT_DIAG), .R(3), .INVERSE(1'b1)) h5 (.clk, .rst, .checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin : watchdog
    repeat (500) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
