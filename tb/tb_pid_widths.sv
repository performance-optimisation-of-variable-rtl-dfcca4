// tb_pid_widths: the word-length / pipeline-depth sweep of the PI
// controller. Five controllers run side by side, each checked bit for bit
// against the difference equation and for its latency of 6 + PIPE clocks
// (see pid_check_harness):
//   WIDTH  8, PIPE  0   narrowest word
//   WIDTH 64, PIPE  0   widest word that needs no extra stage
//   WIDTH 76, PIPE  4
//   WIDTH 94, PIPE 12
//   WIDTH 96, PIPE 14   widest word, most stages
// Coefficients have WIDTH/2 fraction bits.
module tb_pid_widths;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks, failures;

  localparam int NH = 5;
  int c [NH];
  int f [NH];
  bit d [NH];

  always #5 clk = ~clk;

  pid_check_harness #(.WIDTH(8),  .PIPE(0))  h8  (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  pid_check_harness #(.WIDTH(64), .PIPE(0))  h64 (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  pid_check_harness #(.WIDTH(76), .PIPE(4))  h76 (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  pid_check_harness #(.WIDTH(94), .PIPE(12)) h94 (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  pid_check_harness #(.WIDTH(96), .PIPE(14)) h96 (.clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
