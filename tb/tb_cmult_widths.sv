// tb_cmult_widths: the packed single-multiplication complex multiplier at
// the part widths it is evaluated at besides its 6-bit default: 4, 8, 9, 16
// and 32 bits. Each instance is checked bit for bit, with its 3-clock
// latency, against wide integer arithmetic (see cmult_check_harness). At
// W = 32 the packed operands are 96 bits and the product 192 bits.
module tb_cmult_widths;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks, failures;

  localparam int NH = 5;
  int c [NH];
  int f [NH];
  bit d [NH];

  always #5 clk = ~clk;

  cmult_check_harness #(.W(4))  h4  (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  cmult_check_harness #(.W(8))  h8  (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  cmult_check_harness #(.W(9))  h9  (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  cmult_check_harness #(.W(16)) h16 (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  cmult_check_harness #(.W(32)) h32 (.clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));

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
