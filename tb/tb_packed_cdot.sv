// tb_packed_cdot: checks the packed complex dot product (W = 9, N = 9, and
// W = 6, N = 4) against sums of ordinary complex integer products. Vectors
// whose parts are all below 2^(W-1) must give the exact complex dot
// product; full-range vectors are compared with the documented wrap of the
// packed multipliers (each real part (ra*rb - ia*ib + carry) mod 2^(2W) read
// as signed, each imaginary part (ra*ib + ia*rb) mod 2^(2W)). Results are
// checked 4 clocks after their operands.
module tb_packed_cdot;
  localparam int LAT = 4;
  localparam int NV  = 200;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks = 0, failures = 0, exact = 0;

  logic [8:0] a9_re [9], a9_im [9], b9_re [9], b9_im [9];
  logic [5:0] a6_re [4], a6_im [4], b6_re [4], b6_im [4];
  logic signed [22:0] c9_re, c9_im;
  logic signed [14:0] c6_re, c6_im;
  longint e9_re [NV], e9_im [NV], e6_re [NV], e6_im [NV];

  always #5 clk = ~clk;

  packed_cdot #(.W(9), .N(9)) d9 (.clk, .rst, .a_re(a9_re), .a_im(a9_im),
    .b_re(b9_re), .b_im(b9_im), .c_re(c9_re), .c_im(c9_im));
  packed_cdot #(.W(6), .N(4)) d6 (.clk, .rst, .a_re(a6_re), .a_im(a6_im),
    .b_re(b6_re), .b_im(b6_im), .c_re(c6_re), .c_im(c6_im));

  // Expected contribution of one product, with the packed-multiplier wrap.
  task automatic prod(input longint ra, input longint ia, input longint rb,
                      input longint ib, input int w, output longint pr,
                      output longint pi);
    longint xs, m;
    m  = 64'sd1 <<< (2 * w);
    xs = ra * ib + ia * rb;
    pi = xs % m;
    pr = (ra * rb - ia * ib + (xs >= m ? 1 : 0)) & (m - 1);
    if (pr >= m / 2) pr -= m;
  endtask

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 9; i++) begin a9_re[i] = 0; a9_im[i] = 0; b9_re[i] = 0; b9_im[i] = 0; end
    for (int i = 0; i < 4; i++) begin a6_re[i] = 0; a6_im[i] = 0; b6_re[i] = 0; b6_im[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NV + LAT; n++) begin
      if (n < NV) begin
        int lim9, lim6;
        longint pr, pi;
        lim9 = (n % 2 == 0) ? 255 : 511;
        lim6 = (n % 2 == 0) ? 31 : 63;
        e9_re[n] = 0; e9_im[n] = 0; e6_re[n] = 0; e6_im[n] = 0;
        for (int i = 0; i < 9; i++) begin
          a9_re[i] = 9'($urandom_range(0, lim9)); a9_im[i] = 9'($urandom_range(0, lim9));
          b9_re[i] = 9'($urandom_range(0, lim9)); b9_im[i] = 9'($urandom_range(0, lim9));
          if (n % 2 == 0) begin
            // exact region: true complex product
            e9_re[n] += longint'(a9_re[i]) * b9_re[i] - longint'(a9_im[i]) * b9_im[i];
            e9_im[n] += longint'(a9_re[i]) * b9_im[i] + longint'(a9_im[i]) * b9_re[i];
          end else begin
            prod(a9_re[i], a9_im[i], b9_re[i], b9_im[i], 9, pr, pi);
            e9_re[n] += pr; e9_im[n] += pi;
          end
        end
        for (int i = 0; i < 4; i++) begin
          a6_re[i] = 6'($urandom_range(0, lim6)); a6_im[i] = 6'($urandom_range(0, lim6));
          b6_re[i] = 6'($urandom_range(0, lim6)); b6_im[i] = 6'($urandom_range(0, lim6));
          if (n % 2 == 0) begin
            e6_re[n] += longint'(a6_re[i]) * b6_re[i] - longint'(a6_im[i]) * b6_im[i];
            e6_im[n] += longint'(a6_re[i]) * b6_im[i] + longint'(a6_im[i]) * b6_re[i];
          end else begin
            prod(a6_re[i], a6_im[i], b6_re[i], b6_im[i], 6, pr, pi);
            e6_re[n] += pr; e6_im[n] += pi;
          end
        end
      end
      @(negedge clk);
      if (n - LAT + 1 >= 0 && n - LAT + 1 < NV) begin
        int k;
        k = n - LAT + 1;
        checks += 2;
        if (k % 2 == 0) exact += 2;
        if (longint'(c9_re) != e9_re[k] || longint'(c9_im) != e9_im[k]) begin
          failures++;
          if (failures < 8) $display("FAIL W9 vec %0d: got (%0d,%0d) exp (%0d,%0d)", k, c9_re, c9_im, e9_re[k], e9_im[k]);
        end
        if (longint'(c6_re) != e6_re[k] || longint'(c6_im) != e6_im[k]) begin
          failures++;
          if (failures < 8) $display("FAIL W6 vec %0d: got (%0d,%0d) exp (%0d,%0d)", k, c6_re, c6_im, e6_re[k], e6_im[k]);
        end
      end
    end
    if (exact < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
