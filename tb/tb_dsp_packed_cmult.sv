// tb_dsp_packed_cmult: self-checking test of the packed single-multiplier
// complex multiplier at W = 6.
//
// A new random operand pair is applied every clock (plus the corner cases
// all-zero and all-ones). Each result is compared, exactly 3 clocks after
// its operands, with a reference built from ordinary integer products:
// im = (ra*ib + ia*rb) mod 2^12, re = (ra*rb - ia*ib + carry) mod 2^12,
// carry = (ra*ib + ia*rb) >= 2^12. For operands below 2^5 the test also
// checks that the real part read as signed is the exact complex product.
module tb_dsp_packed_cmult;
  localparam int W   = 6;
  localparam int LAT = 3;
  localparam int NV  = 400;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [W-1:0] re_a, im_a, re_b, im_b;
  logic [2*W-1:0] re_c, im_c;
  int checks = 0, failures = 0, exact_checks = 0;

  int hra [NV+LAT+1], hia [NV+LAT+1], hrb [NV+LAT+1], hib [NV+LAT+1];

  dsp_packed_cmult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ra, ia, rb, ib, xsum, exp_re, exp_im, full_re;
    re_a = '0; im_a = '0; re_b = '0; im_b = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NV + LAT; n++) begin
      // drive operand set n
      if (n < NV) begin
        case (n)
          0: begin ra = 63; ia = 63; rb = 63; ib = 63; end
          1: begin ra = 0;  ia = 0;  rb = 0;  ib = 0;  end
          2: begin ra = 0;  ia = 63; rb = 0;  ib = 63; end
          default: begin
            if (n % 2 == 0) begin
              ra = $urandom_range(0, 31); ia = $urandom_range(0, 31);
              rb = $urandom_range(0, 31); ib = $urandom_range(0, 31);
            end else begin
              ra = $urandom_range(0, 63); ia = $urandom_range(0, 63);
              rb = $urandom_range(0, 63); ib = $urandom_range(0, 63);
            end
          end
        endcase
        hra[n] = ra; hia[n] = ia; hrb[n] = rb; hib[n] = ib;
        re_a = W'(ra); im_a = W'(ia); re_b = W'(rb); im_b = W'(ib);
      end
      @(posedge clk);
      #1;
      // result of operand set n-LAT+1 is visible now
      if (n - LAT + 1 >= 0 && n - LAT + 1 < NV) begin
        int k;
        k = n - LAT + 1;
        xsum   = hra[k] * hib[k] + hia[k] * hrb[k];
        full_re = hra[k] * hrb[k] - hia[k] * hib[k];
        exp_im  = xsum % (1 << 2*W);
        exp_re  = (full_re + (xsum >> 2*W)) & ((1 << 2*W) - 1);
        checks++;
        if (re_c !== (2*W)'(exp_re) || im_c !== (2*W)'(exp_im)) begin
          failures++;
          $display("FAIL k=%0d (%0d+j%0d)*(%0d+j%0d): got %0d,%0d exp %0d,%0d",
                   k, hra[k], hia[k], hrb[k], hib[k], re_c, im_c, exp_re, exp_im);
        end
        if (hra[k] < 32 && hia[k] < 32 && hrb[k] < 32 && hib[k] < 32) begin
          checks++;
          exact_checks++;
          if (int'($signed(re_c)) != full_re || int'(im_c) != xsum) begin
            failures++;
            $display("FAIL exact k=%0d", k);
          end
        end
      end
      @(negedge clk);
    end
    if (exact_checks < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
