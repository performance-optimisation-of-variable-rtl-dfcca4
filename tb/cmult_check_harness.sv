// cmult_check_harness: drives one dsp_packed_cmult of any part width W with
// a new random operand pair every clock (after two corner cases: all zeros
// and all ones) and compares each result, exactly 3 clocks later, with a
// reference built from ordinary integer products on wide vectors:
//   x  = ra*ib + ia*rb               (2W+1 bits)
//   im = x mod 2^(2W)
//   re = (ra*rb - ia*ib + (x >> 2W)) mod 2^(2W)
// Every fourth pair uses parts below 2^(W-1); for those the harness also
// checks that re, read as signed, is the exact complex product.
module cmult_check_harness #(
  parameter int W  = 6,
  parameter int NV = 200
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int LAT = 3;
  typedef logic [W-1:0]     part_t;
  typedef logic [2*W+1:0]   wide_t;

  part_t re_a, im_a, re_b, im_b;
  logic [2*W-1:0] re_c, im_c;
  logic [2*W-1:0] exp_re [NV], exp_im [NV];
  bit             low_half  [NV];
  logic signed [2*W+1:0] exact_re [NV];

  dsp_packed_cmult #(.W(W)) dut (.*);

  function automatic part_t rnd(input bit half);
    logic [127:0] r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return half ? part_t'(r[W-2:0]) : part_t'(r);
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    re_a = '0; im_a = '0; re_b = '0; im_b = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int n = 0; n < NV + LAT; n++) begin
      if (n < NV) begin
        wide_t x, rr, ii;
        low_half[n] = (n % 4 == 3);
        if (n == 0)      begin re_a = '0; im_a = '0; re_b = '0; im_b = '0; end
        else if (n == 1) begin re_a = '1; im_a = '1; re_b = '1; im_b = '1; end
        else begin
          re_a = rnd(low_half[n]); im_a = rnd(low_half[n]);
          re_b = rnd(low_half[n]); im_b = rnd(low_half[n]);
        end
        x  = wide_t'(re_a) * wide_t'(im_b) + wide_t'(im_a) * wide_t'(re_b);
        rr = wide_t'(re_a) * wide_t'(re_b);
        ii = wide_t'(im_a) * wide_t'(im_b);
        exp_im[n]   = x[2*W-1:0];
        exp_re[n]   = (2*W)'(rr - ii + (x >> (2*W)));
        exact_re[n] = $signed(rr) - $signed(ii);
      end
      @(negedge clk);
      if (n >= LAT - 1 && n - (LAT - 1) < NV) begin
        int k;
        k = n - (LAT - 1);
        checks++;
        if (re_c !== exp_re[k] || im_c !== exp_im[k]) begin
          failures++;
          if (failures < 5)
            $display("FAIL W=%0d pair %0d: got (%h, %h) exp (%h, %h)",
                     W, k, re_c, im_c, exp_re[k], exp_im[k]);
        end
        if (low_half[k]) begin
          checks++;
          if ((2*W+2)'($signed(re_c)) !== exact_re[k]) begin
            failures++;
            if (failures < 5)
              $display("FAIL W=%0d pair %0d: signed real part %0d, exact %0d",
                       W, k, $signed(re_c), exact_re[k]);
          end
        end
      end
    end
    done = 1'b1;
  end
endmodule
