// tb_const_cmult: checks the constant complex multiplier, DSP build (2-clock
// latency) and LUT-only build (4-clock latency), against an integer model:
// re = floor((a_re*C_RE - a_im*C_IM) / 2^FRAC), im likewise, kept to 18 bits.
// Constants: exp(-j*pi/4), -j, 1 and a general value, quantised with 12
// fractional bits.
module tb_const_cmult;
  localparam int W    = 18;
  localparam int FRAC = 12;
  localparam int NC   = 4;
  localparam longint CR [NC] = '{64'sd2896, 64'sd0, 64'sd4096, -64'sd1567};
  localparam longint CI [NC] = '{-64'sd2896, -64'sd4096, 64'sd0, 64'sd3784};
  localparam int NV = 200;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic signed [W-1:0] a_re, a_im;
  logic signed [W-1:0] d_re [NC], d_im [NC], l_re [NC], l_im [NC];
  int checks = 0, failures = 0;
  int h_re [$], h_im [$];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    const_cmult #(.W(W), .FRAC(FRAC), .C_RE(CR[c]), .C_IM(CI[c]), .LUT_ONLY(1'b0))
      dsp (.clk, .rst, .a_re, .a_im, .p_re(d_re[c]), .p_im(d_im[c]));
    const_cmult #(.W(W), .FRAC(FRAC), .C_RE(CR[c]), .C_IM(CI[c]), .LUT_ONLY(1'b1))
      lut (.clk, .rst, .a_re, .a_im, .p_re(l_re[c]), .p_im(l_im[c]));
  end

  function automatic longint expect_part(input longint ar, input longint ai,
                                         input longint cr, input longint ci,
                                         input bit imag);
    longint full;
    full = imag ? (ar * ci + ai * cr) : (ar * cr - ai * ci);
    full = full >>> FRAC;                        // floor
    return longint'(W'(full)) ;
  endfunction

  task automatic check(input int lat, input int n, input bit lut);
    int k;
    k = n - lat + 1;
    if (k < 0 || k >= NV) return;
    for (int c = 0; c < NC; c++) begin
      longint er, ei, gr, gi;
      er = longint'($signed(W'(expect_part(h_re[k], h_im[k], CR[c], CI[c], 1'b0))));
      ei = longint'($signed(W'(expect_part(h_re[k], h_im[k], CR[c], CI[c], 1'b1))));
      gr = lut ? longint'(l_re[c]) : longint'(d_re[c]);
      gi = lut ? longint'(l_im[c]) : longint'(d_im[c]);
      checks++;
      if (gr != er || gi != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL lut=%0d c=%0d k=%0d: got (%0d,%0d) exp (%0d,%0d)",
                   lut, c, k, gr, gi, er, ei);
      end
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_re = '0; a_im = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NV + 4; n++) begin
      int vr, vi;
      vr = $urandom_range(0, 40000) - 20000;
      vi = $urandom_range(0, 40000) - 20000;
      if (n == 0) begin vr = 20000; vi = -20000; end
      a_re = W'(vr); a_im = W'(vi);
      h_re.push_back(vr); h_im.push_back(vi);
      @(negedge clk);
      check(2, n, 1'b0);
      check(4, n, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
