// tb_const_cdot: checks single constant dot products (one matrix column
// each) bit-exactly against an integer model: a dense column (5-point DFT,
// 5 multipliers, 8-leaf adder tree), a two-entry butterfly column and a
// single-entry twiddle column, DSP build (3 clocks) and LUT-only build
// (5 clocks). Model: coefficients round(cos/sin * 2^12), every product
// truncated (floor) to 18 bits, sums wrapping at 18 bits.
module tb_const_cdot;
  import fft_pkg::*;
  localparam int  W    = 18;
  localparam int  FRAC = 12;
  localparam real PI   = 3.14159265358979323846;
  localparam int  NV   = 60;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic signed [W-1:0] x5_re [5], x5_im [5], x8_re [8], x8_im [8];
  logic signed [W-1:0] y_re [4], y_im [4];
  int checks = 0, failures = 0;
  longint h5_re [NV][5], h5_im [NV][5], h8_re [NV][8], h8_im [NV][8];

  always #5 clk = ~clk;

  // 5-point DFT, column 2 (all five entries non-zero)
  const_cdot #(.N(5), .KIND(MAT_KRON), .NPTS(5), .R(5), .COL(2)) d0 (
    .clk, .rst, .x_re(x5_re), .x_im(x5_im), .y_re(y_re[0]), .y_im(y_im[0]));
  // 8-point radix-2 butterfly matrix, column 7 (rows 3 and 7)
  const_cdot #(.N(8), .KIND(MAT_KRON), .NPTS(8), .R(2), .COL(7)) d1 (
    .clk, .rst, .x_re(x8_re), .x_im(x8_im), .y_re(y_re[1]), .y_im(y_im[1]));
  // 8-point radix-2 twiddle diagonal, column 7 (W_8^3)
  const_cdot #(.N(8), .KIND(MAT_DIAG), .NPTS(8), .R(2), .COL(7)) d2 (
    .clk, .rst, .x_re(x8_re), .x_im(x8_im), .y_re(y_re[2]), .y_im(y_im[2]));
  // same dense column, LUT-only
  const_cdot #(.N(5), .KIND(MAT_KRON), .NPTS(5), .R(5), .COL(2), .LUT_ONLY(1'b1)) d3 (
    .clk, .rst, .x_re(x5_re), .x_im(x5_im), .y_re(y_re[3]), .y_im(y_im[3]));

  function automatic longint wrap(input longint v);
    return longint'($signed(W'(v)));
  endfunction

  function automatic longint q(input real v);
    return longint'(v * (2.0 ** FRAC));
  endfunction

  // One product term, truncated and wrapped.
  function automatic longint term(input longint xr, input longint xi,
                                  input real a, input bit imag);
    longint cr, ci;
    cr = q($cos(a));
    ci = q($sin(a));
    return imag ? wrap((xr * ci + xi * cr) >>> FRAC)
                : wrap((xr * cr - xi * ci) >>> FRAC);
  endfunction

  task automatic expect_col(input int which, input int k,
                            output longint er, output longint ei);
    er = 0; ei = 0;
    case (which)
      0, 3: for (int i = 0; i < 5; i++) begin
        er = wrap(er + term(h5_re[k][i], h5_im[k][i], -2.0 * PI * ((i * 2) % 5) / 5.0, 1'b0));
        ei = wrap(ei + term(h5_re[k][i], h5_im[k][i], -2.0 * PI * ((i * 2) % 5) / 5.0, 1'b1));
      end
      1: begin   // rows 3 (W_2^0 = 1) and 7 (W_2^1 = -1)
        er = wrap(term(h8_re[k][3], h8_im[k][3], 0.0, 1'b0) + term(h8_re[k][7], h8_im[k][7], -PI, 1'b0));
        ei = wrap(term(h8_re[k][3], h8_im[k][3], 0.0, 1'b1) + term(h8_re[k][7], h8_im[k][7], -PI, 1'b1));
      end
      default: begin   // row 7: W_8^(1*3)
        er = term(h8_re[k][7], h8_im[k][7], -2.0 * PI * 3.0 / 8.0, 1'b0);
        ei = term(h8_re[k][7], h8_im[k][7], -2.0 * PI * 3.0 / 8.0, 1'b1);
      end
    endcase
  endtask

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin x5_re[i] = '0; x5_im[i] = '0; end
    for (int i = 0; i < 8; i++) begin x8_re[i] = '0; x8_im[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int v = 0; v < NV + 5; v++) begin
      if (v < NV) begin
        for (int i = 0; i < 5; i++) begin
          h5_re[v][i] = longint'($urandom_range(0, 20000)) - 10000;
          h5_im[v][i] = longint'($urandom_range(0, 20000)) - 10000;
          x5_re[i] = W'(h5_re[v][i]); x5_im[i] = W'(h5_im[v][i]);
        end
        for (int i = 0; i < 8; i++) begin
          h8_re[v][i] = longint'($urandom_range(0, 20000)) - 10000;
          h8_im[v][i] = longint'($urandom_range(0, 20000)) - 10000;
          x8_re[i] = W'(h8_re[v][i]); x8_im[i] = W'(h8_im[v][i]);
        end
      end
      @(negedge clk);
      for (int u = 0; u < 4; u++) begin
        int lat, k;
        longint er, ei;
        lat = (u == 3) ? 5 : 3;
        k = v - lat + 1;
        if (k >= 0 && k < NV) begin
          expect_col(u, k, er, ei);
          checks++;
          if (longint'(y_re[u]) != er || longint'(y_im[u]) != ei) begin
            failures++;
            if (failures < 8)
              $display("FAIL dot %0d vec %0d: got (%0d,%0d) exp (%0d,%0d)",
                       u, k, y_re[u], y_im[u], er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
