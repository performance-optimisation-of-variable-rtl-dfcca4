// packed_cdot: complex dot product sum_i a[i]*b[i] of two N-element vectors
// of unsigned W-bit complex numbers, one dsp_packed_cmult per element.
//
// Each packed multiplier returns 2W-bit real and imaginary fields. The real
// field is read as a signed 2W-bit number and the imaginary field as an
// unsigned one, both are widened to OW = 2W + clog2(N) + 1 signed bits, and
// the N products are summed. The sum is exact whenever every product is
// (operand parts below 2^(W-1)); otherwise it carries the wrap of the
// packed multipliers.
//
// Timing: the multiplier's 3 clocks plus one output register after the
// adder: c_re/c_im follow a/b by 4 clocks, one dot product per clock.
// Synchronous, active-high reset.
//
// One packed multiplier per element and a sum of their outputs follow the
// source design; the output width and the signed reading of the real
// field are this design's choice.
module packed_cdot #(
  parameter int W  = 9,
  parameter int N  = 9,
  parameter int OW = 2 * W + $clog2(N) + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [W-1:0]         a_re [N],
  input  logic [W-1:0]         a_im [N],
  input  logic [W-1:0]         b_re [N],
  input  logic [W-1:0]         b_im [N],
  output logic signed [OW-1:0] c_re,
  output logic signed [OW-1:0] c_im
);
  logic [2*W-1:0]        p_re [N];
  logic [2*W-1:0]        p_im [N];
  logic signed [OW-1:0]  sum_re, sum_im;

  for (genvar i = 0; i < N; i++) begin : g_mul
    dsp_packed_cmult #(.W(W)) u_mul (
      .clk, .rst,
      .re_a(a_re[i]), .im_a(a_im[i]), .re_b(b_re[i]), .im_b(b_im[i]),
      .re_c(p_re[i]), .im_c(p_im[i])
    );
  end

  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int i = 0; i < N; i++) begin
      sum_re = sum_re + OW'($signed(p_re[i]));
      sum_im = sum_im + OW'({1'b0, p_im[i]});
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c_re <= '0;
      c_im <= '0;
    end else begin
      c_re <= sum_re;
      c_im <= sum_im;
    end
  end
endmodule
