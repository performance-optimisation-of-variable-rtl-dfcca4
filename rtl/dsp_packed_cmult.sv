// dsp_packed_cmult: unsigned complex multiplication with a single wide
// multiplier and a single subtractor, small enough at W = 6 to fit one
// 27x18 DSP slice.
//
// Both operands are packed into 3W-bit words with W zero bits between the
// parts: A = {re_a, W'0, im_a}, B = {re_b, W'0, im_b}. Their product then
// holds three 2W-bit fields:
//   bits [2W-1:0]  im_a*im_b
//   bits [4W-1:2W] re_a*im_b + im_a*re_b        (the imaginary result)
//   bits [6W-1:4W] re_a*re_b                    (plus any carry, see below)
// Subtracting the low field shifted up by 4W turns the top field into
// re_a*re_b - im_a*im_b, the real result. One multiply and one subtract give
// the whole complex product.
//
// Results are modulo 2^(2W): im_c = (re_a*im_b + im_a*re_b) mod 2^(2W),
// re_c = (re_a*re_b - im_a*im_b + carry) mod 2^(2W), where carry is 1 when
// the cross-product sum reaches 2^(2W) (it spills into the top field).
// For operand parts below 2^(W-1) there is no carry and re_c, read as a
// signed 2W-bit number, is the exact real part.
//
// Timing: input registers (re/im of A and B), then the product-minus-field
// goes into a pipeline register and from there into the output register:
// re_c/im_c follow the inputs by 3 clocks, one product per clock.
// Synchronous, active-high reset.
//
// The packing, the field positions and the subtraction follow the source
// design. There the subtracted field was taken from the previous output
// register; here it is taken from the same product, which gives the right
// answer for a new operand pair every clock.
module dsp_packed_cmult #(
  parameter int W = 6
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [W-1:0]    re_a,
  input  logic [W-1:0]    im_a,
  input  logic [W-1:0]    re_b,
  input  logic [W-1:0]    im_b,
  output logic [2*W-1:0]  re_c,
  output logic [2*W-1:0]  im_c
);
  logic [W-1:0]   re_a_reg, im_a_reg, re_b_reg, im_b_reg;
  logic [3*W-1:0] in_a, in_b;
  logic [6*W-1:0] prod, packed_res;
  logic [2*W-1:0] re_c_pipe, im_c_pipe;

  always_comb begin
    in_a       = {re_a_reg, {W{1'b0}}, im_a_reg};
    in_b       = {re_b_reg, {W{1'b0}}, im_b_reg};
    prod       = (6*W)'(in_a) * (6*W)'(in_b);
    packed_res = prod - {prod[2*W-1:0], {(4*W){1'b0}}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      re_a_reg  <= '0;
      im_a_reg  <= '0;
      re_b_reg  <= '0;
      im_b_reg  <= '0;
      re_c_pipe <= '0;
      im_c_pipe <= '0;
      re_c      <= '0;
      im_c      <= '0;
    end else begin
      re_a_reg  <= re_a;
      im_a_reg  <= im_a;
      re_b_reg  <= re_b;
      im_b_reg  <= im_b;
      re_c_pipe <= packed_res[6*W-1:4*W];
      im_c_pipe <= packed_res[4*W-1:2*W];
      re_c      <= re_c_pipe;
      im_c      <= im_c_pipe;
    end
  end
endmodule
