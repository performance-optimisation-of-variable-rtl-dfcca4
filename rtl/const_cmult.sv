// const_cmult: complex sample times a complex constant, truncated back to
// the sample width.
//
// (a_re + j*a_im) * (C_RE + j*C_IM) is formed with four real products and two
// additions: re = a_re*C_RE - a_im*C_IM, im = a_re*C_IM + a_im*C_RE. Samples
// are signed fixed point of W bits with FRAC fractional bits; the constant
// has its own format, CW bits with CFRAC fractional bits (by default the same
// as the samples; a constant that does not fit in CW bits stops
// elaboration). The full-precision result is cut back to W bits by dropping
// the CFRAC lowest bits (truncation toward minus infinity) and keeping the
// next W, so the binary point stays where it was and the word length stays
// constant.
// Integer bits that do not fit wrap around.
//
// Two builds, chosen by LUT_ONLY:
//   0: the four products are written as multiplications, meant to map onto
//      DSP multipliers. Latency 2 cycles: product register, truncation
//      register.
//   1: each product is a csd_mult (signed-digit shift-and-add), no hardware
//      multiplier. Latency 4 cycles: 3 inside csd_mult, 1 truncation
//      register.
// A new sample is accepted every cycle. Synchronous, active-high reset.
//
// The four-multiplier form and the truncation follow the source design;
// the register placement is this design's choice, picked so that a
// constant matrix multiply takes 3 (DSP) or 5 (LUT-only) cycles as stated
// there.
module const_cmult #(
  parameter int     W        = 18,
  parameter int     FRAC     = 12,
  parameter int     CW       = W,
  parameter int     CFRAC    = FRAC,
  parameter longint C_RE     = 64'sd2896,
  parameter longint C_IM     = -64'sd2896,
  parameter bit     LUT_ONLY = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  output logic signed [W-1:0] p_re,
  output logic signed [W-1:0] p_im
);
  localparam int FW = W + CW + 3;   // full-precision width of re/im sums

  logic signed [FW-1:0] full_re, full_im;

  if (C_RE >= (64'sd1 <<< (CW - 1)) || C_RE < -(64'sd1 <<< (CW - 1)) ||
      C_IM >= (64'sd1 <<< (CW - 1)) || C_IM < -(64'sd1 <<< (CW - 1)))
  begin : g_bad_coef
    $error("const_cmult: constant (%0d, %0d) does not fit in %0d bits", C_RE, C_IM, CW);
  end

  if (!LUT_ONLY) begin : g_dsp
    localparam logic signed [FW-1:0] CR = FW'(C_RE);
    localparam logic signed [FW-1:0] CI = FW'(C_IM);
    always_ff @(posedge clk) begin
      if (rst) begin
        full_re <= '0;
        full_im <= '0;
      end else begin
        full_re <= FW'(a_re) * CR - FW'(a_im) * CI;
        full_im <= FW'(a_re) * CI + FW'(a_im) * CR;
      end
    end
  end else begin : g_lut
    logic signed [W+CW+1:0] m_rr, m_ii, m_ri, m_ir;
    csd_mult #(.W(W), .CW(CW), .C(C_RE)) u_rr (.clk, .rst, .x(a_re), .p(m_rr));
    csd_mult #(.W(W), .CW(CW), .C(C_IM)) u_ii (.clk, .rst, .x(a_im), .p(m_ii));
    csd_mult #(.W(W), .CW(CW), .C(C_IM)) u_ri (.clk, .rst, .x(a_re), .p(m_ri));
    csd_mult #(.W(W), .CW(CW), .C(C_RE)) u_ir (.clk, .rst, .x(a_im), .p(m_ir));
    always_comb begin
      full_re = FW'(m_rr) - FW'(m_ii);
      full_im = FW'(m_ri) + FW'(m_ir);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_re <= '0;
      p_im <= '0;
    end else begin
      p_re <= full_re[CFRAC +: W];
      p_im <= full_im[CFRAC +: W];
    end
  end
endmodule
