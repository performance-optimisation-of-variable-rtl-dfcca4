// csd_mult: multiplication of a signed sample by a fixed signed constant
// without a hardware multiplier, for the LUT-only build of the FFT.
//
// The constant's magnitude is recoded at elaboration into its non-adjacent
// form (canonical signed digits) with the shift/add/xor recipe of Prodinger:
//   xh = |C| >> 1,  x3 = |C| + xh,  c = xh ^ x3,
//   np = x3 & c   (digits +1),   nm = xh & c   (digits -1),   |C| = np - nm.
// The product is then x*np - x*nm; each partial product is a sum of shifted
// copies of x (at most about W/2 non-zero digits), so synthesis builds it
// from adders alone. A negative constant swaps np and nm.
//
// Interface: x (signed W bits) in, p (signed PW = W+CW+2 bits, full
// precision, no rounding) out, CW being the constant's width (by default W). Timing: three register stages (input
// register, partial-product register, difference register), so p follows x
// by 3 clock cycles; a new x is accepted every cycle. Synchronous,
// active-high reset clears all stages.
//
// The recoding and the np/nm subtraction follow the source design; the
// output width and the number of pipeline stages are this design's choice.
module csd_mult #(
  parameter int     W  = 18,
  parameter int     CW = W,
  parameter longint C  = 64'sd2896
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [W-1:0]   x,
  output logic signed [W+CW+1:0] p
);
  localparam int PW = W + CW + 2;

  localparam longint MAG = (C < 0) ? -C : C;
  localparam longint XH  = MAG >>> 1;
  localparam longint X3  = MAG + XH;
  localparam longint CC  = XH ^ X3;
  localparam longint NPD = X3 & CC;   // +1 digits of |C|
  localparam longint NMD = XH & CC;   // -1 digits of |C|
  localparam longint NP  = (C < 0) ? NMD : NPD;
  localparam longint NM  = (C < 0) ? NPD : NMD;

  localparam logic signed [PW-1:0] NP_W = PW'(NP);
  localparam logic signed [PW-1:0] NM_W = PW'(NM);

  logic signed [W-1:0]  x_r;
  logic signed [PW-1:0] pp_pos, pp_neg;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_r    <= '0;
      pp_pos <= '0;
      pp_neg <= '0;
      p      <= '0;
    end else begin
      x_r    <= x;
      pp_pos <= PW'(x_r) * NP_W;
      pp_neg <= PW'(x_r) * NM_W;
      p      <= pp_pos - pp_neg;
    end
  end
endmodule
