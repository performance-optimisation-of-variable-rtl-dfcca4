// pid_pipelined: pipelined incremental (velocity-form) PI / PID controller
// for any word length.
//
// The controller evaluates, once per clock,
//   e[k] = SP[k] - y[k]
//   u[k] = u[k-1] + a0*e[k] - a1*e[k-1] + a2*e[k-2]
// i.e. a 3-tap FIR filter on the error followed by an accumulator. With
// DERIVATIVE = 0 (the default, a PI controller) the e[k-2] tap, its
// multiplier and its adder are not built and a2 is ignored. For a standard
// PID with gain Kp, integral time Ti, derivative time Td and sample time T:
//   a0 = Kp*(1 + Td/T),  a1 = Kp*(1 - T/Ti + 2*Td/T),  a2 = Kp*Td/T.
//
// Numbers are signed fixed point of WIDTH bits. The coefficients have FRAC
// fractional bits, the samples are integers (or share any binary point):
// each product is truncated by dropping its FRAC lowest bits and keeping
// the next WIDTH. The error, the sum and the accumulator wrap at WIDTH bits.
//
// Pipeline (one register rank per step; the loop itself is only the
// accumulator register):
//   1 input registers on y, SP and the coefficients (the coefficients get
//     a second register that keeps them aligned with the error, so a
//     coefficient change applies from the sample it arrives with)
//   2 error register e[k], with a delay line giving e[k-1], e[k-2]
//   3 product register (multiplier output)
//   + PIPE optional extra product registers (for wide words)
//   4 second product register
//   5 sum register (P - I + D)
//   6 accumulator, which is also the output u
// so a change of y or SP first shows in u 6 + PIPE clocks later. A new
// sample is taken every clock. Synchronous, active-high reset clears the
// pipeline and the accumulator (u = 0).
//
// The difference equation, the register placement of the pipelined
// controller, the extra product stages and the PI reduction follow the
// source design; the coefficient registers, the binary point of the
// coefficients and wrap-around on overflow are this design's choices.
module pid_pipelined #(
  parameter int WIDTH      = 16,
  parameter int FRAC       = 8,
  parameter int PIPE       = 0,
  parameter bit DERIVATIVE = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WIDTH-1:0] y,
  input  logic signed [WIDTH-1:0] sp,
  input  logic signed [WIDTH-1:0] a0,
  input  logic signed [WIDTH-1:0] a1,
  input  logic signed [WIDTH-1:0] a2,
  output logic signed [WIDTH-1:0] u
);
  localparam int TAPS = DERIVATIVE ? 3 : 2;
  localparam int PW   = 2 * WIDTH;

  logic signed [WIDTH-1:0] y_r, sp_r;
  logic signed [WIDTH-1:0] coef   [TAPS];
  logic signed [WIDTH-1:0] coef_r [TAPS];   // aligned with y_r, sp_r
  logic signed [WIDTH-1:0] coef_e [TAPS];   // aligned with e
  logic signed [WIDTH-1:0] e      [TAPS];    // e[0] = e[k], e[1] = e[k-1], ...
  logic signed [PW-1:0]    prod_x [TAPS][PIPE+1];  // [t][0]: multiplier register
  logic signed [PW-1:0]    prod2  [TAPS];
  logic signed [WIDTH-1:0] sum_r;
  logic signed [WIDTH-1:0] acc;

  always_comb begin
    coef[0] = a0;
    coef[1] = a1;
    if (DERIVATIVE) coef[TAPS-1] = a2;
  end

  // Truncated product of one tap.
  function automatic logic signed [WIDTH-1:0] trunc(input logic signed [PW-1:0] p);
    return p[FRAC +: WIDTH];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      y_r    <= '0;
      sp_r   <= '0;
      coef_r <= '{default: '0};
      coef_e <= '{default: '0};
      e      <= '{default: '0};
      prod_x <= '{default: '0};
      prod2  <= '{default: '0};
      sum_r  <= '0;
      acc    <= '0;
    end else begin
      // 1: inputs
      y_r    <= y;
      sp_r   <= sp;
      coef_r <= coef;
      // 2: error and its delay line
      e[0] <= sp_r - y_r;
      coef_e <= coef_r;
      for (int t = 1; t < TAPS; t++) e[t] <= e[t-1];
      // 3, extra stages, 4: multipliers
      for (int t = 0; t < TAPS; t++) begin
        prod_x[t][0] <= PW'(coef_e[t]) * PW'(e[t]);
        for (int s = 1; s <= PIPE; s++) prod_x[t][s] <= prod_x[t][s-1];
        prod2[t]     <= prod_x[t][PIPE];
      end
      // 5: P - I (+ D)
      if (DERIVATIVE) sum_r <= trunc(prod2[0]) - trunc(prod2[1]) + trunc(prod2[TAPS-1]);
      else            sum_r <= trunc(prod2[0]) - trunc(prod2[1]);
      // 6: accumulate
      acc <= acc + sum_r;
    end
  end

  assign u = acc;
endmodule
