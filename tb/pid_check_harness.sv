// pid_check_harness: drives one pid_pipelined instance of any word length
// with random measurements, set points and coefficients, and compares every
// output with the difference equation evaluated in the harness:
//   e[k] = SP[k] - y[k]
//   u[k] = u[k-1] + a0*e[k] - a1*e[k-1]
// with each product truncated by dropping FRAC bits and every value wrapping
// at WIDTH bits. The model works on 2*WIDTH-bit vectors, so any WIDTH is
// covered. Output u is compared exactly 6 + PIPE clocks after its sample
// entered, which checks the pipeline depth. Inputs change every clock; the
// coefficients are redrawn once, half way through the run, which also checks
// that a coefficient change takes effect with the same latency.
module pid_check_harness #(
  parameter int WIDTH = 16,
  parameter int FRAC  = WIDTH / 2,
  parameter int PIPE  = 0,
  parameter int NS    = 200
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int LAT = 6 + PIPE;
  typedef logic signed [WIDTH-1:0]   w_t;
  typedef logic signed [2*WIDTH-1:0] p_t;

  w_t y, sp, a0, a1, u;
  w_t m_e [NS];
  w_t m_u [NS];

  pid_pipelined #(.WIDTH(WIDTH), .FRAC(FRAC), .PIPE(PIPE)) dut (
    .clk, .rst, .y, .sp, .a0, .a1, .a2(w_t'(0)), .u);

  function automatic w_t rnd();
    logic [127:0] r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return w_t'(r);
  endfunction

  // product of a coefficient and an error, truncated as the datapath does
  function automatic w_t mul_tr(input w_t a, input w_t e);
    p_t p;
    p = p_t'(a) * p_t'(e);
    return w_t'(p >>> FRAC);
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    y = '0; sp = '0; a0 = '0; a1 = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      w_t e_prev, u_prev;
      if (n == 0 || n == NS / 2) begin
        // coefficients of magnitude up to 2^(WIDTH/2) in fixed point
        a0 = rnd() >>> (WIDTH / 2);
        a1 = rnd() >>> (WIDTH / 2);
      end
      y  = rnd();
      sp = (n % 40 < 20) ? rnd() : sp;          // set point held in runs
      e_prev = (n == 0) ? '0 : m_e[n-1];
      u_prev = (n == 0) ? '0 : m_u[n-1];
      m_e[n] = sp - y;
      m_u[n] = u_prev + w_t'(mul_tr(a0, m_e[n]) - mul_tr(a1, e_prev));
      @(negedge clk);
      // after clock edge n the output holds sample n - (LAT - 1)
      if (n - (LAT - 1) >= 0) begin
        checks++;
        if (u !== m_u[n-(LAT-1)]) begin
          failures++;
          if (failures < 5)
            $display("FAIL WIDTH=%0d PIPE=%0d sample %0d: got %h exp %h",
                     WIDTH, PIPE, n - (LAT - 1), u, m_u[n-(LAT-1)]);
        end
      end else begin
        checks++;
        if (u !== '0) begin
          failures++;
          $display("FAIL WIDTH=%0d PIPE=%0d: output %h before the first sample arrived",
                   WIDTH, PIPE, u);
        end
      end
    end
    done = 1'b1;
  end
endmodule
