// tb_pid_pipelined: open-loop check of the pipelined controller against
// the difference equation
//   e[k] = SP[k] - y[k],  u[k] = u[k-1] + a0*e[k] - a1*e[k-1] (+ a2*e[k-2])
// evaluated sample by sample in the testbench (products truncated by FRAC
// bits, all values wrapping at WIDTH bits). Three controllers are run:
//   pi   : 16-bit PI, no extra stages     -> latency 6
//   pid  : 16-bit PID, 4 extra stages     -> latency 10
//   pi32 : 32-bit PI, 2 extra stages      -> latency 8
// Each output is compared with the model exactly `latency` clocks after the
// sample entered, which also checks the pipeline depth.
module tb_pid_pipelined;
  localparam int NS = 300;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks = 0, failures = 0;

  logic signed [15:0] y16, sp16, u_pi, u_pid;
  logic signed [31:0] y32, sp32, u_pi32;
  localparam logic signed [15:0] A0 = 16'sd300, A1 = 16'sd250, A2 = 16'sd40;
  localparam logic signed [31:0] B0 = 32'sd70000, B1 = 32'sd65000;

  always #5 clk = ~clk;

  pid_pipelined #(.WIDTH(16), .FRAC(8)) pi (
    .clk, .rst, .y(y16), .sp(sp16), .a0(A0), .a1(A1), .a2(16'sd0), .u(u_pi));
  pid_pipelined #(.WIDTH(16), .FRAC(8), .PIPE(4), .DERIVATIVE(1'b1)) pid (
    .clk, .rst, .y(y16), .sp(sp16), .a0(A0), .a1(A1), .a2(A2), .u(u_pid));
  pid_pipelined #(.WIDTH(32), .FRAC(16), .PIPE(2)) pi32 (
    .clk, .rst, .y(y32), .sp(sp32), .a0(B0), .a1(B1), .a2(32'sd0), .u(u_pi32));

  // Model state per controller: error history and output history.
  longint e16 [NS], e32 [NS];
  longint m_pi [NS], m_pid [NS], m_pi32 [NS];

  function automatic longint wr(input longint v, input int w);
    longint m;
    m = v & ((64'sd1 <<< w) - 1);
    if (m >= (64'sd1 <<< (w - 1))) m -= (64'sd1 <<< w);
    return m;
  endfunction

  function automatic longint tr(input longint a, input longint e, input int frac,
                                input int w);
    return wr((a * e) >>> frac, w);
  endfunction

  function automatic longint ev(input longint arr [NS], input int k);
    return (k < 0) ? 0 : arr[k];
  endfunction

  task automatic cmp(input string name, input longint got, input longint arr [NS],
                     input int k);
    longint exp_v;
    exp_v = ev(arr, k);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s sample %0d: got %0d exp %0d", name, k, got, exp_v);
    end
  endtask

  initial begin : watchdog
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y16 = '0; sp16 = '0; y32 = '0; sp32 = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NS; n++) begin
      longint yv, sv, yv32, sv32;
      // set-point steps with a noisy measurement
      sv   = (n < 100) ? 1000 : (n < 200 ? -700 : 20000);
      yv   = longint'($urandom_range(0, 4000)) - 2000;
      if (n % 50 == 7) yv = -32768;          // drives e out of range: wraps
      sv32 = sv * 1000;
      yv32 = longint'($urandom_range(0, 400000)) - 200000;
      y16 = 16'(yv); sp16 = 16'(sv); y32 = 32'(yv32); sp32 = 32'(sv32);
      // model
      e16[n] = wr(sv - yv, 16);
      e32[n] = wr(sv32 - yv32, 32);
      m_pi[n]  = wr(ev(m_pi, n - 1) + wr(tr(A0, e16[n], 8, 16) - tr(A1, ev(e16, n - 1), 8, 16), 16), 16);
      m_pid[n] = wr(ev(m_pid, n - 1) + wr(tr(A0, e16[n], 8, 16) - tr(A1, ev(e16, n - 1), 8, 16)
                                        + tr(A2, ev(e16, n - 2), 8, 16), 16), 16);
      m_pi32[n] = wr(ev(m_pi32, n - 1) + wr(tr(B0, e32[n], 16, 32) - tr(B1, ev(e32, n - 1), 16, 32), 32), 32);
      @(negedge clk);
      // after clock edge n the output holds sample n - (latency - 1)
      cmp("pi",   longint'(u_pi),   m_pi,   n - 5);
      cmp("pid",  longint'(u_pid),  m_pid,  n - 9);
      cmp("pi32", longint'(u_pi32), m_pi32, n - 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
