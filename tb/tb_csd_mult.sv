// tb_csd_mult: checks the signed-digit constant multiplier against plain
// integer multiplication for a set of constants (positive, negative, zero,
// powers of two, long runs of ones, the 18-bit extremes) and random samples,
// with the 3-clock latency checked by comparing each output with the sample
// applied 3 clocks earlier.
module tb_csd_mult;
  localparam int W   = 18;
  localparam int LAT = 3;
  localparam int NC  = 7;
  localparam longint CS [NC] = '{64'sd2896, -64'sd2896, 64'sd4096, -64'sd1,
                                 64'sd0, 64'sd131071, -64'sd87381};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic signed [W-1:0] x;
  logic signed [2*W+1:0] p [NC];
  int checks = 0, failures = 0;
  int hist [$];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    csd_mult #(.W(W), .C(CS[c])) dut (.clk, .rst, .x, .p(p[c]));
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300 + LAT; n++) begin
      int v;
      case (n)
        0: v = 131071;
        1: v = -131072;
        2: v = 0;
        default: v = $urandom_range(0, 262143) - 131072;
      endcase
      x = W'(v);
      hist.push_back(v);
      @(negedge clk);
      if (n >= LAT - 1 && n - LAT + 1 < 300) begin
        longint xv;
        xv = longint'(hist[n - LAT + 1]);
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (longint'(p[c]) != xv * CS[c]) begin
            failures++;
            if (failures < 10)
              $display("FAIL C=%0d x=%0d: got %0d exp %0d", CS[c], xv, p[c], xv * CS[c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
