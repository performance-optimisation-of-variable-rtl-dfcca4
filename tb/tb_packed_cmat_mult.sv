// tb_packed_cmat_mult: checks the parallel complex matrix multiplier at its
// full size (9 x 9 times 9 x 9, unsigned 9-bit parts) and at 2 x 3 times
// 3 x 4 with 6-bit parts. A new pair of random matrices with parts below
// 2^(W-1) (where the packed multipliers are exact) enters every clock; every
// element of every product is compared with a plain integer matrix product,
// and out_valid must follow in_valid by exactly 4 clocks.
module tb_packed_cmat_mult;
  localparam int NV  = 12;
  localparam int LAT = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks = 0, failures = 0;

  // full size
  logic       v9_in, v9_out;
  logic [8:0] a9_re [9][9], a9_im [9][9], b9_re [9][9], b9_im [9][9];
  logic signed [22:0] c9_re [9][9], c9_im [9][9];
  longint e9_re [NV][9][9], e9_im [NV][9][9];
  // small
  logic       v6_in, v6_out;
  logic [5:0] a6_re [2][3], a6_im [2][3], b6_re [3][4], b6_im [3][4];
  logic signed [14:0] c6_re [2][4], c6_im [2][4];
  longint e6_re [NV][2][4], e6_im [NV][2][4];

  always #5 clk = ~clk;

  packed_cmat_mult dut9 (.clk, .rst, .in_valid(v9_in), .a_re(a9_re), .a_im(a9_im),
    .b_re(b9_re), .b_im(b9_im), .out_valid(v9_out), .c_re(c9_re), .c_im(c9_im));
  packed_cmat_mult #(.W(6), .M(2), .N(3), .P(4)) dut6 (.clk, .rst, .in_valid(v6_in),
    .a_re(a6_re), .a_im(a6_im), .b_re(b6_re), .b_im(b6_im), .out_valid(v6_out),
    .c_re(c6_re), .c_im(c6_im));

  initial begin : watchdog
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen;
    v9_in = 0; v6_in = 0;
    a9_re = '{default: '{default: '0}}; a9_im = '{default: '{default: '0}};
    b9_re = '{default: '{default: '0}}; b9_im = '{default: '{default: '0}};
    a6_re = '{default: '{default: '0}}; a6_im = '{default: '{default: '0}};
    b6_re = '{default: '{default: '0}}; b6_im = '{default: '{default: '0}};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    seen = 0;
    for (int n = 0; n < NV + LAT + 2; n++) begin
      v9_in = (n < NV);
      v6_in = (n < NV);
      if (n < NV) begin
        for (int i = 0; i < 9; i++)
          for (int j = 0; j < 9; j++) begin
            a9_re[i][j] = 9'($urandom_range(0, 255)); a9_im[i][j] = 9'($urandom_range(0, 255));
            b9_re[i][j] = 9'($urandom_range(0, 255)); b9_im[i][j] = 9'($urandom_range(0, 255));
            if (n == 0) begin a9_re[i][j] = 255; a9_im[i][j] = 0; b9_re[i][j] = 255; b9_im[i][j] = 255; end
          end
        for (int i = 0; i < 9; i++)
          for (int j = 0; j < 9; j++) begin
            e9_re[n][i][j] = 0; e9_im[n][i][j] = 0;
            for (int k = 0; k < 9; k++) begin
              e9_re[n][i][j] += longint'(a9_re[i][k]) * b9_re[k][j] - longint'(a9_im[i][k]) * b9_im[k][j];
              e9_im[n][i][j] += longint'(a9_re[i][k]) * b9_im[k][j] + longint'(a9_im[i][k]) * b9_re[k][j];
            end
          end
        for (int i = 0; i < 2; i++)
          for (int k = 0; k < 3; k++) begin
            a6_re[i][k] = 6'($urandom_range(0, 31)); a6_im[i][k] = 6'($urandom_range(0, 31));
          end
        for (int k = 0; k < 3; k++)
          for (int j = 0; j < 4; j++) begin
            b6_re[k][j] = 6'($urandom_range(0, 31)); b6_im[k][j] = 6'($urandom_range(0, 31));
          end
        for (int i = 0; i < 2; i++)
          for (int j = 0; j < 4; j++) begin
            e6_re[n][i][j] = 0; e6_im[n][i][j] = 0;
            for (int k = 0; k < 3; k++) begin
              e6_re[n][i][j] += longint'(a6_re[i][k]) * b6_re[k][j] - longint'(a6_im[i][k]) * b6_im[k][j];
              e6_im[n][i][j] += longint'(a6_re[i][k]) * b6_im[k][j] + longint'(a6_im[i][k]) * b6_re[k][j];
            end
          end
      end
      @(negedge clk);
      begin
        int k;
        bit due;
        k = n - LAT + 1;
        due = (k >= 0 && k < NV);
        checks++;
        if (v9_out !== due || v6_out !== due) begin
          failures++;
          $display("FAIL valid at step %0d: %b %b, expected %b", n, v9_out, v6_out, due);
        end
        if (due) begin
          seen++;
          for (int i = 0; i < 9; i++)
            for (int j = 0; j < 9; j++) begin
              checks++;
              if (longint'(c9_re[i][j]) != e9_re[k][i][j] || longint'(c9_im[i][j]) != e9_im[k][i][j]) begin
                failures++;
                if (failures < 8) $display("FAIL 9x9 mat %0d [%0d][%0d]: got (%0d,%0d) exp (%0d,%0d)",
                  k, i, j, c9_re[i][j], c9_im[i][j], e9_re[k][i][j], e9_im[k][i][j]);
              end
            end
          for (int i = 0; i < 2; i++)
            for (int j = 0; j < 4; j++) begin
              checks++;
              if (longint'(c6_re[i][j]) != e6_re[k][i][j] || longint'(c6_im[i][j]) != e6_im[k][i][j]) begin
                failures++;
                if (failures < 8) $display("FAIL 2x4 mat %0d [%0d][%0d]", k, i, j);
              end
            end
        end
      end
    end
    if (seen != NV) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
