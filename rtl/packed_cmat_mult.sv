// packed_cmat_mult: fully parallel complex matrix product C = A * B of an
// M x N and an N x P matrix of unsigned W-bit complex numbers.
//
// Every output element C[i][j] is a packed_cdot of row i of A with column j
// of B, so the array holds M*N*P packed complex multipliers (729 for the
// default 9 x 9 x 9, W = 9) and produces a whole product matrix every clock.
// At W = 9 each packed multiplier is a 27 x 27-bit product, two DSP slices.
//
// Interface: a_*[i][k] and b_*[k][j] in; c_*[i][j] out, signed, OW bits (see
// packed_cdot for exactness). in_valid is a marker that comes out as
// out_valid after the 4-clock latency; the datapath runs every clock.
// Synchronous, active-high reset.
//
// The array of row-by-column dot products follows the source design; the
// valid marker is this design's addition.
module packed_cmat_mult #(
  parameter int W  = 9,
  parameter int M  = 9,
  parameter int N  = 9,
  parameter int P  = 9,
  parameter int OW = 2 * W + $clog2(N) + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [W-1:0]         a_re [M][N],
  input  logic [W-1:0]         a_im [M][N],
  input  logic [W-1:0]         b_re [N][P],
  input  logic [W-1:0]         b_im [N][P],
  output logic                 out_valid,
  output logic signed [OW-1:0] c_re [M][P],
  output logic signed [OW-1:0] c_im [M][P]
);
  localparam int LATENCY = 4;

  logic [LATENCY-1:0] valid_sr;

  always_ff @(posedge clk) begin
    if (rst) valid_sr <= '0;
    else     valid_sr <= {valid_sr[LATENCY-2:0], in_valid};
  end
  assign out_valid = valid_sr[LATENCY-1];

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < P; j++) begin : g_col
      logic [W-1:0] col_re [N];
      logic [W-1:0] col_im [N];
      for (genvar k = 0; k < N; k++) begin : g_k
        assign col_re[k] = b_re[k][j];
        assign col_im[k] = b_im[k][j];
      end
      packed_cdot #(.W(W), .N(N), .OW(OW)) u_dot (
        .clk, .rst,
        .a_re(a_re[i]), .a_im(a_im[i]), .b_re(col_re), .b_im(col_im),
        .c_re(c_re[i][j]), .c_im(c_im[i][j])
      );
    end
  end
endmodule
