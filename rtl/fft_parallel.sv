// fft_parallel: fully parallel, fully pipelined N-point FFT of any size and
// any mix of radices.
//
// All N complex samples enter in one clock and all N bins leave together
// LATENCY clocks later; a new transform can start every clock, so the
// throughput is N samples per cycle. The transform is built by fft_stage,
// which splits it recursively as given by the stage list STAGES (e.g.
// 64 32 16 8 4 2 for radix 2, 64 16 4 for radix 4, 12 4 for one radix-3
// split with 4-point leaves) and computes each level as two constant complex
// matrix products (butterflies, then twiddles) followed by smaller
// transforms.
//
// Number format: signed fixed point, W bits per real and per imaginary part
// with FRAC fractional bits (default 18 and 12). Every product is truncated
// back to W bits and sums are not scaled, so the input magnitude must leave
// room for a growth of up to N in the integer part. The coefficients may
// have their own format, CW bits with CFRAC fractional bits (by default W and
// FRAC); products are truncated by CFRAC bits so the sample format is kept.
// INVERSE = 1 computes the unscaled inverse transform (conjugate
// coefficients, no division by N). LUT_ONLY = 1 replaces the multipliers by
// signed-digit shift-and-add constant multipliers (5-cycle instead of
// 3-cycle matrix products).
//
// Interface: in_valid qualifies x_re/x_im; out_valid is in_valid delayed by
// LATENCY = MAT_LAT * (2*L - 1) clocks, L the number of levels. The datapath
// itself has no enable and processes every clock; the valid flag is only a
// marker travelling alongside. Synchronous, active-high reset.
//
// The recursive any-radix structure, the fixed-point format and the latency
// per matrix product follow the source design; the valid marker is this
// design's addition.
module fft_parallel #(
  parameter int                   W        = 18,
  parameter int                   FRAC     = 12,
  parameter int                   CW       = W,
  parameter int                   CFRAC    = FRAC,
  parameter fft_pkg::stage_list_t STAGES   = fft_pkg::STAGES_64_R2,
  parameter bit                   INVERSE  = 1'b0,
  parameter bit                   LUT_ONLY = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re [STAGES[0]],
  input  logic signed [W-1:0] x_im [STAGES[0]],
  output logic                out_valid,
  output logic signed [W-1:0] X_re [STAGES[0]],
  output logic signed [W-1:0] X_im [STAGES[0]]
);
  localparam int MAT_LAT = LUT_ONLY ? 5 : 3;
  localparam int LEVELS  = fft_pkg::stage_count(STAGES);
  localparam int LATENCY = MAT_LAT * (2 * LEVELS - 1);

  logic [LATENCY-1:0] valid_sr;

  always_ff @(posedge clk) begin
    if (rst) valid_sr <= '0;
    else     valid_sr <= {valid_sr[LATENCY-2:0], in_valid};
  end
  assign out_valid = valid_sr[LATENCY-1];

  fft_stage #(
    .W(W), .FRAC(FRAC), .CW(CW), .CFRAC(CFRAC), .STAGES(STAGES), .INVERSE(INVERSE),
    .LUT_ONLY(LUT_ONLY)
  ) u_fft (
    .clk, .rst, .x_re, .x_im, .X_re, .X_im
  );
endmodule
