// fir_pipe - three-stage pipelined direct-form FIR filter, one sample per clock.
//
// Computes y(n) = sat( round( sum_{i=0}^{TAPS-1} coef[i] * x(n-i) / 2^14 ) ):
// Q1.15 samples times Q2.14 coefficients, result in Q1.15. The sample line is a
// shift register; tap 0 is the input itself.
//
// Timing: x(n) presented before clock edge n gives y(n) after edge n+2, that is
// three edges counting the one that captures the products:
//   edge n   : products  coef[i] * x(n-i)   (coef as seen before edge n)
//   edge n+1 : sum of the products
//   edge n+2 : rounding and saturation to 16 bits, sat_o flags a clip
// Reset (rst, synchronous, active high) clears the sample line and the pipeline.
// Shared by the three filters of the canceller; its structure is this design's
// own, the document gives the filters only as blocks.
module fir_pipe
  import alms_pkg::*;
#(
  parameter int unsigned TAPS = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x_in,
  input  coef_t   coef [TAPS],
  output sample_t y_out,
  output logic    sat_o
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + $clog2(TAPS) + 1;

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  sample_t line [TAPS];   // line[i] holds x(n-1-i) once x(n) is at the input
  sample_t tap  [TAPS];
  prod_t   prod [TAPS];
  sum_t    sum_q;
  sum_t    sum_d;
  logic signed [63:0] scaled;

  always_comb begin
    tap[0] = x_in;
    for (int i = 1; i < TAPS; i++) tap[i] = line[i-1];
  end

  always_comb begin
    sum_d = '0;
    for (int i = 0; i < TAPS; i++) sum_d += SUM_W'(prod[i]);
  end

  assign scaled = round_shift(64'(sum_q), COEF_FRAC);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) begin
        line[i] <= '0;
        prod[i] <= '0;
      end
      sum_q <= '0;
      y_out <= '0;
      sat_o <= 1'b0;
    end else begin
      line[0] <= x_in;
      for (int i = 1; i < TAPS; i++) line[i] <= line[i-1];
      for (int i = 0; i < TAPS; i++) prod[i] <= tap[i] * coef[i];
      sum_q <= sum_d;
      y_out <= sat_sample(scaled);
      sat_o <= clips(scaled);
    end
  end
endmodule
