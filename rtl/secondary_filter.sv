// secondary_filter - the "Secondary Filter" block: a fixed FIR model S of the
// secondary path between the controller output and the error sensor.
//
// Computes ys(n) = sum_j s_j y(n-j) with the constant Q2.14 coefficients of
// S_COEF (tap 0 in the lowest 16 bits) through a three-stage pipelined FIR.
// Output Out1 is ys(n), Q1.15.
//
// Timing: y(n) captured at edge n appears as ys(n) after edge n+2 (latency 3).
// The block and step 2 of the algorithm (filter y(n) through the secondary path
// to give ys(n)) follow the document; the coefficient values, the tap count and
// the pipelining are this design's choices, since the document gives none.
module secondary_filter
  import alms_pkg::*;
#(
  parameter int unsigned                   S_TAPS = S_TAPS_DEF,
  parameter logic [S_TAPS*COEF_W-1:0]      S_COEF = S_COEF_DEF
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t y_in,    // controller output y(n)
  output sample_t out1,    // secondary response ys(n)
  output logic    sat_o    // ys(n) was clipped
);
  coef_t coef [S_TAPS];

  always_comb
    for (int j = 0; j < S_TAPS; j++) coef[j] = coef_t'(S_COEF[j*COEF_W +: COEF_W]);

  fir_pipe #(.TAPS(S_TAPS)) u_fir (
    .clk  (clk),
    .rst  (rst),
    .x_in (y_in),
    .coef (coef),
    .y_out(out1),
    .sat_o(sat_o)
  );
endmodule
