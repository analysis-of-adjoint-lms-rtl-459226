// adaptive_filter - the "Filter" block: the adaptive FIR controller W.
//
// Filters the reference input x(n) (data2) through the current adaptive
// weights to give the controller output y(n) = sum_k w_k x(n-k). The weights
// arrive from the LMS Filter block as 32-bit Q2.30 accumulators; this block
// rounds each to a Q2.14 coefficient (upper 16 bits, round half up, saturated)
// and runs a three-stage pipelined FIR (fir_pipe).
//
// Timing: x(n) captured at edge n appears as y(n) after edge n+2 (latency 3).
// The weights used for x(n) are those present before edge n.
// The block, its place between data2 and the Secondary Filter and step 1 of the
// algorithm (filter x(n) through w(n-1)) follow the document; the tap count,
// formats and pipelining are this design's choices.
module adaptive_filter
  import alms_pkg::*;
#(
  parameter int unsigned N_TAPS = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x_in,              // reference input x(n)
  input  wacc_t   w_in  [N_TAPS],    // adaptive weights, Q2.30
  output sample_t y_out,             // controller output y(n), Q1.15
  output logic    sat_o              // y(n) was clipped
);
  localparam int unsigned SH = WACC_FRAC - COEF_FRAC;

  coef_t coef [N_TAPS];

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) begin
      logic signed [63:0] r;
      r = round_shift(64'(w_in[k]), SH);
      if (r > 64'sd32767)       coef[k] = coef_t'(16'sh7FFF);
      else if (r < -64'sd32768) coef[k] = coef_t'(16'sh8000);
      else                      coef[k] = coef_t'(r);
    end
  end

  fir_pipe #(.TAPS(N_TAPS)) u_fir (
    .clk  (clk),
    .rst  (rst),
    .x_in (x_in),
    .coef (coef),
    .y_out(y_out),
    .sat_o(sat_o)
  );
endmodule
