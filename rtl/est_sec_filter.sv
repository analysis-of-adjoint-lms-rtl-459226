// est_sec_filter - the "Est.sec filter" block: the adjoint filter of the error.
//
// Passes the error e(n) through the time-reversed (mirrored) estimate of the
// secondary path, s_hat, giving the filtered error
//     fe(m) = sum_{j=0}^{M-1} s_hat_j * e(m + j).
// Since fe(m) needs errors up to e(m+M-1), it is produced when e(m+M-1)
// arrives: the FIR runs with the coefficients reversed, c_i = s_hat_{M-1-i}.
// This is the adjoint LMS idea: the error, not the reference input, is
// filtered, at a fixed extra delay of M-1 samples that the weight update
// compensates by delaying x by the same amount.
//
// Timing: e(q) captured at edge q gives fe(q-M+1) after edge q+2 (latency 3
// plus the M-1 samples of look-ahead).
// The block and step 4 of the algorithm follow the document; the coefficient
// values (by default equal to the Secondary Filter's, a perfect estimate) and
// the pipelining are this design's choices.
module est_sec_filter
  import alms_pkg::*;
#(
  parameter int unsigned              S_TAPS    = S_TAPS_DEF,
  parameter logic [S_TAPS*COEF_W-1:0] SHAT_COEF = S_COEF_DEF
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t e_in,      // error e(n), error_out of the SUB block
  output sample_t fe_out,    // filtered error fe, m_error
  output logic    sat_o      // fe was clipped
);
  coef_t coef [S_TAPS];

  always_comb
    for (int i = 0; i < S_TAPS; i++)
      coef[i] = coef_t'(SHAT_COEF[(S_TAPS-1-i)*COEF_W +: COEF_W]);

  fir_pipe #(.TAPS(S_TAPS)) u_fir (
    .clk  (clk),
    .rst  (rst),
    .x_in (e_in),
    .coef (coef),
    .y_out(fe_out),
    .sat_o(sat_o)
  );
endmodule
