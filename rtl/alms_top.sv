// alms_top - adjoint LMS (ALMS) adaptive noise canceller, one 16-bit sample per
// clock.
//
// Inputs are the primary signal d(n) on data1 (the noisy signal at the sensor)
// and the noise reference x(n) on data2. Per sample:
//   Filter            y(n)  = W * x          adaptive FIR controller
//   Secondary Filter  ys(n) = S * y          model of the secondary path (Out1)
//   SUB               e(n)  = d(n) - ys(n)   error, the corrected output
//   Est.sec filter    fe    = mirrored S_hat applied to e    (m_error)
//   MUL               Out2  = mu * fe / (N * P_x)            normalised step
//   LMS Filter        w_k  += Out2 * x(delayed, k)           weight update
// The error e(n) is the error-corrected output alms_out. The weights adapt so
// that S*W*x matches the part of d correlated with x, leaving in e what x
// cannot explain.
//
// Interface: clk, rst (synchronous, active high), data1, data2 in; alms_out
// out: four inputs and one output, 50 pins in all, as the document's design.
// Timing: no handshake; a new sample pair is taken on every clock edge. A
// sample captured at edge n leaves as e(n) after edge n+7: eight clock edges of
// latency, one sample per clock of throughput, as the document states. The
// weight update works with the errors of samples DELAY clocks old (a delayed
// LMS), DELAY = S_TAPS + 11 for the pipeline depths used here.
// The six blocks and their wiring follow the document's block diagram; the
// number formats, the tap counts, the coefficient values, the pipelining and
// the normalisation by a power-of-two estimate are this design's own choices.
module alms_top
  import alms_pkg::*;
#(
  parameter int unsigned              N_TAPS    = 16,
  parameter int unsigned              S_TAPS    = S_TAPS_DEF,
  parameter logic [S_TAPS*COEF_W-1:0] S_COEF    = S_COEF_DEF,
  parameter logic [S_TAPS*COEF_W-1:0] SHAT_COEF = S_COEF_DEF,
  parameter sample_t                  MU        = 16'sd4096,
  parameter int unsigned              PWR_SHIFT = 5
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t data1,      // primary input d(n)
  input  sample_t data2,      // noise reference x(n)
  output sample_t alms_out    // error-corrected output e(n)
);
  localparam int unsigned L_FILT = 3;   // latency of each fir_pipe
  localparam int unsigned L_SUB  = 1;
  localparam int unsigned L_MUL  = 2;
  localparam int unsigned DELAY  = (S_TAPS - 1) + L_FILT + L_FILT + L_SUB + L_FILT + L_MUL;

  sample_t d_q, x_q;
  sample_t y, out1, error_out, m_error, out2;
  wacc_t   w [N_TAPS];
  logic    y_sat, s_sat, e_sat, fe_sat, o2_sat, norm_clamp, w_sat;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_q <= '0;
      x_q <= '0;
    end else begin
      d_q <= data1;
      x_q <= data2;
    end
  end

  adaptive_filter #(.N_TAPS(N_TAPS)) u_filter (
    .clk(clk), .rst(rst), .x_in(x_q), .w_in(w), .y_out(y), .sat_o(y_sat)
  );

  secondary_filter #(.S_TAPS(S_TAPS), .S_COEF(S_COEF)) u_sec (
    .clk(clk), .rst(rst), .y_in(y), .out1(out1), .sat_o(s_sat)
  );

  alms_sub #(.D_DELAY(2 * L_FILT)) u_sub (
    .clk(clk), .rst(rst), .d_in(d_q), .out1(out1), .error_out(error_out), .sat_o(e_sat)
  );

  est_sec_filter #(.S_TAPS(S_TAPS), .SHAT_COEF(SHAT_COEF)) u_est (
    .clk(clk), .rst(rst), .e_in(error_out), .fe_out(m_error), .sat_o(fe_sat)
  );

  alms_mul #(.N_TAPS(N_TAPS), .MU(MU), .PWR_SHIFT(PWR_SHIFT)) u_mul (
    .clk(clk), .rst(rst), .fe_in(m_error), .x_in(x_q), .out2(out2),
    .sat_o(o2_sat), .norm_clamp_o(norm_clamp)
  );

  lms_filter #(.N_TAPS(N_TAPS), .DELAY(DELAY)) u_lms (
    .clk(clk), .rst(rst), .x_in(x_q), .out2(out2), .w_out(w), .wsat_o(w_sat)
  );

  assign alms_out = error_out;
endmodule
