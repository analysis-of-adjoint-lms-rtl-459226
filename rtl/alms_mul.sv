// alms_mul - the "MUL" block: turns the filtered error into the normalised
// step term of the weight update.
//
//     Out2 = sat( fe * mu / (N * P_x) )
//
// fe is the filtered error m_error (Q1.15), mu the step size MU (Q1.15) and P_x
// a running estimate of the power of the reference input x = data2, so that
// N * P_x approximates the energy of the N-sample input vector (normalised LMS).
// P_x is an exponential average, P <- P + (x^2 - P) / 2^PWR_SHIFT, in Q2.30.
// The division is done as a right shift: P_x is rounded down to a power of two
// 2^(L-30) by finding its leading one L, and L is held at L_MIN or above so
// that a silent input cannot blow the step up (regularisation).
//
// Timing: two stages. fe presented before edge t gives Out2 after edge t+1.
// norm_clamp_o is high in the cycle after a step whose divisor was clamped.
// Multiplying the filtered error with a term made from data2, and normalising
// the gradient, follow the document; the power estimator, the power-of-two
// division and the constants are this design's own.
module alms_mul
  import alms_pkg::*;
#(
  parameter int unsigned N_TAPS    = 16,
  parameter sample_t     MU        = 16'sd4096,   // 0.125 in Q1.15
  parameter int unsigned PWR_SHIFT = 5,
  parameter int unsigned L_MIN     = 20           // power floor 2^-10
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t fe_in,         // filtered error fe (m_error)
  input  sample_t x_in,          // reference input x (data2)
  output sample_t out2,          // step term mu*fe/(N*P_x), Q1.15
  output logic    sat_o,         // out2 was clipped
  output logic    norm_clamp_o   // power floor was in force for this step
);
  localparam int unsigned LOG2N = $clog2(N_TAPS);

  logic [31:0]        pw_q;       // power estimate, Q2.30, never negative
  logic signed [33:0] pw_next;
  logic [31:0]        x_sq;
  int unsigned        lead, l_eff;
  logic signed [31:0] prod_q;
  int unsigned        rs_q;
  logic               clamp_q;
  logic signed [63:0] scaled;

  assign x_sq    = 32'(unsigned'(32'(x_in * x_in)));
  assign pw_next = 34'(signed'({2'b00, pw_q})) +
                   ((34'(signed'({2'b00, x_sq})) - 34'(signed'({2'b00, pw_q}))) >>> PWR_SHIFT);

  always_comb begin
    lead = 0;
    for (int i = 0; i < 32; i++) if (pw_q[i]) lead = i;
    l_eff = (lead < L_MIN) ? L_MIN : lead;
  end

  assign scaled = round_shift(64'(prod_q), rs_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      pw_q    <= '0;
      prod_q  <= '0;
      rs_q    <= L_MIN + LOG2N - 15;
      clamp_q <= 1'b1;
      out2    <= '0;
      sat_o   <= 1'b0;
      norm_clamp_o <= 1'b0;
    end else begin
      pw_q    <= 32'(pw_next);
      prod_q  <= fe_in * MU;
      rs_q    <= l_eff + LOG2N - 15;
      clamp_q <= (lead < L_MIN);
      out2    <= sat_sample(scaled);
      sat_o   <= clips(scaled);
      norm_clamp_o <= clamp_q;
    end
  end
endmodule
