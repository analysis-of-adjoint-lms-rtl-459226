// lms_filter - the "LMS Filter" block: holds and updates the adaptive weights.
//
// Every clock each weight takes one step of the adjoint LMS update
//     w_k <= sat( w_k + Out2(t) * x(t - DELAY - k) ),   k = 0 .. N_TAPS-1
// where Out2 is the normalised step term from the MUL block and x = data2.
// Out2 at clock t belongs to the error of the sample x(t - DELAY), DELAY being
// the total pipeline delay of the loop plus the M-1 samples of look-ahead of
// the adjoint filter; the block keeps its own line of past x so that each
// weight is paired with the right input sample. Weights are 32-bit Q2.30 and
// are read by the adaptive Filter block.
//
// Timing: one clock per update; reset clears all weights to zero.
// wsat_o is high after an update in which some weight clipped.
// The block, and step 5 of the algorithm (update w from x and the filtered
// error), follow the document. Drawing the weights back to the Filter, which
// the diagram leaves implicit, the alignment delay and the accumulator width
// are this design's own.
module lms_filter
  import alms_pkg::*;
#(
  parameter int unsigned N_TAPS = 16,
  parameter int unsigned DELAY  = 15
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x_in,            // reference input x(t)
  input  sample_t out2,            // step term for the sample x(t - DELAY)
  output wacc_t   w_out [N_TAPS],  // adaptive weights, Q2.30
  output logic    wsat_o
);
  localparam int unsigned LINE = DELAY + N_TAPS - 1;

  sample_t xline [LINE];   // xline[i] = x(t-1-i)
  wacc_t   w_q   [N_TAPS];
  logic    any_sat;
  wacc_t   w_d   [N_TAPS];

  always_comb begin
    any_sat = 1'b0;
    for (int k = 0; k < N_TAPS; k++) begin
      logic signed [WACC_W:0] s;
      s = (WACC_W+1)'(w_q[k]) + (WACC_W+1)'(out2 * xline[DELAY-1+k]);
      if (s[WACC_W] != s[WACC_W-1]) begin
        w_d[k]  = s[WACC_W] ? {1'b1, {(WACC_W-1){1'b0}}} : {1'b0, {(WACC_W-1){1'b1}}};
        any_sat = 1'b1;
      end else begin
        w_d[k]  = s[WACC_W-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LINE; i++) xline[i] <= '0;
      for (int k = 0; k < N_TAPS; k++) w_q[k] <= '0;
      wsat_o <= 1'b0;
    end else begin
      xline[0] <= x_in;
      for (int i = 1; i < LINE; i++) xline[i] <= xline[i-1];
      for (int k = 0; k < N_TAPS; k++) w_q[k] <= w_d[k];
      wsat_o <= any_sat;
    end
  end

  assign w_out = w_q;
endmodule
