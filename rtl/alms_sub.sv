// alms_sub - the "SUB" block: forms the error at the sensor.
//
// e(n) = sat( d(n) - ys(n) ), where d(n) is the primary (noisy) input data1 and
// ys(n) the Secondary Filter output Out1. The error is the canceller's
// error-corrected output and feeds the adjoint filter. Because ys(n) leaves the
// controller and secondary-path pipelines D_DELAY clocks after d(n) enters,
// d is first delayed by D_DELAY registers so that the two samples meet.
//
// Timing: d(n) captured at edge n (d_in) and ys(n) presented before edge
// n+D_DELAY give e(n) after edge n+D_DELAY. sat_o flags a clipped error.
// The block and its name come from the document's block diagram, which draws a
// subtractor; the algorithm text forms the error as a sum d(n) + ys(n) instead.
// This design follows the diagram. The delay line and the saturation are this
// design's own.
module alms_sub
  import alms_pkg::*;
#(
  parameter int unsigned D_DELAY = 6
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t d_in,        // primary input d(n)
  input  sample_t out1,        // secondary response ys(n), D_DELAY clocks later
  output sample_t error_out,   // e(n)
  output logic    sat_o        // e(n) was clipped
);
  sample_t dline [D_DELAY];
  logic signed [63:0] diff;

  assign diff = 64'(dline[D_DELAY-1]) - 64'(out1);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < D_DELAY; i++) dline[i] <= '0;
      error_out <= '0;
      sat_o     <= 1'b0;
    end else begin
      dline[0] <= d_in;
      for (int i = 1; i < D_DELAY; i++) dline[i] <= dline[i-1];
      error_out <= sat_sample(diff);
      sat_o     <= clips(diff);
    end
  end
endmodule
