// tb_adaptive_filter - self-checking test of the adaptive FIR controller.
//
// Drives random Q1.15 samples and random Q2.30 weights (changed every 37
// clocks) and compares every output with a reference computed here: weights
// rounded to Q2.14, dot product with the last N_TAPS inputs, rounded and
// saturated to Q1.15, expected three clock edges after the input is taken.
// Large inputs and weights are mixed in so that saturation is exercised.
module tb_adaptive_filter;
  import alms_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst = 1;
  sample_t x_in = '0, y_out;
  wacc_t   w [N];
  logic    sat_o;
  int checks = 0, failures = 0, nsat = 0;

  adaptive_filter dut (.clk, .rst, .x_in, .w_in(w), .y_out, .sat_o);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [N];
  longint acc, r, e, ex;
  bit     es;
  longint expq [$];
  bit     satq [$];

  function automatic longint coef_of(wacc_t wv);
    longint r = (longint'(wv) + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin w[k] = '0; hist[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc % 37 == 0)
        for (int k = 0; k < N; k++)
          w[k] = (cyc % 5 == 0) ? wacc_t'($urandom) : wacc_t'($signed($urandom) >>> 2);
      x_in = sample_t'($urandom);
      for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(x_in);
      acc = 0;
      for (int k = 0; k < N; k++) acc += coef_of(w[k]) * hist[k];
      r = (acc + 8192) >>> 14;
      e = (r > 32767) ? 32767 : (r < -32768) ? -32768 : r;
      expq.push_back(e);
      satq.push_back(r != e);
      @(posedge clk); #1;
      if (expq.size() == 3) begin
        ex = expq.pop_front();
        es = satq.pop_front();
        checks++;
        if (longint'(y_out) != ex || sat_o != es) begin
          failures++;
          if (failures < 10) $display("cyc %0d: y=%0d exp %0d sat=%b exp %b", cyc, y_out, ex, sat_o, es);
        end
        if (es) nsat++;
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturated outputs: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
