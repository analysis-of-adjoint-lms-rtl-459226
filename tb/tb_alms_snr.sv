// tb_alms_snr - noise-cancellation workload for the adjoint LMS canceller at
// its default parameters.
//
// The primary input data1 carries a clean tone (amplitude 0.05, period 50
// samples) plus noise that reached the sensor through a primary path
// h = S * Wo. The reference data2 is the noise source x, white, amplitude
// 1/4. The tone is not correlated with x, so the canceller should remove the
// noise and pass the tone. The test measures the signal-to-noise ratio of
// data1 (tone against noise) and of alms_out (tone against whatever else is
// in the output) over the last 4000 samples. It requires an improvement of at
// least 12 dB and an output SNR of at least 10 dB. What is left at the output
// is the LMS misadjustment: the tone disturbs the weight update, and the
// residual grows with the step size MU and the tone power (a typical run:
// -2.5 dB in, 13.5 dB out).
module tb_alms_snr;
  import alms_pkg::*;

  localparam int NRUN = 20000, NMEAS = 4000, LAT = 8;

  logic clk = 0, rst = 1;
  sample_t data1 = '0, data2 = '0, alms_out;
  int checks = 0, failures = 0;

  alms_top dut (.clk, .rst, .data1, .data2, .alms_out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    s_path [4] = '{0.5, 0.25, -0.125, 0.0625};
  real    wo [8]     = '{-0.35, 0.25, 0.30, -0.15, 0.10, 0.05, -0.04, 0.02};
  real    h [11];
  real    xh [11];
  real    tone [$];
  real    nz, tn, p_sig, p_in_noise, p_out_noise, snr_in, snr_out, ot;
  sample_t xv;

  initial begin
    for (int i = 0; i < 11; i++) begin h[i] = 0.0; xh[i] = 0.0; end
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 4; j++) h[k+j] += wo[k] * s_path[j];
    p_sig = 0.0; p_in_noise = 0.0; p_out_noise = 0.0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < LAT - 1; i++) tone.push_back(0.0);
    for (int n = 0; n < NRUN; n++) begin
      @(negedge clk);
      xv = sample_t'($signed($urandom) >>> 18);
      for (int i = 10; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = real'(xv);
      nz = 0.0;
      for (int i = 0; i < 11; i++) nz += h[i] * xh[i];
      tn = 1638.4 * $sin(2.0 * 3.14159265358979 * real'(n) / 50.0);
      data1 = sample_t'($rtoi(tn + nz));
      data2 = xv;
      tone.push_back(tn);
      @(posedge clk); #1;
      ot = tone.pop_front();   // tone sample that alms_out now carries
      if (n >= NRUN - NMEAS) begin
        p_sig       += tn * tn;
        p_in_noise  += nz * nz;
        p_out_noise += (real'(alms_out) - ot) * (real'(alms_out) - ot);
      end
    end
    snr_in  = 10.0 * $log10(p_sig / p_in_noise);
    snr_out = 10.0 * $log10(p_sig / (p_out_noise + 1.0e-9));
    $display("SNR at data1: %f dB, at alms_out: %f dB", snr_in, snr_out);
    checks += 2;
    if (snr_out - snr_in < 12.0) begin failures++; $display("improvement below 12 dB"); end
    if (snr_out < 10.0) begin failures++; $display("output SNR below 10 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
