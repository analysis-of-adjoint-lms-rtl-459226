// tb_alms_top - end-to-end test of the adjoint LMS noise canceller at its
// default parameters.
//
// Phase 1, latency: with the reference data2 silent the weights cannot move
// and alms_out must repeat data1 exactly, eight clock edges later (the edge
// that takes the sample counts as the first). A single impulse measures the
// latency; random data1 checks every sample. The silent reference also holds
// the normaliser at its power floor.
// Phase 2, cancellation: data2 is white noise x of amplitude 1/4 and data1 is
// d = h * x, where h = S * Wo is the secondary path (the design's default
// 0.5, 0.25, -0.125, 0.0625) convolved with a target controller Wo chosen
// here. The canceller must learn W = Wo: the residual power at the end must be
// at least 30 dB below the power of d, and the adaptive weights must reach Wo
// to within 0.01.
// Phase 3, overload: data1 held at full scale so that the error clips.
// Each mechanism (fixed latency, power floor, data-driven normalisation,
// weight adaptation, convergence, error clipping) is counted and must occur.
module tb_alms_top;
  import alms_pkg::*;

  localparam int NCONV = 12000;

  logic clk = 0, rst = 1;
  sample_t data1 = '0, data2 = '0, alms_out;
  int checks = 0, failures = 0;
  int n_floor = 0, n_norm = 0, n_esat = 0, n_adapt = 0;

  alms_top dut (.clk, .rst, .data1, .data2, .alms_out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, read from the blocks' status outputs
  always @(posedge clk) if (!rst) begin
    if (dut.u_mul.norm_clamp_o) n_floor++; else n_norm++;
    if (dut.u_sub.sat_o) n_esat++;
    if (dut.u_lms.w_out[0] != 0) n_adapt++;
  end

  real    s_path [4] = '{0.5, 0.25, -0.125, 0.0625};
  real    wo [8]     = '{0.40, -0.30, 0.20, 0.15, -0.10, 0.05, 0.03, -0.02};
  real    h [11];
  real    xh [11];
  real    dr, p_d, p_e;
  int     q [$];
  int     lat, ex, nbad;
  real    wk, tk;
  sample_t v, xv;

  task automatic step(input sample_t d1, input sample_t d2);
    @(negedge clk);
    data1 = d1;
    data2 = d2;
    @(posedge clk); #1;
  endtask

  initial begin
    for (int i = 0; i < 11; i++) begin h[i] = 0.0; xh[i] = 0.0; end
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 4; j++) h[k+j] += wo[k] * s_path[j];

    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // ---- phase 1: latency ----
    lat = -1;
    step(16'sd1000, '0);
    for (int i = 1; i <= 12; i++) begin
      if (alms_out != 0 && lat < 0) lat = i;
      step('0, '0);
    end
    checks++;
    if (lat != 8) begin failures++; $display("latency %0d edges, expected 8", lat); end
    else $display("latency: 8 clock edges");
    repeat (8) step('0, '0);
    for (int i = 0; i < 7; i++) q.push_back(0);
    for (int i = 0; i < 200; i++) begin
      v = sample_t'($urandom);
      step(v, '0);
      q.push_back(int'(v));
      ex = q.pop_front();
      checks++;
      if (int'(alms_out) != ex) begin
        failures++;
        if (failures < 10) $display("latency phase %0d: out %0d exp %0d", i, alms_out, ex);
      end
    end
    repeat (8) step('0, '0);

    // ---- phase 2: cancellation ----
    p_d = 0.0; p_e = 0.0;
    for (int n = 0; n < NCONV; n++) begin
      xv = sample_t'($signed($urandom) >>> 18);
      for (int i = 10; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = real'(xv);
      dr = 0.0;
      for (int i = 0; i < 11; i++) dr += h[i] * xh[i];
      step(sample_t'($rtoi(dr)), xv);
      if (n >= NCONV - 2000) begin
        p_d += dr * dr;
        p_e += real'(alms_out) * real'(alms_out);
      end
    end
    $display("residual / primary power over the last 2000 samples: %f (%f dB)",
             p_e / p_d, 10.0 * $log10(p_e / p_d + 1.0e-12));
    checks++;
    if (p_e > p_d * 0.001) begin failures++; $display("cancellation below 30 dB"); end
    nbad = 0;
    for (int k = 0; k < 16; k++) begin
      wk = real'(dut.u_lms.w_out[k]) / 1073741824.0;
      tk = (k < 8) ? wo[k] : 0.0;
      checks++;
      if (wk - tk > 0.01 || tk - wk > 0.01) begin
        failures++; nbad++;
        $display("weight %0d = %f, target %f", k, wk, tk);
      end
    end

    // ---- phase 3: overload ----
    for (int n = 0; n < 200; n++) step(16'sh7FFF, sample_t'($signed($urandom) >>> 18));

    $display("mechanisms: power floor %0d, normalised %0d, adapting %0d, error clipped %0d",
             n_floor, n_norm, n_adapt, n_esat);
    checks += 4;
    if (n_floor == 0) begin failures++; $display("power floor never in force"); end
    if (n_norm  == 0) begin failures++; $display("normalisation never data-driven"); end
    if (n_adapt == 0) begin failures++; $display("weights never adapted"); end
    if (n_esat  == 0) begin failures++; $display("error never clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
