// tb_lms_filter - self-checking test of the weight store and update.
//
// Drives random x and step terms Out2 and checks all sixteen Q2.30 weights
// and the clip flag after every clock against a model kept here:
// w_k <- sat32(w_k + Out2 * x(t - 15 - k)) with DELAY = 15, the default.
// Phases with full-scale Out2 and x of one sign drive the weights into both
// clip limits. Checks that reset clears the weights.
module tb_lms_filter;
  import alms_pkg::*;
  localparam int N = 16, DLY = 15, LINE = DLY + N - 1;

  logic clk = 0, rst = 1;
  sample_t x_in = '0, out2 = '0;
  wacc_t   w_out [N];
  logic    wsat_o;
  int checks = 0, failures = 0, n_sat = 0;

  lms_filter dut (.clk, .rst, .x_in, .out2, .w_out, .wsat_o);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xl [LINE];
  longint w [N];
  longint s;
  bit     esat;
  int     bad;

  initial begin
    for (int i = 0; i < LINE; i++) xl[i] = 0;
    for (int k = 0; k < N; k++) w[k] = 0;
    repeat (3) @(posedge clk);
    #1 checks++;
    foreach (w_out[k]) if (w_out[k] != 0) begin failures++; break; end
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if ((cyc / 300) % 4 == 2) begin
        x_in = 16'sh7FFF;
        out2 = ((cyc / 1200) % 2 == 0) ? 16'sh7FFF : 16'sh8000;
      end else begin
        x_in = sample_t'($urandom);
        out2 = sample_t'($signed($urandom) >>> 20);
      end
      esat = 0;
      for (int k = 0; k < N; k++) begin
        s = w[k] + longint'(out2) * xl[DLY - 1 + k];
        if (s > 64'sd2147483647)  begin s = 64'sd2147483647;  esat = 1; end
        if (s < -64'sd2147483648) begin s = -64'sd2147483648; esat = 1; end
        w[k] = s;
      end
      for (int i = LINE - 1; i > 0; i--) xl[i] = xl[i-1];
      xl[0] = longint'(x_in);
      @(posedge clk); #1;
      checks++;
      bad = 0;
      for (int k = 0; k < N; k++) if (longint'(w_out[k]) != w[k]) bad++;
      if (bad != 0 || wsat_o != esat) begin
        failures++;
        if (failures < 10) $display("cyc %0d: %0d weights wrong, wsat %b exp %b", cyc, bad, wsat_o, esat);
      end
      if (esat) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("weight clipping never exercised"); end
    $display("clipping updates: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
