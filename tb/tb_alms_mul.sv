// tb_alms_mul - self-checking test of the normalised step term.
//
// Drives random filtered errors and a reference input whose amplitude changes
// every 400 clocks (silent, small, full scale), and checks Out2, its clip flag
// and the power-floor flag every clock against a model kept here: the power
// estimate P <- P + (x^2 - P)/32, the exponent of its leading one held at 20 or
// above, and Out2 = round(fe * MU / 2^(L + log2(16) - 15)) saturated, two
// clock edges after fe is taken. Both the floor and the data-driven
// normalisation, and clipping of Out2, must occur.
module tb_alms_mul;
  import alms_pkg::*;

  logic clk = 0, rst = 1;
  sample_t fe_in = '0, x_in = '0, out2;
  logic    sat_o, norm_clamp_o;
  int checks = 0, failures = 0, n_clamp = 0, n_norm = 0, n_sat = 0;

  alms_mul dut (.clk, .rst, .fe_in, .x_in, .out2, .sat_o, .norm_clamp_o);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model registers
  longint pw = 0, prod = 0, v, o;
  int     rs = 9, lead;
  bit     clamp = 1, e_clamp = 0, e_sat = 0;
  longint e_out = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      fe_in = sample_t'($signed($urandom) >>> (16 + ($urandom % 8)));
      case ((cyc / 400) % 3)
        0: x_in = '0;
        1: x_in = sample_t'($signed($urandom) >>> 22);
        default: x_in = sample_t'($urandom);
      endcase
      // edge: second stage uses the first stage's old contents
      v = (rs > 0) ? ((prod + (64'sd1 <<< (rs - 1))) >>> rs) : prod;
      o = (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
      e_out = o; e_sat = (o != v); e_clamp = clamp;
      lead = 0;
      if (pw > 0) while ((64'sd1 <<< (lead + 1)) <= pw) lead++;
      clamp = (lead < 20);
      rs = ((lead < 20) ? 20 : lead) + 4 - 15;
      prod = longint'(fe_in) * 4096;
      pw = pw + ((longint'(x_in) * longint'(x_in) - pw) >>> 5);
      @(posedge clk); #1;
      checks++;
      if (longint'(out2) != e_out || sat_o != e_sat || norm_clamp_o != e_clamp) begin
        failures++;
        if (failures < 10) $display("cyc %0d: out2=%0d exp %0d sat %b/%b clamp %b/%b",
                                    cyc, out2, e_out, sat_o, e_sat, norm_clamp_o, e_clamp);
      end
      if (e_clamp) n_clamp++; else n_norm++;
      if (e_sat) n_sat++;
    end
    checks++;
    if (n_clamp == 0 || n_norm == 0 || n_sat == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("floor %0d, normalised %0d, clipped %0d", n_clamp, n_norm, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
