// tb_alms_sub - self-checking test of the error former e(n) = sat(d(n) - ys(n)).
//
// Presents a random d(n) and ys every clock; ys presented with d six clocks
// later is the one it meets (D_DELAY = 6). The expected error, worked out here
// from a record of past d values, is compared with error_out right after the
// edge that takes ys, and the clip flag is checked. Full-scale values of
// opposite sign are mixed in so that both saturation limits are reached.
module tb_alms_sub;
  import alms_pkg::*;
  localparam int D = 6;

  logic clk = 0, rst = 1;
  sample_t d_in = '0, out1 = '0, error_out;
  logic    sat_o;
  int checks = 0, failures = 0, nsat_hi = 0, nsat_lo = 0;

  alms_sub dut (.clk, .rst, .d_in, .out1, .error_out, .sat_o);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dh [$];
  int diff, ex;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < D; k++) dh.push_back(0);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc % 7 == 3) begin
        d_in = ($urandom % 2 != 0) ? 16'sh7000 : -16'sh7000;
        out1 = -d_in;
      end else begin
        d_in = sample_t'($urandom);
        out1 = sample_t'($urandom);
      end
      dh.push_back(int'(d_in));
      diff = dh.pop_front() - int'(out1);
      ex = (diff > 32767) ? 32767 : (diff < -32768) ? -32768 : diff;
      @(posedge clk); #1;
      checks++;
      if (int'(error_out) != ex || sat_o != (ex != diff)) begin
        failures++;
        if (failures < 10) $display("cyc %0d: e=%0d exp %0d", cyc, error_out, ex);
      end
      if (diff > 32767) nsat_hi++;
      if (diff < -32768) nsat_lo++;
    end
    checks++;
    if (nsat_hi == 0 || nsat_lo == 0) begin failures++; $display("a saturation limit was never reached"); end
    $display("clipped high %0d, low %0d", nsat_hi, nsat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
