// tb_est_sec_filter - self-checking test of the adjoint (mirrored) error filter.
//
// Drives random Q1.15 samples of varying amplitude through the block at its
// default coefficients (0.5, 0.25, -0.125, 0.0625, written out here again) and
// checks every output against fe(q-M+1) = sum_j s_j e(q-M+1+j), q the newest error,
// rounded to Q1.15, three clock edges after the input is taken. Also checks
// that the block's output is zero while reset is held.
module tb_est_sec_filter;
  import alms_pkg::*;
  localparam int M = 4;
  localparam longint S [M] = '{8192, 4096, -2048, 1024};

  logic clk = 0, rst = 1;
  sample_t din = '0, dout;
  logic    sat_o;
  int checks = 0, failures = 0;

  est_sec_filter dut (.clk, .rst, .e_in(din), .fe_out(dout), .sat_o);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [M];
  longint expq [$];
  longint acc, r, ex;

  initial begin
    for (int k = 0; k < M; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (dout !== '0) failures++;
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      case ((cyc / 100) % 3)
        0: din = sample_t'($urandom);
        1: din = sample_t'($signed($urandom) >>> 20);
        default: din = (cyc % 2 != 0) ? 16'sh7FFF : 16'sh8000;
      endcase
      for (int k = M-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(din);
      acc = 0;
      for (int j = 0; j < M; j++) acc += S[j] * hist[M-1-j];
      r = (acc + 8192) >>> 14;
      expq.push_back((r > 32767) ? 32767 : (r < -32768) ? -32768 : r);
      @(posedge clk); #1;
      if (expq.size() == 3) begin
        ex = expq.pop_front();
        checks++;
        if (longint'(dout) != ex || sat_o) begin
          failures++;
          if (failures < 10) $display("cyc %0d: out=%0d exp %0d", cyc, dout, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
