// tb_profile_extract: checks the modulation-profile extraction.
//
// The input is a synthetic low-pass filtered SSC phase: the running sum of a
// triangular frequency offset that swings between 0 and -3 steps (0.3 UI per
// reference period, 6 MHz) with a period of 2048/3 reference periods
// (29.3 kHz), plus uniform noise of +-0.05 steps as left by the low-pass.
// freq_dev must be the exact first difference of the input one
// clock later; dev_pp must be 3 steps (up to 3.1 with the noise), and the mean measured period
// 682.7 within 1 reference period.
module tb_profile_extract;
  import ssc_pkg::*;
  localparam real P = 2048.0 / 3.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  sample_t x = '0, freq_dev, dev_min, dev_max, dev_pp;
  logic dev_valid, done;
  logic [31:0] period_sum;
  logic [15:0] period_cnt;
  int checks = 0, failures = 0;

  profile_extract dut (.clk, .rst_n, .start, .in_valid, .x, .freq_dev, .dev_valid,
                       .dev_min, .dev_max, .dev_pp, .period_sum, .period_cnt, .done);

  always #25 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ph, fr, u, per, pp;
    sample_t prev;
    int bad;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ph = 1000.0;
    bad = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    prev = '0;
    for (int n = 0; n < 8000 && !done; n++) begin
      @(negedge clk);
      if (n > 1 && dev_valid && freq_dev != x - prev) bad++;
      prev = x;
      u  = (real'(n) / P) - $floor(real'(n) / P);
      fr = (u < 0.5) ? -6.0 * u : -6.0 * (1.0 - u);
      fr = fr + real'($urandom_range(0, 1000)) / 10000.0 - 0.05;   // residual noise
      ph = ph + fr;
      x  = sample_t'(longint'(ph * 65536.0));
      in_valid = 1'b1;
    end
    @(negedge clk) in_valid = 1'b0;
    checks++; if (!done) begin failures++; $display("not done"); end
    checks++; if (bad != 0) begin failures++; $display("%0d wrong derivatives", bad); end
    pp  = real'(dev_pp) / 65536.0;
    per = real'(period_sum) / real'(period_cnt);
    $display("dev_pp %0.4f steps, period %0.2f over %0d periods", pp, per, period_cnt);
    checks++; if (pp < 2.97 || pp > 3.13) failures++;
    checks++; if (period_cnt < 4) failures++;
    checks++; if (per < P - 1.0 || per > P + 1.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
