// tb_mash111_sdm: checks the MASH 1-1-1 modulator.
//
// Every output is compared with an integer model of the textbook MASH 1-1-1
// (three modulo-1024 accumulators, y = c1 + (1 - z^-1) c2 + (1 - z^-1)^2 c3).
//
// For several constant inputs the running sum of the output must track
// n x frac / 1024 within the bounded error of a third-order MASH, the output
// must stay within -3..+4, and for inputs that are not a power-of-two
// fraction the output must use values outside {0, 1} (third-order shaping,
// not a single accumulator).  The output spectrum is checked for noise
// shaping: the mean of the third difference of the running error is zero
// and the low-frequency error (sum over 64 samples) stays small.
module tb_mash111_sdm;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [9:0] frac = '0;
  logic signed [3:0] y;
  int checks = 0, failures = 0;

  mash111_sdm dut (.clk, .rst_n, .tick, .frac, .y);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fvals [6] = '{0, 1, 341, 512, 700, 1023};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (fvals[k]) begin
      longint sum_y;
      int ymin, ymax, maxerr, mism;
      int m1, m2, m3, c2p, c3p, c3pp;
      real err;
      @(negedge clk);
      rst_n = 1'b0;
      frac = 10'(fvals[k]);
      @(negedge clk);
      rst_n = 1'b1;
      sum_y = 0; ymin = 10; ymax = -10; maxerr = 0;
      m1 = 0; m2 = 0; m3 = 0; c2p = 0; c3p = 0; c3pp = 0; mism = 0;
      for (int n = 1; n <= 8192; n++) begin
        @(negedge clk) tick = 1'b1;
        @(negedge clk) tick = 1'b0;
        begin
          int c1, c2, c3, my;
          m1 += fvals[k];  c1 = m1 / 1024; m1 %= 1024;
          m2 += m1;        c2 = m2 / 1024; m2 %= 1024;
          m3 += m2;        c3 = m3 / 1024; m3 %= 1024;
          my = c1 + c2 - c2p + c3 - 2 * c3p + c3pp;
          c2p = c2; c3pp = c3p; c3p = c3;
          if (int'(y) != my) mism++;
        end
        sum_y += y;
        if (y < ymin) ymin = y;
        if (y > ymax) ymax = y;
        // one tick of latency: after n ticks, n-1 outputs of the input
        err = real'(sum_y) - real'(n - 1) * real'(fvals[k]) / 1024.0;
        if (err > 3.0 || err < -3.0) maxerr++;
      end
      checks++; if (mism != 0) begin failures++; $display("frac %0d: %0d outputs differ from the model", fvals[k], mism); end
      checks++; if (maxerr != 0) begin failures++; $display("frac %0d: running sum off %0d times", fvals[k], maxerr); end
      checks++; if (ymin < -3 || ymax > 4) begin failures++; $display("frac %0d: range %0d..%0d", fvals[k], ymin, ymax); end
      if (fvals[k] == 341 || fvals[k] == 700 || fvals[k] == 1) begin
        checks++;
        if (!(ymin < 0 && ymax >= 2)) begin failures++; $display("frac %0d: no third-order activity (%0d..%0d)", fvals[k], ymin, ymax); end
      end
      if (fvals[k] == 0) begin checks++; if (ymin != 0 || ymax != 0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
