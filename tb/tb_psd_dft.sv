// tb_psd_dft: checks the PSD unit against a direct DFT in double precision.
//
// Record 1: a sine of 0.8 LSB amplitude exactly on bin 37, a small offset and
// white noise of about 0.3 LSB RMS, all on the unit's 8-fraction-bit grid so
// that the input reduction is exact.  The testbench keeps the samples, computes
// every one-sided bin |X_k|^2 / N^2 by a direct DFT, and compares each output
// bin within 0.2 % plus a small absolute floor.  It also checks the bin order,
// the peak at bin 37, Parseval's sum against the mean square, and the time from
// the last sample to done, (N/2 + 1) * (N + 2) clocks.  Samples sent before
// start and while the spectrum is computed must be ignored.  Record 2 is pure
// noise, to check that a second start begins from a clean state.
module tb_psd_dft;
  import ssc_pkg::*;
  localparam int N = 1024;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  sample_t x = '0;
  logic busy, done, out_valid;
  logic [10:0] out_bin;
  logic [63:0] out_pow;
  int checks = 0, failures = 0;

  psd_dft dut (.clk, .rst_n, .start, .in_valid, .x, .busy, .done,
               .out_valid, .out_bin, .out_pow);

  always #25 clk = ~clk;

  initial begin
    #80000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   xi [N];                 // samples in 1/256 LSB
  real  pw [N/2+1];             // powers received, LSB^2
  int   nbin;
  int   next_bin;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_bin) != next_bin) begin
      failures++;
      $display("FAIL bin order: got %0d expected %0d", out_bin, next_bin);
    end
    if (out_bin <= 11'(N/2)) pw[out_bin] = real'(out_pow) / 2.0**32;
    next_bin++;
    nbin++;
  end

  function automatic int gauss8(real sigma);
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return int'((s - 6.0) * sigma * 256.0);
  endfunction

  task automatic run_record(input real amp, input int kbin, input real offs, input real sigma);
    real re, im, ref_p, ms, ps, err, tol, pk;
    int  t_done, kmax;
    nbin = 0;
    next_bin = 0;
    // samples before start are ignored
    repeat (5) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = sample_t'(64'sd1000 <<< FRAC_W);
    end
    @(negedge clk);
    in_valid = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int n = 0; n < N; n++) begin
      xi[n] = int'(amp * 256.0 * $sin(2.0 * PI * kbin * n / N)) + int'(offs * 256.0) + gauss8(sigma);
      @(negedge clk);
      in_valid = 1'b1;
      x = sample_t'(longint'(xi[n]) <<< (FRAC_W - 8));
      if (n % 7 == 3) begin   // a gap in the stream
        in_valid = 1'b0;
        @(negedge clk);
        in_valid = 1'b1;
      end
    end
    @(negedge clk);
    x = sample_t'(64'sd5000 <<< FRAC_W);   // keeps arriving, must be ignored
    t_done = 1;
    while (!done) begin
      @(negedge clk);
      t_done++;
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);

    checks++;
    if (t_done < (N/2 + 1) * (N + 2) - 2 || t_done > (N/2 + 1) * (N + 2) + 4) begin
      failures++;
      $display("FAIL latency %0d clocks, expected %0d", t_done, (N/2 + 1) * (N + 2));
    end
    checks++;
    if (nbin != N/2 + 1) begin
      failures++;
      $display("FAIL %0d bins received", nbin);
    end

    // reference DFT and Parseval
    ms = 0.0;
    for (int n = 0; n < N; n++) ms += (real'(xi[n]) / 256.0) ** 2;
    ms /= N;
    ps = 0.0;
    pk = 0.0;
    kmax = 0;
    for (int k = 0; k <= N/2; k++) begin
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += real'(xi[n]) / 256.0 * $cos(2.0 * PI * k * n / N);
        im -= real'(xi[n]) / 256.0 * $sin(2.0 * PI * k * n / N);
      end
      ref_p = (re * re + im * im) / (real'(N) * N);
      err = pw[k] - ref_p;
      if (err < 0.0) err = -err;
      tol = 0.002 * ref_p + 1.0e-6 * ms;
      checks++;
      if (err > tol) begin
        failures++;
        $display("FAIL bin %0d: got %g expected %g", k, pw[k], ref_p);
      end
      ps += (k == 0 || k == N/2) ? pw[k] : 2.0 * pw[k];
      if (k > 0 && pw[k] > pk) begin
        pk = pw[k];
        kmax = k;
      end
    end
    checks++;
    err = ps - ms;
    if (err < 0.0) err = -err;
    if (err > 1.0e-3 * ms) begin
      failures++;
      $display("FAIL Parseval: sum %g mean square %g", ps, ms);
    end
    if (amp > 0.0) begin
      checks++;
      if (kmax != kbin) begin
        failures++;
        $display("FAIL peak at bin %0d, expected %0d", kmax, kbin);
      end
    end
    $display("record: mean square %f LSB^2, spectrum sum %f, peak bin %0d, %0d clocks",
             ms, ps, kmax, t_done);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL busy/done after reset");
    end
    run_record(0.8, 37, 0.05, 0.3);
    run_record(0.0, 0, 0.0, 0.3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
