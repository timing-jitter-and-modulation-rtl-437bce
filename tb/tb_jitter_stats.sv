// tb_jitter_stats: checks the jitter statistics unit with 10^4-sample records.
//
// Record 1: random samples of a few LSB.  The testbench reduces each sample to
// 8 fraction bits as the unit does, and computes in integers the sum of
// squares, the mean square floor(sum / N), the variance (minus the HPF
// quantisation-noise power) and the integer square root, plus the expected
// histogram; all must match exactly.  done must come within 100 clocks of the
// last sample, and samples before start or during the computation must be
// ignored.  Record 2: tiny samples, so the variance is negative and the RMS
// must be 0.
module tb_jitter_stats;
  import ssc_pkg::*;
  localparam int N = 10000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  sample_t x = '0;
  logic busy, done;
  logic [47:0] mean_sq;
  logic signed [48:0] jit_var;
  logic [23:0] jit_rms;
  logic [15:0] hist [32];
  int checks = 0, failures = 0;

  jitter_stats dut (.clk, .rst_n, .start, .in_valid, .x, .busy, .done,
                    .mean_sq, .jit_var, .jit_rms, .hist);

  always #25 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint isqrt(longint v);
    longint r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic run_record(int amp);
    longint sumsq, ms, vr, rt;
    int eh [32];
    int lat;
    foreach (eh[i]) eh[i] = 0;
    sumsq = 0;
    // samples before start are ignored
    @(negedge clk) begin in_valid = 1'b1; x = sample_t'(1000) <<< 16; end
    @(negedge clk) begin in_valid = 1'b0; start = 1'b1; end
    @(negedge clk) start = 1'b0;
    for (int n = 0; n < N; n++) begin
      longint s8;
      int b;
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      if (!in_valid) begin
        @(negedge clk);
        in_valid = 1'b1;
      end
      x = sample_t'($signed($urandom_range(0, 2 * amp))) - sample_t'(amp);
      s8 = longint'(x >>> 8);
      sumsq += s8 * s8;
      b = int'(s8 >>> 5) + 16;
      if (b < 0) b = 0;
      if (b > 31) b = 31;
      eh[b]++;
    end
    @(negedge clk) begin in_valid = 1'b1; x = sample_t'(999) <<< 16; end   // after the record
    ms = sumsq / N;
    vr = ms - EH_VAR_HPF500K;
    rt = (vr > 0) ? isqrt(vr) : 0;
    lat = 0;
    while (!done && lat < 200) begin @(negedge clk); in_valid = 1'b0; lat++; end
    checks++; if (lat >= 100) begin failures++; $display("done after %0d clocks", lat); end
    checks++; if (longint'(mean_sq) != ms) begin failures++; $display("mean_sq %0d exp %0d", mean_sq, ms); end
    checks++; if (longint'(jit_var) != vr) begin failures++; $display("var %0d exp %0d", jit_var, vr); end
    checks++; if (longint'(jit_rms) != rt) begin failures++; $display("rms %0d exp %0d", jit_rms, rt); end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (int'(hist[i]) != eh[i]) begin failures++; $display("bin %0d: %0d exp %0d", i, hist[i], eh[i]); end
    end
    $display("amp %0d: mean square %0d/65536 LSB^2, rms %0d/256 LSB", amp, mean_sq, jit_rms);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_record(5 * 65536);    // uniform +-5 LSB
    run_record(8000);         // below the quantisation-noise floor
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
