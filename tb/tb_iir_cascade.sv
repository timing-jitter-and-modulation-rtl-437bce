// tb_iir_cascade: checks the three BIST filters by their frequency response.
//
// The 500 kHz fifth-order low-pass (default parameters), the 500 kHz
// fifth-order high-pass and the 3.6 MHz third-order high-pass are fed the
// same sine of amplitude 200 LSB at fs = 20 MHz.  After settling, the output
// amplitude must be the ideal Butterworth magnitude 1/sqrt(1 + (f/fc)^(2n))
// (low-pass) or 1/sqrt(1 + (fc/f)^(2n)) (high-pass) within 3 % (corner
// frequencies prewarped for the bilinear transform).  The latency of each
// filter must equal its number of sections, and a constant input must come out
// of the low-pass unchanged and out of the high-passes as zero.
module tb_iir_cascade;
  import ssc_pkg::*;
  localparam real FS = 20.0e6;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t x = '0, y_lp, y_hp, y_h36;
  logic v_lp, v_hp, v_h36;
  int checks = 0, failures = 0;

  iir_cascade u_lp (.clk, .rst_n, .in_valid, .x, .y(y_lp), .out_valid(v_lp));
  iir_cascade #(.NSEC(HPF500K_NSEC), .COEF(HPF500K)) u_hp (
    .clk, .rst_n, .in_valid, .x, .y(y_hp), .out_valid(v_hp));
  iir_cascade #(.NSEC(HPF3M6_NSEC), .COEF(HPF3M6)) u_h36 (
    .clk, .rst_n, .in_valid, .x, .y(y_h36), .out_valid(v_h36));

  always #25 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real warp(real f);
    return $tan(PI * f / FS);
  endfunction

  function automatic real butter(real f, real fc, int ord, bit hp);
    real r;
    r = warp(f) / warp(fc);
    if (hp) r = 1.0 / r;
    return 1.0 / $sqrt(1.0 + r ** (2 * ord));
  endfunction

  task automatic check_amp(string nm, real got, real exp_a);
    checks++;
    if (got > exp_a * 1.03 + 0.02 || got < exp_a * 0.97 - 0.02) begin
      failures++;
      $display("%s: amplitude %f expected %f", nm, got, exp_a);
    end
  endtask

  real freqs [5] = '{50.0e3, 300.0e3, 500.0e3, 1.5e6, 3.6e6};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // latency
    @(negedge clk) begin in_valid = 1'b1; x = sample_t'(1) <<< 20; end
    @(negedge clk) in_valid = 1'b0;
    @(negedge clk);                              // two clocks after the input
    checks++; if (!(v_h36 == 1'b1 && v_lp == 1'b0)) begin failures++; $display("latency of 2 sections"); end
    @(negedge clk);                              // three clocks after the input
    checks++; if (!(v_h36 == 1'b0 && v_lp == 1'b1 && v_hp == 1'b1)) begin failures++; $display("latency of 3 sections"); end
    foreach (freqs[k]) begin
      real alp, ahp, ah36, s;
      alp = 0; ahp = 0; ah36 = 0;
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      for (int n = 0; n < 4000; n++) begin
        @(negedge clk);
        in_valid = 1'b1;
        s = 200.0 * $sin(2.0 * PI * freqs[k] * n / FS);
        x = sample_t'(longint'(s * 65536.0));
        if (n > 2000) begin
          if (fabs(real'(y_lp)) / 65536.0 > alp) alp = fabs(real'(y_lp)) / 65536.0;
          if (fabs(real'(y_hp)) / 65536.0 > ahp) ahp = fabs(real'(y_hp)) / 65536.0;
          if (fabs(real'(y_h36)) / 65536.0 > ah36) ah36 = fabs(real'(y_h36)) / 65536.0;
        end
      end
      $display("f = %0.0f kHz: LPF %0.4f HPF %0.4f HPF3.6M %0.4f", freqs[k] / 1e3,
               alp / 200.0, ahp / 200.0, ah36 / 200.0);
      check_amp("LPF", alp / 200.0, butter(freqs[k], 500.0e3, 5, 0));
      check_amp("HPF", ahp / 200.0, butter(freqs[k], 500.0e3, 5, 1));
      check_amp("HPF3.6M", ah36 / 200.0, butter(freqs[k], 3.6e6, 3, 1));
    end
    // constant input
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    x = sample_t'(-1234) <<< 16;
    repeat (3000) @(negedge clk);
    checks++; if (fabs(real'(y_lp) / 65536.0 + 1234.0) > 0.01) begin failures++; $display("LPF DC %f", real'(y_lp) / 65536.0); end
    checks++; if (fabs(real'(y_hp) / 65536.0) > 0.01 || fabs(real'(y_h36) / 65536.0) > 0.01) begin failures++; $display("HPF DC"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
