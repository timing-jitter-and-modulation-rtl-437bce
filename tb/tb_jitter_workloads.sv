// tb_jitter_workloads: jitter measurement at the three reported jitter levels.
//
// The design was characterised with its PLL set to three loop natural
// frequencies (0.4, 0.9 and 2.2 MHz), which gave SSC jitter of about 0.0034,
// 0.0042 and 0.0298 UI RMS after the 3.6 MHz high-pass.  This testbench
// reproduces those levels: the behavioural PLL runs in SSC mode, and white
// Gaussian timing jitter is put on the rising edges of the reference clock,
// which the phase detector sees as white phase jitter of the VCO.  Its RMS is
// chosen so that after the 3.6 MHz high-pass (white-noise power gain 0.63497)
// it equals the target.  On top of it the clock carries the jitter that the
// sigma-delta modulator's phase steps leave after the PLL's loop response.
//
// Reference: at each reference edge the testbench takes the VCO model's exact,
// unquantised phase, removes the nominal 60 UI per period, and runs it through
// double-precision copies of both high-pass filters; the RMS of their outputs
// over the record is the true jitter in each band.  The BIST sees the same
// phase only through the 0.1 UI detector and removes the quantisation noise
// by formula; its jit_rms must agree with the truth within 0.003 UI plus
// 10 %, in line with the 0.0026 UI agreement reported for the silicon.  The
// injected level alone is printed as well.
//
// Spectrum: the testbench keeps the true 500 kHz high-pass output for the
// samples the PSD unit takes, and after each record compares the design's
// PSD, summed over three bands (0.5-1, 1-3.6 and 3.6-10 MHz), with the true
// band power from a direct DFT plus the expected quantisation-noise power
// (1/12 LSB^2 shaped by the filter), within three standard deviations of a
// single periodogram plus 5 %.  The VCO model is stopped while the spectrum
// is computed, since the unit then works on stored samples.  Runs at default
// parameters.
module tb_jitter_workloads;
  import ssc_pkg::*;
  localparam real TREF = 50.0;
  localparam int  NS   = 10000;
  localparam int  NPSD = 1024;
  localparam real PI   = 3.14159265358979323846;

  logic clk_ref = 1'b0, rst_n = 1'b0, ssc_en = 1'b0, mpd_clear = 1'b0, meas_start = 1'b0;
  logic [9:0] vco_ph;
  logic mux_clk, div_clk, sdm_tick;
  logic [9:0] prof_level;
  logic signed [3:0] sdm_y;
  logic [3:0] mux_sel, mpd_phase;
  logic signed [5:0] ref_sum;
  logic signed [3:0] mpd_shift;
  logic mpd_shift_valid, ssc_phase_valid, filt_valid;
  logic signed [23:0] ssc_phase;
  logic signed [DATA_W-1:0] lpf_out, hpf500_out, hpf36_out, freq_dev, dev_pp;
  logic jit500_done, jit36_done, prof_done;
  logic psd_valid, psd_done;
  logic [10:0] psd_bin;
  logic [63:0] psd_pow;
  logic [47:0] jit500_mean_sq, jit36_mean_sq;
  logic signed [48:0] jit500_var, jit36_var;
  logic [23:0] jit500_rms, jit36_rms;
  logic [15:0] jit500_hist [32];
  logic [15:0] jit36_hist [32];
  logic [31:0] period_sum;
  logic [15:0] period_cnt;

  int checks = 0, failures = 0;

  vco10_model u_vco (.ph(vco_ph));
  ssc_bist_top dut (.*);

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1 << 20)) / real'(1 << 20);
    return s - 6.0;
  endfunction

  // reference clock with white jitter on its rising edges
  real    jit_ns = 0.0;
  bit     rec_on = 1'b0;
  real    sum_j = 0.0, sum_j2 = 0.0;
  int     n_j = 0;
  initial begin
    longint k;
    k = 1;
    forever begin
      real d;
      d = jit_ns * gauss();
      #(real'(k) * TREF + d - $realtime) clk_ref = 1'b1;
      if (rec_on && n_j < NS) begin
        sum_j += d; sum_j2 += d * d; n_j++;
      end
      #(real'(k) * TREF + TREF / 2.0 - $realtime) clk_ref = 1'b0;
      k++;
    end
  end

  // double-precision high-pass filters over the true phase
  real st500 [3][4];
  real st36  [2][4];
  real tr500 = 0.0, tr36 = 0.0;
  int  n_tr = 0;
  longint kref = 0;
  real tq [NPSD];                 // true 500 kHz high-pass output
  int  n_tq = 0;

  // PSD bins from the design
  real psd [NPSD/2+1];
  int  n_psd = 0;
  always @(posedge clk_ref) if (rst_n && psd_valid) begin
    if (psd_bin <= 11'(NPSD/2)) psd[psd_bin] = real'(psd_pow) / 2.0**32;
    n_psd++;
  end

  // |H(f)|^2 of the 500 kHz high-pass at f = k * fref / NPSD
  function automatic real hpf500_gain2(int k);
    real g, w, nr, ni, dr, di;
    g = 1.0;
    w = 2.0 * PI * real'(k) / real'(NPSD);
    for (int i = 0; i < 3; i++) begin
      nr = real'(coef_t'(HPF500K[i][0])) + real'(coef_t'(HPF500K[i][1])) * $cos(w)
         + real'(coef_t'(HPF500K[i][2])) * $cos(2.0 * w);
      ni = -real'(coef_t'(HPF500K[i][1])) * $sin(w) - real'(coef_t'(HPF500K[i][2])) * $sin(2.0 * w);
      dr = real'(1 << COEF_Q) + real'(coef_t'(HPF500K[i][3])) * $cos(w)
         + real'(coef_t'(HPF500K[i][4])) * $cos(2.0 * w);
      di = -real'(coef_t'(HPF500K[i][3])) * $sin(w) - real'(coef_t'(HPF500K[i][4])) * $sin(2.0 * w);
      g *= (nr * nr + ni * ni) / (dr * dr + di * di);
    end
    return g;
  endfunction

  // one-sided band power of the true signal, the design's PSD and the
  // expected quantisation noise (Delta^2/12 = 1/12 LSB^2, white)
  task automatic band_check(input string wname, input string bname, input int k0, input int k1);
    real t, m, q, re, im, tol;
    t = 0.0; m = 0.0; q = 0.0;
    for (int k = k0; k <= k1; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NPSD; n++) begin
        re += tq[n] * $cos(2.0 * PI * k * n / NPSD);
        im -= tq[n] * $sin(2.0 * PI * k * n / NPSD);
      end
      t += 2.0 * (re * re + im * im) / (real'(NPSD) * NPSD);
      m += 2.0 * psd[k];
      q += 2.0 * hpf500_gain2(k) / 12.0 / NPSD;
    end
    tol = 3.0 * q / $sqrt(real'(k1 - k0 + 1)) + 0.05 * (t + q);
    $display("%s: PSD %s: design %0.5f, true %0.5f + quantisation %0.5f LSB^2",
             wname, bname, m, t, q);
    checks++;
    if (m > t + q + tol || m < t + q - tol) begin
      failures++; $display("FAIL: PSD band %s", bname);
    end
  endtask

  // one direct-form-I section; s = {x[n-1], x[n-2], y[n-1], y[n-2]}
  function automatic real sos_y(input real x, input logic [0:4][COEF_W-1:0] c, input real s [4]);
    return (real'(coef_t'(c[0])) * x + real'(coef_t'(c[1])) * s[0] + real'(coef_t'(c[2])) * s[1]
            - real'(coef_t'(c[3])) * s[2] - real'(coef_t'(c[4])) * s[3]) / real'(1 << COEF_Q);
  endfunction

  always @(posedge clk_ref) begin
    real ph, a, b;
    ph = u_vco.theta($realtime) - 60.0 * real'(kref);
    kref++;
    if (rst_n) begin
      a = ph;
      for (int i = 0; i < 3; i++) begin
        real y;
        y = sos_y(a, HPF500K[i], st500[i]);
        st500[i][1] = st500[i][0]; st500[i][0] = a; st500[i][3] = st500[i][2]; st500[i][2] = y;
        a = y;
      end
      b = ph;
      for (int i = 0; i < 2; i++) begin
        real y;
        y = sos_y(b, HPF3M6[i], st36[i]);
        st36[i][1] = st36[i][0]; st36[i][0] = b; st36[i][3] = st36[i][2]; st36[i][2] = y;
        b = y;
      end
      if (rec_on && n_tr < NS) begin
        tr500 += a * a; tr36 += b * b; n_tr++;
      end
      if (rec_on && n_tq < NPSD) begin
        tq[n_tq] = 10.0 * a;   // in detector LSB (0.1 UI)
        n_tq++;
      end
    end
  end

  // behavioural PLL as in the end-to-end test
  real ybar = 0.0;
  bit  vco_park = 1'b0;   // stops the VCO model while only the PSD is computed
  always @(posedge clk_ref) begin
    ybar = ybar + 0.125 * (real'(ref_sum) - ybar);
    u_vco.period_ns = vco_park ? 1.0e6 : TREF / (60.0 - 0.1 * ybar);
  end

  initial begin
    #(TREF * 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real targets [3] = '{0.0034, 0.0042, 0.0298};
  string names [3] = '{"fn 0.4 MHz", "fn 0.9 MHz", "fn 2.2 MHz"};

  initial begin
    foreach (targets[w]) begin
      real sig_ui, sd, exp36, exp500, got36, got500, tvco;
      tvco = TREF / 60.0;
      rst_n = 1'b0; ssc_en = 1'b0; rec_on = 1'b0;
      sig_ui = targets[w] / $sqrt(0.63497);
      jit_ns = sig_ui * tvco;
      repeat (4) @(posedge clk_ref);
      rst_n = 1'b1; ssc_en = 1'b1;
      repeat (600) @(posedge clk_ref);
      sum_j = 0.0; sum_j2 = 0.0; n_j = 0;
      tr500 = 0.0; tr36 = 0.0; n_tr = 0; n_tq = 0; n_psd = 0;
      // the jitter units take samples from the next valid output on; the
      // filters add a few clocks, which does not matter for white jitter
      @(negedge clk_ref) meas_start = 1'b1;
      rec_on = 1'b1;
      @(negedge clk_ref) meas_start = 1'b0;
      wait (jit500_done && jit36_done);
      rec_on = 1'b0;
      sd = $sqrt(sum_j2 / n_j - (sum_j / n_j) * (sum_j / n_j)) / tvco;
      exp36  = $sqrt(tr36 / n_tr);
      exp500 = $sqrt(tr500 / n_tr);
      got36  = 0.1 * real'(jit36_rms) / 256.0;
      got500 = 0.1 * real'(jit500_rms) / 256.0;
      $display("%s: injected %0.5f UI rms; HPF 3.6 MHz true %0.5f measured %0.5f UI; HPF 500 kHz true %0.5f measured %0.5f UI",
               names[w], sd, exp36, got36, exp500, got500);
      checks++;
      if (got36 > exp36 * 1.1 + 0.003 || got36 < exp36 * 0.9 - 0.003) begin
        failures++; $display("FAIL: 3.6 MHz path out of tolerance");
      end
      checks++;
      if (got500 > exp500 * 1.1 + 0.003 || got500 < exp500 * 0.9 - 0.003) begin
        failures++; $display("FAIL: 500 kHz path out of tolerance");
      end
      // PSD of the 500 kHz high-pass output, by band
      vco_park = 1'b1;
      wait (psd_done);
      repeat (2) @(posedge clk_ref);
      checks++;
      if (n_psd != NPSD/2 + 1) begin
        failures++; $display("FAIL: %0d PSD bins", n_psd);
      end
      band_check(names[w], "0.5-1 MHz", 26, 51);
      band_check(names[w], "1-3.6 MHz", 52, 184);
      band_check(names[w], "3.6-10 MHz", 185, 512);
      vco_park = 1'b0;
      repeat (2100) @(posedge clk_ref);   // the parked model finishes its long step
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
