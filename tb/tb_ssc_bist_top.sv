// tb_ssc_bist_top: end-to-end test of the SSC generator logic and its
// built-in jitter and modulation-profile measurement, at default parameters.
//
// Closed loop around a behavioural PLL: the ten-phase VCO model is kept in
// lock by setting its frequency, at every reference edge, to
// fref x (60 - 0.1 x ybar), where ybar is the SDM phase-step sum per
// reference period (ref_sum) passed through a first-order low-pass that stands
// in for the PLL's loop response.  The VCO also carries random-walk jitter.
//
// Sequence: non-SSC mode for 600 reference periods, switch to SSC mode, wait
// for the filters to settle, then one measurement record of 10^4 samples.
// Checks:
//   * the divider output keeps pace with the reference (PLL frequency lock);
//   * every accumulated-phase sample equals the VCO model's phase count;
//   * non-SSC mode: no spreading (ref_sum 0) and phase shifts of at most 1;
//   * modulation profile: peak-to-peak deviation 3 steps (6 MHz) and period
//     2048/3 reference periods (29.3 kHz), from the hardware's own results;
//   * jitter: mean square, variance and RMS of both HPF paths against a
//     double-precision computation over the same HPF samples; the histograms
//     hold 10^4 samples each;
//   * every mechanism (mode switch, negative SDM output, earlier and later
//     phase selection, phase-index wrap, both record completions) happened;
//   * the PSD of the 500 kHz high-pass output: one bin per DFT frequency,
//     Parseval's sum equal to the mean square of the same 1024 samples, and
//     less power per bin below 250 kHz than above 1 MHz.
module tb_ssc_bist_top;
  import ssc_pkg::*;
  localparam real TREF = 50.0;
  localparam int  NS   = 10000;
  localparam int  NPSD = 1024;

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

  always #(TREF / 2) clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- behavioural PLL: frequency follows the low-passed phase-step sum ----
  real ybar = 0.0;
  bit  vco_park = 1'b0;   // stops the VCO model while only the PSD is computed
  always @(posedge clk_ref) begin
    ybar = ybar + 0.125 * (real'(ref_sum) - ybar);
    u_vco.period_ns = vco_park ? 1.0e6 : TREF / (60.0 - 0.1 * ybar);
  end

  // ---- frequency lock: divider edges against reference edges ----
  longint n_ref = 0, n_div = 0;
  always @(posedge clk_ref) if (rst_n) n_ref++;
  always @(posedge div_clk) if (rst_n) n_div++;

  // ---- mechanism counters ----
  int n_sdm_neg = 0, n_sel_earlier = 0, n_sel_later = 0, n_wrap = 0, n_mode_switch = 0;
  logic [3:0] sel_q = '0;
  always @(posedge mux_clk) begin
    if (sdm_tick && sdm_y < 0) n_sdm_neg++;
    if (mux_sel != sel_q) begin
      int d;
      d = int'(mux_sel) - int'(sel_q);
      if (d > 5) d -= 10;
      if (d < -5) d += 10;
      if (d < 0) n_sel_earlier++; else n_sel_later++;
      sel_q = mux_sel;
    end
  end

  // ---- accumulated phase against the VCO model ----
  longint nrec [0:16383];
  int edge_i = 0, base = -1, acc_bad = 0, nonssc_bad = 0;
  bit in_nonssc = 1'b0;
  always @(posedge clk_ref) begin
    nrec[edge_i % 16384] = u_vco.nstep;
    edge_i++;
    if (rst_n && ssc_phase_valid && !vco_park) begin
      int s;
      longint e;
      s = edge_i - 1 - 4;
      if (base < 0) base = s - 1;
      e = (nrec[s % 16384] - nrec[base % 16384]) - 600 * longint'(s - base);
      checks++;
      if (longint'(ssc_phase) != e) begin
        acc_bad++; failures++;
        if (acc_bad < 5) $display("acc mismatch at %0d: got %0d exp %0d", s, ssc_phase, e);
      end
    end
    if (rst_n && mpd_shift_valid) begin
      int s;
      s = edge_i - 1 - 3;
      if ((nrec[s % 16384] % 10) < (nrec[(s - 1) % 16384] % 10)) n_wrap++;
    end
    if (in_nonssc && mpd_shift_valid && (mpd_shift > 1 || mpd_shift < -1 || ref_sum != 0)) nonssc_bad++;
  end

  // ---- independent statistics of the HPF outputs over the record ----
  real sq500 = 0.0, sq36 = 0.0, sq_psd = 0.0;
  int  nrec500 = 0, nrec36 = 0;
  bit  rec_on = 1'b0;
  always @(posedge clk_ref) begin
    if (rec_on && filt_valid) begin
      real a, b;
      // jitter_stats squares the sample rounded down to 8 fraction bits
      a = real'(hpf500_out >>> (FRAC_W - 8)) / 256.0;
      b = real'(hpf36_out  >>> (FRAC_W - 8)) / 256.0;
      if (nrec500 < NPSD) sq_psd += a * a;
      if (nrec500 < NS) begin sq500 += a * a; nrec500++; end
      if (nrec36  < NS) begin sq36  += b * b; nrec36++;  end
    end
  end

  // ---- PSD bins as they stream out ----
  real psd [NPSD/2+1];
  int  n_psd = 0;
  always @(posedge clk_ref) if (rst_n && psd_valid) begin
    if (psd_bin <= 11'(NPSD/2)) psd[psd_bin] = real'(psd_pow) / 2.0**32;
    n_psd++;
  end

  initial begin
    #(TREF * 600000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ms500, ms36, got, per, pp, rms_ui;
    longint hs500, hs36;
    u_vco.sigma_ns = 0.00005;   // 0.05 ps per 0.1 UI step
    repeat (4) @(posedge clk_ref);
    rst_n = 1'b1;
    // non-SSC mode
    repeat (100) @(posedge clk_ref);
    in_nonssc = 1'b1;
    repeat (500) @(posedge clk_ref);
    in_nonssc = 1'b0;
    check(nonssc_bad == 0, "non-SSC mode shows spreading");
    // switch to SSC mode
    ssc_en = 1'b1;
    n_mode_switch++;
    repeat (600) @(posedge clk_ref);
    // one measurement record; the jitter units take the next valid samples
    @(negedge clk_ref) meas_start = 1'b1;
    @(negedge clk_ref) meas_start = 1'b0;
    rec_on = 1'b1;
    wait (jit500_done && jit36_done && prof_done);
    @(posedge clk_ref);

    // frequency lock
    $display("reference edges %0d, divider edges %0d", n_ref, n_div);
    check(n_div >= n_ref - 3 && n_div <= n_ref + 3, "divider out of lock");

    // modulation profile: deviation 3 steps = 0.3 UI per period = 6 MHz
    pp  = real'(dev_pp) / real'(1 << FRAC_W);
    per = real'(period_sum) / real'(period_cnt);
    $display("deviation p-p %0.3f steps = %0.2f MHz, period %0.2f ref periods = %0.2f kHz",
             pp, pp * 2.0, per, 20000.0 / per);
    check(pp > 2.7 && pp < 3.3, "frequency deviation not 6 MHz");
    check(period_cnt >= 4, "too few modulation periods measured");
    check(per > 2048.0 / 3.0 - 2.0 && per < 2048.0 / 3.0 + 2.0, "modulation period not 29.3 kHz");

    // jitter statistics against double precision
    ms500 = sq500 / NS;
    ms36  = sq36 / NS;
    got = real'(jit500_mean_sq) / 65536.0;
    $display("HPF 500k: mean square %0.5f (ref %0.5f) LSB^2, rms %0.5f UI", got, ms500,
             0.1 * real'(jit500_rms) / 256.0);
    check(got > ms500 - 0.0002 && got < ms500 + 0.0002, "HPF500k mean square");
    check(jit500_var == 49'(jit500_mean_sq) - 49'(EH_VAR_HPF500K), "HPF500k variance");
    got = real'(jit36_mean_sq) / 65536.0;
    $display("HPF 3.6M: mean square %0.5f (ref %0.5f) LSB^2, rms %0.5f UI", got, ms36,
             0.1 * real'(jit36_rms) / 256.0);
    check(got > ms36 - 0.0002 && got < ms36 + 0.0002, "HPF3.6M mean square");
    check(jit36_var == 49'(jit36_mean_sq) - 49'(EH_VAR_HPF3M6), "HPF3.6M variance");
    if (jit500_var > 0) begin
      rms_ui = $sqrt(real'(jit500_var) / 65536.0);
      check(real'(jit500_rms) / 256.0 > rms_ui - 0.01 && real'(jit500_rms) / 256.0 < rms_ui + 0.01,
            "HPF500k rms");
    end
    hs500 = 0; hs36 = 0;
    for (int i = 0; i < 32; i++) begin hs500 += jit500_hist[i]; hs36 += jit36_hist[i]; end
    check(hs500 == NS && hs36 == NS, "histogram totals");

    // mechanisms
    $display("mode switches %0d, negative SDM outputs %0d, earlier/later selections %0d/%0d, index wraps %0d",
             n_mode_switch, n_sdm_neg, n_sel_earlier, n_sel_later, n_wrap);
    check(n_mode_switch > 0, "no mode switch");
    check(n_sdm_neg > 0, "no negative SDM output");
    check(n_sel_earlier > 0 && n_sel_later > 0, "MUX never moved both ways");
    check(n_wrap > 0, "no phase-index wrap");
    check(jit500_done && jit36_done && prof_done, "records not complete");
    check(acc_bad == 0, "accumulated phase mismatches");

    // PSD of the 500 kHz high-pass output over the first NPSD samples.  The
    // VCO model is parked meanwhile: the spectrum comes from stored samples.
    vco_park = 1'b1;
    wait (psd_done);
    repeat (2) @(posedge clk_ref);
    begin
      real ps, lo, hi;
      ps = psd[0] + psd[NPSD/2];
      for (int k = 1; k < NPSD/2; k++) ps += 2.0 * psd[k];
      lo = 0.0;   // below 250 kHz, in the HPF's stop band
      for (int k = 1; k <= 12; k++) lo += psd[k] / 12.0;
      hi = 0.0;   // 1 MHz to 10 MHz
      for (int k = 52; k <= 512; k++) hi += psd[k] / 461.0;
      $display("PSD: %0d bins, sum %0.5f (mean square %0.5f) LSB^2, mean bin below 250 kHz %0.3g, above 1 MHz %0.3g",
               n_psd, ps, sq_psd / NPSD, lo, hi);
      check(n_psd == NPSD/2 + 1, "PSD bin count");
      check(ps > sq_psd / NPSD * 0.999 - 1.0e-6 && ps < sq_psd / NPSD * 1.001 + 1.0e-6,
            "PSD sum against the mean square");
      check(lo < hi, "PSD not high-pass shaped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
