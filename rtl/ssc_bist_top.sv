// ssc_bist_top: spread-spectrum clock generator logic with built-in
// measurement of its timing jitter and modulation profile.
//
// SSCG side (clocked by the selected MUX phase, mux_clk, 1.2 GHz): the
// feedback divider divides mux_clk by N_DIV for the PLL's phase detector and
// gives three ticks per reference period (60 MHz).  On each tick the
// triangular profile steps, the MASH 1-1-1 modulator turns the profile into
// phase steps of 0.1 UI, and the MUX control moves the phase selection of the
// ten-phase clock MUX.  Stepping to earlier phases shortens the feedback
// period, so the locked VCO runs slower: a down-spread of up to
// 3 x 0.1 UI / 60 UI = 0.5 % (5000 ppm).  ssc_en = 0 selects the non-SSC mode.
//
// BIST side (clocked by the 20 MHz reference): the multiphase phase detector
// samples the ten VCO phases at each reference edge, finds the phase shift
// between edges and accumulates it into the absolute phase.  That phase feeds
// a 500 kHz fifth-order low-pass (modulation profile: its derivative is the
// frequency deviation), a 500 kHz fifth-order high-pass and a 3.6 MHz
// third-order high-pass (jitter: mean square, RMS and histogram with the
// phase detector's quantisation noise removed; and the PSD of the 500 kHz
// high-pass output over the first NPSD samples of the record).
//
// The analog parts of the PLL (reference oscillator, phase-frequency detector
// and charge pump, loop filter, ten-phase VCO) are outside: vco_ph comes in,
// div_clk goes out.  The clock MUX inside is a behavioural model of a
// glitch-free multiphase switch; everything else is synthesizable.
//
// The partition, the rates, the division ratio, the filter orders and
// corners, and the 10^4-sample record follow the description; the fixed-point
// formats, the control sequence (meas_start begins a record on all four
// measurement units), the SDM clocking from the divider and the PSD record
// length are this design's choices.  The accumulator wraps after 2^(ACC_W-1)
// steps of 0.1 UI; restart it with mpd_clear (the filters then need about 200
// samples to settle).
module ssc_bist_top
  import ssc_pkg::*;
#(
  parameter int NPH       = NPHASE,
  parameter int NDIV      = N_DIV,
  parameter int PROF_W    = 10,
  parameter int ACC_W     = 24,
  parameter int N_SAMPLES = 10000,
  parameter int HBINS     = 32,
  parameter int SETTLE    = 256,
  parameter int WIN       = 2048,
  parameter int MEAS      = 4096,
  parameter int NPSD      = 1024
) (
  input  logic                     clk_ref,
  input  logic                     rst_n,
  input  logic                     ssc_en,
  input  logic [NPH-1:0]           vco_ph,
  input  logic                     mpd_clear,
  input  logic                     meas_start,
  // SSCG
  output logic                     mux_clk,
  output logic                     div_clk,
  output logic                     sdm_tick,
  output logic [PROF_W-1:0]        prof_level,
  output logic signed [3:0]        sdm_y,
  output logic [$clog2(NPH)-1:0]   mux_sel,
  output logic signed [5:0]        ref_sum,
  // multiphase phase detector
  output logic [$clog2(NPH)-1:0]   mpd_phase,
  output logic signed [PH_W-1:0]   mpd_shift,
  output logic                     mpd_shift_valid,
  output logic signed [ACC_W-1:0]  ssc_phase,
  output logic                     ssc_phase_valid,
  // filters
  output logic signed [DATA_W-1:0] lpf_out,
  output logic signed [DATA_W-1:0] hpf500_out,
  output logic signed [DATA_W-1:0] hpf36_out,
  output logic                     filt_valid,
  // jitter, 500 kHz high-pass
  output logic                     jit500_done,
  output logic [47:0]              jit500_mean_sq,
  output logic signed [48:0]       jit500_var,
  output logic [23:0]              jit500_rms,
  output logic [15:0]              jit500_hist [HBINS],
  // jitter, 3.6 MHz high-pass
  output logic                     jit36_done,
  output logic [47:0]              jit36_mean_sq,
  output logic signed [48:0]       jit36_var,
  output logic [23:0]              jit36_rms,
  output logic [15:0]              jit36_hist [HBINS],
  // jitter PSD, 500 kHz high-pass
  output logic                     psd_valid,
  output logic [$clog2(NPSD):0]    psd_bin,
  output logic [63:0]              psd_pow,
  output logic                     psd_done,
  // modulation profile
  output logic signed [DATA_W-1:0] freq_dev,
  output logic signed [DATA_W-1:0] dev_pp,
  output logic [31:0]              period_sum,
  output logic [15:0]              period_cnt,
  output logic                     prof_done
);

  // ---------------- SSCG: divider, profile, SDM, MUX control, MUX ----------
  fb_divider #(.N(NDIV), .RATIO(SDM_PER_REF)) u_div (
    .clk(mux_clk), .rst_n, .div_out(div_clk), .tick(sdm_tick));

  logic prof_falling;
  tri_profile #(.PROF_W(PROF_W)) u_prof (
    .clk(mux_clk), .rst_n, .tick(sdm_tick), .ssc_en,
    .level(prof_level), .falling(prof_falling));

  mash111_sdm #(.W(PROF_W)) u_sdm (
    .clk(mux_clk), .rst_n, .tick(sdm_tick), .frac(prof_level), .y(sdm_y));

  mux_ctrl #(.NPH(NPH)) u_mctl (
    .clk(mux_clk), .rst_n, .tick(sdm_tick), .sdm_y,
    .sel(mux_sel), .ref_sum);

  clk_phase_mux #(.NPH(NPH)) u_mux (
    .rst_n, .ph(vco_ph), .sel(mux_sel), .clk_out(mux_clk));

  // ---------------- BIST: multiphase phase detector -------------------------
  logic mpd_phase_valid;
  mpd #(.NPH(NPH), .ACC_W(ACC_W)) u_mpd (
    .clk_ref, .rst_n, .clear(mpd_clear), .ph(vco_ph),
    .phase(mpd_phase), .phase_valid(mpd_phase_valid),
    .shift(mpd_shift), .shift_valid(mpd_shift_valid),
    .acc(ssc_phase), .acc_valid(ssc_phase_valid));

  // ---------------- BIST: filters -------------------------------------------
  sample_t phase_s;
  assign phase_s = sample_t'(ssc_phase) <<< FRAC_W;

  logic v_lpf, v_h500, v_h36;

  iir_cascade #(.NSEC(LPF500K_NSEC), .COEF(LPF500K)) u_lpf (
    .clk(clk_ref), .rst_n, .in_valid(ssc_phase_valid), .x(phase_s),
    .y(lpf_out), .out_valid(v_lpf));

  iir_cascade #(.NSEC(HPF500K_NSEC), .COEF(HPF500K)) u_hpf500 (
    .clk(clk_ref), .rst_n, .in_valid(ssc_phase_valid), .x(phase_s),
    .y(hpf500_out), .out_valid(v_h500));

  iir_cascade #(.NSEC(HPF3M6_NSEC), .COEF(HPF3M6)) u_hpf36 (
    .clk(clk_ref), .rst_n, .in_valid(ssc_phase_valid), .x(phase_s),
    .y(hpf36_out), .out_valid(v_h36));

  assign filt_valid = v_lpf;

  // ---------------- BIST: jitter and profile extraction ---------------------
  logic jit500_busy, jit36_busy;

  jitter_stats #(.N_SAMPLES(N_SAMPLES), .HBINS(HBINS), .EH_VAR(EH_VAR_HPF500K)) u_jit500 (
    .clk(clk_ref), .rst_n, .start(meas_start), .in_valid(v_h500), .x(hpf500_out),
    .busy(jit500_busy), .done(jit500_done), .mean_sq(jit500_mean_sq),
    .jit_var(jit500_var), .jit_rms(jit500_rms), .hist(jit500_hist));

  jitter_stats #(.N_SAMPLES(N_SAMPLES), .HBINS(HBINS), .EH_VAR(EH_VAR_HPF3M6)) u_jit36 (
    .clk(clk_ref), .rst_n, .start(meas_start), .in_valid(v_h36), .x(hpf36_out),
    .busy(jit36_busy), .done(jit36_done), .mean_sq(jit36_mean_sq),
    .jit_var(jit36_var), .jit_rms(jit36_rms), .hist(jit36_hist));

  logic psd_busy;

  psd_dft #(.NPSD(NPSD)) u_psd (
    .clk(clk_ref), .rst_n, .start(meas_start), .in_valid(v_h500), .x(hpf500_out),
    .busy(psd_busy), .done(psd_done), .out_valid(psd_valid), .out_bin(psd_bin),
    .out_pow(psd_pow));

  logic dev_valid;
  logic signed [DATA_W-1:0] dev_min, dev_max;

  profile_extract #(.SETTLE(SETTLE), .WIN(WIN), .MEAS(MEAS)) u_pext (
    .clk(clk_ref), .rst_n, .start(meas_start), .in_valid(v_lpf), .x(lpf_out),
    .freq_dev, .dev_valid, .dev_min, .dev_max, .dev_pp,
    .period_sum, .period_cnt, .done(prof_done));

endmodule
