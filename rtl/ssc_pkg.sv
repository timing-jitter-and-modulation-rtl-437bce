// ssc_pkg: constants and types shared by the spread-spectrum clock generator
// (SSCG) digital logic and its built-in jitter measurement (BIST).
//
// Numbers that come from the design description: a 20 MHz reference, a
// 1.2 GHz ten-phase VCO, a feedback division ratio of 60, a sigma-delta
// modulator running at three times the reference rate, 500 kHz filters of
// fifth order and a 3.6 MHz third-order high-pass filter.  The fixed-point
// formats and the Butterworth response of the filters are this design's own
// choices.
//
// Filter coefficients are Butterworth second-order sections for fs = 20 MHz in
// Q4.28 (value * 2^28), ordered {b0, b1, b2, a1, a2} with
//   y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2].
// Each section is scaled to unit gain in its passband (DC for the low-pass,
// fs/2 for the high-passes), so no section overflows its neighbour.
package ssc_pkg;

  localparam int NPHASE      = 10;   // VCO phases, one step = 0.1 UI
  localparam int PH_W        = 4;    // bits of a phase index
  localparam int N_DIV       = 60;   // 1.2 GHz / 20 MHz
  localparam int SDM_PER_REF = 3;    // SDM samples per reference period

  // Sample format of the BIST filter chain: phase in 0.1 UI units with
  // FRAC_W fraction bits.
  localparam int DATA_W = 48;
  localparam int FRAC_W = 16;
  localparam int COEF_W = 32;
  localparam int COEF_Q = 28;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Fifth-order low-pass, corner 500 kHz (modulation profile path).
  localparam int LPF500K_NSEC = 3;
  localparam logic [0:LPF500K_NSEC-1][0:4][COEF_W-1:0] LPF500K = '{
    '{32'sd9792479,   32'sd19584959,  32'sd9792479,  -32'sd229265538, 32'sd0},
    '{32'sd1466807,   32'sd2933613,   32'sd1466807,  -32'sd470691322, 32'sd208123092},
    '{32'sd3152492,   32'sd3152492,   32'sd0,        -32'sd505809833, 32'sd243679361}};

  // Fifth-order high-pass, corner 500 kHz (jitter path).
  localparam int HPF500K_NSEC = 3;
  localparam logic [0:HPF500K_NSEC-1][0:4][COEF_W-1:0] HPF500K = '{
    '{32'sd248850497, -32'sd248850497, 32'sd0,         -32'sd229265538, 32'sd0},
    '{32'sd236812467, -32'sd473624935, 32'sd236812467, -32'sd470691322, 32'sd208123092},
    '{32'sd254481163, -32'sd508962325, 32'sd254481163, -32'sd505809833, 32'sd243679361}};

  // Third-order high-pass, corner 3.6 MHz = 6 Gb/s / 1667 (SATA jitter path).
  localparam int HPF3M6_NSEC = 2;
  localparam logic [0:HPF3M6_NSEC-1][0:4][COEF_W-1:0] HPF3M6 = '{
    '{32'sd82109472,  -32'sd164218945, 32'sd82109472,  -32'sd60002433,  32'sd0},
    '{32'sd263512910, -32'sd263512910, 32'sd0,         -32'sd157385285, 32'sd101205078}};

  // High-frequency quantisation-noise power left after each HPF, in LSB^2
  // (LSB = 0.1 UI) with 16 fraction bits: (1/12) * sum(h[n]^2), where h is
  // the filter's impulse response and 1/12 LSB^2 the white quantisation noise
  // of the phase detector.  Noise gains: 0.94918 (500 kHz), 0.63497 (3.6 MHz).
  localparam int EH_VAR_HPF500K = 5184;  // round(65536 * 0.94918 / 12)
  localparam int EH_VAR_HPF3M6  = 3468;  // round(65536 * 0.63497 / 12)

endpackage
