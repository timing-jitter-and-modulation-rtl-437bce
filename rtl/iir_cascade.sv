// iir_cascade: IIR filter built from NSEC second-order sections in series.
//
// COEF holds one {b0, b1, b2, a1, a2} row (Q4.28) per section; ssc_pkg
// provides the three filters of the jitter measurement: the fifth-order
// 500 kHz low-pass that recovers the modulation profile, the fifth-order
// 500 kHz high-pass and the third-order 3.6 MHz high-pass that keep the
// jitter.  Orders and corner frequencies follow the description; the
// Butterworth response and the section-cascade form are this design's
// choices.
//
// Timing: one sample per clock; NSEC clocks of latency.
module iir_cascade
  import ssc_pkg::*;
#(
  parameter int    DW   = DATA_W,
  parameter int    NSEC = LPF500K_NSEC,
  parameter logic [0:NSEC-1][0:4][COEF_W-1:0] COEF = LPF500K
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y,
  output logic                 out_valid
);
  logic signed [DW-1:0] d [NSEC+1];
  logic                 v [NSEC+1];

  assign d[0] = x;
  assign v[0] = in_valid;

  for (genvar i = 0; i < NSEC; i++) begin : g_sec
    iir_sos #(
      .DW(DW),
      .B0(coef_t'(COEF[i][0])), .B1(coef_t'(COEF[i][1])),
      .B2(coef_t'(COEF[i][2])), .A1(coef_t'(COEF[i][3])),
      .A2(coef_t'(COEF[i][4]))
    ) u_sos (
      .clk, .rst_n, .in_valid(v[i]), .x(d[i]), .y(d[i+1]), .out_valid(v[i+1]));
  end

  assign y         = d[NSEC];
  assign out_valid = v[NSEC];
endmodule
