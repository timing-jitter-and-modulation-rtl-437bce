// iir_sos: one second-order IIR section (biquad), direct form I.
//
//   y[n] = (b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]) / 2^28
//
// Samples are signed DATA_W-bit fixed point (the BIST uses 0.1 UI units with
// 16 fraction bits); coefficients are Q4.28 parameters.  The full-precision
// sum is rounded to nearest before it is stored.  A first-order section is the
// same with b2 = a2 = 0.  Cascades of these sections form the 500 kHz and
// 3.6 MHz filters of the jitter measurement; the section form, the formats
// and the rounding are this design's choices.
//
// Timing: one sample per clock when in_valid is high; y is registered and
// out_valid follows in_valid by one clock.
module iir_sos
  import ssc_pkg::*;
#(
  parameter int    DW = DATA_W,
  parameter coef_t B0 = coef_t'(1 << COEF_Q),
  parameter coef_t B1 = '0,
  parameter coef_t B2 = '0,
  parameter coef_t A1 = '0,
  parameter coef_t A2 = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y,
  output logic                 out_valid
);
  localparam int PW = DW + COEF_W + 3;

  logic signed [DW-1:0] x1, x2, y2;
  logic signed [PW-1:0] acc;
  logic signed [PW-1:0] rnd;

  always_comb begin
    acc = PW'(B0 * x) + PW'(B1 * x1) + PW'(B2 * x2)
        - PW'(A1 * y) - PW'(A2 * y2);
    rnd = (acc + (PW'(1) <<< (COEF_Q - 1))) >>> COEF_Q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y <= '0; y2 <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= x;
        x2 <= x1;
        y2 <= y;
        y  <= DW'(rnd);
      end
    end
  end
endmodule
