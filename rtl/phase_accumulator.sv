// phase_accumulator: recovers the absolute SSC phase from the phase shifts.
//
// Adds each valid phase shift (0.1 UI steps) to a running sum.  Without
// jitter the sum is the time integral of the modulation profile; with the
// 5000 ppm down-spread it falls by about 0.15 UI per reference period on
// average.  Accumulating the shifts follows the description; the width and the
// synchronous clear are this design's choices.
//
// Timing: acc and out_valid are registered, one clock after shift; clear
// restarts the sum at 0 on the next clock.
module phase_accumulator
  import ssc_pkg::*;
#(
  parameter int ACC_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [PH_W-1:0]  shift,
  output logic signed [ACC_W-1:0] acc,
  output logic                    out_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) acc <= acc + ACC_W'(shift);
    end
  end
endmodule
