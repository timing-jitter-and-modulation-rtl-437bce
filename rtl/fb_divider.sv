// fb_divider: feedback divider of the PLL and SDM clock enable.
//
// Counts cycles of the selected MUX output from 0 to N_DIV-1.  div_out is
// high for the first half of the count (50 % duty) and goes to the phase
// detector; tick is high in the last cycle of each third of the count, so the
// SDM and MUX control run at SDM_PER_REF times the reference rate (60 MHz for
// 1.2 GHz / 60).  The ratio 60 and the three SDM samples per reference period
// follow the description; the duty cycle and the tick positions are this
// design's choices.
//
// Timing: div_out rises on the clock after the count wraps to 0.
module fb_divider
  import ssc_pkg::*;
#(
  parameter int N     = N_DIV,
  parameter int RATIO = SDM_PER_REF
) (
  input  logic clk,
  input  logic rst_n,
  output logic div_out,
  output logic tick
);
  localparam int CW   = $clog2(N);
  localparam int STEP = N / RATIO;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
  end

  always_comb begin
    div_out = (cnt < CW'(N / 2));
    tick    = ((int'(cnt) % STEP) == STEP - 1);
  end

endmodule
