// mux_ctrl: phase selection of the ten-phase clock MUX.
//
// Every SDM tick the selected phase index moves by the SDM output, modulo 10.
// A positive SDM value selects an earlier phase: the feedback clock then
// loses 0.1 UI per step, so the locked VCO runs slower than 60 x 20 MHz and
// the clock is spread downwards.  Three SDM values fall in one reference
// period; their sum y[k] is the phase shift the PLL sees per reference period
// and is given out on ref_sum for observation.  That one step is 0.1 UI and
// that three SDM values make one reference period follow the description; the
// sign convention and the tick counting are this design's choices.
//
// Interface: sel is registered, updated one clock after a tick.  ref_sum is
// updated on every third tick (when tick_cnt wraps).
module mux_ctrl
  import ssc_pkg::*;
#(
  parameter int NPH = NPHASE
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  input  logic signed [3:0]       sdm_y,
  output logic [$clog2(NPH)-1:0]  sel,
  output logic signed [5:0]       ref_sum
);
  localparam int SW = $clog2(NPH);

  logic [1:0]        tick_cnt;
  logic signed [5:0] part_sum;
  int                nxt;

  always_comb begin
    nxt = int'(sel) - int'(sdm_y);
    if (nxt < 0)         nxt = nxt + NPH;
    else if (nxt >= NPH) nxt = nxt - NPH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= '0;
      tick_cnt <= '0;
      part_sum <= '0;
      ref_sum  <= '0;
    end else if (tick) begin
      sel <= SW'(nxt);
      if (tick_cnt == 2'(SDM_PER_REF - 1)) begin
        tick_cnt <= '0;
        ref_sum  <= part_sum + 6'(sdm_y);
        part_sum <= '0;
      end else begin
        tick_cnt <= tick_cnt + 1'b1;
        part_sum <= part_sum + 6'(sdm_y);
      end
    end
  end

endmodule
