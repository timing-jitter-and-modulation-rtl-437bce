// tri_profile: triangular modulation profile of the spread-spectrum clock.
//
// The profile is the fraction of the full down-spread (5000 ppm) that the
// clock should have at each moment.  A counter that advances on every SDM
// tick ramps `level` from 0 up to 2^PROF_W-1 and back down, so one triangle
// lasts 2*HALF_PERIOD ticks.  With the 60 MHz SDM rate and HALF_PERIOD = 1024
// the modulation frequency is 60 MHz / 2048 = 29.3 kHz, the design target.
// The triangular shape and the 29.3 kHz target follow the description; the
// counter realisation, the 10-bit resolution and the way the non-SSC mode is
// entered (ssc_en low holds the level at 0, i.e. no spreading) are this
// design's choices.
//
// Interface: clk is the feedback (MUX output) clock, tick the 60 MHz enable.
// Timing: level changes one clock after a tick; the ramp starts at 0 after
// reset or when ssc_en rises.
module tri_profile #(
  parameter int PROF_W      = 10,
  parameter int HALF_PERIOD = 1 << PROF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              ssc_en,
  output logic [PROF_W-1:0] level,
  output logic              falling   // 1 on the downward half of the triangle
);
  localparam int CNT_W = $clog2(HALF_PERIOD);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      falling <= 1'b0;
    end else if (!ssc_en) begin
      cnt     <= '0;
      falling <= 1'b0;
    end else if (tick) begin
      if (cnt == CNT_W'(HALF_PERIOD - 1)) begin
        cnt     <= '0;
        falling <= ~falling;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // Scale the position within a half period onto the profile range.
  always_comb begin
    logic [CNT_W-1:0] pos;
    pos = falling ? CNT_W'(HALF_PERIOD - 1) - cnt : cnt;
    if (!ssc_en)
      level = '0;
    else if (CNT_W >= PROF_W)
      level = PROF_W'(pos >> (CNT_W - PROF_W));
    else
      level = PROF_W'(pos) << (PROF_W - CNT_W);
  end

endmodule
