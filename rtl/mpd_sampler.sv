// mpd_sampler: the flip-flop bank of the multiphase phase detector (MPD).
//
// Ten D flip-flops share the reference clock as their clock and take the ten
// VCO phases as data.  At each reference edge they capture a snapshot of the
// phases: five consecutive phases (in circular order) are high and five are
// low, a circular thermometer code whose 1-to-0 transition marks the phase
// that rose last.  This structure follows the description.  There is no
// synchroniser stage; the description shows a single rank.
//
// Timing: therm is valid one reference cycle after the sampling edge.
module mpd_sampler
  import ssc_pkg::*;
#(
  parameter int NPH = NPHASE
) (
  input  logic           clk_ref,
  input  logic [NPH-1:0] ph,
  output logic [NPH-1:0] therm
);
  always_ff @(posedge clk_ref) therm <= ph;
endmodule
