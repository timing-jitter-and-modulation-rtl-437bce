// mpd: ten-phase multiphase phase detector with phase accumulation.
//
// Chain of the four parts of the detector: the flip-flop bank samples the
// VCO phases at each reference edge, the encoder turns the thermometer code
// into a phase index 0..9, the phase-shift detector takes the difference to
// the previous index (0.1 UI steps), and the accumulator sums the shifts into
// the absolute SSC phase.  The chain and its one-sample-per-reference-clock
// rate (20 MHz) follow the description; the register between each stage is
// this design's choice.
//
// Timing: a sampling edge appears on shift three reference clocks later and
// on acc four clocks later; one result per clock.
module mpd
  import ssc_pkg::*;
#(
  parameter int NPH   = NPHASE,
  parameter int ACC_W = 24
) (
  input  logic                    clk_ref,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [NPH-1:0]          ph,
  output logic [$clog2(NPH)-1:0]  phase,
  output logic                    phase_valid,
  output logic signed [PH_W-1:0]  shift,
  output logic                    shift_valid,
  output logic signed [ACC_W-1:0] acc,
  output logic                    acc_valid
);
  logic [NPH-1:0] therm;

  mpd_sampler #(.NPH(NPH)) u_sampler (.clk_ref, .ph, .therm);

  mpd_encoder #(.NPH(NPH)) u_encoder (
    .clk(clk_ref), .rst_n, .therm, .phase, .valid(phase_valid));

  phase_shift_detector #(.NPH(NPH)) u_psd (
    .clk(clk_ref), .rst_n, .in_valid(phase_valid), .phase,
    .shift, .out_valid(shift_valid));

  phase_accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk(clk_ref), .rst_n, .clear, .in_valid(shift_valid), .shift,
    .acc, .out_valid(acc_valid));
endmodule
