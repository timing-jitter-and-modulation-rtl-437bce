// mpd_encoder: thermometer-code-to-phase encoder of the MPD.
//
// Phase j of the VCO is delayed by j x 0.1 UI.  At a reference edge the
// phases that rose within the last half period are high, so the sampled code
// reads 1 at j and 0 at j+1 (circularly) exactly where phase j was the last to
// rise.  The encoder reports that j: the detected phase, with 0.1 UI
// resolution.  That the transition bit is the detected phase follows the
// description; taking the lowest j if a bubble gives several transitions, and
// flagging a code without any (all ones or all zeros) as invalid, are this
// design's choices.
//
// Timing: phase and valid are registered, one clock after therm.
module mpd_encoder
  import ssc_pkg::*;
#(
  parameter int NPH = NPHASE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NPH-1:0]         therm,
  output logic [$clog2(NPH)-1:0] phase,
  output logic                   valid
);
  localparam int SW = $clog2(NPH);

  logic [SW-1:0] p_c;
  logic          v_c;

  always_comb begin
    p_c = '0;
    v_c = 1'b0;
    for (int j = NPH - 1; j >= 0; j--) begin
      if (therm[j] && !therm[(j + 1) % NPH]) begin
        p_c = SW'(j);
        v_c = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      valid <= 1'b0;
    end else begin
      phase <= p_c;
      valid <= v_c;
    end
  end
endmodule
