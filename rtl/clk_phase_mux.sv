// clk_phase_mux: behavioural model of the glitch-free ten-phase clock MUX.
//
// The real part is a timing-critical circuit that the description only names;
// this model has its ports and its function and is not meant for synthesis.
// The output follows the selected VCO phase.  A new selection is taken only
// after a falling edge of the output, and only once the newly requested phase
// is itself low, so no runt pulse appears: moving k phases earlier shortens
// the next period by k x 0.1 UI, moving k phases later lengthens it by the
// same.  Valid for moves of at most NPH/2 - 1 phases, which covers the -3..+4
// range of a MASH 1-1-1 modulator.
module clk_phase_mux #(
  parameter int NPH = 10
) (
  input  logic                   rst_n,
  input  logic [NPH-1:0]         ph,
  input  logic [$clog2(NPH)-1:0] sel,
  output logic                   clk_out
);
  logic [$clog2(NPH)-1:0] cur;

  assign clk_out = ph[cur];

  initial cur = '0;

  always begin
    @(negedge clk_out or negedge rst_n);
    if (!rst_n) begin
      cur = '0;
    end else begin
      wait (ph[sel] == 1'b0);
      cur = sel;
    end
  end

endmodule
