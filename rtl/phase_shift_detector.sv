// phase_shift_detector: phase change between consecutive reference edges.
//
// Subtracts the phase detected at the previous reference edge from the one
// detected now and folds the result modulo 10 into -5..+4 steps of 0.1 UI.
// Example from the description: phase 5 then phase 7 gives +0.2 UI.  The
// folding range is this design's choice: it is correct while the true shift
// per reference period stays within -0.5..+0.4 UI (a 5000 ppm spread at
// 20 MHz gives 0.3 UI).  The first valid phase after reset only primes the
// previous-phase register and yields no shift.
//
// Timing: shift and out_valid are registered, one clock after phase.
module phase_shift_detector
  import ssc_pkg::*;
#(
  parameter int NPH = NPHASE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(NPH)-1:0] phase,
  output logic signed [PH_W-1:0] shift,
  output logic                   out_valid
);
  localparam int SW = $clog2(NPH);

  logic [SW-1:0] prev;
  logic          primed;
  int            d;

  always_comb begin
    d = int'(phase) - int'(prev);
    if (d >= NPH / 2)   d = d - NPH;
    else if (d < -(NPH / 2)) d = d + NPH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      primed    <= 1'b0;
      shift     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && primed;
      if (in_valid) begin
        prev   <= phase;
        primed <= 1'b1;
        shift  <= PH_W'(d);
      end
    end
  end
endmodule
