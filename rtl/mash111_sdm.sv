// mash111_sdm: third-order MASH 1-1-1 sigma-delta modulator.
//
// Three first-order accumulators are cascaded: the first integrates the
// fractional input, the second the residue of the first, the third the
// residue of the second.  Their carries c1, c2, c3 are combined as
//   y[n] = c1[n] + (c2[n] - c2[n-1]) + (c3[n] - 2 c3[n-1] + c3[n-2]),
// which leaves the input on average (mean y = frac / 2^W) and shapes the
// quantisation noise by (1 - z^-1)^3.  One unit of y is one 0.1 UI phase step
// of the clock MUX.  The MASH-111 order and the 60 MHz rate follow the
// description; the standard error-cancellation form and the W-bit
// accumulators are this design's choices.
//
// Interface: frac is sampled on each tick; y is registered and holds a value
// in -3..+4 until the next tick (one tick of latency).
module mash111_sdm #(
  parameter int W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [W-1:0]      frac,
  output logic signed [3:0] y
);
  logic [W-1:0] acc1, acc2, acc3;
  logic [W:0]   s1, s2, s3;
  logic         c2_d, c3_d, c3_dd;

  always_comb begin
    s1 = {1'b0, acc1} + {1'b0, frac};
    s2 = {1'b0, acc2} + {1'b0, s1[W-1:0]};
    s3 = {1'b0, acc3} + {1'b0, s2[W-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1 <= '0; acc2 <= '0; acc3 <= '0;
      c2_d <= 1'b0; c3_d <= 1'b0; c3_dd <= 1'b0;
      y    <= '0;
    end else if (tick) begin
      acc1  <= s1[W-1:0];
      acc2  <= s2[W-1:0];
      acc3  <= s3[W-1:0];
      c2_d  <= s2[W];
      c3_d  <= s3[W];
      c3_dd <= c3_d;
      y <= 4'(signed'({3'b000, s1[W]}))
         + 4'(signed'({3'b000, s2[W]})) - 4'(signed'({3'b000, c2_d}))
         + 4'(signed'({3'b000, s3[W]})) - 4'(signed'({2'b00, c3_d, 1'b0}))
         + 4'(signed'({3'b000, c3_dd}));
    end
  end

endmodule
