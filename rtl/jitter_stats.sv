// jitter_stats: RMS jitter and jitter histogram from the high-pass filtered
// phase.
//
// After `start`, the next N_SAMPLES valid samples of the HPF output form one
// record.  For each sample the unit adds its square to a running sum (the
// integral of the jitter PSD equals the mean square of the signal) and counts
// it in one of HBINS histogram bins of 1/8 LSB (0.0125 UI) each, centred on
// zero; samples beyond the outer bins land in the outer bins.  At the end of
// the record a bit-serial divider forms the mean square, the known
// quantisation-noise power EH_VAR left by the HPF is subtracted (the jitter
// variance), and a bit-serial square root gives the RMS jitter.  Record length
// (10^4 samples), the mean-square definition and the subtraction of the
// quantisation noise follow the description; the fixed-point formats, the bin
// width and the sequential divider and root are this design's choices.
//
// Formats: x has FW fraction bits in units of 0.1 UI.  mean_sq and jit_var
// are in LSB^2 with 16 fraction bits; jit_rms in LSB with 8 fraction bits.
// Timing: one sample per clock; done rises about 64 + 24 clocks after the last
// sample of the record and stays high until the next start.
module jitter_stats
  import ssc_pkg::*;
#(
  parameter int DW        = DATA_W,
  parameter int FW        = FRAC_W,
  parameter int N_SAMPLES = 10000,
  parameter int HBINS     = 32,
  parameter int EH_VAR    = EH_VAR_HPF500K
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic                 busy,
  output logic                 done,
  output logic [47:0]          mean_sq,
  output logic signed [48:0]   jit_var,
  output logic [23:0]          jit_rms,
  output logic [15:0]          hist [HBINS]
);
  localparam int NW = $clog2(N_SAMPLES + 1);
  localparam int HB = $clog2(HBINS);

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_DIV, S_SQRT, S_DONE} state_t;
  state_t state;

  // Sample reduced to 8 fraction bits and saturated to 24 bits.
  logic signed [23:0] s8;
  logic [47:0]        sq;
  int                 bin;

  always_comb begin
    logic signed [DW-1:0] t;
    t = x >>> (FW - 8);
    if (t > DW'(24'sh7fffff))       s8 = 24'sh7fffff;
    else if (t < -DW'(24'sh7fffff)) s8 = -24'sh7fffff;
    else                            s8 = 24'(t);
    sq  = 48'(s8 * s8);
    bin = int'(24'(s8 >>> 5)) + HBINS / 2;
    if (bin < 0)          bin = 0;
    else if (bin >= HBINS) bin = HBINS - 1;
  end

  logic [63:0]   sum_sq;
  logic [NW-1:0] cnt;
  logic [63:0]   rem;
  logic [63:0]   quo;
  logic [6:0]    step;
  // square root state
  logic [47:0]   rad;
  logic [27:0]   racc;
  logic [23:0]   root;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sum_sq  <= '0;
      cnt     <= '0;
      rem     <= '0;
      quo     <= '0;
      step    <= '0;
      rad     <= '0;
      racc    <= '0;
      root    <= '0;
      mean_sq <= '0;
      jit_var <= '0;
      for (int i = 0; i < HBINS; i++) hist[i] <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state  <= S_ACC;
            sum_sq <= '0;
            cnt    <= '0;
            for (int i = 0; i < HBINS; i++) hist[i] <= '0;
          end
        end
        S_ACC: begin
          if (in_valid) begin
            sum_sq <= sum_sq + 64'(sq);
            hist[HB'(bin)] <= hist[HB'(bin)] + 1'b1;
            cnt <= cnt + 1'b1;
            if (cnt == NW'(N_SAMPLES - 1)) begin
              state <= S_DIV;
              rem   <= '0;
              quo   <= sum_sq + 64'(sq);
              step  <= '0;
            end
          end
        end
        S_DIV: begin
          // Restoring division of quo by N_SAMPLES, one quotient bit per clock.
          logic [64:0] r2;
          r2 = {rem, quo[63]};
          if (r2 >= 65'(N_SAMPLES)) begin
            rem <= 64'(r2 - 65'(N_SAMPLES));
            quo <= {quo[62:0], 1'b1};
          end else begin
            rem <= 64'(r2);
            quo <= {quo[62:0], 1'b0};
          end
          step <= step + 1'b1;
          if (step == 7'd63) begin
            state <= S_SQRT;
          end
        end
        S_SQRT: begin
          if (step == 7'd64) begin
            // Entry: quotient complete.
            mean_sq <= 48'(quo);
            jit_var <= 49'(quo) - 49'(EH_VAR);
            rad     <= ($signed(49'(quo) - 49'(EH_VAR)) > 0) ? 48'(49'(quo) - 49'(EH_VAR)) : '0;
            racc    <= '0;
            root    <= '0;
            step    <= step + 1'b1;
          end else begin
            // Digit-by-digit square root, two radicand bits per clock.
            logic [27:0] trial;
            logic [27:0] a2;
            a2    = {racc[25:0], rad[47:46]};
            trial = {2'b00, root, 2'b01};
            if (a2 >= trial) begin
              racc <= a2 - trial;
              root <= {root[22:0], 1'b1};
            end else begin
              racc <= a2;
              root <= {root[22:0], 1'b0};
            end
            rad  <= {rad[45:0], 2'b00};
            step <= step + 1'b1;
            if (step == 7'd88) begin
              state <= S_DONE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy    = (state == S_ACC) || (state == S_DIV) || (state == S_SQRT);
    done    = (state == S_DONE);
    jit_rms = root;
  end

endmodule
