// profile_extract: modulation profile, frequency deviation and modulation
// period from the low-pass filtered SSC phase.
//
// The accumulated phase is the time integral of the clock frequency, so its
// first difference per reference period is the frequency offset of the clock:
// freq_dev, in 0.1 UI per reference period, where one unit is
// 0.1 x 20 MHz = 2 MHz at 1.2 GHz.  After `start` the unit skips SETTLE
// samples (filter start-up), takes the minimum and maximum of freq_dev over the
// next WIN samples (dev_pp = max - min is the peak-to-peak deviation), and
// then, for MEAS samples, detects upward crossings of the mid level with a
// hysteresis of a quarter of dev_pp; the spacing of successive crossings is one
// modulation period, summed in period_sum (reference periods) and counted in
// period_cnt.  Taking the derivative of the filtered phase follows the
// description; the window lengths and the crossing method are this design's
// choices.
//
// Timing: freq_dev is registered one clock after each valid input; done goes
// high after SETTLE + WIN + MEAS valid samples and stays high until start.
module profile_extract
  import ssc_pkg::*;
#(
  parameter int DW     = DATA_W,
  parameter int SETTLE = 256,
  parameter int WIN    = 2048,
  parameter int MEAS   = 4096
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] freq_dev,
  output logic                 dev_valid,
  output logic signed [DW-1:0] dev_min,
  output logic signed [DW-1:0] dev_max,
  output logic signed [DW-1:0] dev_pp,
  output logic [31:0]          period_sum,
  output logic [15:0]          period_cnt,
  output logic                 done
);
  typedef enum logic [2:0] {P_IDLE, P_SETTLE, P_MINMAX, P_MEAS, P_DONE} pstate_t;
  pstate_t state;

  logic signed [DW-1:0] x_prev;
  logic                 primed;
  logic [31:0]          n;          // samples in the current phase
  logic [31:0]          since;      // samples since the last upward crossing
  logic                 above;      // hysteresis state
  logic                 seen;       // one crossing seen already
  logic signed [DW-1:0] mid, hyst, d;

  always_comb begin
    d      = x - x_prev;
    dev_pp = dev_max - dev_min;
    mid    = (dev_max + dev_min) >>> 1;
    hyst   = dev_pp >>> 2;
    done   = (state == P_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= P_IDLE;
      x_prev     <= '0;
      primed     <= 1'b0;
      freq_dev   <= '0;
      dev_valid  <= 1'b0;
      dev_min    <= '0;
      dev_max    <= '0;
      period_sum <= '0;
      period_cnt <= '0;
      n          <= '0;
      since      <= '0;
      above      <= 1'b0;
      seen       <= 1'b0;
    end else begin
      dev_valid <= in_valid && primed;
      if (in_valid) begin
        x_prev   <= x;
        primed   <= 1'b1;
        freq_dev <= d;
      end
      case (state)
        P_IDLE, P_DONE: begin
          if (start) begin
            state      <= P_SETTLE;
            n          <= '0;
            period_sum <= '0;
            period_cnt <= '0;
          end
        end
        P_SETTLE: begin
          if (dev_valid) begin
            n <= n + 1;
            if (n == 32'(SETTLE - 1)) begin
              state   <= P_MINMAX;
              n       <= '0;
              dev_min <= freq_dev;
              dev_max <= freq_dev;
            end
          end
        end
        P_MINMAX: begin
          if (dev_valid) begin
            if (freq_dev < dev_min) dev_min <= freq_dev;
            if (freq_dev > dev_max) dev_max <= freq_dev;
            n <= n + 1;
            if (n == 32'(WIN - 1)) begin
              state <= P_MEAS;
              n     <= '0;
              since <= '0;
              above <= 1'b1;
              seen  <= 1'b0;
            end
          end
        end
        P_MEAS: begin
          if (dev_valid) begin
            n     <= n + 1;
            since <= since + 1;
            if (above && freq_dev < mid - hyst) begin
              above <= 1'b0;
            end else if (!above && freq_dev > mid + hyst) begin
              above <= 1'b1;
              since <= 32'd1;
              if (seen) begin
                period_sum <= period_sum + since;
                period_cnt <= period_cnt + 1'b1;
              end
              seen <= 1'b1;
            end
            if (n == 32'(MEAS - 1)) state <= P_DONE;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
