// psd_dft: power spectral density of the high-pass filtered phase.
//
// The jitter PSD is the squared magnitude of the Fourier transform of the
// HPF output.  After `start` this unit stores the next NPSD valid samples in a
// small memory and then evaluates the DFT one bin at a time with the Goertzel
// recursion
//     s[n] = x[n] + c_k * s[n-1] - s[n-2],   c_k = 2 cos(2*pi*k/NPSD),
//     |X_k|^2 = s1^2 + s2^2 - c_k * s1 * s2   (s1, s2: the last two states),
// for k = 0 .. NPSD/2 (the one-sided spectrum of a real signal).  The bin
// coefficient c_k is not stored: it is produced by the Chebyshev recurrence
// c_{k+1} = c_1 * c_k - c_{k-1}, so only 2cos(2*pi/NPSD) is a constant.
// That the PSD is the squared transform of the HPF output follows the
// description; the record length, the Goertzel form, the single-bin-at-a-time
// schedule and the fixed-point formats are this design's own choices.
//
// Scaling: pow = |X_k|^2 / NPSD^2 in LSB^2 (LSB = 0.1 UI) with 32 fraction
// bits, so that pow[0] + 2*(pow[1] + .. + pow[NPSD/2-1]) + pow[NPSD/2]
// equals the mean square of the record (Parseval).  Samples are reduced to 8
// fraction bits and saturated to 24 bits on entry, as in jitter_stats; the
// recursion carries GF further fraction bits so that its rounding stays far
// below the quantisation of the samples.
//
// Interface: in_valid/x is the sample stream; out_valid pulses once per bin
// with its index out_bin and power out_pow, in increasing bin order; done
// rises after the last bin and stays high until the next start.
// Timing: NPSD cycles of capture (one sample per valid), then NPSD + 2 clocks
// per bin, i.e. (NPSD/2 + 1) * (NPSD + 2) clocks for the whole spectrum.
module psd_dft
  import ssc_pkg::*;
#(
  parameter int DW   = DATA_W,
  parameter int FW   = FRAC_W,
  parameter int NPSD = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  x,
  output logic                  busy,
  output logic                  done,
  output logic                  out_valid,
  output logic [$clog2(NPSD):0] out_bin,
  output logic [63:0]           out_pow
);
  localparam int  LN = $clog2(NPSD);
  localparam int  XW = 24;              // stored sample, 8 fraction bits
  localparam int  GF = 8;               // guard fraction bits of the state
  localparam int  SW = XW + 2 * LN + GF + 4; // Goertzel state
  localparam int  CF = 40;              // fraction bits of c_k
  localparam int  CW = CF + 4;
  localparam real PI = 3.14159265358979323846;
  localparam logic signed [CW-1:0] C1 = CW'(longint'($cos(2.0 * PI / NPSD) * 2.0 ** (CF + 1)));
  localparam logic signed [CW-1:0] C0 = CW'(64'sd2 <<< CF);
  // |X|^2 has 16 + 2*GF fraction bits; /NPSD^2 and 32 output fraction bits.
  localparam int  PSH = 2 * LN + 2 * GF - 16;

  typedef enum logic [2:0] {S_IDLE, S_CAP, S_RUN, S_POW, S_DONE} state_t;
  state_t state;

  logic signed [XW-1:0] mem [NPSD];
  logic [LN-1:0]        wr_addr, rd_addr;
  logic signed [XW-1:0] rd_data;
  logic                 rd_valid, rd_last;
  logic                 issue, issue_last;
  logic [LN:0]          bin;
  logic signed [CW-1:0] c_k, c_km1;
  logic signed [SW-1:0] s1, s2;

  // Input reduced to 8 fraction bits and saturated.
  logic signed [XW-1:0] xs;
  always_comb begin
    logic signed [DW-1:0] t;
    t = x >>> (FW - 8);
    if (t > DW'(24'sh7fffff))       xs = 24'sh7fffff;
    else if (t < -DW'(24'sh7fffff)) xs = -24'sh7fffff;
    else                            xs = XW'(t);
  end

  // One Goertzel step and the bin power, both from the current state.
  logic signed [SW-1:0]      s0;
  logic signed [CW+SW-1:0]   cs1;
  logic signed [2*SW+CW:0]   p_full;
  logic signed [2*SW+CW:0]   p_scaled;
  logic signed [CW-1:0]      c_next;
  always_comb begin
    logic signed [2*SW+CW:0] cs1s2;
    logic signed [2*CW-1:0]  cc;
    cs1   = c_k * s1;
    s0    = (SW'(rd_data) <<< GF) + SW'((cs1 + (CW+SW)'(64'sd1 <<< (CF - 1))) >>> CF) - s2;
    cs1s2 = (2*SW+CW+1)'(cs1) * (2*SW+CW+1)'(s2);
    p_full = (2*SW+CW+1)'(s1) * (2*SW+CW+1)'(s1) + (2*SW+CW+1)'(s2) * (2*SW+CW+1)'(s2)
           - (cs1s2 >>> CF);
    if (p_full < 0) p_scaled = '0;      // rounding only; a power is never negative
    else            p_scaled = p_full >>> PSH;
    cc     = C1 * c_k;
    c_next = CW'((cc + (2*CW)'(64'sd1 <<< (CF - 1))) >>> CF) - c_km1;
  end

  assign issue      = (state == S_RUN) && !issue_last;
  assign busy       = (state != S_IDLE) && (state != S_DONE);

  // Sample memory: one write port during capture, one registered read port.
  always_ff @(posedge clk) begin
    if (state == S_CAP && in_valid) mem[wr_addr] <= xs;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      wr_addr    <= '0;
      rd_addr    <= '0;
      rd_valid   <= 1'b0;
      rd_last    <= 1'b0;
      issue_last <= 1'b0;
      bin        <= '0;
      c_k        <= C0;
      c_km1      <= C1;
      s1         <= '0;
      s2         <= '0;
      out_valid  <= 1'b0;
      out_bin    <= '0;
      out_pow    <= '0;
    end else begin
      out_valid <= 1'b0;
      rd_valid  <= issue;
      rd_last   <= issue && (rd_addr == LN'(NPSD - 1));
      if (start) begin
        state   <= S_CAP;
        done    <= 1'b0;
        wr_addr <= '0;
      end else begin
        unique case (state)
          S_IDLE, S_DONE: ;
          S_CAP: if (in_valid) begin
            wr_addr <= wr_addr + 1'b1;
            if (wr_addr == LN'(NPSD - 1)) begin
              state      <= S_RUN;
              bin        <= '0;
              c_k        <= C0;
              c_km1      <= C1;
              rd_addr    <= '0;
              issue_last <= 1'b0;
              s1         <= '0;
              s2         <= '0;
            end
          end
          S_RUN: begin
            if (issue) begin
              rd_addr <= rd_addr + 1'b1;
              if (rd_addr == LN'(NPSD - 1)) issue_last <= 1'b1;
            end
            if (rd_valid) begin
              s1 <= s0;
              s2 <= s1;
              if (rd_last) state <= S_POW;
            end
          end
          S_POW: begin
            out_valid <= 1'b1;
            out_bin   <= bin;
            out_pow   <= (p_scaled > (2*SW+CW+1)'(64'h7fff_ffff_ffff_ffff))
                         ? 64'h7fff_ffff_ffff_ffff : 64'(p_scaled);
            s1        <= '0;
            s2        <= '0;
            rd_addr   <= '0;
            issue_last <= 1'b0;
            c_km1     <= c_k;
            c_k       <= c_next;
            bin       <= bin + 1'b1;
            if (bin == (LN+1)'(NPSD / 2)) begin
              state <= S_DONE;
              done  <= 1'b1;
            end else begin
              state <= S_RUN;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
