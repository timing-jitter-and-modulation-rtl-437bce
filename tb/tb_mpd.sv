// tb_mpd: self-checking test of the multiphase phase detector chain.
//
// A behavioural ten-phase VCO runs at a frequency that changes every few
// hundred reference periods (phase advance per reference period of
// 60 - s UI with s from -0.4 to +0.4 UI, including the 0.3 UI of a full
// 5000 ppm down-spread).  At each reference edge the testbench notes how many
// 0.1 UI steps the VCO has made; the accumulated phase must equal that count
// relative to the first sample, minus 600 steps per reference period,
// exactly, and arrive four clocks after its sampling edge.  The shift output
// is checked against the same count, and a clear is exercised.
module tb_mpd;
  localparam real TREF = 50.0;
  logic clk_ref = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [9:0] ph;
  logic [3:0] phase;
  logic phase_valid, shift_valid, acc_valid;
  logic signed [3:0] shift;
  logic signed [23:0] acc;
  int checks = 0, failures = 0;

  vco10_model u_vco (.ph);
  mpd dut (.clk_ref, .rst_n, .clear, .ph, .phase, .phase_valid, .shift, .shift_valid, .acc, .acc_valid);

  always #(TREF / 2) clk_ref = ~clk_ref;

  longint nrec [0:8191];
  int     edge_i = 0;
  int     base = -1;
  int     n_acc = 0, n_wrap = 0;

  always @(posedge clk_ref) begin
    nrec[edge_i % 8192] = u_vco.nstep;
    edge_i++;
  end

  always @(posedge clk_ref) begin
    if (rst_n && !clear && acc_valid) begin
      int s;
      longint exp_acc;
      s = edge_i - 1 - 4;           // edge index at which this sample was taken
      if (base < 0) base = s - 1;   // the priming sample
      exp_acc = (nrec[s % 8192] - nrec[base % 8192]) - 600 * longint'(s - base);
      checks++;
      if (longint'(acc) != exp_acc) begin
        failures++;
        if (failures < 10) $display("acc mismatch at edge %0d: got %0d exp %0d", s, acc, exp_acc);
      end
      n_acc++;
    end
    if (rst_n && shift_valid) begin
      int s;
      longint d;
      s = edge_i - 1 - 3;
      d = (nrec[s % 8192] - nrec[(s - 1) % 8192]) - 600;
      checks++;
      if (longint'(shift) != d) begin
        failures++;
        if (failures < 10) $display("shift mismatch at edge %0d: got %0d exp %0d", s, shift, d);
      end
      if ((nrec[s % 8192] % 10) < (nrec[(s - 1) % 8192] % 10) && d > 0) n_wrap++;
    end
  end

  initial begin
    #(TREF * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real svals [8] = '{0.0, 0.1, 0.2, 0.3, 0.4, -0.1, -0.3, -0.4};

  initial begin
    repeat (5) @(posedge clk_ref);
    rst_n = 1'b1;
    foreach (svals[i]) begin
      u_vco.period_ns = TREF / (60.0 - svals[i]);
      repeat (300) @(posedge clk_ref);
    end
    // Clear restarts the accumulation from zero.
    @(negedge clk_ref) clear = 1'b1;
    @(negedge clk_ref) clear = 1'b0;
    base = -1;
    checks++;
    if (acc != 0) begin failures++; $display("clear did not zero acc"); end
    u_vco.period_ns = TREF / (60.0 - 0.25);
    repeat (300) @(posedge clk_ref);
    checks++;
    if (n_wrap == 0) begin failures++; $display("no phase-index wrap seen"); end
    $display("accumulated samples %0d, index wraps %0d", n_acc, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
