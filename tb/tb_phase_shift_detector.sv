// tb_phase_shift_detector: checks the phase-shift detector.
//
// A random walk of detected phases with true steps in -5..+4 is applied, one
// per clock, with some invalid cycles.  Each shift must equal the true step,
// one clock later, including steps across the 9 -> 0 wrap.  The example of
// the description (phase 5, 7, 10 giving 0.2 UI then 0.3 UI) is run first.
module tb_phase_shift_detector;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [3:0] phase = '0;
  logic signed [3:0] shift;
  logic out_valid;
  int checks = 0, failures = 0;

  phase_shift_detector dut (.clk, .rst_n, .in_valid, .phase, .shift, .out_valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0 || int'(shift) != exp_q[0]) begin
        failures++;
        if (failures < 5) $display("shift %0d exp %0d", shift, exp_q.size() ? exp_q[0] : 99);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  initial begin
    int p, st, n_valid;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // phi_5, phi_7, phi_10 are indices 4, 6, 9
    @(negedge clk) begin in_valid = 1'b1; phase = 4'd4; end
    @(negedge clk) begin phase = 4'd6; exp_q.push_back(2); end
    @(negedge clk) begin phase = 4'd9; exp_q.push_back(3); end
    p = 9;
    n_valid = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      if (in_valid) begin
        st = $urandom_range(0, 9) - 5;
        p = (p + st + 10) % 10;
        phase = 4'(p);
        exp_q.push_back(st);
        n_valid++;
      end else begin
        phase = 4'($urandom_range(0, 9));
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d shifts missing", exp_q.size()); end
    checks++; if (checks < n_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
