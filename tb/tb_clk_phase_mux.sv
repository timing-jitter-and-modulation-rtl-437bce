// tb_clk_phase_mux: checks the behavioural ten-phase clock MUX.
//
// A ten-phase clock of 1 ns period runs while the selection moves by random
// steps of -3..+4 phases at random times.  The output must never show a
// high or low pulse shorter than 0.15 ns (an earlier phase by k steps
// shortens one low time to (0.5 - 0.1 k) ns; a glitch would be shorter), every output rising
// edge must coincide with a rising edge of the phase selected at that time,
// and the number of output periods must equal the elapsed clock periods minus
// the net selection movement / 10.
module tb_clk_phase_mux;
  localparam real P = 1.0;
  logic [9:0] ph;
  logic [3:0] sel = '0;
  logic rst_n = 1'b0, clk_out;
  int checks = 0, failures = 0;

  clk_phase_mux dut (.rst_n, .ph, .sel, .clk_out);

  // phase j rises at (k + j/10) ns
  initial begin
    longint n;
    n = 0;
    for (int j = 0; j < 10; j++) ph[j] = ((10 - j) % 10) < 5;
    forever begin
      #(P / 10.0);
      n++;
      ph[int'(n % 10)] = 1'b1;
      ph[int'((n + 5) % 10)] = 1'b0;
    end
  end

  realtime t_edge = 0;
  int n_rise = 0, short_pulses = 0, bad_edge = 0;
  always @(clk_out) begin
    if ($realtime - t_edge < 0.15 * P && $realtime > 2.0) short_pulses++;
    t_edge = $realtime;
    if (clk_out) begin
      n_rise++;
      if (!ph[dut.cur]) bad_edge++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int net, r0;
    real t0;
    #3.05 rst_n = 1'b1;
    #5.0;
    net = 0; r0 = n_rise; t0 = $realtime;
    for (int k = 0; k < 400; k++) begin
      int step;
      step = $urandom_range(0, 7) - 3;
      net += step;
      sel = 4'((int'(sel) + step + 10) % 10);
      #(real'($urandom_range(4000, 9000)) / 1000.0 + 0.013);
    end
    #5.0;
    begin
      real expect_p;
      expect_p = ($realtime - t0) / P - real'(net) / 10.0;
      checks++;
      if (real'(n_rise - r0) < expect_p - 1.5 || real'(n_rise - r0) > expect_p + 1.5) begin
        failures++;
        $display("periods %0d, expected %0.1f", n_rise - r0, expect_p);
      end
    end
    checks++; if (short_pulses != 0) begin failures++; $display("%0d short pulses", short_pulses); end
    checks++; if (bad_edge != 0) begin failures++; $display("%0d bad edges", bad_edge); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
