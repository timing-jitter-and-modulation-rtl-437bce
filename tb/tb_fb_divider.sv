// tb_fb_divider: checks the divide-by-60 feedback divider.
//
// Over 20 output periods: div_out must have a period of exactly 60 input
// clocks with 30 high, and tick must come exactly every 20 clocks (three per
// output period).
module tb_fb_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic div_out, tick;
  int checks = 0, failures = 0;

  fb_divider dut (.clk, .rst_n, .div_out, .tick);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, last_rise, last_tick, highs, n_rise, n_tick;
    logic prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    c = 0; last_rise = -1; last_tick = -1; highs = 0; n_rise = 0; n_tick = 0; prev = div_out;
    for (int n = 0; n < 60 * 20 + 5; n++) begin
      @(posedge clk); #1;
      c++;
      if (div_out && !prev) begin
        if (last_rise >= 0) begin
          checks++; if (c - last_rise != 60) failures++;
          checks++; if (highs != 30) begin failures++; $display("high %0d", highs); end
        end
        last_rise = c; highs = 0; n_rise++;
      end
      if (div_out) highs++;
      prev = div_out;
      if (tick) begin
        if (last_tick >= 0) begin checks++; if (c - last_tick != 20) failures++; end
        last_tick = c; n_tick++;
      end
    end
    checks++; if (n_rise < 19) begin failures++; $display("only %0d output periods", n_rise); end
    checks++; if (n_tick < 3 * (n_rise - 1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
