// tb_tri_profile: checks the triangular modulation profile.
//
// With a tick every second clock, the level must follow the reference
// triangle: 0, 1, ..., 1023, 1023, ..., 0 over 2048 ticks (29.3 kHz at a
// 60 MHz tick), change only after ticks, and be 0 while ssc_en is low.
module tb_tri_profile;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, ssc_en = 1'b0;
  logic [9:0] level;
  logic falling;
  int checks = 0, failures = 0;

  tri_profile dut (.clk, .rst_n, .tick, .ssc_en, .level, .falling);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, exp_l, peaks;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    checks++; if (level != 0) failures++;          // non-SSC mode
    @(negedge clk) ssc_en = 1'b1;
    t = 0; peaks = 0;
    for (int n = 0; n < 3 * 2048 + 100; n++) begin
      // level before the tick
      exp_l = (t % 2048) < 1024 ? (t % 2048) : 2047 - (t % 2048);
      @(negedge clk);
      checks++;
      if (level != 10'(exp_l)) begin
        failures++;
        if (failures < 5) $display("tick %0d: level %0d exp %0d", t, level, exp_l);
      end
      if (level == 10'd1023 && !falling) peaks++;
      tick = 1'b1;
      @(negedge clk) tick = 1'b0;
      checks++;                                     // no change without a tick
      if (level != 10'(((t + 1) % 2048) < 1024 ? ((t + 1) % 2048) : 2047 - ((t + 1) % 2048))) failures++;
      t++;
    end
    checks++; if (peaks != 3) begin failures++; $display("peaks %0d", peaks); end
    @(negedge clk) ssc_en = 1'b0;
    @(negedge clk);
    checks++; if (level != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
