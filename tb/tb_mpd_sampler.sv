// tb_mpd_sampler: the flip-flop bank must present, after each reference
// edge, exactly the phase pattern present at that edge.
module tb_mpd_sampler;
  logic clk_ref = 1'b0;
  logic [9:0] ph = '0, therm;
  int checks = 0, failures = 0;

  mpd_sampler dut (.clk_ref, .ph, .therm);

  always #25 clk_ref = ~clk_ref;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] v;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk_ref);
      v = 10'($urandom);
      ph = v;
      @(posedge clk_ref);
      #10 ph = ~v;             // changes after the edge must not show
      #5;
      checks++;
      if (therm != v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
