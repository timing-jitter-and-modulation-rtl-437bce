// tb_mpd_encoder: checks the thermometer-to-phase encoder.
//
// For every phase j the circular code with ones at j-4..j must give j, valid,
// one clock later.  The example of the description (phase 5 then phase 7) is
// included.  Codes of all zeros or all ones must be flagged invalid; a code
// with a one-bit bubble must still give one of its transition positions.
module tb_mpd_encoder;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] therm = '0;
  logic [3:0] phase;
  logic valid;
  int checks = 0, failures = 0;

  mpd_encoder dut (.clk, .rst_n, .therm, .phase, .valid);

  always #5 clk = ~clk;

  function automatic logic [9:0] code(int j);
    logic [9:0] c;
    c = '0;
    for (int i = 0; i < 5; i++) c[(j - i + 10) % 10] = 1'b1;
    return c;
  endfunction

  task automatic apply(logic [9:0] c, int exp_p, bit exp_v);
    @(negedge clk) therm = c;
    @(negedge clk);
    checks++;
    if (valid != exp_v || (exp_v && int'(phase) != exp_p)) begin
      failures++;
      $display("code %b: got %0d/%0b exp %0d/%0b", c, phase, valid, exp_p, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // the example: phase 5 (phi_5 is index 4 if phi_1 is index 0) then 7
    apply(code(4), 4, 1'b1);
    apply(code(6), 6, 1'b1);
    for (int r = 0; r < 20; r++)
      for (int j = 0; j < 10; j++) apply(code(j), j, 1'b1);
    apply(10'h000, 0, 1'b0);
    apply(10'h3ff, 0, 1'b0);
    // bubble: ones at 7,8,9,0 with 1 missing... code(1) with bit 9 cleared:
    // transitions at 1 and 8; the encoder takes the lowest
    apply(code(1) & ~10'b10_0000_0000, 1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
