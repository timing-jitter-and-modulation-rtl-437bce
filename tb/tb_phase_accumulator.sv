// tb_phase_accumulator: checks the phase accumulator.
//
// First the example of the description: starting from 0.5 UI (5 steps),
// shifts of +0.2 UI and +0.3 UI must give 0.7 UI and 1.0 UI.  Then random
// shifts in -5..+4 with random valid gaps are summed by a model and compared
// every clock; clear must restart the sum at zero.
module tb_phase_accumulator;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [3:0] shift = '0;
  logic signed [23:0] acc;
  logic out_valid;
  int checks = 0, failures = 0;

  phase_accumulator dut (.clk, .rst_n, .clear, .in_valid, .shift, .acc, .out_valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int s, bit v, inout longint model);
    @(negedge clk) begin shift = 4'(s); in_valid = v; end
    if (v) model += s;
    @(negedge clk) in_valid = 1'b0;
    checks++;
    if (longint'(acc) != model || out_valid != v) begin
      failures++;
      if (failures < 5) $display("acc %0d exp %0d", acc, model);
    end
  endtask

  initial begin
    longint m;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    m = 0;
    step(5, 1'b1, m);
    step(2, 1'b1, m);
    checks++; if (acc != 24'sd7) failures++;
    step(3, 1'b1, m);
    checks++; if (acc != 24'sd10) failures++;
    for (int n = 0; n < 4000; n++) step($urandom_range(0, 9) - 5, $urandom_range(0, 4) != 0, m);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    m = 0;
    checks++; if (acc != 0) failures++;
    for (int n = 0; n < 500; n++) step($urandom_range(0, 9) - 5, 1'b1, m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
