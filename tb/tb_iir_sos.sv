// tb_iir_sos: checks one biquad section against a double-precision model.
//
// The section is set to the last section of the 500 kHz high-pass.  Random
// inputs (with random valid gaps) are filtered by the design and by a
// real-valued direct-form-I model with the same coefficients; outputs must
// agree within 2^-12 LSB plus the accumulated rounding, and arrive one clock
// after their input.  A DC input must decay to zero (high-pass).
module tb_iir_sos;
  import ssc_pkg::*;
  localparam coef_t B0 = coef_t'(HPF500K[2][0]);
  localparam coef_t B1 = coef_t'(HPF500K[2][1]);
  localparam coef_t B2 = coef_t'(HPF500K[2][2]);
  localparam coef_t A1 = coef_t'(HPF500K[2][3]);
  localparam coef_t A2 = coef_t'(HPF500K[2][4]);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t x = '0, y;
  logic out_valid;
  int checks = 0, failures = 0;

  iir_sos #(.B0(B0), .B1(B1), .B2(B2), .A1(A1), .A2(A2)) dut (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real q = real'(1 << COEF_Q);
  real rx1 = 0, rx2 = 0, ry1 = 0, ry2 = 0;

  initial begin
    real xin, yr, ydut, maxe;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    maxe = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      xin = (n < 2000) ? real'($urandom_range(0, 2000)) - 1000.0 : 50.0;
      x = sample_t'(longint'(xin * 65536.0));
      if (in_valid) begin
        yr = (real'(B0) * xin + real'(B1) * rx1 + real'(B2) * rx2
              - real'(A1) * ry1 - real'(A2) * ry2) / q;
        rx2 = rx1; rx1 = xin; ry2 = ry1; ry1 = yr;
      end
      @(negedge clk);
      if (in_valid) begin
        ydut = real'(y) / 65536.0;
        checks++;
        if (!out_valid || (ydut - yr > 0.01) || (yr - ydut > 0.01)) begin
          failures++;
          if (failures < 5) $display("n %0d: y %f ref %f", n, ydut, yr);
        end
        if (ydut - yr > maxe) maxe = ydut - yr;
      end
      in_valid = 1'b0;
    end
    checks++;
    if (ry1 > 0.01 || ry1 < -0.01) begin failures++; $display("DC not removed: %f", ry1); end
    checks++;
    if (real'(y) / 65536.0 > 0.01 || real'(y) / 65536.0 < -0.01) begin failures++; $display("DC not removed in design"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
