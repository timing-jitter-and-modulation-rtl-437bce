// tb_mux_ctrl: checks the MUX phase selection.
//
// Random SDM values in -3..+4 arrive on random ticks.  A reference model
// keeps sel = (sel - y) mod 10 and the sum of every three consecutive values
// (one reference period); both outputs must match it, and nothing may change
// without a tick.
module tb_mux_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic signed [3:0] sdm_y = '0;
  logic [3:0] sel;
  logic signed [5:0] ref_sum;
  int checks = 0, failures = 0;

  mux_ctrl dut (.clk, .rst_n, .tick, .sdm_y, .sel, .ref_sum);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_sel, m_part, m_sum, m_cnt;
    m_sel = 0; m_part = 0; m_sum = 0; m_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      tick  = ($urandom_range(0, 2) != 0);
      sdm_y = 4'($signed($urandom_range(0, 7)) - 3);
      if (tick) begin
        m_sel = (m_sel - int'(sdm_y) + 10) % 10;
        m_part += int'(sdm_y);
        m_cnt++;
        if (m_cnt == 3) begin m_sum = m_part; m_part = 0; m_cnt = 0; end
      end
      @(posedge clk);
      #1;
      checks++;
      if (int'(sel) != m_sel || int'(ref_sum) != m_sum) begin
        failures++;
        if (failures < 5) $display("n %0d: sel %0d/%0d sum %0d/%0d", n, sel, m_sel, ref_sum, m_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
