// mult_detection_logic_tb: every pair of 8-bit operands; effective widths are
// recomputed here as the smallest w with value < 2^w.
module mult_detection_logic_tb;
  localparam int N = 8;
  logic [N-1:0] m, q;
  logic [3:0]   m_len, q_len;
  logic         m_zero, q_zero;
  int checks = 0, failures = 0;

  mult_detection_logic #(.N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int width_of(input int v);
    int w = 0;
    while ((1 << w) <= v) w++;
    return w;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j += 17) begin
        m = N'(i); q = N'(j);
        #1;
        checks++;
        if (int'(m_len) != width_of(i) || int'(q_len) != width_of(j) ||
            m_zero != (i == 0) || q_zero != (j == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d q=%0d len %0d %0d", i, j, m_len, q_len);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
