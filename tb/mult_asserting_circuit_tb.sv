// mult_asserting_circuit_tb: random detection results and row-use flags. Row
// enables must follow row use unless an operand is zero; exactly the columns
// below m_len + q_len must be enabled.
module mult_asserting_circuit_tb;
  localparam int N = 8, NROWS = 6;
  logic [3:0]  m_len, q_len;
  logic        m_zero, q_zero;
  logic        row_used [NROWS];
  logic        row_en   [NROWS];
  logic [15:0] col_en;
  int checks = 0, failures = 0;

  mult_asserting_circuit #(.N(N), .NROWS(NROWS)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int w;
      logic [15:0] exp_col;
      m_len = 4'($urandom_range(0, 8));
      q_len = 4'($urandom_range(0, 8));
      m_zero = (m_len == 0);
      q_zero = (q_len == 0);
      for (int r = 0; r < NROWS; r++) row_used[r] = 1'($urandom);
      #1;
      w = int'(m_len) + int'(q_len);
      exp_col = (m_zero || q_zero) ? 16'h0 : (w >= 16) ? 16'hFFFF : 16'((1 << w) - 1);
      checks++;
      if (col_en != exp_col) begin
        failures++;
        $display("FAIL m_len=%0d q_len=%0d col_en=%h exp=%h", m_len, q_len, col_en, exp_col);
      end
      for (int r = 0; r < NROWS; r++) begin
        checks++;
        if (row_en[r] != (row_used[r] && !m_zero && !q_zero)) begin
          failures++;
          $display("FAIL row %0d", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
