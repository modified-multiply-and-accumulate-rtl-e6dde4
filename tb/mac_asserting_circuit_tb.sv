// mac_asserting_circuit_tb: random classes, window marks and idle cycles. A
// model pipeline two stages deep predicts every enable, the accumulator
// operation and out_valid (three cycles after a window's last pixel).
module mac_asserting_circuit_tb;
  import mac_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_first = 0, in_last = 0;
  pix_class_e pix_class = PIX_MUL;
  logic       latch1_en, const_en, latch2_en, latch2_sel_const, out_valid;
  acc_op_e    acc_op, exp_op;
  int checks = 0, failures = 0;
  int seen_op [4] = '{0, 0, 0, 0};
  // model pipeline: {valid, first, last, class}
  logic [4:0] m1, m2;
  logic       m_out;

  mac_asserting_circuit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0b want=%0b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    m1 = '0; m2 = '0; m_out = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 5) != 0);
      in_first  = 1'($urandom);
      in_last   = 1'($urandom);
      pix_class = pix_class_e'($urandom_range(0, 3));
      #1;
      expect_bit("latch1_en", latch1_en, in_valid && pix_class == PIX_MUL);
      expect_bit("const_en",  const_en,  in_valid && pix_class == PIX_ONE);
      expect_bit("latch2_en", latch2_en, m1[4] && (m1[1:0] == 2'(PIX_MUL) || m1[1:0] == 2'(PIX_ONE)));
      if (m1[4]) expect_bit("latch2_sel_const", latch2_sel_const, m1[1:0] == 2'(PIX_ONE));
      if (!m2[4])                      exp_op = ACC_HOLD;
      else if (m2[1:0] == 2'(PIX_ZERO)) exp_op = m2[3] ? ACC_CLEAR : ACC_HOLD;
      else                              exp_op = m2[3] ? ACC_LOAD : ACC_ADD;
      checks++;
      if (acc_op != exp_op) begin
        failures++;
        if (failures < 10) $display("FAIL acc_op %s want %s", acc_op.name(), exp_op.name());
      end
      seen_op[int'(exp_op)]++;
      expect_bit("out_valid", out_valid, m_out);
      @(posedge clk);
      m_out = m2[4] && m2[2];
      m2 = m1;
      m1 = {in_valid, in_first, in_last, 2'(pix_class)};
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen_op[k] == 0) begin failures++; $display("FAIL acc op %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
