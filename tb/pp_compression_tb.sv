// pp_compression_tb: random rows and row enables; the sum and carry vectors
// must add (mod 2^16) to the sum of the enabled rows only, which shows both
// the carry-save addition and that bypassed rows are ignored. The carry
// vector's bit 0 must stay 0.
module pp_compression_tb;
  localparam int W = 16, NIN = 7;
  logic [W-1:0] rows   [NIN];
  logic         row_en [NIN];
  logic [W-1:0] sum_o, carry_o;
  logic [W-1:0] expect_v;
  int checks = 0, failures = 0;

  pp_compression #(.W(W), .NIN(NIN)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      expect_v = '0;
      for (int r = 0; r < NIN; r++) begin
        rows[r]   = W'($urandom);
        row_en[r] = (it < 10) ? 1'b1 : 1'($urandom);
        if (row_en[r]) expect_v += rows[r];
      end
      #1;
      checks++;
      if (W'(sum_o + carry_o) != expect_v || carry_o[0]) begin
        failures++;
        if (failures < 10) $display("FAIL it=%0d sum=%h carry=%h exp=%h", it, sum_o, carry_o, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
