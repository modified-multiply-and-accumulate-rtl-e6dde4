// glue_circuit_tb: every combination of negate flags and row enables for six
// rows. The sign-extension enables must be the AND of the two, and carry-in
// plus correction row must together count the negated active rows.
module glue_circuit_tb;
  localparam int N = 8, NROWS = 6;
  logic         row_neg [NROWS];
  logic         row_en  [NROWS];
  logic         sx_en   [NROWS];
  logic [15:0]  corr_row;
  logic         fa_cin;
  int checks = 0, failures = 0;
  int k;

  glue_circuit #(.N(N), .NROWS(NROWS)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * NROWS)); v++) begin
      k = 0;
      for (int r = 0; r < NROWS; r++) begin
        row_neg[r] = 1'((v >> r) & 1);
        row_en[r]  = 1'((v >> (r + NROWS)) & 1);
        if (row_neg[r] && row_en[r]) k++;
      end
      #1;
      for (int r = 0; r < NROWS; r++) begin
        checks++;
        if (sx_en[r] != (row_neg[r] & row_en[r])) begin failures++; $display("FAIL sx_en v=%0h", v); end
      end
      checks++;
      if (int'(fa_cin) + int'(corr_row) != k || fa_cin != (k != 0)) begin
        failures++;
        $display("FAIL v=%0h k=%0d cin=%0b corr=%0d", v, k, fa_cin, corr_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
