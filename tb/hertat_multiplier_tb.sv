// hertat_multiplier_tb: all 65,536 pairs of 8-bit operands against the
// integer product. Also checks the 41H x 22H example (8A2H with a single
// partial-product row) and that the split and Booth paths were exercised.
module hertat_multiplier_tb;
  localparam int N = 8;
  logic [N-1:0]   m, q;
  logic [2*N-1:0] p;
  logic           split, booth;
  logic [3:0]     rows_active;
  int checks = 0, failures = 0;
  int n_split = 0, n_booth = 0, n_one_row = 0;

  hertat_multiplier #(.N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        m = N'(i); q = N'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d x %0d = %0d", i, j, p);
        end
        if (split) n_split++;
        if (booth) n_booth++;
        if (rows_active == 1) n_one_row++;
      end
    end
    m = 8'h41; q = 8'h22;
    #1;
    checks++;
    if (p != 16'h08A2 || rows_active != 1 || split) begin
      failures++;
      $display("FAIL example: p=%h rows=%0d", p, rows_active);
    end
    checks++;
    if (n_split == 0 || n_booth == 0 || n_one_row == 0) begin
      failures++;
      $display("FAIL coverage split=%0d booth=%0d one_row=%0d", n_split, n_booth, n_one_row);
    end
    $display("split=%0d booth=%0d single_row=%0d", n_split, n_booth, n_one_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
