// sign_extension_tb: random row magnitudes and enables; an enabled row must
// come out as the two's-complement negative of its magnitude minus one
// (so that adding the glue circuit's +1 completes the negation), a disabled
// row unchanged.
module sign_extension_tb;
  localparam int N = 8, NROWS = 6, W = 16;
  logic [W-1:0] row_mag [NROWS];
  logic         sx_en   [NROWS];
  logic [W-1:0] row_out [NROWS];
  int checks = 0, failures = 0;

  sign_extension #(.N(N), .NROWS(NROWS)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int r = 0; r < NROWS; r++) begin
        row_mag[r] = W'($urandom_range(0, 1 << 10));
        sx_en[r]   = 1'($urandom);
      end
      #1;
      for (int r = 0; r < NROWS; r++) begin
        checks++;
        if (sx_en[r] ? (W'(row_out[r] + 1'b1) != W'(0 - int'(row_mag[r]))) : (row_out[r] != row_mag[r])) begin
          failures++;
          $display("FAIL row %0d mag=%h en=%0b out=%h", r, row_mag[r], sx_en[r], row_out[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
