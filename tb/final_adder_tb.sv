// final_adder_tb: random addends and carry-in with column enables covering
// the low k columns (k = 0..16). The result must be the true sum masked to
// the enabled columns; with all columns enabled the carry out is checked too.
module final_adder_tb;
  localparam int W = 16;
  logic [W-1:0] a, b, col_en, s;
  logic         cin, cout;
  logic [W:0]   full;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int k;
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      k = it % (W + 1);
      col_en = (k == W) ? '1 : W'((1 << k) - 1);
      #1;
      full = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      checks++;
      if (s != (full[W-1:0] & col_en) || (k == W && cout != full[W])) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%0b k=%0d s=%h", a, b, cin, k, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
