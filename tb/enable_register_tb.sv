// enable_register_tb: random data and enables over many clocks; the register
// must load on an enabled edge, hold otherwise, and clear on reset.
module enable_register_tb;
  localparam int W = 12;
  logic         clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  enable_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q != model) begin failures++; $display("FAIL it=%0d q=%h exp=%h", it, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
