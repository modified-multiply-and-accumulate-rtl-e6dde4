// mac_detection_logic_tb: a stream of pixels and constants drawn from small
// sets (so that repeats happen) with idle cycles. The class of each pixel is
// predicted from a model that remembers the last pixel/constant pair that
// reloaded the product register.
module mac_detection_logic_tb;
  import mac_pkg::*;
  localparam int N = 8;
  logic         clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] pixel = '0, coef = '0;
  pix_class_e   pix_class, exp_cls;
  logic         mref_valid;
  logic [N-1:0] mref_pix, mref_coef;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  mac_detection_logic #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mref_valid = 0; mref_pix = '0; mref_coef = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      pixel    = N'($urandom_range(0, 4));
      coef     = N'($urandom_range(2, 3));
      #1;
      if (pixel == 0)                                                   exp_cls = PIX_ZERO;
      else if (pixel == 1)                                              exp_cls = PIX_ONE;
      else if (mref_valid && pixel == mref_pix && coef == mref_coef)    exp_cls = PIX_REUSE;
      else                                                              exp_cls = PIX_MUL;
      checks++;
      if (pix_class != exp_cls) begin
        failures++;
        if (failures < 10) $display("FAIL it=%0d pix=%0d coef=%0d cls=%s exp=%s",
                                    it, pixel, coef, pix_class.name(), exp_cls.name());
      end
      if (in_valid) begin
        seen[int'(exp_cls)]++;
        if (exp_cls == PIX_MUL || exp_cls == PIX_ONE) begin
          mref_valid = 1; mref_pix = pixel; mref_coef = coef;
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL class %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
