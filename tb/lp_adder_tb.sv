// lp_adder_tb: random sequences of hold / add / load / clear operations with
// random addends; the accumulator is compared with a model after each clock.
// Every operation is exercised.
module lp_adder_tb;
  import mac_pkg::*;
  localparam int W = 20, AW = 16;
  logic          clk = 0, rst_n = 0;
  acc_op_e       op = ACC_HOLD;
  logic [AW-1:0] addend = '0;
  logic [W-1:0]  acc, model;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  lp_adder #(.W(W), .AW(AW)) dut (.*);

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
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      op     = acc_op_e'($urandom_range(0, 3));
      addend = AW'($urandom);
      seen[int'(op)]++;
      @(posedge clk);
      case (op)
        ACC_ADD:   model = model + W'(addend);
        ACC_LOAD:  model = W'(addend);
        ACC_CLEAR: model = '0;
        default:   ;
      endcase
      #1;
      checks++;
      if (acc != model) begin
        failures++;
        if (failures < 10) $display("FAIL it=%0d op=%s acc=%h exp=%h", it, op.name(), acc, model);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL op %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
