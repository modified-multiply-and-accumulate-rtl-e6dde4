// hybrid_encoder_tb: runs every 8-bit multiplier value through the encoder.
// For each it rebuilds the expected decision from the bit pattern: no split
// for at most three 1s, otherwise halves; per segment the category from the
// number of 1s and whether bit 0 is set, and the 1 positions, which must
// reproduce the segment's value. Also checks the 22H example (category D).
module hybrid_encoder_tb;
  import mac_pkg::*;
  localparam int N = 8;
  localparam int H = N / 2;

  logic [N-1:0] q;
  logic         split;
  cat_e         seg_cat [2];
  logic [2:0]   seg_p0 [2], seg_p1 [2], seg_p2 [2];
  logic [3:0]   ones;
  int checks = 0, failures = 0;

  hybrid_encoder #(.N(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popc(input int v);
    int c = 0;
    for (int b = 0; b < 32; b++) c += (v >> b) & 1;
    return c;
  endfunction

  task automatic check_seg(input int s, input int val);
    int   n;
    int   rebuilt;
    cat_e exp_cat;
    n = popc(val);
    case (n)
      0: exp_cat = CAT_NONE;
      1: exp_cat = ((val & 1) != 0) ? CAT_A : CAT_B;
      2: exp_cat = ((val & 1) != 0) ? CAT_C : CAT_D;
      3: exp_cat = ((val & 1) != 0) ? CAT_E : CAT_F;
      default: exp_cat = CAT_BOOTH;
    endcase
    checks++;
    if (seg_cat[s] != exp_cat) begin
      failures++;
      $display("FAIL q=%02h seg%0d cat=%s exp=%s", q, s, seg_cat[s].name(), exp_cat.name());
    end
    if (n >= 1 && n <= 3) begin
      rebuilt = (1 << seg_p0[s]);
      if (n >= 2) rebuilt += (1 << seg_p1[s]);
      if (n >= 3) rebuilt += (1 << seg_p2[s]);
      checks++;
      if (rebuilt != val || (n >= 2 && seg_p1[s] <= seg_p0[s]) || (n >= 3 && seg_p2[s] <= seg_p1[s])) begin
        failures++;
        $display("FAIL q=%02h seg%0d positions %0d %0d %0d", q, s, seg_p0[s], seg_p1[s], seg_p2[s]);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      q = N'(v);
      #1;
      checks++;
      if (int'(ones) != popc(v) || split != (popc(v) > 3)) begin
        failures++;
        $display("FAIL q=%02h ones=%0d split=%0b", q, ones, split);
      end
      if (popc(v) <= 3) begin
        check_seg(0, v);
        checks++;
        if (seg_cat[1] != CAT_NONE) begin failures++; $display("FAIL q=%02h seg1 used", q); end
      end else begin
        check_seg(0, v & ((1 << H) - 1));
        check_seg(1, v >> H);
      end
    end
    // Worked example: multiplier 22H has 1s in bits 2 and 6 (1-based): category D.
    q = 8'h22;
    #1;
    checks++;
    if (split || seg_cat[0] != CAT_D || seg_p0[0] != 3'd1 || seg_p1[0] != 3'd5) begin
      failures++;
      $display("FAIL 22H example: cat=%s p0=%0d p1=%0d", seg_cat[0].name(), seg_p0[0], seg_p1[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
