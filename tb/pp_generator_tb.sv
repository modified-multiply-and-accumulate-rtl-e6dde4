// pp_generator_tb: drives the partial-product generator with every pair of
// 8-bit operands, the encoder's decision for the multiplier being worked out
// here in the testbench. The signed sum of the rows must equal the product,
// a multiplier with at most three 1s must give exactly one row, and a Booth
// half (1111) exactly two rows. Checks the 41H x 22H example row by value.
module pp_generator_tb;
  import mac_pkg::*;
  localparam int N = 8, H = 4, R = 3, NROWS = 6;

  logic [N-1:0]   m, q;
  logic           split;
  cat_e           seg_cat [2];
  logic [2:0]     seg_p0 [2], seg_p1 [2], seg_p2 [2];
  logic [2*N-1:0] row_mag [NROWS];
  logic           row_neg [NROWS];
  logic           row_used[NROWS];
  int checks = 0, failures = 0;

  pp_generator #(.N(N)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encoder decision worked out independently for one segment value.
  task automatic set_seg(input int s, input int val);
    int pos [3];
    int n;
    n = 0;
    pos = '{0, 0, 0};
    for (int b = 0; b < N; b++) if (((val >> b) & 1) != 0) begin
      if (n < 3) pos[n] = b;
      n++;
    end
    seg_p0[s] = 3'(pos[0]); seg_p1[s] = 3'(pos[1]); seg_p2[s] = 3'(pos[2]);
    case (n)
      0: seg_cat[s] = CAT_NONE;
      1: seg_cat[s] = ((val & 1) != 0) ? CAT_A : CAT_B;
      2: seg_cat[s] = ((val & 1) != 0) ? CAT_C : CAT_D;
      3: seg_cat[s] = ((val & 1) != 0) ? CAT_E : CAT_F;
      default: seg_cat[s] = CAT_BOOTH;
    endcase
  endtask

  function automatic int popc(input int v);
    int c = 0;
    for (int b = 0; b < 32; b++) c += (v >> b) & 1;
    return c;
  endfunction

  // Rows a half contributes: none if zero, two Booth digits (-1, +1) if 1111,
  // otherwise the single category row.
  function automatic int half_rows(input int h);
    return (h == 0) ? 0 : (h == 15) ? 2 : 1;
  endfunction

  int sum, used;

  initial begin
    for (int qi = 0; qi < 256; qi++) begin
      q = 8'(qi);
      split = popc(qi) > 3;
      if (!split) begin
        set_seg(0, qi);
        set_seg(1, 0);
      end else begin
        set_seg(0, qi & 15);
        set_seg(1, qi >> 4);
      end
      for (int mi = 0; mi < 256; mi++) begin
        m = 8'(mi);
        #1;
        sum = 0; used = 0;
        for (int r = 0; r < NROWS; r++) begin
          if (row_used[r]) used++;
          if (row_neg[r]) sum -= int'(row_mag[r]);
          else            sum += int'(row_mag[r]);
        end
        checks++;
        if (sum != mi * qi) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d q=%0d rows sum %0d", mi, qi, sum);
        end
        checks++;
        if ((!split && used != (qi != 0 ? 1 : 0)) ||
            (split && used != half_rows(qi & 15) + half_rows(qi >> 4))) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d q=%0d rows used %0d", mi, qi, used);
        end
      end
    end
    // 41H x 22H: category D, single row ((41H << 4) + 41H) << 1 = 8A2H.
    m = 8'h41; q = 8'h22; split = 1'b0; set_seg(0, 'h22); set_seg(1, 0);
    #1;
    checks++;
    if (row_mag[0] != 16'h08A2 || row_neg[0] || !row_used[0]) begin
      failures++;
      $display("FAIL example row %h", row_mag[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
